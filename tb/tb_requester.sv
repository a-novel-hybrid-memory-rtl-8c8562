// Testbench of the per-flow round-robin requester: random packet requests of
// random flows and lengths. A reference working on absolute byte offsets of
// every flow predicts each delivery task (offset in block, byte count, span,
// sop/eop) and each block request: block n of a flow must be requested from
// DRAM n mod K exactly once as a new request, re-requested only when a packet
// starts inside it, and the head-buffer slots must follow the ring order.
// Also checks that pr_ready stalls the arbiter while a long packet is issued.
module tb_requester;
  localparam int unsigned W = 64, Q = 3, K = 3, MAXLEN = 40, HSLOTS = 64;
  localparam int unsigned WB = 8, NW = 4, OW = 3, FW = 2, DW = 2, LW = 6, SW = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          pr_valid, pr_ready, tk_valid, tk_span, tk_sop, tk_eop;
  logic [FW-1:0] pr_flow, tk_flow, rq0_flow, rq1_flow;
  logic [LW-1:0] pr_len;
  logic [OW-1:0] tk_off;
  logic [NW-1:0] tk_nbytes;
  logic [SW-1:0] tk_slot_lo, tk_slot_hi, rq0_slot, rq1_slot;
  logic          rq0_valid, rq0_re, rq1_valid;
  logic [DW-1:0] rq0_d, rq1_d;
  int checks = 0, failures = 0, n_re = 0, n_span = 0, n_stall = 0;

  requester #(.W(W), .Q(Q), .K(K), .MAXLEN(MAXLEN), .HSLOTS(HSLOTS)) dut (
    .clk, .rst_n, .pr_valid_i(pr_valid), .pr_flow_i(pr_flow), .pr_len_i(pr_len),
    .pr_ready_o(pr_ready), .tk_valid_o(tk_valid), .tk_flow_o(tk_flow), .tk_off_o(tk_off),
    .tk_nbytes_o(tk_nbytes), .tk_span_o(tk_span), .tk_slot_lo_o(tk_slot_lo),
    .tk_slot_hi_o(tk_slot_hi), .tk_sop_o(tk_sop), .tk_eop_o(tk_eop),
    .rq0_valid_o(rq0_valid), .rq0_d_o(rq0_d), .rq0_flow_o(rq0_flow), .rq0_slot_o(rq0_slot),
    .rq0_re_o(rq0_re), .rq1_valid_o(rq1_valid), .rq1_d_o(rq1_d), .rq1_flow_o(rq1_flow),
    .rq1_slot_o(rq1_slot)
  );

  int abs_off [Q];
  int max_req [Q];   // highest block index requested so far, -1 none
  int sp, prev_slot;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("%s", what); end
  endtask

  initial begin
    int cur_f, rem, first;
    for (int f = 0; f < int'(Q); f++) begin abs_off[f] = 0; max_req[f] = -1; end
    sp = 0; prev_slot = 0; rem = 0; cur_f = 0; first = 0;
    pr_valid = 0; pr_flow = '0; pr_len = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      int a, m, jlo, jhi, exp_lo, exp_hi;
      bit lo_req, span;
      @(negedge clk);
      pr_valid = 0;
      if (rem == 0) begin
        if ($urandom % 4 != 0) begin
          chk(pr_ready, "ready low while idle");
          pr_valid = 1; pr_flow = FW'($urandom % Q); pr_len = LW'(1 + $urandom % MAXLEN);
          cur_f = int'(pr_flow); rem = int'(pr_len); first = 1;
        end
      end else begin
        chk(!pr_ready, "ready high while busy");
        n_stall++;
      end
      #1;
      chk(tk_valid == (rem > 0), "task valid");
      if (rem > 0) begin
        a = abs_off[cur_f];
        m = (rem > int'(WB)) ? int'(WB) : rem;
        jlo = a / int'(WB);
        jhi = (a + m - 1) / int'(WB);
        span = (jhi != jlo);
        lo_req = first || (a % int'(WB) == 0);
        exp_lo = lo_req ? sp : prev_slot;
        exp_hi = lo_req ? sp + 1 : sp;
        chk(int'(tk_flow) == cur_f && int'(tk_off) == a % int'(WB) && int'(tk_nbytes) == m &&
            tk_span == span && tk_sop == first && tk_eop == (rem == m), "task fields");
        chk(int'(tk_slot_lo) == exp_lo % int'(HSLOTS), "slot lo");
        if (span) chk(int'(tk_slot_hi) == exp_hi % int'(HSLOTS), "slot hi");
        chk(rq0_valid == lo_req && rq1_valid == span, "request strobes");
        if (lo_req) begin
          chk(int'(rq0_d) == jlo % int'(K) && int'(rq0_flow) == cur_f &&
              int'(rq0_slot) == exp_lo % int'(HSLOTS), "request lo fields");
          if (rq0_re) begin
            n_re++;
            chk(jlo == max_req[cur_f], "re-request of a block not requested before");
          end else begin
            chk(jlo == max_req[cur_f] + 1, "new request not the next block");
            max_req[cur_f] = jlo;
          end
        end
        if (span) begin
          n_span++;
          chk(int'(rq1_d) == jhi % int'(K) && int'(rq1_flow) == cur_f &&
              int'(rq1_slot) == exp_hi % int'(HSLOTS), "request hi fields");
          chk(jhi == max_req[cur_f] + 1, "hi request not the next block");
          max_req[cur_f] = jhi;
        end
        sp = sp + int'(lo_req) + int'(span);
        prev_slot = span ? exp_hi : exp_lo;
        abs_off[cur_f] = a + m;
        rem = rem - m;
        first = 0;
      end
    end
    chk(n_re > 50 && n_span > 50 && n_stall > 50, "coverage");
    $display("re-requests %0d spans %0d stalls %0d", n_re, n_span, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
