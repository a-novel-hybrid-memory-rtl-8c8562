// Testbench of the tail transferor against a reference of its DRAM queues:
// random block arrivals fill per-DRAM order FIFOs and per-(flow, DRAM) block
// counts; random short-cut requests take priority. Checks, every cycle, that
// the transferor serves the first eligible DRAM queue in round-robin order,
// writes each DRAM at most once per K cycles, skips stale order entries,
// answers short-cuts from the list or the aggregation module, and that all
// blocks finally reach DRAM.
module tb_tail_transferor;
  localparam int unsigned Q = 3, K = 4, FW = 2, DW = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          sc_req, sc_full, oq_pop, lu_nonempty, rd_valid, rd_sc, peek, xfer, skip;
  logic [FW-1:0] sc_flow, oq_flow, lu_flow, rd_flow, peek_flow;
  logic [DW-1:0] sc_d, oq_sel, lu_d, rd_d;
  logic [K-1:0]  oq_nonempty;
  int checks = 0, failures = 0;

  int omem [K][256];
  int ord [K], owr [K];
  int lcnt [Q*K];
  int last_wr [K];
  int rr, cyc, n_xfer, n_skip, n_sc;

  tail_transferor #(.Q(Q), .K(K)) dut (
    .clk, .rst_n, .sc_req_i(sc_req), .sc_flow_i(sc_flow), .sc_d_i(sc_d), .sc_full_o(sc_full),
    .oq_nonempty_i(oq_nonempty), .oq_sel_o(oq_sel), .oq_flow_i(oq_flow), .oq_pop_o(oq_pop),
    .lu_flow_o(lu_flow), .lu_d_o(lu_d), .lu_nonempty_i(lu_nonempty),
    .rd_valid_o(rd_valid), .rd_sc_o(rd_sc), .rd_flow_o(rd_flow), .rd_d_o(rd_d),
    .peek_o(peek), .peek_flow_o(peek_flow), .xfer_o(xfer), .skip_o(skip)
  );

  always_comb begin
    for (int d = 0; d < int'(K); d++) oq_nonempty[d] = (owr[d] != ord[d]);
    oq_flow     = FW'(omem[oq_sel][ord[oq_sel] % 256]);
    lu_nonempty = lcnt[int'(lu_flow) * int'(K) + int'(lu_d)] > 0;
  end

  initial begin
    for (int d = 0; d < int'(K); d++) begin ord[d] = 0; owr[d] = 0; last_wr[d] = -100; end
    for (int i = 0; i < int'(Q * K); i++) lcnt[i] = 0;
    sc_req = 0; sc_flow = '0; sc_d = '0; rr = int'(K) - 1; cyc = 0;
    n_xfer = 0; n_skip = 0; n_sc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int exp_d, f, l, dec_l, pop_d;
      bit found;
      @(negedge clk);
      cyc++;
      sc_req  = (c < 2500) && ($urandom % 6 == 0);
      sc_flow = FW'($urandom % Q);
      sc_d    = DW'($urandom % K);
      #1;
      found = 0; exp_d = 0; dec_l = -1; pop_d = -1;
      for (int i = 0; i < int'(K); i++) begin
        int d;
        d = (rr + 1 + i) % int'(K);
        if (!found && owr[d] != ord[d] && cyc - last_wr[d] >= int'(K)) begin found = 1; exp_d = d; end
      end
      checks++;
      if (sc_req) begin
        l = int'(sc_flow) * int'(K) + int'(sc_d);
        if (oq_pop || sc_full != (lcnt[l] > 0) || rd_valid != (lcnt[l] > 0) || (rd_valid && !rd_sc) ||
            peek != (lcnt[l] == 0) || peek_flow != sc_flow || xfer || skip) begin
          failures++; $display("short-cut handling wrong at %0d", c);
        end
        n_sc++;
        dec_l = (lcnt[l] > 0) ? l : -1;
      end else if (found) begin
        f = omem[exp_d][ord[exp_d] % 256];
        l = f * int'(K) + exp_d;
        if (!oq_pop || int'(oq_sel) != exp_d || xfer != (lcnt[l] > 0) || skip != (lcnt[l] == 0) ||
            rd_valid != (lcnt[l] > 0) || rd_sc || peek) begin
          failures++; $display("transfer choice wrong at %0d: sel %0d exp %0d ne %b pop %0d xfer %0d lcnt %0d", c, oq_sel, exp_d, oq_nonempty, oq_pop, xfer, lcnt[l]);
        end
        if (xfer) begin n_xfer++; last_wr[exp_d] = cyc; dec_l = l; end
        if (skip) n_skip++;
        pop_d = exp_d;
        rr = exp_d;
      end else if (oq_pop || rd_valid || peek) begin
        failures++; $display("spurious action at %0d", c);
      end
      @(posedge clk);
      #1;
      if (dec_l >= 0) lcnt[dec_l]--;
      if (pop_d >= 0) ord[pop_d]++;
      // a new block arrives for a random flow and DRAM queue
      if (c < 2500 && ($urandom % 3 != 0)) begin
        int fa, da;
        fa = int'($urandom % Q); da = int'($urandom % K);
        omem[da][owr[da] % 256] = fa; owr[da]++;
        lcnt[fa * int'(K) + da]++;
      end
    end
    checks++;
    for (int i = 0; i < int'(Q * K); i++) if (lcnt[i] != 0) begin failures++; $display("blocks left"); break; end
    checks++;
    if (n_xfer == 0 || n_skip == 0 || n_sc == 0) failures++;
    $display("xfer %0d skip %0d short-cut %0d", n_xfer, n_skip, n_sc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
