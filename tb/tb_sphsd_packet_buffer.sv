// End-to-end testbench of the SPHSD packet buffer at reduced size.
//
// Random packets of random flows enter at close to line rate; an arbiter model
// requests arrived packets in random order of flows (per flow in order). The
// reference model keeps every flow's byte stream and predicts each output word
// and the cycle it must appear in: READ_LAT cycles after its request. Three
// traffic phases make the blocks take every path: a heavy input phase with few
// requests (blocks go through the tail buffer to DRAM and are read back), a
// drain phase, and a light phase where packets are requested at once (full
// and partial blocks over the short-cut). The test also counts how often each
// mechanism occurred and fails if one never did.
module tb_sphsd_packet_buffer;
  localparam int unsigned W = 64, Q = 4, K = 4, MAXLEN = 64, RDL = 4;
  localparam int unsigned WB = W / 8;
  localparam int unsigned NW = $clog2(WB + 1);
  localparam int unsigned FW = $clog2(Q);
  localparam int unsigned DW = $clog2(K);
  localparam int unsigned LW = $clog2(MAXLEN + 1);
  localparam int unsigned READ_LAT = Q * K + 2 * K + RDL + 8;
  localparam int unsigned MAXW = (MAXLEN + WB - 1) / WB;
  localparam int unsigned HSLOTS = 2 ** $clog2(2 * (READ_LAT + MAXW));
  localparam int unsigned SW = $clog2(HSLOTS);
  localparam int unsigned TB_DEPTH = Q * (K + 1) / 2;
  localparam int unsigned CW = $clog2(TB_DEPTH + 1);
  localparam int NCYC = 12000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic          in_valid;
  logic [FW-1:0] in_flow;
  logic [W-1:0]  in_data;
  logic [NW-1:0] in_nbytes;
  logic          pr_valid, pr_ready;
  logic [FW-1:0] pr_flow;
  logic [LW-1:0] pr_len;
  logic          out_valid, out_sop, out_eop;
  logic [FW-1:0] out_flow;
  logic [W-1:0]  out_data;
  logic [NW-1:0] out_nbytes;
  logic          dwv, drv, rspv;
  logic [DW-1:0] dwb, drb;
  logic [FW-1:0] dwf, drf;
  logic [W-1:0]  dwd, rspd;
  logic [SW-1:0] drt, rspt;
  logic [CW-1:0] tail_used;
  logic          tail_ovf, ord_ovf, req_ovf, late;
  logic          ev_block, ev_xfer, ev_skip, ev_sc_full, ev_sc_partial, ev_cached;
  logic [NW-1:0] sc_fill;
  int            dram_err, dram_wr, dram_rd;

  sphsd_packet_buffer #(.W(W), .Q(Q), .K(K), .MAXLEN(MAXLEN), .DRAM_RD_LAT(RDL)) dut (
    .clk, .rst_n,
    .in_valid, .in_flow, .in_data, .in_nbytes,
    .pr_valid, .pr_flow, .pr_len, .pr_ready,
    .out_valid, .out_flow, .out_data, .out_nbytes, .out_sop, .out_eop,
    .dram_wr_valid(dwv), .dram_wr_bank(dwb), .dram_wr_flow(dwf), .dram_wr_data(dwd),
    .dram_rd_valid(drv), .dram_rd_bank(drb), .dram_rd_flow(drf), .dram_rd_tag(drt),
    .dram_rsp_valid(rspv), .dram_rsp_tag(rspt), .dram_rsp_data(rspd),
    .tail_used, .tail_overflow(tail_ovf), .order_overflow(ord_ovf), .req_overflow(req_ovf),
    .late, .ev_block, .ev_xfer, .ev_skip, .ev_sc_full, .ev_sc_partial, .ev_cached, .sc_fill
  );

  dram_model #(.W(W), .Q(Q), .K(K), .SW(SW), .DQ(512), .RD_LAT(RDL)) u_dram (
    .clk, .rst_n,
    .wr_valid(dwv), .wr_bank(dwb), .wr_flow(dwf), .wr_data(dwd),
    .rd_valid(drv), .rd_bank(drb), .rd_flow(drf), .rd_tag(drt),
    .rsp_valid(rspv), .rsp_tag(rspt), .rsp_data(rspd),
    .errors_o(dram_err), .writes_o(dram_wr), .reads_o(dram_rd)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // reference model
  logic [7:0] stream [Q][$];   // arrived bytes of each flow, not yet requested
  int         pend   [Q][$];   // lengths of arrived packets not yet requested
  typedef struct {
    int            due;
    logic [FW-1:0] flow;
    logic [W-1:0]  data;
    int            nb;
    bit            sop, eop;
  } exp_t;
  exp_t expq[$];

  // mechanism counters
  int n_block = 0, n_xfer = 0, n_skip = 0, n_scf = 0, n_scp = 0, n_cached = 0;
  int n_drd = 0, n_stall = 0, n_multi = 0, n_backlog = 0, n_words = 0, max_used = 0;

  always @(posedge clk) if (rst_n) begin
    n_block  += int'(ev_block);
    n_xfer   += int'(ev_xfer);
    n_skip   += int'(ev_skip);
    n_scf    += int'(ev_sc_full);
    n_scp    += int'(ev_sc_partial);
    n_cached += int'(ev_cached);
    n_drd    += int'(drv);
    if (int'(tail_used) > K) n_backlog++;
    if (int'(tail_used) > max_used) max_used = int'(tail_used);
  end

  // output checker (samples between edges)
  always @(negedge clk) if (rst_n) begin
    if (late) begin failures++; $display("late block at cycle %0d", cyc); end
    if (out_valid) begin
      checks++;
      n_words++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected output word at cycle %0d", cyc);
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (e.due != cyc || e.flow != out_flow || e.data != out_data || e.nb != int'(out_nbytes) ||
            e.sop != out_sop || e.eop != out_eop) begin
          failures++;
          if (failures < 10)
            $display("mismatch cyc %0d (due %0d): flow %0d/%0d data %h/%h nb %0d/%0d sop %0d/%0d eop %0d/%0d",
                     cyc, e.due, out_flow, e.flow, out_data, e.data, out_nbytes, e.nb,
                     out_sop, e.sop, out_eop, e.eop);
        end
      end
    end else if (expq.size() != 0 && expq[0].due == cyc) begin
      failures++; $display("missing output word at cycle %0d", cyc);
    end
  end

  // stimulus
  int phase;
  int cur_len = 0, cur_rem = 0;
  logic [FW-1:0] cur_flow = '0;
  int done_flow = -1, done_len = 0;

  task automatic request(input int f);
    int len, o, nwords;
    len = pend[f].pop_front();
    pr_valid = 1'b1;
    pr_flow  = FW'(f);
    pr_len   = LW'(len);
    nwords = (len + WB - 1) / WB;
    if (nwords > 1) n_multi++;
    for (int i = 0; i < nwords; i++) begin
      exp_t e;
      int nb;
      nb = (len - i * WB > int'(WB)) ? int'(WB) : len - i * WB;
      e.due  = cyc + i + READ_LAT;
      e.flow = FW'(f);
      e.data = '0;
      for (int b = 0; b < nb; b++) e.data[8*b +: 8] = stream[f].pop_front();
      e.nb  = nb;
      e.sop = (i == 0);
      e.eop = (i == nwords - 1);
      expq.push_back(e);
    end
    o = 0;
  endtask

  initial begin
    int p_in, p_req, nfl;
    in_valid = 0; in_flow = '0; in_data = '0; in_nbytes = '0;
    pr_valid = 0; pr_flow = '0; pr_len = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      phase = (c < 3000) ? 0 : (c < 6000) ? 1 : (c < 9000) ? 2 : 3;
      case (phase)
        0: begin p_in = 95; p_req = 8;  end
        1: begin p_in = 30; p_req = 90; end
        2: begin p_in = 20; p_req = 100; end
        default: begin p_in = 0; p_req = 100; end
      endcase
      // a packet whose last word entered at the previous edge is now stored
      if (done_flow >= 0) begin pend[done_flow].push_back(done_len); done_flow = -1; end
      // input side
      in_valid = 1'b0;
      if (cur_rem == 0 && ($urandom % 100) < p_in) begin
        cur_flow = FW'($urandom % Q);
        if (phase == 2 && ($urandom % 2) == 0) cur_len = 1 + int'($urandom % 6);
        else cur_len = ($urandom % 3 == 0) ? int'(MAXLEN) - int'($urandom % 5) : 1 + int'($urandom % MAXLEN);
        cur_rem = cur_len;
      end
      if (cur_rem > 0) begin
        int nb;
        nb = (cur_rem > int'(WB)) ? int'(WB) : cur_rem;
        in_valid  = 1'b1;
        in_flow   = cur_flow;
        in_nbytes = NW'(nb);
        in_data   = '0;
        for (int b = 0; b < nb; b++) begin
          logic [7:0] v;
          v = 8'($urandom);
          in_data[8*b +: 8] = v;
          stream[cur_flow].push_back(v);
        end
        for (int b = nb; b < int'(WB); b++) in_data[8*b +: 8] = 8'($urandom);
        cur_rem -= nb;
        if (cur_rem == 0) begin done_flow = int'(cur_flow); done_len = cur_len; end
      end
      // request side
      pr_valid = 1'b0;
      nfl = 0;
      for (int f = 0; f < int'(Q); f++) if (pend[f].size() > 0) nfl++;
      if (nfl > 0 && ($urandom % 100) < p_req) begin
        if (!pr_ready) n_stall++;
        else begin
          int s;
          s = int'($urandom % Q);
          for (int i = 0; i < int'(Q); i++) begin
            int f;
            f = (s + i) % int'(Q);
            if (!pr_valid && pend[f].size() > 0) request(f);
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0; pr_valid = 1'b0;
    repeat (READ_LAT + 4 * MAXW) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d words never delivered", expq.size()); end
    checks++;
    if (tail_ovf || ord_ovf || req_ovf) begin failures++; $display("overflow flag set"); end
    checks++;
    if (dram_err != 0) begin failures++; $display("DRAM protocol errors: %0d", dram_err); end
    $display("words %0d blocks %0d xfer %0d skip %0d dram_rd %0d sc_full %0d sc_partial %0d cached %0d stall %0d multi %0d backlog %0d max_tail_used %0d",
             n_words, n_block, n_xfer, n_skip, n_drd, n_scf, n_scp, n_cached, n_stall, n_multi, n_backlog, max_used);
    checks++; if (n_block == 0)  begin failures++; $display("no block completed"); end
    checks++; if (n_xfer == 0)   begin failures++; $display("no DRAM write"); end
    checks++; if (n_skip == 0)   begin failures++; $display("no stale order entry skipped"); end
    checks++; if (n_drd == 0)    begin failures++; $display("no DRAM read"); end
    checks++; if (n_scf == 0)    begin failures++; $display("no full-block short-cut"); end
    checks++; if (n_scp == 0)    begin failures++; $display("no partial-block short-cut"); end
    checks++; if (n_cached == 0) begin failures++; $display("no cached re-request"); end
    checks++; if (n_stall == 0)  begin failures++; $display("no request stall"); end
    checks++; if (n_multi == 0)  begin failures++; $display("no multi-word packet"); end
    checks++; if (n_backlog == 0) begin failures++; $display("no overbooked DRAM queue"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
