// Testbench of the head transferor against a reference: random block requests
// wait in per-DRAM queues; random tail transfers add blocks to DRAM. Every
// cycle the reference predicts the DRAM read (round robin over queues whose
// block is in DRAM and whose DRAM was not read in the last K cycles), the
// short-cut or cached re-request (round robin over the other queues), the pops,
// and the head-buffer writes of the short-cut and DRAM responses.
module tb_head_transferor;
  localparam int unsigned W = 32, Q = 3, K = 3, HSLOTS = 32;
  localparam int unsigned FW = 2, DW = 2, SW = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic [K-1:0]         rb_ne, rb_re, rb_pop;
  logic [K-1:0][FW-1:0] rb_flow;
  logic [K-1:0][SW-1:0] rb_slot;
  logic          xfer, drv, rspv, sc_req, sc_full, scv, hba, hbb, hbbc, evc;
  logic [FW-1:0] xfer_f, drf, sc_f;
  logic [DW-1:0] xfer_d, drb, sc_d;
  logic [SW-1:0] drt, rspt, hbas, hbbs;
  logic [W-1:0]  rspd, scd, hbad, hbbd;
  int checks = 0, failures = 0, n_d = 0, n_s = 0, n_c = 0;

  head_transferor #(.W(W), .Q(Q), .K(K), .HSLOTS(HSLOTS)) dut (
    .clk, .rst_n, .rb_nonempty_i(rb_ne), .rb_flow_i(rb_flow), .rb_slot_i(rb_slot), .rb_re_i(rb_re),
    .rb_pop_o(rb_pop), .xfer_i(xfer), .xfer_flow_i(xfer_f), .xfer_d_i(xfer_d),
    .dram_rd_valid_o(drv), .dram_rd_bank_o(drb), .dram_rd_flow_o(drf), .dram_rd_tag_o(drt),
    .dram_rsp_valid_i(rspv), .dram_rsp_tag_i(rspt), .dram_rsp_data_i(rspd),
    .sc_req_o(sc_req), .sc_flow_o(sc_f), .sc_d_o(sc_d), .sc_full_i(sc_full),
    .sc_valid_i(scv), .sc_data_i(scd),
    .hba_we_o(hba), .hba_slot_o(hbas), .hba_data_o(hbad),
    .hbb_we_o(hbb), .hbb_slot_o(hbbs), .hbb_data_o(hbbd), .hbb_cached_o(hbbc), .ev_cached_o(evc)
  );

  int rq [K][$];         // entries {flow, slot, re}
  int dcnt [Q*K];
  bit fullf [Q*K];
  int last_rd [K];
  int rr_d, rr_s, cyc;

  always_comb begin
    for (int d = 0; d < int'(K); d++) begin
      rb_ne[d] = rq[d].size() > 0;
      {rb_flow[d], rb_slot[d], rb_re[d]} = rb_ne[d] ? (FW+SW+1)'(rq[d][0]) : '0;
    end
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    bit p_sc, p_c;
    int p_slot;
    logic [W-1:0] p_data;
    for (int i = 0; i < int'(Q * K); i++) begin dcnt[i] = 0; fullf[i] = 0; end
    for (int d = 0; d < int'(K); d++) last_rd[d] = -100;
    rr_d = int'(K) - 1; rr_s = int'(K) - 1; cyc = 0; p_sc = 0; p_c = 0; p_slot = 0;
    xfer = 0; xfer_f = '0; xfer_d = '0; rspv = 0; rspt = '0; rspd = '0; sc_full = 0;
    scv = 0; scd = '0; p_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      int ed, es, qd, qs;
      bit fd, fs, cached_s;
      @(negedge clk);
      cyc++;
      xfer = $urandom % 3 == 0; xfer_f = FW'($urandom % Q); xfer_d = DW'($urandom % K);
      rspv = $urandom % 2; rspt = SW'($urandom); rspd = $urandom;
      sc_full = $urandom % 2;
      scv = p_sc; scd = $urandom; p_data = scd;
      #1;
      fd = 0; fs = 0; ed = 0; es = 0;
      for (int i = 0; i < int'(K); i++) begin
        int d, e, fq, eq;
        bit cd, ce, ind, ine;
        d = (rr_d + 1 + i) % int'(K);
        e = (rr_s + 1 + i) % int'(K);
        if (rq[d].size() > 0) begin
          fq = (rq[d][0] >> (SW + 1)) * int'(K) + d;
          cd = (rq[d][0] & 1) && fullf[fq];
          ind = !cd && dcnt[fq] > 0;
          if (!fd && ind && cyc - last_rd[d] >= int'(K)) begin fd = 1; ed = d; end
        end
        if (rq[e].size() > 0) begin
          eq = (rq[e][0] >> (SW + 1)) * int'(K) + e;
          ce = (rq[e][0] & 1) && fullf[eq];
          ine = !ce && dcnt[eq] > 0;
          if (!fs && !ine) begin fs = 1; es = e; end
        end
      end
      // outputs of this cycle
      chk(drv == fd, "DRAM read strobe");
      if (fd) chk(int'(drb) == ed && drf == rb_flow[ed] && drt == rb_slot[ed], "DRAM read fields");
      cached_s = fs && rb_re[es] && fullf[int'(rb_flow[es]) * int'(K) + es];
      chk(sc_req == (fs && !cached_s) && evc == cached_s, "short-cut strobe");
      if (fs && !cached_s) chk(int'(sc_d) == es && sc_f == rb_flow[es], "short-cut fields");
      chk(rb_pop == ((fd ? K'(1) << ed : '0) | (fs ? K'(1) << es : '0)), "pops");
      chk(hba == rspv && hbas == rspt && hbad == rspd, "DRAM response write");
      chk(hbb == (p_c || p_sc) && (!hbb || (int'(hbbs) == p_slot && hbbc == p_c &&
          (p_c || hbbd == p_data))), "short-cut response write");
      @(posedge clk);
      #1;
      // reference update
      if (fd) begin
        qd = int'(rb_flow[ed]) * int'(K) + ed;
        dcnt[qd]--; fullf[qd] = 1; last_rd[ed] = cyc; rr_d = ed; n_d++;
        void'(rq[ed].pop_front());
      end
      p_sc = 0; p_c = 0;
      if (fs) begin
        qs = int'(rq[es][0] >> (SW + 1)) * int'(K) + es;
        p_slot = (rq[es][0] >> 1) & (int'(HSLOTS) - 1);
        if (cached_s) begin p_c = 1; n_c++; end
        else begin p_sc = 1; fullf[qs] = sc_full; n_s++; end
        rr_s = es;
        void'(rq[es].pop_front());
      end
      if (xfer) dcnt[int'(xfer_f) * int'(K) + int'(xfer_d)]++;
      if (c < 3500 && $urandom % 2 == 0) begin
        int d;
        d = int'($urandom % K);
        if (rq[d].size() < 8) rq[d].push_back(int'({FW'($urandom % Q), SW'($urandom), 1'($urandom % 2)}));
      end
    end
    chk(n_d > 100 && n_s > 20 && n_c > 20, "coverage");
    $display("dram reads %0d short-cuts %0d cached %0d", n_d, n_s, n_c);
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
