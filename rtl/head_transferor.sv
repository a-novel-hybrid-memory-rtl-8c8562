// Head transferor.
//
// Processes every block request as early as possible (the simple of the two
// head strategies). It counts, per flow and DRAM, the blocks that the tail
// transferor has written to DRAM and that were not read back yet. For the
// oldest request of each DRAM queue it then knows where the block is:
//  - in DRAM: read it, at most one DRAM read per cycle and one per DRAM every
//    K cycles; the data come back tagged with the head-buffer slot;
//  - not in DRAM: fetch it over the short-cut path from the tail part, which
//    returns a full block from the tail buffer or the partial block still
//    being aggregated (one short-cut per cycle, data one cycle later);
//  - a re-request (re = 1) of a block that was already fetched full needs no
//    memory access: the slot is only marked "use the flow's remainder"
//    (cached), since the head buffer still holds that block.
// Requests of one DRAM queue are served in order, so blocks of one flow and
// DRAM are fetched in order. Per (flow, DRAM) a bit remembers whether the last
// fetch was a full block, which is what a later re-request needs to know.
//
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of simulation assertions, which verilator reports as a
// net used both synchronously and asynchronously (SYNCASYNCNET). Intended;
// the assertions are not part of the circuit.
module head_transferor #(
  parameter int unsigned W      = sphsd_pkg::W_DEF,
  parameter int unsigned Q      = sphsd_pkg::Q_DEF,
  parameter int unsigned K      = sphsd_pkg::K_DEF,
  parameter int unsigned HSLOTS = 16384,
  parameter int unsigned DCW    = 16,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SW = $clog2(HSLOTS),
  localparam int unsigned BW = $clog2(K + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // request buffer heads
  input  logic [K-1:0]          rb_nonempty_i,
  input  logic [K-1:0][FW-1:0]  rb_flow_i,
  input  logic [K-1:0][SW-1:0]  rb_slot_i,
  input  logic [K-1:0]          rb_re_i,
  output logic [K-1:0]          rb_pop_o,
  // blocks written to DRAM by the tail transferor
  input  logic                  xfer_i,
  input  logic [FW-1:0]         xfer_flow_i,
  input  logic [DW-1:0]         xfer_d_i,
  // DRAM read command and response
  output logic                  dram_rd_valid_o,
  output logic [DW-1:0]         dram_rd_bank_o,
  output logic [FW-1:0]         dram_rd_flow_o,
  output logic [SW-1:0]         dram_rd_tag_o,
  input  logic                  dram_rsp_valid_i,
  input  logic [SW-1:0]         dram_rsp_tag_i,
  input  logic [W-1:0]          dram_rsp_data_i,
  // short-cut request and response
  output logic                  sc_req_o,
  output logic [FW-1:0]         sc_flow_o,
  output logic [DW-1:0]         sc_d_o,
  input  logic                  sc_full_i,
  input  logic                  sc_valid_i,
  input  logic [W-1:0]          sc_data_i,
  // head buffer write ports
  output logic                  hba_we_o,
  output logic [SW-1:0]         hba_slot_o,
  output logic [W-1:0]          hba_data_o,
  output logic                  hbb_we_o,
  output logic [SW-1:0]         hbb_slot_o,
  output logic [W-1:0]          hbb_data_o,
  output logic                  hbb_cached_o,
  // events
  output logic                  ev_cached_o
);
  localparam int unsigned QK = Q * K;
  localparam int unsigned IW = (QK > 1) ? $clog2(QK) : 1;

  logic [DCW-1:0] dcnt  [QK];
  logic           fullf [QK];
  logic [BW-1:0]  rbusy [K];
  logic [DW-1:0]  rr_d, rr_s;

  function automatic logic [IW-1:0] idx(input logic [FW-1:0] f, input logic [DW-1:0] d);
    return IW'(f) * IW'(K) + IW'(d);
  endfunction

  logic [K-1:0] cached, indram;
  always_comb begin
    for (int d = 0; d < K; d++) begin
      cached[d] = rb_nonempty_i[d] && rb_re_i[d] && fullf[idx(rb_flow_i[d], DW'(d))];
      indram[d] = rb_nonempty_i[d] && !cached[d] && (dcnt[idx(rb_flow_i[d], DW'(d))] != '0);
    end
  end

  logic          dfound, sfound;
  logic [DW-1:0] dsel, ssel;
  always_comb begin
    dfound = 1'b0; dsel = '0;
    sfound = 1'b0; ssel = '0;
    for (int i = 0; i < K; i++) begin
      logic [DW-1:0] d, e;
      d = DW'((int'(rr_d) + 1 + i) % K);
      e = DW'((int'(rr_s) + 1 + i) % K);
      if (!dfound && indram[d] && rbusy[d] == '0) begin
        dfound = 1'b1; dsel = DW'(d);
      end
      if (!sfound && rb_nonempty_i[e] && !indram[e]) begin
        sfound = 1'b1; ssel = DW'(e);
      end
    end
  end

  logic s_cached;
  assign s_cached = sfound && cached[ssel];

  always_comb begin
    rb_pop_o = '0;
    if (dfound) rb_pop_o[dsel] = 1'b1;
    if (sfound) rb_pop_o[ssel] = 1'b1;
  end

  assign dram_rd_valid_o = dfound;
  assign dram_rd_bank_o  = dsel;
  assign dram_rd_flow_o  = rb_flow_i[dsel];
  assign dram_rd_tag_o   = rb_slot_i[dsel];

  assign sc_req_o  = sfound && !s_cached;
  assign sc_flow_o = rb_flow_i[ssel];
  assign sc_d_o    = ssel;

  // second write port: short-cut data or cached marker, one cycle later
  logic          p_sc, p_cached;
  logic [SW-1:0] p_slot;
  assign hba_we_o     = dram_rsp_valid_i;
  assign hba_slot_o   = dram_rsp_tag_i;
  assign hba_data_o   = dram_rsp_data_i;
  assign hbb_we_o     = p_cached || (p_sc && sc_valid_i);
  assign hbb_slot_o   = p_slot;
  assign hbb_data_o   = sc_data_i;
  assign hbb_cached_o = p_cached;
  assign ev_cached_o  = s_cached;

  logic [IW-1:0] qd, qs, qx;
  assign qd = idx(rb_flow_i[dsel], dsel);
  assign qs = idx(rb_flow_i[ssel], ssel);
  assign qx = idx(xfer_flow_i, xfer_d_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < QK; i++) begin
        dcnt[i]  <= '0;
        fullf[i] <= 1'b0;
      end
      for (int d = 0; d < K; d++) rbusy[d] <= '0;
      rr_d     <= DW'(K - 1);
      rr_s     <= DW'(K - 1);
      p_sc     <= 1'b0;
      p_cached <= 1'b0;
      p_slot   <= '0;
    end else begin
      if (xfer_i && dfound && qx == qd) begin
        // one in, one out: count unchanged
      end else begin
        if (xfer_i) dcnt[qx] <= dcnt[qx] + 1'b1;
        if (dfound) dcnt[qd] <= dcnt[qd] - 1'b1;
      end
      if (dfound) fullf[qd] <= 1'b1;
      if (sc_req_o) fullf[qs] <= sc_full_i;
      for (int d = 0; d < K; d++) begin
        if (dfound && dsel == DW'(d)) rbusy[d] <= BW'(K - 1);
        else if (rbusy[d] != '0)      rbusy[d] <= rbusy[d] - 1'b1;
      end
      if (dfound) rr_d <= dsel;
      if (sfound) rr_s <= ssel;
      p_sc     <= sc_req_o;
      p_cached <= s_cached;
      p_slot   <= rb_slot_i[ssel];
    end
  end

`ifndef SYNTHESIS
  a_sc_rsp: assert property (@(posedge clk) disable iff (!rst_n) p_sc |-> sc_valid_i);
`endif
endmodule
