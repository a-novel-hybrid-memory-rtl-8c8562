// SPHSD packet buffer top: tail part, head part and the DRAM interface.
//
// Tail part (packet data in): aggregation -> dispatcher -> write module ->
// tail buffer with free list, pointer memory and queue table -> transferor ->
// read module -> K DRAMs. Head part (packet requests in): requester ->
// request buffer -> head transferor -> DRAM or short-cut -> head buffer ->
// reassembler -> packet words out, READ_LAT cycles after each request.
//
// Interface and timing: one bus word of packet data per cycle on in_* (flow,
// W bits, 1..W/8 valid bytes from byte 0); one packet request per output word
// at most on pr_* (flow, length in bytes; pr_ready low while a longer packet is
// issued); the requested packet leaves on out_* exactly READ_LAT cycles after
// its request was accepted, one word per cycle, in request order. The K DRAMs
// (banks) are outside: dram_wr_* writes a block to the FIFO of a flow in bank
// dram_wr_bank, dram_rd_* reads the oldest block of a flow in a bank, and the
// data must return on dram_rsp_* with the tag within DRAM_RD_LAT cycles. Each
// bank sees at most one write and one read every K cycles.
//
// The defaults follow the main configuration of the design (w = 512, k = 20,
// tail buffer of Q(k+1)/2 blocks, read latency of Qk slots plus a margin for
// the pipeline and the DRAM access). Q = 256, MAXLEN and the margin are own
// choices. The status outputs report overflows and events for monitoring;
// sc_fill is the byte count of the block on the short-cut path.
//
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of simulation assertions in some sub-blocks, which verilator reports as a
// net used both synchronously and asynchronously (SYNCASYNCNET). Intended;
// the assertions are not part of the circuit.
module sphsd_packet_buffer #(
  parameter int unsigned W           = sphsd_pkg::W_DEF,
  parameter int unsigned Q           = sphsd_pkg::Q_DEF,
  parameter int unsigned K           = sphsd_pkg::K_DEF,
  parameter int unsigned MAXLEN      = sphsd_pkg::MAXLEN_DEF,
  parameter int unsigned TB_DEPTH    = Q * (K + 1) / 2,
  parameter int unsigned ODEPTH      = 2 * Q,
  parameter int unsigned RQ_DEPTH    = 2 * Q,
  parameter int unsigned DRAM_RD_LAT = K,
  parameter int unsigned READ_LAT    = Q * K + 2 * K + DRAM_RD_LAT + 8,
  localparam int unsigned WB     = W / 8,
  localparam int unsigned NW     = $clog2(WB + 1),
  localparam int unsigned FW     = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW     = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW     = $clog2(MAXLEN + 1),
  localparam int unsigned AW     = (TB_DEPTH > 1) ? $clog2(TB_DEPTH) : 1,
  localparam int unsigned CW     = $clog2(TB_DEPTH + 1),
  localparam int unsigned MAXW   = (MAXLEN + WB - 1) / WB,
  localparam int unsigned HSLOTS = 2 ** $clog2(2 * (READ_LAT + MAXW)),
  localparam int unsigned SW     = $clog2(HSLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // packet data in
  input  logic          in_valid,
  input  logic [FW-1:0] in_flow,
  input  logic [W-1:0]  in_data,
  input  logic [NW-1:0] in_nbytes,
  // packet requests from the arbiter
  input  logic          pr_valid,
  input  logic [FW-1:0] pr_flow,
  input  logic [LW-1:0] pr_len,
  output logic          pr_ready,
  // packet words out
  output logic          out_valid,
  output logic [FW-1:0] out_flow,
  output logic [W-1:0]  out_data,
  output logic [NW-1:0] out_nbytes,
  output logic          out_sop,
  output logic          out_eop,
  // DRAM banks
  output logic          dram_wr_valid,
  output logic [DW-1:0] dram_wr_bank,
  output logic [FW-1:0] dram_wr_flow,
  output logic [W-1:0]  dram_wr_data,
  output logic          dram_rd_valid,
  output logic [DW-1:0] dram_rd_bank,
  output logic [FW-1:0] dram_rd_flow,
  output logic [SW-1:0] dram_rd_tag,
  input  logic          dram_rsp_valid,
  input  logic [SW-1:0] dram_rsp_tag,
  input  logic [W-1:0]  dram_rsp_data,
  // status and events
  output logic [CW-1:0] tail_used,
  output logic          tail_overflow,
  output logic          order_overflow,
  output logic          req_overflow,
  output logic          late,
  output logic          ev_block,
  output logic          ev_xfer,
  output logic          ev_skip,
  output logic          ev_sc_full,
  output logic          ev_sc_partial,
  output logic          ev_cached,
  output logic [NW-1:0] sc_fill
);
  // ---------------- tail part ----------------
  logic          blk_valid;
  logic [FW-1:0] blk_flow;
  logic [W-1:0]  blk_data;
  logic [DW-1:0] blk_d;
  logic          peek;
  logic [FW-1:0] peek_flow;
  logic          agg_sc_valid;
  logic [W-1:0]  agg_sc_data;
  logic [NW-1:0] agg_sc_fill;

  aggregation #(.W(W), .Q(Q)) u_agg (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_flow_i(in_flow), .in_data_i(in_data), .in_nbytes_i(in_nbytes),
    .blk_valid_o(blk_valid), .blk_flow_o(blk_flow), .blk_data_o(blk_data),
    .sc_valid_i(peek), .sc_flow_i(peek_flow),
    .sc_valid_o(agg_sc_valid), .sc_data_o(agg_sc_data), .sc_fill_o(agg_sc_fill)
  );

  dispatcher #(.Q(Q), .K(K)) u_disp (
    .clk, .rst_n, .flow_i(blk_flow), .adv_i(blk_valid), .d_o(blk_d)
  );

  logic          alloc, alloc_ok;
  logic [AW-1:0] alloc_addr;
  logic          tb_we;
  logic [AW-1:0] tb_waddr;
  logic [W-1:0]  tb_wdata;
  logic          pm_we;
  logic [AW-1:0] pm_waddr, pm_wdata, pm_raddr, pm_rdata;
  logic          ap_valid;
  logic [FW-1:0] ap_flow;
  logic [DW-1:0] ap_d;
  logic [AW-1:0] ap_addr, ap_old_tail;
  logic          ap_nonempty;

  tail_write #(.W(W), .Q(Q), .K(K), .DEPTH(TB_DEPTH)) u_wr (
    .clk, .rst_n,
    .blk_valid_i(blk_valid), .blk_flow_i(blk_flow), .blk_d_i(blk_d), .blk_data_i(blk_data),
    .alloc_o(alloc), .alloc_ok_i(alloc_ok), .alloc_addr_i(alloc_addr),
    .tb_we_o(tb_we), .tb_waddr_o(tb_waddr), .tb_wdata_o(tb_wdata),
    .pm_we_o(pm_we), .pm_waddr_o(pm_waddr), .pm_wdata_o(pm_wdata),
    .ap_valid_o(ap_valid), .ap_flow_o(ap_flow), .ap_d_o(ap_d), .ap_addr_o(ap_addr),
    .ap_nonempty_i(ap_nonempty), .ap_old_tail_i(ap_old_tail),
    .overflow_o(tail_overflow)
  );

  logic          free_v;
  logic [AW-1:0] free_addr;

  free_list #(.DEPTH(TB_DEPTH)) u_free (
    .clk, .rst_n,
    .alloc_i(alloc), .alloc_ok_o(alloc_ok), .alloc_addr_o(alloc_addr),
    .free_i(free_v), .free_addr_i(free_addr), .used_o(tail_used)
  );

  ptr_mem #(.DEPTH(TB_DEPTH)) u_ptr (
    .clk, .we_i(pm_we), .waddr_i(pm_waddr), .wdata_i(pm_wdata),
    .raddr_i(pm_raddr), .rdata_o(pm_rdata)
  );

  logic          tb_re;
  logic [AW-1:0] tb_raddr;
  logic [W-1:0]  tb_rdata;

  tail_buffer #(.W(W), .DEPTH(TB_DEPTH)) u_tbuf (
    .clk, .we_i(tb_we), .waddr_i(tb_waddr), .wdata_i(tb_wdata),
    .re_i(tb_re), .raddr_i(tb_raddr), .rdata_o(tb_rdata)
  );

  logic [FW-1:0] lu_flow;
  logic [DW-1:0] lu_d;
  logic          lu_nonempty;
  logic [AW-1:0] lu_head, pop_next;
  logic          pop;
  logic [K-1:0]  oq_nonempty;
  logic [DW-1:0] oq_sel;
  logic [FW-1:0] oq_flow;
  logic          oq_pop;

  queue_table #(.Q(Q), .K(K), .DEPTH(TB_DEPTH), .ODEPTH(ODEPTH)) u_qt (
    .clk, .rst_n,
    .ap_valid_i(ap_valid), .ap_flow_i(ap_flow), .ap_d_i(ap_d), .ap_addr_i(ap_addr),
    .ap_nonempty_o(ap_nonempty), .ap_old_tail_o(ap_old_tail),
    .lu_flow_i(lu_flow), .lu_d_i(lu_d), .lu_nonempty_o(lu_nonempty), .lu_head_o(lu_head),
    .pop_i(pop), .pop_next_i(pop_next),
    .oq_nonempty_o(oq_nonempty), .oq_sel_i(oq_sel), .oq_flow_o(oq_flow), .oq_pop_i(oq_pop),
    .oq_overflow_o(order_overflow)
  );

  logic          sc_req, sc_full;
  logic [FW-1:0] sc_flow;
  logic [DW-1:0] sc_d;
  logic          rd_valid, rd_sc;
  logic [FW-1:0] rd_flow;
  logic [DW-1:0] rd_d;
  logic          xfer;

  tail_transferor #(.Q(Q), .K(K)) u_ttr (
    .clk, .rst_n,
    .sc_req_i(sc_req), .sc_flow_i(sc_flow), .sc_d_i(sc_d), .sc_full_o(sc_full),
    .oq_nonempty_i(oq_nonempty), .oq_sel_o(oq_sel), .oq_flow_i(oq_flow), .oq_pop_o(oq_pop),
    .lu_flow_o(lu_flow), .lu_d_o(lu_d), .lu_nonempty_i(lu_nonempty),
    .rd_valid_o(rd_valid), .rd_sc_o(rd_sc), .rd_flow_o(rd_flow), .rd_d_o(rd_d),
    .peek_o(peek), .peek_flow_o(peek_flow),
    .xfer_o(xfer), .skip_o(ev_skip)
  );

  logic          scr_valid, scr_full;
  logic [NW-1:0] scr_fill;
  logic [W-1:0]  scr_data;

  tail_read #(.W(W), .Q(Q), .K(K), .DEPTH(TB_DEPTH)) u_rd (
    .clk, .rst_n,
    .rd_valid_i(rd_valid), .rd_sc_i(rd_sc), .rd_flow_i(rd_flow), .rd_d_i(rd_d), .peek_i(peek),
    .lu_head_i(lu_head), .pop_o(pop), .pop_next_o(pop_next),
    .pm_raddr_o(pm_raddr), .pm_rdata_i(pm_rdata),
    .free_o(free_v), .free_addr_o(free_addr),
    .tb_re_o(tb_re), .tb_raddr_o(tb_raddr), .tb_rdata_i(tb_rdata),
    .agg_data_i(agg_sc_data), .agg_fill_i(agg_sc_fill),
    .dram_wr_valid_o(dram_wr_valid), .dram_wr_bank_o(dram_wr_bank),
    .dram_wr_flow_o(dram_wr_flow), .dram_wr_data_o(dram_wr_data),
    .sc_valid_o(scr_valid), .sc_full_o(scr_full), .sc_fill_o(scr_fill), .sc_data_o(scr_data)
  );

  assign ev_block      = blk_valid;
  assign ev_xfer       = xfer;
  assign ev_sc_full    = scr_valid && scr_full;
  assign ev_sc_partial = agg_sc_valid;
  assign sc_fill       = scr_fill;

  // ---------------- head part ----------------
  logic          tk_valid, tk_span, tk_sop, tk_eop;
  logic [FW-1:0] tk_flow;
  logic [NW-2:0] tk_off;
  logic [NW-1:0] tk_nbytes;
  logic [SW-1:0] tk_slot_lo, tk_slot_hi;
  logic          rq0_valid, rq0_re, rq1_valid;
  logic [DW-1:0] rq0_d, rq1_d;
  logic [FW-1:0] rq0_flow, rq1_flow;
  logic [SW-1:0] rq0_slot, rq1_slot;

  requester #(.W(W), .Q(Q), .K(K), .MAXLEN(MAXLEN), .HSLOTS(HSLOTS)) u_req (
    .clk, .rst_n,
    .pr_valid_i(pr_valid), .pr_flow_i(pr_flow), .pr_len_i(pr_len), .pr_ready_o(pr_ready),
    .tk_valid_o(tk_valid), .tk_flow_o(tk_flow), .tk_off_o(tk_off), .tk_nbytes_o(tk_nbytes),
    .tk_span_o(tk_span), .tk_slot_lo_o(tk_slot_lo), .tk_slot_hi_o(tk_slot_hi),
    .tk_sop_o(tk_sop), .tk_eop_o(tk_eop),
    .rq0_valid_o(rq0_valid), .rq0_d_o(rq0_d), .rq0_flow_o(rq0_flow), .rq0_slot_o(rq0_slot),
    .rq0_re_o(rq0_re),
    .rq1_valid_o(rq1_valid), .rq1_d_o(rq1_d), .rq1_flow_o(rq1_flow), .rq1_slot_o(rq1_slot)
  );

  logic [K-1:0]         rb_nonempty, rb_re, rb_pop;
  logic [K-1:0][FW-1:0] rb_flow;
  logic [K-1:0][SW-1:0] rb_slot;

  request_buffer #(.Q(Q), .K(K), .DEPTH(RQ_DEPTH), .HSLOTS(HSLOTS)) u_rb (
    .clk, .rst_n,
    .p0_valid_i(rq0_valid), .p0_d_i(rq0_d), .p0_flow_i(rq0_flow), .p0_slot_i(rq0_slot),
    .p0_re_i(rq0_re),
    .p1_valid_i(rq1_valid), .p1_d_i(rq1_d), .p1_flow_i(rq1_flow), .p1_slot_i(rq1_slot),
    .nonempty_o(rb_nonempty), .flow_o(rb_flow), .slot_o(rb_slot), .re_o(rb_re),
    .pop_i(rb_pop), .overflow_o(req_overflow)
  );

  logic          hba_we, hbb_we, hbb_cached;
  logic [SW-1:0] hba_slot, hbb_slot;
  logic [W-1:0]  hba_data, hbb_data;

  head_transferor #(.W(W), .Q(Q), .K(K), .HSLOTS(HSLOTS)) u_htr (
    .clk, .rst_n,
    .rb_nonempty_i(rb_nonempty), .rb_flow_i(rb_flow), .rb_slot_i(rb_slot), .rb_re_i(rb_re),
    .rb_pop_o(rb_pop),
    .xfer_i(xfer), .xfer_flow_i(lu_flow), .xfer_d_i(lu_d),
    .dram_rd_valid_o(dram_rd_valid), .dram_rd_bank_o(dram_rd_bank),
    .dram_rd_flow_o(dram_rd_flow), .dram_rd_tag_o(dram_rd_tag),
    .dram_rsp_valid_i(dram_rsp_valid), .dram_rsp_tag_i(dram_rsp_tag),
    .dram_rsp_data_i(dram_rsp_data),
    .sc_req_o(sc_req), .sc_flow_o(sc_flow), .sc_d_o(sc_d), .sc_full_i(sc_full),
    .sc_valid_i(scr_valid), .sc_data_i(scr_data),
    .hba_we_o(hba_we), .hba_slot_o(hba_slot), .hba_data_o(hba_data),
    .hbb_we_o(hbb_we), .hbb_slot_o(hbb_slot), .hbb_data_o(hbb_data), .hbb_cached_o(hbb_cached),
    .ev_cached_o(ev_cached)
  );

  logic [SW-1:0] lo_slot, hi_slot;
  logic [W-1:0]  lo_data, hi_data, rw_data, rr_data;
  logic          lo_cached, lo_filled, hi_filled, rw;
  logic [FW-1:0] rw_flow, rr_flow;

  head_buffer #(.W(W), .Q(Q), .HSLOTS(HSLOTS)) u_hb (
    .clk, .rst_n,
    .clr0_i(rq0_valid), .clr0_slot_i(rq0_slot), .clr1_i(rq1_valid), .clr1_slot_i(rq1_slot),
    .wa_i(hba_we), .wa_slot_i(hba_slot), .wa_data_i(hba_data),
    .wb_i(hbb_we), .wb_slot_i(hbb_slot), .wb_data_i(hbb_data), .wb_cached_i(hbb_cached),
    .lo_slot_i(lo_slot), .lo_data_o(lo_data), .lo_cached_o(lo_cached), .lo_filled_o(lo_filled),
    .hi_slot_i(hi_slot), .hi_data_o(hi_data), .hi_filled_o(hi_filled),
    .rw_i(rw), .rw_flow_i(rw_flow), .rw_data_i(rw_data),
    .rr_flow_i(rr_flow), .rr_data_o(rr_data)
  );

  reassembler #(.W(W), .Q(Q), .HSLOTS(HSLOTS), .LAT(READ_LAT)) u_ras (
    .clk, .rst_n,
    .tk_valid_i(tk_valid), .tk_flow_i(tk_flow), .tk_off_i(tk_off), .tk_nbytes_i(tk_nbytes),
    .tk_span_i(tk_span), .tk_slot_lo_i(tk_slot_lo), .tk_slot_hi_i(tk_slot_hi),
    .tk_sop_i(tk_sop), .tk_eop_i(tk_eop),
    .lo_slot_o(lo_slot), .lo_data_i(lo_data), .lo_cached_i(lo_cached), .lo_filled_i(lo_filled),
    .hi_slot_o(hi_slot), .hi_data_i(hi_data), .hi_filled_i(hi_filled),
    .rw_o(rw), .rw_flow_o(rw_flow), .rw_data_o(rw_data),
    .rr_flow_o(rr_flow), .rr_data_i(rr_data),
    .out_valid_o(out_valid), .out_flow_o(out_flow), .out_data_o(out_data),
    .out_nbytes_o(out_nbytes), .out_sop_o(out_sop), .out_eop_o(out_eop), .late_o(late)
  );
endmodule
