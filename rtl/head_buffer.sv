// Head buffer: reorder buffer for fetched blocks plus per-flow remainder.
//
// Blocks arrive from DRAM and over the short-cut in any order and are kept in
// the head-buffer slot the requester assigned to them, until the reassembler
// uses them at the fixed delivery time. A slot is marked empty when it is
// handed out (two per cycle) and filled by either write port; a slot written
// as "cached" carries no data and stands for the flow's remainder. The
// remainder memory holds, per flow, the last block the reassembler used, i.e.
// the bytes of the flow not yet requested by the arbiter. Two asynchronous
// slot read ports and one remainder read port serve the reassembler.
// Own choice: the slots form a ring rather than a linked-list allocation.
module head_buffer #(
  parameter int unsigned W      = sphsd_pkg::W_DEF,
  parameter int unsigned Q      = sphsd_pkg::Q_DEF,
  parameter int unsigned HSLOTS = 16384,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned SW = $clog2(HSLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr0_i,
  input  logic [SW-1:0] clr0_slot_i,
  input  logic          clr1_i,
  input  logic [SW-1:0] clr1_slot_i,
  input  logic          wa_i,
  input  logic [SW-1:0] wa_slot_i,
  input  logic [W-1:0]  wa_data_i,
  input  logic          wb_i,
  input  logic [SW-1:0] wb_slot_i,
  input  logic [W-1:0]  wb_data_i,
  input  logic          wb_cached_i,
  input  logic [SW-1:0] lo_slot_i,
  output logic [W-1:0]  lo_data_o,
  output logic          lo_cached_o,
  output logic          lo_filled_o,
  input  logic [SW-1:0] hi_slot_i,
  output logic [W-1:0]  hi_data_o,
  output logic          hi_filled_o,
  input  logic          rw_i,
  input  logic [FW-1:0] rw_flow_i,
  input  logic [W-1:0]  rw_data_i,
  input  logic [FW-1:0] rr_flow_i,
  output logic [W-1:0]  rr_data_o
);
  logic [W-1:0] data   [HSLOTS];
  logic         cached [HSLOTS];
  logic         filled [HSLOTS];
  logic [W-1:0] rem    [Q];

  assign lo_data_o   = data[lo_slot_i];
  assign lo_cached_o = cached[lo_slot_i];
  assign lo_filled_o = filled[lo_slot_i];
  assign hi_data_o   = data[hi_slot_i];
  assign hi_filled_o = filled[hi_slot_i];
  assign rr_data_o   = rem[rr_flow_i];

  always_ff @(posedge clk) begin
    if (wa_i) data[wa_slot_i] <= wa_data_i;
    if (wb_i && !wb_cached_i) data[wb_slot_i] <= wb_data_i;
    if (wa_i) cached[wa_slot_i] <= 1'b0;
    if (wb_i) cached[wb_slot_i] <= wb_cached_i;
    if (rw_i) rem[rw_flow_i] <= rw_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HSLOTS; i++) filled[i] <= 1'b0;
    end else begin
      if (clr0_i) filled[clr0_slot_i] <= 1'b0;
      if (clr1_i) filled[clr1_slot_i] <= 1'b0;
      if (wa_i)   filled[wa_slot_i]   <= 1'b1;
      if (wb_i)   filled[wb_slot_i]   <= 1'b1;
    end
  end
endmodule
