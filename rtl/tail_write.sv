// Write module of the tail part.
//
// Takes a full block from the aggregation module, together with the DRAM queue
// the dispatcher chose for it, and stores it in the same cycle: it takes a
// free tail-buffer address, writes the block there, links the address behind
// the current tail of list (flow, DRAM queue) in the pointer memory and appends
// it in the queue table. If no address is free the block is lost and the
// sticky overflow_o flag is set; with the tail buffer sized to the bound
// Q(k+1)/2 this does not happen for traffic at line rate.
module tail_write #(
  parameter int unsigned W     = sphsd_pkg::W_DEF,
  parameter int unsigned Q     = sphsd_pkg::Q_DEF,
  parameter int unsigned K     = sphsd_pkg::K_DEF,
  parameter int unsigned DEPTH = sphsd_pkg::Q_DEF * (sphsd_pkg::K_DEF + 1) / 2,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // block from aggregation / dispatcher
  input  logic          blk_valid_i,
  input  logic [FW-1:0] blk_flow_i,
  input  logic [DW-1:0] blk_d_i,
  input  logic [W-1:0]  blk_data_i,
  // free list
  output logic          alloc_o,
  input  logic          alloc_ok_i,
  input  logic [AW-1:0] alloc_addr_i,
  // tail buffer write port
  output logic          tb_we_o,
  output logic [AW-1:0] tb_waddr_o,
  output logic [W-1:0]  tb_wdata_o,
  // pointer memory write port
  output logic          pm_we_o,
  output logic [AW-1:0] pm_waddr_o,
  output logic [AW-1:0] pm_wdata_o,
  // queue table append port
  output logic          ap_valid_o,
  output logic [FW-1:0] ap_flow_o,
  output logic [DW-1:0] ap_d_o,
  output logic [AW-1:0] ap_addr_o,
  input  logic          ap_nonempty_i,
  input  logic [AW-1:0] ap_old_tail_i,
  output logic          overflow_o
);
  logic go;
  assign go         = blk_valid_i && alloc_ok_i;
  assign alloc_o    = blk_valid_i;
  assign tb_we_o    = go;
  assign tb_waddr_o = alloc_addr_i;
  assign tb_wdata_o = blk_data_i;
  assign pm_we_o    = go && ap_nonempty_i;
  assign pm_waddr_o = ap_old_tail_i;
  assign pm_wdata_o = alloc_addr_i;
  assign ap_valid_o = go;
  assign ap_flow_o  = blk_flow_i;
  assign ap_d_o     = blk_d_i;
  assign ap_addr_o  = alloc_addr_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            overflow_o <= 1'b0;
    else if (blk_valid_i && !alloc_ok_i)   overflow_o <= 1'b1;
  end
endmodule
