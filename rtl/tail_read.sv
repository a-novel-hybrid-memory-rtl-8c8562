// Read module of the tail part.
//
// Executes the transfers the tail transferor orders. For a list read
// (rd_valid_i) it removes the head word of list (flow, DRAM queue) from the
// queue table, follows its next pointer in the pointer memory, returns the
// address to the free list and reads the block from the tail buffer. One
// cycle later the block leaves either towards DRAM rd_d_i (dram_wr_*) or, for
// a short-cut, towards the head buffer (sc_*). A short-cut of a partial block
// is served by the aggregation module; its data arrive with the same one-cycle
// delay and are merged onto the same short-cut output here, marked not full.
//
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of simulation assertions, which verilator reports as a
// net used both synchronously and asynchronously (SYNCASYNCNET). Intended;
// the assertions are not part of the circuit.
module tail_read #(
  parameter int unsigned W     = sphsd_pkg::W_DEF,
  parameter int unsigned Q     = sphsd_pkg::Q_DEF,
  parameter int unsigned K     = sphsd_pkg::K_DEF,
  parameter int unsigned DEPTH = sphsd_pkg::Q_DEF * (sphsd_pkg::K_DEF + 1) / 2,
  localparam int unsigned WB = W / 8,
  localparam int unsigned NW = $clog2(WB + 1),
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // order from the transferor
  input  logic          rd_valid_i,
  input  logic          rd_sc_i,      // 1: short-cut, 0: to DRAM
  input  logic [FW-1:0] rd_flow_i,
  input  logic [DW-1:0] rd_d_i,
  input  logic          peek_i,       // partial block short-cut in progress
  // queue table pop port
  input  logic [AW-1:0] lu_head_i,
  output logic          pop_o,
  output logic [AW-1:0] pop_next_o,
  // pointer memory read port
  output logic [AW-1:0] pm_raddr_o,
  input  logic [AW-1:0] pm_rdata_i,
  // free list
  output logic          free_o,
  output logic [AW-1:0] free_addr_o,
  // tail buffer read port
  output logic          tb_re_o,
  output logic [AW-1:0] tb_raddr_o,
  input  logic [W-1:0]  tb_rdata_i,
  // partial block from aggregation (one cycle after peek_i)
  input  logic [W-1:0]  agg_data_i,
  input  logic [NW-1:0] agg_fill_i,
  // to DRAM
  output logic          dram_wr_valid_o,
  output logic [DW-1:0] dram_wr_bank_o,
  output logic [FW-1:0] dram_wr_flow_o,
  output logic [W-1:0]  dram_wr_data_o,
  // short-cut to head
  output logic          sc_valid_o,
  output logic          sc_full_o,
  output logic [NW-1:0] sc_fill_o,
  output logic [W-1:0]  sc_data_o
);
  assign pop_o       = rd_valid_i;
  assign pm_raddr_o  = lu_head_i;
  assign pop_next_o  = pm_rdata_i;
  assign free_o      = rd_valid_i;
  assign free_addr_o = lu_head_i;
  assign tb_re_o     = rd_valid_i;
  assign tb_raddr_o  = lu_head_i;

  logic          r_dram, r_sc, r_peek;
  logic [DW-1:0] r_d;
  logic [FW-1:0] r_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_dram <= 1'b0;
      r_sc   <= 1'b0;
      r_peek <= 1'b0;
      r_d    <= '0;
      r_f    <= '0;
    end else begin
      r_dram <= rd_valid_i && !rd_sc_i;
      r_sc   <= rd_valid_i && rd_sc_i;
      r_peek <= peek_i;
      r_d    <= rd_d_i;
      r_f    <= rd_flow_i;
    end
  end

  assign dram_wr_valid_o = r_dram;
  assign dram_wr_bank_o  = r_d;
  assign dram_wr_flow_o  = r_f;
  assign dram_wr_data_o  = tb_rdata_i;
  assign sc_valid_o      = r_sc || r_peek;
  assign sc_full_o       = r_sc;
  assign sc_fill_o       = r_sc ? NW'(WB) : agg_fill_i;
  assign sc_data_o       = r_sc ? tb_rdata_i : agg_data_i;

`ifndef SYNTHESIS
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(rd_valid_i && peek_i));
`endif
endmodule
