// Tail transferor.
//
// Moves full blocks from the tail buffer to the DRAMs as fast as possible.
// Every DRAM (bank) accepts one block write every K cycles (2T = k time
// slots). Each cycle the transferor scans the K DRAM queues round robin,
// starting after the last one served, for a queue that holds a full block
// while its DRAM is free; it pops the queue's order FIFO and, if the flow's
// list still holds a block, orders the read module to send that block to the
// DRAM. With full blocks in every DRAM queue all K DRAMs write in parallel.
//
// It also serves short-cut requests from the head part, which have priority
// and use the tail buffer's read port in place of a transfer: it checks the
// location of the oldest block of (flow, DRAM queue); if the list holds one it
// is read from the tail buffer and removed (sc_full_o = 1), otherwise the
// block is still being aggregated and its partial word is read from the
// aggregation module (sc_full_o = 0). sc_full_o is given in the request cycle.
// xfer_* reports, in the cycle it is decided, each block sent to a DRAM.
module tail_transferor #(
  parameter int unsigned Q = sphsd_pkg::Q_DEF,
  parameter int unsigned K = sphsd_pkg::K_DEF,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned BW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // short-cut request from head transferor
  input  logic          sc_req_i,
  input  logic [FW-1:0] sc_flow_i,
  input  logic [DW-1:0] sc_d_i,
  output logic          sc_full_o,
  // queue table
  input  logic [K-1:0]  oq_nonempty_i,
  output logic [DW-1:0] oq_sel_o,
  input  logic [FW-1:0] oq_flow_i,
  output logic          oq_pop_o,
  output logic [FW-1:0] lu_flow_o,
  output logic [DW-1:0] lu_d_o,
  input  logic          lu_nonempty_i,
  // read module
  output logic          rd_valid_o,
  output logic          rd_sc_o,
  output logic [FW-1:0] rd_flow_o,
  output logic [DW-1:0] rd_d_o,
  // aggregation short-cut
  output logic          peek_o,
  output logic [FW-1:0] peek_flow_o,
  // events
  output logic          xfer_o,
  output logic          skip_o
);
  logic [BW-1:0] busy [K];   // cycles until DRAM d accepts the next write
  logic [DW-1:0] rr;
  logic          found;
  logic [DW-1:0] sel;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int i = 0; i < K; i++) begin
      logic [DW-1:0] d;
      d = DW'((int'(rr) + 1 + i) % K);
      if (!found && oq_nonempty_i[d] && busy[d] == '0) begin
        found = 1'b1;
        sel   = DW'(d);
      end
    end
  end

  logic tx;
  assign tx = !sc_req_i && found;

  always_comb begin
    oq_sel_o    = sel;
    oq_pop_o    = tx;
    lu_flow_o   = sc_req_i ? sc_flow_i : oq_flow_i;
    lu_d_o      = sc_req_i ? sc_d_i : sel;
    sc_full_o   = sc_req_i && lu_nonempty_i;
    rd_valid_o  = (sc_req_i || tx) && lu_nonempty_i;
    rd_sc_o     = sc_req_i;
    rd_flow_o   = lu_flow_o;
    rd_d_o      = lu_d_o;
    peek_o      = sc_req_i && !lu_nonempty_i;
    peek_flow_o = sc_flow_i;
    xfer_o      = tx && lu_nonempty_i;
    skip_o      = tx && !lu_nonempty_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= DW'(K - 1);
      for (int d = 0; d < K; d++) busy[d] <= '0;
    end else begin
      for (int d = 0; d < K; d++) begin
        if (xfer_o && sel == DW'(d)) busy[d] <= BW'(K - 1);
        else if (busy[d] != '0)      busy[d] <= busy[d] - 1'b1;
      end
      if (tx) rr <= sel;
    end
  end
endmodule
