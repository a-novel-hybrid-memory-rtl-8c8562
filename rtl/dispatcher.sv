// Per-flow round-robin dispatcher.
//
// Keeps, for every flow, the index of the DRAM queue that receives the flow's
// next block, so that consecutive blocks of one flow go to DRAM 0, 1, ..., K-1,
// 0, ... and every K-th block of a flow lands in the same DRAM. The lookup is
// combinational: d_o is the DRAM queue of the block of flow_i that is being
// completed now; when adv_i is high the flow's pointer moves on to the next
// DRAM at the clock edge. The same unit serves as the per-flow round-robin
// requester's pointer on the head side, which mirrors the tail side.
// Reset starts every flow at DRAM 0 (own choice; the order only has to be the
// same on both sides).
module dispatcher #(
  parameter int unsigned Q  = sphsd_pkg::Q_DEF,
  parameter int unsigned K  = sphsd_pkg::K_DEF,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [FW-1:0] flow_i,
  input  logic          adv_i,
  output logic [DW-1:0] d_o
);
  logic [DW-1:0] ptr [Q];

  assign d_o = ptr[flow_i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < Q; i++) ptr[i] <= '0;
    end else if (adv_i) begin
      ptr[flow_i] <= (ptr[flow_i] == DW'(K - 1)) ? '0 : ptr[flow_i] + 1'b1;
    end
  end
endmodule
