// Aggregation module: per-flow segmentation and aggregation into full blocks.
//
// Packet data of one flow arrives as bus words of W bits, in_nbytes_i valid
// bytes (1..W/8) packed from byte 0. Per flow the module keeps the not yet full
// block ("partial word") and its fill level in bytes. Incoming bytes are
// appended behind the partial bytes, so packets of a flow are packed back to
// back and no block is ever padded. When the fill reaches W/8 bytes the full
// block is presented on blk_* in the same cycle (combinational), the bytes that
// did not fit start the next partial block, and the write module stores the
// block at the clock edge. One word is accepted every cycle.
//
// The short-cut path may read the partial block of any flow in the same cycle
// as a new word is aggregated. As in the described prototype, the aggregation
// memory is doubled for that instead of being clocked twice as fast: copy A is
// read by the aggregation path, copy B by the short-cut, both are written
// together. A short-cut read (sc_valid_i) returns the partial block and its
// fill one cycle later on sc_*_o; it does not remove the bytes, the block keeps
// filling and is written to DRAM once full (own choice, see the README).
//
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of simulation assertions, which verilator reports as a
// net used both synchronously and asynchronously (SYNCASYNCNET). Intended;
// the assertions are not part of the circuit.
module aggregation #(
  parameter int unsigned W  = sphsd_pkg::W_DEF,
  parameter int unsigned Q  = sphsd_pkg::Q_DEF,
  localparam int unsigned WB = W / 8,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned NW = $clog2(WB + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // packet data in
  input  logic          in_valid_i,
  input  logic [FW-1:0] in_flow_i,
  input  logic [W-1:0]  in_data_i,
  input  logic [NW-1:0] in_nbytes_i,
  // full block out, same cycle
  output logic          blk_valid_o,
  output logic [FW-1:0] blk_flow_o,
  output logic [W-1:0]  blk_data_o,
  // short-cut read of a partial block
  input  logic          sc_valid_i,
  input  logic [FW-1:0] sc_flow_i,
  output logic          sc_valid_o,
  output logic [W-1:0]  sc_data_o,
  output logic [NW-1:0] sc_fill_o
);
  logic [W-1:0]  mem_a [Q];
  logic [W-1:0]  mem_b [Q];
  logic [NW-1:0] fill  [Q];

  // Keep only the lowest n bytes of a word.
  function automatic logic [W-1:0] keep_bytes(input logic [W-1:0] d, input logic [NW-1:0] n);
    logic [W-1:0] m;
    m = (n >= NW'(WB)) ? '1 : ~({W{1'b1}} << (8 * n));
    return d & m;
  endfunction

  logic [NW-1:0] f_cur;
  logic [W-1:0]  part;
  logic [2*W-1:0] comb;
  logic [NW:0]   sum;
  logic          full;
  logic [W-1:0]  new_part;
  logic [NW-1:0] new_fill;

  always_comb begin
    f_cur    = fill[in_flow_i];
    part     = keep_bytes(mem_a[in_flow_i], f_cur);
    comb     = {{W{1'b0}}, part} |
               ({{W{1'b0}}, keep_bytes(in_data_i, in_nbytes_i)} << (8 * f_cur));
    sum      = {1'b0, f_cur} + {1'b0, in_nbytes_i};
    full     = (sum >= (NW+1)'(WB));
    new_part = full ? comb[2*W-1:W] : comb[W-1:0];
    new_fill = full ? NW'(sum - (NW+1)'(WB)) : NW'(sum);
  end

  assign blk_valid_o = in_valid_i && full;
  assign blk_flow_o  = in_flow_i;
  assign blk_data_o  = comb[W-1:0];

  always_ff @(posedge clk) begin
    if (in_valid_i) begin
      mem_a[in_flow_i] <= new_part;
      mem_b[in_flow_i] <= new_part;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < Q; i++) fill[i] <= '0;
      sc_valid_o <= 1'b0;
      sc_data_o  <= '0;
      sc_fill_o  <= '0;
    end else begin
      if (in_valid_i) fill[in_flow_i] <= new_fill;
      sc_valid_o <= sc_valid_i;
      if (sc_valid_i) begin
        sc_data_o <= keep_bytes(mem_b[sc_flow_i], fill[sc_flow_i]);
        sc_fill_o <= fill[sc_flow_i];
      end
    end
  end

`ifndef SYNTHESIS
  // A word may carry 1..W/8 bytes.
  a_nbytes: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid_i |-> (in_nbytes_i != '0 && in_nbytes_i <= NW'(WB)));
`endif
endmodule
