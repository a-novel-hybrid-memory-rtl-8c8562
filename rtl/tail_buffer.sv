// Tail buffer: on-chip dual-port SRAM holding full blocks.
//
// DEPTH words of W bits, organised at the granularity of one bus word and
// allocated dynamically through linked lists (free list, pointer memory and
// queue table live outside). One write and one read per cycle; the read is
// synchronous, data appear one cycle after re_i. The default depth is the
// bound for a dynamically allocated tail buffer, Q(k+1)/2 blocks.
// Dual-port SRAM and one-word granularity follow the described prototype;
// the registered read is an own choice.
module tail_buffer #(
  parameter int unsigned W     = sphsd_pkg::W_DEF,
  parameter int unsigned DEPTH = sphsd_pkg::Q_DEF * (sphsd_pkg::K_DEF + 1) / 2,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic          re_i,
  input  logic [AW-1:0] raddr_i,
  output logic [W-1:0]  rdata_o
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end
endmodule
