// Pointer memory of the tail buffer's linked lists.
//
// One next-pointer per tail-buffer word: entry a holds the address of the word
// that follows word a in its list. The write module links a new word behind
// the old list tail (write port); the read module follows the list when it
// removes the head word (asynchronous read port, so a list can lose one word
// per cycle). Dual-port memory, one write and one read per cycle.
// Linked lists in a pointer memory follow the described prototype; the
// asynchronous read port is an own choice.
module ptr_mem #(
  parameter int unsigned DEPTH = 2688,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [AW-1:0] wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic [AW-1:0] rdata_o
);
  logic [AW-1:0] mem [DEPTH];
  assign rdata_o = mem[raddr_i];
  always_ff @(posedge clk) if (we_i) mem[waddr_i] <= wdata_i;
endmodule
