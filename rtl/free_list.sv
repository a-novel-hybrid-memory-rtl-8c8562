// Free-address list of the dynamically allocated tail buffer.
//
// Hands out one tail-buffer word address per cycle and takes back one freed
// address per cycle. Addresses never used since reset come from a counter, so
// no initialisation sweep is needed; freed addresses are kept in a FIFO. When
// the FIFO is empty, an address freed in the same cycle is handed out directly.
// alloc_ok_o is low when the buffer is full. used_o counts the allocated words.
// The document only says that the tail buffer is allocated dynamically with
// linked lists; this counter-plus-FIFO form is an own choice.
module free_list #(
  parameter int unsigned DEPTH = 2688,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_i,
  output logic          alloc_ok_o,
  output logic [AW-1:0] alloc_addr_o,
  input  logic          free_i,
  input  logic [AW-1:0] free_addr_i,
  output logic [CW-1:0] used_o
);
  logic [AW-1:0] fifo [DEPTH];
  logic [CW-1:0] fresh, cnt;
  logic [AW-1:0] rd, wr;
  logic          from_fresh, from_fifo, bypass;

  always_comb begin
    from_fresh = (fresh < CW'(DEPTH));
    from_fifo  = !from_fresh && (cnt != '0);
    bypass     = !from_fresh && (cnt == '0) && free_i;
    alloc_ok_o = from_fresh || from_fifo || bypass;
    if (from_fresh)     alloc_addr_o = AW'(fresh);
    else if (from_fifo) alloc_addr_o = fifo[rd];
    else                alloc_addr_o = free_addr_i;
  end

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_pop, do_push;
  assign do_pop  = alloc_i && from_fifo;
  assign do_push = free_i && !(alloc_i && bypass);

  always_ff @(posedge clk) begin
    if (do_push) fifo[wr] <= free_addr_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh  <= '0;
      cnt    <= '0;
      rd     <= '0;
      wr     <= '0;
      used_o <= '0;
    end else begin
      if (alloc_i && from_fresh) fresh <= fresh + 1'b1;
      if (do_pop)  rd <= inc(rd);
      if (do_push) wr <= inc(wr);
      cnt    <= cnt + CW'(do_push) - CW'(do_pop);
      used_o <= used_o + CW'(alloc_i && alloc_ok_o) - CW'(free_i);
    end
  end
endmodule
