// Request buffer of the head part: one FIFO of block requests per DRAM.
//
// Holds block requests while their DRAM is overbooked. Two requests may be
// pushed per cycle, for two different DRAMs. The head transferor sees the
// oldest entry of every queue at once (flow, head-buffer slot, re-request
// flag) and pops any set of queues per cycle. overflow_o is a sticky flag.
//
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of simulation assertions, which verilator reports as a
// net used both synchronously and asynchronously (SYNCASYNCNET). Intended;
// the assertions are not part of the circuit.
// One queue per DRAM follows the design description; the depth (2Q by
// default at the top) and the two push ports are own choices.
module request_buffer #(
  parameter int unsigned Q      = sphsd_pkg::Q_DEF,
  parameter int unsigned K      = sphsd_pkg::K_DEF,
  parameter int unsigned DEPTH  = 2 * sphsd_pkg::Q_DEF,
  parameter int unsigned HSLOTS = 16384,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SW = $clog2(HSLOTS),
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned EW = FW + SW + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  p0_valid_i,
  input  logic [DW-1:0]         p0_d_i,
  input  logic [FW-1:0]         p0_flow_i,
  input  logic [SW-1:0]         p0_slot_i,
  input  logic                  p0_re_i,
  input  logic                  p1_valid_i,
  input  logic [DW-1:0]         p1_d_i,
  input  logic [FW-1:0]         p1_flow_i,
  input  logic [SW-1:0]         p1_slot_i,
  output logic [K-1:0]          nonempty_o,
  output logic [K-1:0][FW-1:0]  flow_o,
  output logic [K-1:0][SW-1:0]  slot_o,
  output logic [K-1:0]          re_o,
  input  logic [K-1:0]          pop_i,
  output logic                  overflow_o
);
  logic [EW-1:0] mem [K][DEPTH];
  logic [PW-1:0] rd  [K];
  logic [PW-1:0] wr  [K];
  logic [CW-1:0] cnt [K];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    for (int d = 0; d < K; d++) begin
      nonempty_o[d] = (cnt[d] != '0);
      {flow_o[d], slot_o[d], re_o[d]} = mem[d][rd[d]];
    end
  end

  always_ff @(posedge clk) begin
    if (p0_valid_i) mem[p0_d_i][wr[p0_d_i]] <= {p0_flow_i, p0_slot_i, p0_re_i};
    if (p1_valid_i) mem[p1_d_i][wr[p1_d_i]] <= {p1_flow_i, p1_slot_i, 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < K; d++) begin
        rd[d]  <= '0;
        wr[d]  <= '0;
        cnt[d] <= '0;
      end
      overflow_o <= 1'b0;
    end else begin
      for (int d = 0; d < K; d++) begin
        logic push, pop;
        push = (p0_valid_i && p0_d_i == DW'(d)) || (p1_valid_i && p1_d_i == DW'(d));
        pop  = pop_i[d] && (cnt[d] != '0);
        if (push) wr[d] <= inc(wr[d]);
        if (pop)  rd[d] <= inc(rd[d]);
        cnt[d] <= cnt[d] + CW'(push) - CW'(pop);
        if (push && !pop && cnt[d] == CW'(DEPTH)) overflow_o <= 1'b1;
      end
    end
  end

`ifndef SYNTHESIS
  a_two: assert property (@(posedge clk) disable iff (!rst_n)
    (p0_valid_i && p1_valid_i) |-> (p0_d_i != p1_d_i));
`endif
endmodule
