// Queue table of the tail buffer.
//
// The tail buffer keeps Q*K linked lists of full blocks, one per flow f and
// DRAM queue d (index f*K + d), so that the short-cut can take the oldest
// block of a flow from a given DRAM queue. For every list the table holds head
// address, tail address and length. Beside the lists, each of the K DRAM
// queues keeps its block order as a FIFO of flow numbers (the "DRAM queue
// status"): the transferor pops it to know which flow's block goes to the DRAM
// next. An entry whose block already left over the short-cut finds its list
// empty and is skipped by the transferor.
//
// Ports: append (write module) adds word ap_addr_i to list (ap_flow_i, ap_d_i)
// and reports the old tail for linking; lookup/pop (transferor and read module)
// shows head and length of list (lu_flow_i, lu_d_i) and removes its head when
// pop_i is high, pop_next_i being the head's next pointer. Both may hit the
// same list in one cycle. All updates happen at the clock edge.
module queue_table #(
  parameter int unsigned Q      = sphsd_pkg::Q_DEF,
  parameter int unsigned K      = sphsd_pkg::K_DEF,
  parameter int unsigned DEPTH  = sphsd_pkg::Q_DEF * (sphsd_pkg::K_DEF + 1) / 2,
  parameter int unsigned ODEPTH = 2 * sphsd_pkg::Q_DEF,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned OW = (ODEPTH > 1) ? $clog2(ODEPTH) : 1,
  localparam int unsigned OCW = $clog2(ODEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // append
  input  logic          ap_valid_i,
  input  logic [FW-1:0] ap_flow_i,
  input  logic [DW-1:0] ap_d_i,
  input  logic [AW-1:0] ap_addr_i,
  output logic          ap_nonempty_o,
  output logic [AW-1:0] ap_old_tail_o,
  // lookup and pop
  input  logic [FW-1:0] lu_flow_i,
  input  logic [DW-1:0] lu_d_i,
  output logic          lu_nonempty_o,
  output logic [AW-1:0] lu_head_o,
  input  logic          pop_i,
  input  logic [AW-1:0] pop_next_i,
  // DRAM queue order
  output logic [K-1:0]  oq_nonempty_o,
  input  logic [DW-1:0] oq_sel_i,
  output logic [FW-1:0] oq_flow_o,
  input  logic          oq_pop_i,
  output logic          oq_overflow_o
);
  localparam int unsigned QK = Q * K;
  localparam int unsigned IW = (QK > 1) ? $clog2(QK) : 1;

  logic [AW-1:0] head [QK];
  logic [AW-1:0] tail [QK];
  logic [CW-1:0] len  [QK];

  logic [FW-1:0]  omem [K][ODEPTH];
  logic [OW-1:0]  ord  [K];
  logic [OW-1:0]  owr  [K];
  logic [OCW-1:0] ocnt [K];

  function automatic logic [IW-1:0] idx(input logic [FW-1:0] f, input logic [DW-1:0] d);
    return IW'(f) * IW'(K) + IW'(d);
  endfunction

  logic [IW-1:0] ai, li;
  assign ai = idx(ap_flow_i, ap_d_i);
  assign li = idx(lu_flow_i, lu_d_i);

  assign ap_nonempty_o = (len[ai] != '0);
  assign ap_old_tail_o = tail[ai];
  assign lu_nonempty_o = (len[li] != '0);
  assign lu_head_o     = head[li];

  always_comb begin
    for (int d = 0; d < K; d++) oq_nonempty_o[d] = (ocnt[d] != '0);
  end
  assign oq_flow_o = omem[oq_sel_i][ord[oq_sel_i]];

  function automatic logic [OW-1:0] oinc(input logic [OW-1:0] p);
    return (p == OW'(ODEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_pop;
  assign do_pop = pop_i && lu_nonempty_o;

  always_ff @(posedge clk) begin
    if (ap_valid_i) omem[ap_d_i][owr[ap_d_i]] <= ap_flow_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < QK; i++) begin
        len[i]  <= '0;
        head[i] <= '0;
        tail[i] <= '0;
      end
      for (int d = 0; d < K; d++) begin
        ord[d]  <= '0;
        owr[d]  <= '0;
        ocnt[d] <= '0;
      end
      oq_overflow_o <= 1'b0;
    end else begin
      // list updates; the same-list case is resolved explicitly
      if (ap_valid_i && do_pop && ai == li) begin
        if (len[ai] == CW'(1)) head[ai] <= ap_addr_i;
        else                   head[ai] <= pop_next_i;
        tail[ai] <= ap_addr_i;
      end else begin
        if (ap_valid_i) begin
          if (len[ai] == '0) head[ai] <= ap_addr_i;
          tail[ai] <= ap_addr_i;
          len[ai]  <= len[ai] + 1'b1;
        end
        if (do_pop) begin
          head[li] <= pop_next_i;
          len[li]  <= len[li] - 1'b1;
        end
      end
      // DRAM queue order FIFOs
      for (int d = 0; d < K; d++) begin
        logic push, pop;
        push = ap_valid_i && (ap_d_i == DW'(d));
        pop  = oq_pop_i && (oq_sel_i == DW'(d)) && (ocnt[d] != '0);
        if (push) owr[d] <= oinc(owr[d]);
        if (pop)  ord[d] <= oinc(ord[d]);
        ocnt[d] <= ocnt[d] + OCW'(push) - OCW'(pop);
        if (push && !pop && ocnt[d] == OCW'(ODEPTH)) oq_overflow_o <= 1'b1;
      end
    end
  end
endmodule
