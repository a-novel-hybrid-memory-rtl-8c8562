// Per-flow round-robin requester of the head part.
//
// Accepts packet requests (flow, length in bytes) from an external arbiter and
// works out which blocks hold the packet's bytes. Packets of a flow lie back to
// back in the flow's byte stream, which is cut into blocks of W/8 bytes, and
// block n of a flow sits in DRAM n mod K. The requester therefore keeps per flow
// the byte offset inside the current block and, with a dispatcher instance,
// the DRAM of that block: it behaves exactly like the tail-side dispatcher,
// but on requests.
//
// A packet is split into output words of up to W/8 bytes, one word per cycle.
// A word's bytes lie in at most two blocks (lo and hi). For each block the
// packet touches for the first time a block request (flow, DRAM, head-buffer
// slot) is emitted; up to two per cycle, always for different DRAMs (K >= 2).
// The first block of a packet that starts inside a block the previous packet
// already used is requested again with re = 1: that block may have been only
// partially present when it was first fetched. Head-buffer slots are handed out
// in a ring. Each word also leaves a delivery task for the reassembler.
// pr_ready_o is low while the words of a longer packet are being issued, so the
// arbiter may send one request per output word at most (line rate).
//
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of simulation assertions, which verilator reports as a
// net used both synchronously and asynchronously (SYNCASYNCNET). Intended;
// the assertions are not part of the circuit.
module requester #(
  parameter int unsigned W      = sphsd_pkg::W_DEF,
  parameter int unsigned Q      = sphsd_pkg::Q_DEF,
  parameter int unsigned K      = sphsd_pkg::K_DEF,
  parameter int unsigned MAXLEN = sphsd_pkg::MAXLEN_DEF,
  parameter int unsigned HSLOTS = 16384,
  localparam int unsigned WB = W / 8,
  localparam int unsigned NW = $clog2(WB + 1),
  localparam int unsigned OW = $clog2(WB),
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW = $clog2(MAXLEN + 1),
  localparam int unsigned SW = $clog2(HSLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // packet request
  input  logic          pr_valid_i,
  input  logic [FW-1:0] pr_flow_i,
  input  logic [LW-1:0] pr_len_i,
  output logic          pr_ready_o,
  // delivery task, one per output word
  output logic          tk_valid_o,
  output logic [FW-1:0] tk_flow_o,
  output logic [OW-1:0] tk_off_o,
  output logic [NW-1:0] tk_nbytes_o,
  output logic          tk_span_o,
  output logic [SW-1:0] tk_slot_lo_o,
  output logic [SW-1:0] tk_slot_hi_o,
  output logic          tk_sop_o,
  output logic          tk_eop_o,
  // block requests
  output logic          rq0_valid_o,
  output logic [DW-1:0] rq0_d_o,
  output logic [FW-1:0] rq0_flow_o,
  output logic [SW-1:0] rq0_slot_o,
  output logic          rq0_re_o,
  output logic          rq1_valid_o,
  output logic [DW-1:0] rq1_d_o,
  output logic [FW-1:0] rq1_flow_o,
  output logic [SW-1:0] rq1_slot_o
);
  logic [OW-1:0] off [Q];
  logic          busy;
  logic [FW-1:0] c_flow;
  logic [LW-1:0] c_rem;
  logic [SW-1:0] c_prev;
  logic [SW-1:0] sp;

  logic          act, first;
  logic [FW-1:0] f;
  logic [LW-1:0] rem, rem_n;
  logic [OW-1:0] o;
  logic [NW-1:0] m;
  logic [OW+1:0] endb;
  logic          span, lo_req, adv;
  logic [DW-1:0] d_cur, d_nxt;
  logic [SW-1:0] slot_lo, slot_hi;

  dispatcher #(.Q(Q), .K(K)) u_rr (
    .clk, .rst_n, .flow_i(f), .adv_i(act && adv), .d_o(d_cur)
  );

  always_comb begin
    act     = busy || pr_valid_i;
    first   = !busy;
    f       = busy ? c_flow : pr_flow_i;
    rem     = busy ? c_rem  : pr_len_i;
    o       = off[f];
    m       = (rem >= LW'(WB)) ? NW'(WB) : NW'(rem);
    endb    = (OW+2)'(o) + (OW+2)'(m);
    span    = endb > (OW+2)'(WB);
    adv     = endb >= (OW+2)'(WB);
    lo_req  = first || (o == '0);
    slot_lo = lo_req ? sp : c_prev;
    slot_hi = lo_req ? sp + 1'b1 : sp;
    d_nxt   = (d_cur == DW'(K - 1)) ? '0 : d_cur + 1'b1;
    rem_n   = rem - LW'(m);
  end

  assign pr_ready_o   = !busy;
  assign tk_valid_o   = act;
  assign tk_flow_o    = f;
  assign tk_off_o     = o;
  assign tk_nbytes_o  = m;
  assign tk_span_o    = span;
  assign tk_slot_lo_o = slot_lo;
  assign tk_slot_hi_o = slot_hi;
  assign tk_sop_o     = first;
  assign tk_eop_o     = (rem_n == '0);

  assign rq0_valid_o = act && lo_req;
  assign rq0_d_o     = d_cur;
  assign rq0_flow_o  = f;
  assign rq0_slot_o  = slot_lo;
  assign rq0_re_o    = first && (o != '0);
  assign rq1_valid_o = act && span;
  assign rq1_d_o     = d_nxt;
  assign rq1_flow_o  = f;
  assign rq1_slot_o  = slot_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < Q; i++) off[i] <= '0;
      busy   <= 1'b0;
      c_flow <= '0;
      c_rem  <= '0;
      c_prev <= '0;
      sp     <= '0;
    end else if (act) begin
      off[f] <= adv ? OW'(endb - (OW+2)'(WB)) : OW'(endb);
      sp     <= sp + SW'(lo_req) + SW'(span);
      busy   <= (rem_n != '0);
      c_flow <= f;
      c_rem  <= rem_n;
      c_prev <= span ? slot_hi : slot_lo;
    end
  end

`ifndef SYNTHESIS
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    (pr_valid_i && pr_ready_o) |-> (pr_len_i != '0 && pr_len_i <= LW'(MAXLEN)));
`endif
endmodule
