// Reassembler: delivers the requested packets after a constant read latency.
//
// Delivery tasks from the requester (one per output word) wait in a FIFO with
// the cycle they were issued. Exactly LAT cycles after a task was issued the
// word appears on out_*: its bytes are taken from the head-buffer slot of the
// word's first block, starting at the task's byte offset, continued from the
// slot of the following block when the word spans two blocks, and cut to the
// task's byte count. A first block marked "cached" is read from the flow's
// remainder instead. After each word the block that holds its last byte is
// saved as the flow's remainder. late_o flags a word whose blocks had not
// arrived in time (never expected when LAT respects the bound of the design).
// Words of one packet leave in consecutive cycles, first word with sop_o.
module reassembler #(
  parameter int unsigned W      = sphsd_pkg::W_DEF,
  parameter int unsigned Q      = sphsd_pkg::Q_DEF,
  parameter int unsigned HSLOTS = 16384,
  parameter int unsigned LAT    = 5188,
  localparam int unsigned WB = W / 8,
  localparam int unsigned NW = $clog2(WB + 1),
  localparam int unsigned OW = $clog2(WB),
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned SW = $clog2(HSLOTS),
  localparam int unsigned TD = 2 ** $clog2(LAT + 1),
  localparam int unsigned TP = $clog2(TD),
  localparam int unsigned TSW = TP + 1,
  localparam int unsigned TKW = FW + OW + NW + 1 + SW + SW + 1 + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // tasks from the requester
  input  logic          tk_valid_i,
  input  logic [FW-1:0] tk_flow_i,
  input  logic [OW-1:0] tk_off_i,
  input  logic [NW-1:0] tk_nbytes_i,
  input  logic          tk_span_i,
  input  logic [SW-1:0] tk_slot_lo_i,
  input  logic [SW-1:0] tk_slot_hi_i,
  input  logic          tk_sop_i,
  input  logic          tk_eop_i,
  // head buffer
  output logic [SW-1:0] lo_slot_o,
  input  logic [W-1:0]  lo_data_i,
  input  logic          lo_cached_i,
  input  logic          lo_filled_i,
  output logic [SW-1:0] hi_slot_o,
  input  logic [W-1:0]  hi_data_i,
  input  logic          hi_filled_i,
  output logic          rw_o,
  output logic [FW-1:0] rw_flow_o,
  output logic [W-1:0]  rw_data_o,
  output logic [FW-1:0] rr_flow_o,
  input  logic [W-1:0]  rr_data_i,
  // packet words out
  output logic          out_valid_o,
  output logic [FW-1:0] out_flow_o,
  output logic [W-1:0]  out_data_o,
  output logic [NW-1:0] out_nbytes_o,
  output logic          out_sop_o,
  output logic          out_eop_o,
  output logic          late_o
);
  logic [TKW-1:0] tmem [TD];
  logic [TSW-1:0] tts  [TD];
  logic [TP-1:0]  rd, wr;
  logic [TP:0]    cnt;
  logic [TSW-1:0] now;

  logic [FW-1:0] h_flow;
  logic [OW-1:0] h_off;
  logic [NW-1:0] h_nb;
  logic          h_span, h_sop, h_eop;
  logic [SW-1:0] h_lo, h_hi;
  assign {h_flow, h_off, h_nb, h_span, h_lo, h_hi, h_sop, h_eop} = tmem[rd];

  logic due;
  assign due = (cnt != '0) && (TSW'(now - tts[rd]) == TSW'(LAT - 1));

  logic [W-1:0]   lo_blk;
  logic [W-1:0]   word;
  always_comb begin
    lo_blk = lo_cached_i ? rr_data_i : lo_data_i;
    word   = W'({hi_data_i, lo_blk} >> (8 * h_off));  // funnel shift, low word kept
    if (h_nb < NW'(WB)) word = word & ~({W{1'b1}} << (8 * h_nb));
  end

  assign lo_slot_o = h_lo;
  assign hi_slot_o = h_hi;
  assign rr_flow_o = h_flow;
  assign rw_o      = due;
  assign rw_flow_o = h_flow;
  assign rw_data_o = h_span ? hi_data_i : lo_blk;

  always_ff @(posedge clk) begin
    if (tk_valid_i) begin
      tmem[wr] <= {tk_flow_i, tk_off_i, tk_nbytes_i, tk_span_i, tk_slot_lo_i, tk_slot_hi_i,
                   tk_sop_i, tk_eop_i};
      tts[wr]  <= now;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0; now <= '0;
      out_valid_o <= 1'b0; out_flow_o <= '0; out_data_o <= '0; out_nbytes_o <= '0;
      out_sop_o <= 1'b0; out_eop_o <= 1'b0; late_o <= 1'b0;
    end else begin
      now <= now + 1'b1;
      if (tk_valid_i) wr <= wr + 1'b1;
      if (due)        rd <= rd + 1'b1;
      cnt <= cnt + (TP+1)'(tk_valid_i) - (TP+1)'(due);
      out_valid_o  <= due;
      out_flow_o   <= h_flow;
      out_data_o   <= word;
      out_nbytes_o <= h_nb;
      out_sop_o    <= due && h_sop;
      out_eop_o    <= due && h_eop;
      late_o       <= due && (!lo_filled_i || (h_span && !hi_filled_i));
    end
  end
endmodule
