// Testbench of the reassembler with a head buffer: random delivery tasks whose
// blocks are written into random head-buffer slots (some first blocks as
// "cached", i.e. taken from the flow's remainder). Each output word must
// appear exactly LAT cycles after its task, built from the right bytes of one
// or two blocks and cut to its byte count; a task whose block never arrives
// must be flagged late.
module tb_reassembler;
  localparam int unsigned W = 64, Q = 3, HSLOTS = 64, LAT = 12;
  localparam int unsigned WB = 8, NW = 4, OW = 3, FW = 2, SW = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          tkv, tks, tksop, tkeop, loc, lof, hif, rw, ov, osop, oeop, late;
  logic [FW-1:0] tkf, rwf, rrf, of;
  logic [OW-1:0] tko;
  logic [NW-1:0] tkn, onb;
  logic [SW-1:0] tklo, tkhi, los, his;
  logic [W-1:0]  lod, hid, rwd, rrd, od;
  logic          clr0, wa, wb, wbc;
  logic [SW-1:0] clr0s, was, wbs;
  logic [W-1:0]  wad, wbd;
  int checks = 0, failures = 0, cyc = 0, n_cached = 0, n_span = 0, n_late = 0;

  reassembler #(.W(W), .Q(Q), .HSLOTS(HSLOTS), .LAT(LAT)) dut (
    .clk, .rst_n, .tk_valid_i(tkv), .tk_flow_i(tkf), .tk_off_i(tko), .tk_nbytes_i(tkn),
    .tk_span_i(tks), .tk_slot_lo_i(tklo), .tk_slot_hi_i(tkhi), .tk_sop_i(tksop), .tk_eop_i(tkeop),
    .lo_slot_o(los), .lo_data_i(lod), .lo_cached_i(loc), .lo_filled_i(lof),
    .hi_slot_o(his), .hi_data_i(hid), .hi_filled_i(hif), .rw_o(rw), .rw_flow_o(rwf),
    .rw_data_o(rwd), .rr_flow_o(rrf), .rr_data_i(rrd), .out_valid_o(ov), .out_flow_o(of),
    .out_data_o(od), .out_nbytes_o(onb), .out_sop_o(osop), .out_eop_o(oeop), .late_o(late)
  );
  head_buffer #(.W(W), .Q(Q), .HSLOTS(HSLOTS)) u_hb (
    .clk, .rst_n, .clr0_i(clr0), .clr0_slot_i(clr0s), .clr1_i(1'b0), .clr1_slot_i('0),
    .wa_i(wa), .wa_slot_i(was), .wa_data_i(wad), .wb_i(wb), .wb_slot_i(wbs), .wb_data_i(wbd),
    .wb_cached_i(wbc), .lo_slot_i(los), .lo_data_o(lod), .lo_cached_o(loc), .lo_filled_o(lof),
    .hi_slot_i(his), .hi_data_o(hid), .hi_filled_o(hif), .rw_i(rw), .rw_flow_i(rwf),
    .rw_data_i(rwd), .rr_flow_i(rrf), .rr_data_o(rrd)
  );

  typedef struct { int due; int f; logic [W-1:0] lo, hi; bit cached, span; int off, nb; bit sop, eop; } t_t;
  t_t exp_q [$];
  logic [W-1:0] rem [Q];
  bit remk [Q];

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (late) n_late++;
    if (ov) begin
      t_t e;
      logic [2*W-1:0] both;
      logic [W-1:0] lo_eff, word;
      checks++;
      if (exp_q.size() == 0 && !late) begin failures++; $display("unexpected word"); end
      else if (exp_q.size() == 0) checks--;
      else begin
        e = exp_q.pop_front();
        lo_eff = e.cached ? rem[e.f] : e.lo;
        both = {e.hi, lo_eff} >> (8 * e.off);
        word = both[W-1:0];
        if (e.nb < int'(WB)) word = word & ~({W{1'b1}} << (8 * e.nb));
        if (e.due != cyc || int'(of) != e.f || od != word || int'(onb) != e.nb ||
            osop != e.sop || oeop != e.eop) begin
          failures++;
          if (failures < 8) $display("word mismatch at %0d (due %0d): %h/%h", cyc, e.due, od, word);
        end
        rem[e.f] = e.span ? e.hi : lo_eff;
        remk[e.f] = 1;
      end
    end
  end

  initial begin
    int sp;
    sp = 0;
    for (int f = 0; f < int'(Q); f++) remk[f] = 0;
    {tkv, tks, tksop, tkeop, clr0, wa, wb, wbc} = '0;
    tkf = '0; tko = '0; tkn = '0; tklo = '0; tkhi = '0; clr0s = '0; was = '0; wbs = '0;
    wad = '0; wbd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      t_t e;
      @(negedge clk);
      {tkv, wa, wb, wbc} = '0;
      if ($urandom % 10 < 7) begin
        e.f = int'($urandom % Q);
        e.off = int'($urandom % WB);
        e.nb = 1 + int'($urandom % WB);
        e.span = (e.off + e.nb > int'(WB));
        e.cached = remk[e.f] && ($urandom % 5 == 0);
        e.lo = {$urandom, $urandom}; e.hi = {$urandom, $urandom};
        e.sop = $urandom % 2; e.eop = $urandom % 2;
        e.due = cyc + int'(LAT);
        tkv = 1; tkf = FW'(e.f); tko = OW'(e.off); tkn = NW'(e.nb); tks = e.span;
        tklo = SW'(sp); tkhi = SW'(sp + 1); tksop = e.sop; tkeop = e.eop;
        wa = 1; was = SW'(sp); wad = e.lo;
        wb = 1; wbs = SW'(sp + 1); wbd = e.hi; wbc = 1'b0;
        if (e.cached) begin
          // first block stands for the remainder: marker on port B, data block on port A
          was = SW'(sp + 1); wad = e.hi; wbs = SW'(sp); wbc = 1'b1;
          n_cached++;
        end
        if (e.span) n_span++;
        sp += 2;
        exp_q.push_back(e);
      end
    end
    // a task whose block is never written must be reported late
    @(negedge clk);
    {wa, wb} = '0;
    tkv = 1; tkf = '0; tko = '0; tkn = NW'(WB); tks = 0; tklo = SW'(sp); tkhi = SW'(sp);
    clr0 = 1; clr0s = SW'(sp);
    @(negedge clk);
    tkv = 0; clr0 = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (n_late != 1) begin failures++; $display("late flags %0d", n_late); end
    checks++;
    if (exp_q.size() != 0 || n_cached < 10 || n_span < 100) begin failures++; $display("coverage"); end
    $display("cached %0d spans %0d", n_cached, n_span);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
