// Testbench of the head buffer: random slot clears and writes on both ports
// (data or "cached" markers) and remainder writes, checked on the two slot
// read ports and the remainder read port against reference arrays.
module tb_head_buffer;
  localparam int unsigned W = 32, Q = 4, HSLOTS = 16, FW = 2, SW = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          c0, c1, wa, wb, wbc, loc, lof, hif, rw;
  logic [SW-1:0] c0s, c1s, was, wbs, los, his;
  logic [W-1:0]  wad, wbd, lod, hid, rwd, rrd;
  logic [FW-1:0] rwf, rrf;
  int checks = 0, failures = 0;
  logic [W-1:0] rd_ [HSLOTS];
  bit rc [HSLOTS], rfl [HSLOTS], rk [HSLOTS];
  logic [W-1:0] rrem [Q];
  bit rremk [Q];

  head_buffer #(.W(W), .Q(Q), .HSLOTS(HSLOTS)) dut (
    .clk, .rst_n, .clr0_i(c0), .clr0_slot_i(c0s), .clr1_i(c1), .clr1_slot_i(c1s),
    .wa_i(wa), .wa_slot_i(was), .wa_data_i(wad), .wb_i(wb), .wb_slot_i(wbs), .wb_data_i(wbd),
    .wb_cached_i(wbc), .lo_slot_i(los), .lo_data_o(lod), .lo_cached_o(loc), .lo_filled_o(lof),
    .hi_slot_i(his), .hi_data_o(hid), .hi_filled_o(hif), .rw_i(rw), .rw_flow_i(rwf),
    .rw_data_i(rwd), .rr_flow_i(rrf), .rr_data_o(rrd)
  );

  initial begin
    for (int i = 0; i < int'(HSLOTS); i++) begin rfl[i] = 0; rk[i] = 0; end
    for (int i = 0; i < int'(Q); i++) rremk[i] = 0;
    {c0, c1, wa, wb, wbc, rw} = '0;
    {c0s, c1s, was, wbs, los, his} = '0;
    {wad, wbd, rwd} = '0; rwf = '0; rrf = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      los = SW'($urandom); his = SW'($urandom); rrf = FW'($urandom);
      #1;
      checks++;
      if (lof != rfl[los] || hif != rfl[his]) begin failures++; $display("filled flags"); end
      if (rk[los] && rfl[los]) begin
        checks++;
        if (loc != rc[los] || (!rc[los] && lod != rd_[los])) begin failures++; $display("lo read"); end
      end
      if (rk[his] && rfl[his] && !rc[his]) begin
        checks++;
        if (hid != rd_[his]) begin failures++; $display("hi read"); end
      end
      if (rremk[rrf]) begin
        checks++;
        if (rrd != rrem[rrf]) begin failures++; $display("remainder read"); end
      end
      c0 = $urandom % 3 == 0; c0s = SW'($urandom);
      c1 = $urandom % 3 == 0; c1s = SW'(c0s + 1 + $urandom % 7);
      wa = $urandom % 2; was = SW'($urandom); wad = $urandom;
      wb = $urandom % 2; wbs = SW'(was + 1 + $urandom % 7); wbd = $urandom; wbc = $urandom % 3 == 0;
      if (c0 && (c0s == was || c0s == wbs)) c0 = 0;
      if (c1 && (c1s == was || c1s == wbs)) c1 = 0;
      rw = $urandom % 2; rwf = FW'($urandom); rwd = $urandom;
      @(posedge clk);
      #1;
      if (c0) rfl[c0s] = 0;
      if (c1) rfl[c1s] = 0;
      if (wa) begin rd_[was] = wad; rc[was] = 0; rfl[was] = 1; rk[was] = 1; end
      if (wb) begin if (!wbc) rd_[wbs] = wbd; rc[wbs] = wbc; rfl[wbs] = 1; rk[wbs] = !wbc || rk[wbs]; end
      if (wb && wbc) rk[wbs] = 1;
      if (rw) begin rrem[rwf] = rwd; rremk[rwf] = 1; end
      {c0, c1, wa, wb, rw} = '0;
    end
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
