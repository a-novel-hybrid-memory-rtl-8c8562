// Testbench of the aggregation module: random words of random flows with 1..W/8
// bytes. A per-flow byte queue predicts every full block (exactly W/8 bytes,
// in arrival order, no padding) and, for random short-cut reads, the partial
// block and its fill one cycle later.
module tb_aggregation;
  localparam int unsigned W = 64, Q = 4, WB = W / 8, NW = $clog2(WB + 1);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          in_valid, blk_valid, sc_valid, sc_valid_o;
  logic [1:0]    in_flow, blk_flow, sc_flow;
  logic [W-1:0]  in_data, blk_data, sc_data;
  logic [NW-1:0] in_nbytes, sc_fill;
  int checks = 0, failures = 0, nblk = 0, npeek = 0;
  logic [7:0] q [Q][$];
  logic [W-1:0] exp_sc;
  int exp_fill;
  bit exp_sc_v;

  aggregation #(.W(W), .Q(Q)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_flow_i(in_flow), .in_data_i(in_data),
    .in_nbytes_i(in_nbytes), .blk_valid_o(blk_valid), .blk_flow_o(blk_flow),
    .blk_data_o(blk_data), .sc_valid_i(sc_valid), .sc_flow_i(sc_flow),
    .sc_valid_o(sc_valid_o), .sc_data_o(sc_data), .sc_fill_o(sc_fill)
  );

  initial begin
    in_valid = 0; in_flow = '0; in_data = '0; in_nbytes = '0; sc_valid = 0; sc_flow = '0;
    exp_sc_v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // check last cycle's short-cut read
      if (exp_sc_v) begin
        checks++;
        if (!sc_valid_o || sc_data != exp_sc || int'(sc_fill) != exp_fill) begin
          failures++; $display("short-cut mismatch %h/%h fill %0d/%0d", sc_data, exp_sc, sc_fill, exp_fill);
        end
      end
      // short-cut request sees the state before this cycle's word
      sc_valid = ($urandom % 4) == 0;
      sc_flow  = 2'($urandom % Q);
      exp_sc_v = sc_valid;
      exp_sc   = '0;
      exp_fill = q[sc_flow].size();
      for (int b = 0; b < exp_fill; b++) exp_sc[8*b +: 8] = q[sc_flow][b];
      if (sc_valid) npeek++;
      in_valid = ($urandom % 5) != 0;
      in_flow  = 2'($urandom % Q);
      in_nbytes = NW'(1 + $urandom % WB);
      in_data  = {$urandom, $urandom};
      if (in_valid)
        for (int b = 0; b < int'(in_nbytes); b++) q[in_flow].push_back(in_data[8*b +: 8]);
      #1;
      checks++;
      if (in_valid && q[in_flow].size() >= int'(WB)) begin
        logic [W-1:0] e;
        for (int b = 0; b < int'(WB); b++) e[8*b +: 8] = q[in_flow].pop_front();
        nblk++;
        if (!blk_valid || blk_flow != in_flow || blk_data != e) begin
          failures++; $display("block mismatch %h/%h", blk_data, e);
        end
      end else if (blk_valid) begin
        failures++; $display("unexpected block");
      end
    end
    checks++;
    if (nblk < 100 || npeek < 100) failures++;
    $display("blocks %0d short-cuts %0d", nblk, npeek);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
