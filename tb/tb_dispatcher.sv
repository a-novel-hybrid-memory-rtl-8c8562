// Testbench of the per-flow round-robin dispatcher: random block completions
// of random flows; a reference counter per flow predicts the DRAM queue of
// each block (block n of a flow goes to DRAM n mod K).
module tb_dispatcher;
  localparam int unsigned Q = 8, K = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic [2:0] flow;
  logic       adv;
  logic [2:0] d;
  int checks = 0, failures = 0;
  int nblk [Q];

  dispatcher #(.Q(Q), .K(K)) dut (.clk, .rst_n, .flow_i(flow), .adv_i(adv), .d_o(d));

  initial begin
    flow = '0; adv = 0;
    for (int i = 0; i < int'(Q); i++) nblk[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      flow = 3'($urandom % Q);
      adv  = ($urandom % 3) != 0;
      #1;
      checks++;
      if (int'(d) != nblk[flow] % int'(K)) begin
        failures++;
        if (failures < 5) $display("flow %0d block %0d: d=%0d", flow, nblk[flow], d);
      end
      if (adv) nblk[flow]++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
