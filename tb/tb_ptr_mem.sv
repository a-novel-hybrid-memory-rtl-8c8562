// Testbench of the pointer memory: random writes and asynchronous reads,
// compared with a reference array.
module tb_ptr_mem;
  localparam int unsigned DEPTH = 40, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          we;
  logic [AW-1:0] waddr, wdata, raddr, rdata;
  logic [AW-1:0] ref_mem [DEPTH];
  bit            known [DEPTH];
  int checks = 0, failures = 0;

  ptr_mem #(.DEPTH(DEPTH)) dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                                .raddr_i(raddr), .rdata_o(rdata));
  initial begin
    for (int i = 0; i < int'(DEPTH); i++) known[i] = 0;
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      raddr = AW'($urandom % DEPTH);
      #1;
      if (known[raddr]) begin
        checks++;
        if (rdata != ref_mem[raddr]) begin failures++; $display("addr %0d: %0d/%0d", raddr, rdata, ref_mem[raddr]); end
      end
      we = $urandom % 2;
      waddr = AW'($urandom % DEPTH);
      wdata = AW'($urandom);
      @(posedge clk);
      if (we) begin ref_mem[waddr] = wdata; known[waddr] = 1; end
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
