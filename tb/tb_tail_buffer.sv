// Testbench of the tail buffer SRAM: one random write and one random read per
// cycle; read data must appear one cycle after the read and hold the value
// written before that edge (a read and a write of the same word in one cycle
// returns the old word).
module tb_tail_buffer;
  localparam int unsigned W = 64, DEPTH = 21, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  ref_mem [DEPTH];
  bit            known [DEPTH];
  int checks = 0, failures = 0;

  tail_buffer #(.W(W), .DEPTH(DEPTH)) dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                                           .re_i(re), .raddr_i(raddr), .rdata_o(rdata));
  initial begin
    logic [W-1:0] exp_d;
    bit exp_v;
    for (int i = 0; i < int'(DEPTH); i++) known[i] = 0;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0; exp_v = 0; exp_d = '0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata != exp_d) begin failures++; $display("read %h/%h", rdata, exp_d); end
      end
      we = $urandom % 2; waddr = AW'($urandom % DEPTH); wdata = {$urandom, $urandom};
      re = $urandom % 2; raddr = AW'($urandom % DEPTH);
      exp_v = re && known[raddr];
      exp_d = ref_mem[raddr];
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
