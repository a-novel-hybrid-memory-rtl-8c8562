// Testbench of the request buffer: random pairs of pushes to different DRAM
// queues and random pops of any subset, compared with reference FIFOs; the
// overflow flag must rise only when a full queue is pushed.
module tb_request_buffer;
  localparam int unsigned Q = 4, K = 3, DEPTH = 6, HSLOTS = 32;
  localparam int unsigned FW = 2, DW = 2, SW = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          p0v, p1v, p0re, ovf;
  logic [DW-1:0] p0d, p1d;
  logic [FW-1:0] p0f, p1f;
  logic [SW-1:0] p0s, p1s;
  logic [K-1:0]  ne, re, pop;
  logic [K-1:0][FW-1:0] fl;
  logic [K-1:0][SW-1:0] sl;
  int checks = 0, failures = 0;
  int refq [K][$];
  bit exp_ovf;

  request_buffer #(.Q(Q), .K(K), .DEPTH(DEPTH), .HSLOTS(HSLOTS)) dut (
    .clk, .rst_n, .p0_valid_i(p0v), .p0_d_i(p0d), .p0_flow_i(p0f), .p0_slot_i(p0s), .p0_re_i(p0re),
    .p1_valid_i(p1v), .p1_d_i(p1d), .p1_flow_i(p1f), .p1_slot_i(p1s),
    .nonempty_o(ne), .flow_o(fl), .slot_o(sl), .re_o(re), .pop_i(pop), .overflow_o(ovf)
  );

  initial begin
    p0v = 0; p1v = 0; p0d = '0; p1d = '0; p0f = '0; p1f = '0; p0s = '0; p1s = '0; p0re = 0;
    pop = '0; exp_ovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int d = 0; d < int'(K); d++) begin
        checks++;
        if (ne[d] != (refq[d].size() > 0) ||
            (refq[d].size() > 0 && {fl[d], sl[d], re[d]} != (FW+SW+1)'(refq[d][0]))) begin
          failures++; $display("queue %0d head wrong", d);
        end
      end
      checks++;
      if (ovf != exp_ovf) begin failures++; $display("overflow flag %0d/%0d", ovf, exp_ovf); end
      p0v = $urandom % 2; p1v = $urandom % 2;
      p0d = DW'($urandom % K); p1d = DW'((int'(p0d) + 1 + $urandom % (K - 1)) % K);
      p0f = FW'($urandom); p1f = FW'($urandom); p0s = SW'($urandom); p1s = SW'($urandom);
      p0re = $urandom % 2;
      pop = K'($urandom) | K'($urandom);
      @(posedge clk);
      #1;
      for (int d = 0; d < int'(K); d++) if (pop[d] && refq[d].size() > 0) void'(refq[d].pop_front());
      if (p0v) begin
        if (refq[p0d].size() == int'(DEPTH)) exp_ovf = 1;
        else refq[p0d].push_back(int'({p0f, p0s, p0re}));
      end
      if (p1v) begin
        if (refq[p1d].size() == int'(DEPTH)) exp_ovf = 1;
        else refq[p1d].push_back(int'({p1f, p1s, 1'b0}));
      end
      if (exp_ovf) break;
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
