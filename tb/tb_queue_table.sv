// Testbench of the queue table with the pointer memory: random appends of
// fresh addresses to random (flow, DRAM queue) lists and random pops,
// including both on the same list in one cycle. Reference queues predict the
// head address and emptiness of every list and the flow order of every DRAM
// queue's order FIFO.
module tb_queue_table;
  localparam int unsigned Q = 3, K = 3, DEPTH = 64, ODEPTH = 64;
  localparam int unsigned AW = 6, FW = 2, DW = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          ap_valid, ap_nonempty, lu_nonempty, pop, oq_pop, oq_ovf;
  logic [FW-1:0] ap_flow, lu_flow, oq_flow;
  logic [DW-1:0] ap_d, lu_d, oq_sel;
  logic [AW-1:0] ap_addr, ap_old_tail, lu_head, pop_next;
  logic [K-1:0]  oq_nonempty;
  logic          pm_we;
  logic [AW-1:0] pm_waddr, pm_wdata;
  int checks = 0, failures = 0, nsame = 0;

  int lst [Q*K][$];
  int ord [K][$];
  int free_q [$];

  queue_table #(.Q(Q), .K(K), .DEPTH(DEPTH), .ODEPTH(ODEPTH)) dut (
    .clk, .rst_n, .ap_valid_i(ap_valid), .ap_flow_i(ap_flow), .ap_d_i(ap_d), .ap_addr_i(ap_addr),
    .ap_nonempty_o(ap_nonempty), .ap_old_tail_o(ap_old_tail),
    .lu_flow_i(lu_flow), .lu_d_i(lu_d), .lu_nonempty_o(lu_nonempty), .lu_head_o(lu_head),
    .pop_i(pop), .pop_next_i(pop_next),
    .oq_nonempty_o(oq_nonempty), .oq_sel_i(oq_sel), .oq_flow_o(oq_flow), .oq_pop_i(oq_pop),
    .oq_overflow_o(oq_ovf)
  );
  assign pm_we    = ap_valid && ap_nonempty;
  assign pm_waddr = ap_old_tail;
  assign pm_wdata = ap_addr;
  ptr_mem #(.DEPTH(DEPTH)) u_pm (.clk, .we_i(pm_we), .waddr_i(pm_waddr), .wdata_i(pm_wdata),
                                 .raddr_i(lu_head), .rdata_o(pop_next));

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) free_q.push_back(i);
    ap_valid = 0; ap_flow = '0; ap_d = '0; ap_addr = '0; lu_flow = '0; lu_d = '0; pop = 0;
    oq_sel = '0; oq_pop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      int li, ai;
      @(negedge clk);
      lu_flow = FW'($urandom % Q); lu_d = DW'($urandom % K);
      li = int'(lu_flow) * int'(K) + int'(lu_d);
      ap_valid = (free_q.size() > 8) && ($urandom % 2);
      if ($urandom % 4 == 0) begin ap_flow = lu_flow; ap_d = lu_d; end
      else begin ap_flow = FW'($urandom % Q); ap_d = DW'($urandom % K); end
      ai = int'(ap_flow) * int'(K) + int'(ap_d);
      ap_addr = ap_valid ? AW'(free_q.pop_front()) : '0;
      pop = $urandom % 2;
      oq_sel = DW'($urandom % K);
      oq_pop = $urandom % 2;
      #1;
      checks++;
      if (lu_nonempty != (lst[li].size() > 0) || (lst[li].size() > 0 && int'(lu_head) != lst[li][0])) begin
        failures++; $display("list %0d: nonempty %0d head %0d", li, lu_nonempty, lu_head);
      end
      checks++;
      if (ap_nonempty != (lst[ai].size() > 0)) begin failures++; $display("append view wrong"); end
      for (int d = 0; d < int'(K); d++) begin
        checks++;
        if (oq_nonempty[d] != (ord[d].size() > 0)) begin failures++; $display("order %0d empty flag", d); end
      end
      if (ord[oq_sel].size() > 0) begin
        checks++;
        if (int'(oq_flow) != ord[oq_sel][0]) begin failures++; $display("order head"); end
      end
      @(posedge clk);
      if (ap_valid && pop && ai == li && lst[li].size() > 0) nsame++;
      if (pop && lst[li].size() > 0) free_q.push_back(lst[li].pop_front());
      if (ap_valid) begin lst[ai].push_back(int'(ap_addr)); end
      if (oq_pop && ord[oq_sel].size() > 0) void'(ord[oq_sel].pop_front());
      if (ap_valid) ord[ap_d].push_back(int'(ap_flow));
    end
    checks++;
    if (nsame == 0 || oq_ovf) failures++;
    $display("same-list append+pop %0d", nsame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
