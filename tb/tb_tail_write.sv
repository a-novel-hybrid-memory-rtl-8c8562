// Testbench of the write module together with the free list, pointer memory,
// queue table and tail buffer it drives: random full blocks for random
// (flow, DRAM queue) pairs are written, then every list is drained through
// the queue table and pointer memory and the tail-buffer words are compared
// with the blocks in write order. Finally the buffer is filled beyond its
// depth and the overflow flag must rise.
module tb_tail_write;
  localparam int unsigned W = 32, Q = 2, K = 2, DEPTH = 24;
  localparam int unsigned AW = 5, FW = 1, DW = 1, CW = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          blk_valid, alloc, alloc_ok, tb_we, pm_we, ap_valid, ap_nonempty, ovf;
  logic [FW-1:0] blk_flow, ap_flow, lu_flow, oq_flow;
  logic [DW-1:0] blk_d, ap_d, lu_d, oq_sel;
  logic [W-1:0]  blk_data, tb_wdata, tb_rdata;
  logic [AW-1:0] alloc_addr, tb_waddr, pm_waddr, pm_wdata, ap_addr, ap_old_tail, lu_head, pop_next;
  logic          lu_nonempty, pop, free_v;
  logic [K-1:0]  oq_nonempty;
  logic          oq_ovf;
  logic [CW-1:0] used;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [Q*K][$];

  tail_write #(.W(W), .Q(Q), .K(K), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .blk_valid_i(blk_valid), .blk_flow_i(blk_flow), .blk_d_i(blk_d),
    .blk_data_i(blk_data), .alloc_o(alloc), .alloc_ok_i(alloc_ok), .alloc_addr_i(alloc_addr),
    .tb_we_o(tb_we), .tb_waddr_o(tb_waddr), .tb_wdata_o(tb_wdata),
    .pm_we_o(pm_we), .pm_waddr_o(pm_waddr), .pm_wdata_o(pm_wdata),
    .ap_valid_o(ap_valid), .ap_flow_o(ap_flow), .ap_d_o(ap_d), .ap_addr_o(ap_addr),
    .ap_nonempty_i(ap_nonempty), .ap_old_tail_i(ap_old_tail), .overflow_o(ovf)
  );
  free_list #(.DEPTH(DEPTH)) u_fl (.clk, .rst_n, .alloc_i(alloc), .alloc_ok_o(alloc_ok),
    .alloc_addr_o(alloc_addr), .free_i(free_v), .free_addr_i(lu_head), .used_o(used));
  ptr_mem #(.DEPTH(DEPTH)) u_pm (.clk, .we_i(pm_we), .waddr_i(pm_waddr), .wdata_i(pm_wdata),
                                 .raddr_i(lu_head), .rdata_o(pop_next));
  queue_table #(.Q(Q), .K(K), .DEPTH(DEPTH), .ODEPTH(64)) u_qt (
    .clk, .rst_n, .ap_valid_i(ap_valid), .ap_flow_i(ap_flow), .ap_d_i(ap_d), .ap_addr_i(ap_addr),
    .ap_nonempty_o(ap_nonempty), .ap_old_tail_o(ap_old_tail),
    .lu_flow_i(lu_flow), .lu_d_i(lu_d), .lu_nonempty_o(lu_nonempty), .lu_head_o(lu_head),
    .pop_i(pop), .pop_next_i(pop_next), .oq_nonempty_o(oq_nonempty), .oq_sel_i(oq_sel),
    .oq_flow_o(oq_flow), .oq_pop_i(1'b0), .oq_overflow_o(oq_ovf));
  tail_buffer #(.W(W), .DEPTH(DEPTH)) u_tb (.clk, .we_i(tb_we), .waddr_i(tb_waddr),
    .wdata_i(tb_wdata), .re_i(pop), .raddr_i(lu_head), .rdata_o(tb_rdata));
  assign free_v = pop;

  task automatic drain();
    for (int l = 0; l < int'(Q * K); l++) begin
      while (ref_q[l].size() > 0) begin
        @(negedge clk);
        lu_flow = FW'(l / int'(K)); lu_d = DW'(l % int'(K)); pop = 1;
        @(negedge clk);
        pop = 0;
        checks++;
        if (tb_rdata != ref_q[l][0]) begin failures++; $display("list %0d: %h/%h", l, tb_rdata, ref_q[l][0]); end
        void'(ref_q[l].pop_front());
      end
    end
    @(negedge clk);
    checks++;
    if (used != '0) begin failures++; $display("addresses not returned"); end
  endtask

  initial begin
    blk_valid = 0; blk_flow = '0; blk_d = '0; blk_data = '0; lu_flow = '0; lu_d = '0; pop = 0;
    oq_sel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int n;
      n = 1 + int'($urandom % DEPTH);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        blk_valid = 1; blk_flow = FW'($urandom % Q); blk_d = DW'($urandom % K); blk_data = $urandom;
        ref_q[int'(blk_flow) * int'(K) + int'(blk_d)].push_back(blk_data);
      end
      @(negedge clk);
      blk_valid = 0;
      drain();
    end
    checks++;
    if (ovf) begin failures++; $display("early overflow"); end
    for (int i = 0; i < int'(DEPTH) + 1; i++) begin
      @(negedge clk);
      blk_valid = 1; blk_flow = '0; blk_d = '0; blk_data = $urandom;
    end
    @(negedge clk);
    blk_valid = 0;
    checks++;
    if (!ovf) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
