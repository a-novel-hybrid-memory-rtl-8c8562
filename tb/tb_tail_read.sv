// Testbench of the read module: random transfer orders (to DRAM, short-cut of
// a full block, short-cut of a partial block). Checks the pop, free and read
// strobes in the order cycle and the routing of the data one cycle later.
module tb_tail_read;
  localparam int unsigned W = 32, Q = 4, K = 4, DEPTH = 10, WB = 4, NW = 3;
  localparam int unsigned FW = 2, DW = 2, AW = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic          rd_valid, rd_sc, peek, pop, free_v, tb_re, dwv, scv, scfull;
  logic [FW-1:0] rd_flow, dwf;
  logic [DW-1:0] rd_d, dwb;
  logic [AW-1:0] lu_head, pop_next, pm_raddr, pm_rdata, free_addr, tb_raddr;
  logic [W-1:0]  tb_rdata, agg_data, dwd, scd;
  logic [NW-1:0] agg_fill, scfill;
  int checks = 0, failures = 0;

  tail_read #(.W(W), .Q(Q), .K(K), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .rd_valid_i(rd_valid), .rd_sc_i(rd_sc), .rd_flow_i(rd_flow), .rd_d_i(rd_d),
    .peek_i(peek), .lu_head_i(lu_head), .pop_o(pop), .pop_next_o(pop_next),
    .pm_raddr_o(pm_raddr), .pm_rdata_i(pm_rdata), .free_o(free_v), .free_addr_o(free_addr),
    .tb_re_o(tb_re), .tb_raddr_o(tb_raddr), .tb_rdata_i(tb_rdata),
    .agg_data_i(agg_data), .agg_fill_i(agg_fill),
    .dram_wr_valid_o(dwv), .dram_wr_bank_o(dwb), .dram_wr_flow_o(dwf), .dram_wr_data_o(dwd),
    .sc_valid_o(scv), .sc_full_o(scfull), .sc_fill_o(scfill), .sc_data_o(scd)
  );
  // pointer memory stand-in: next = head + 1; tail buffer stand-in: data = f(addr)
  assign pm_rdata = pm_raddr + 1'b1;
  always_ff @(posedge clk) if (tb_re) tb_rdata <= {8'hA5, 20'd0, tb_raddr};

  initial begin
    int kind, pk;
    logic [FW-1:0] pf;
    logic [DW-1:0] pd;
    logic [AW-1:0] ph;
    rd_valid = 0; rd_sc = 0; rd_flow = '0; rd_d = '0; peek = 0; lu_head = '0;
    agg_data = '0; agg_fill = '0; pk = 0; pf = '0; pd = '0; ph = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // outputs of the previous order
      checks++;
      case (pk)
        1: if (!dwv || scv || dwb != pd || dwf != pf || dwd != {8'hA5, 20'd0, ph}) begin
             failures++; $display("DRAM routing wrong"); end
        2: if (dwv || !scv || !scfull || int'(scfill) != int'(WB) || scd != {8'hA5, 20'd0, ph}) begin
             failures++; $display("short-cut routing wrong"); end
        3: if (dwv || !scv || scfull || scd != agg_data || scfill != agg_fill) begin
             failures++; $display("partial short-cut wrong"); end
        default: if (dwv || scv) begin failures++; $display("spurious output"); end
      endcase
      kind = int'($urandom % 4);
      rd_valid = (kind == 1 || kind == 2);
      rd_sc = (kind == 2);
      peek = (kind == 3);
      rd_flow = FW'($urandom); rd_d = DW'($urandom); lu_head = AW'($urandom % 9);
      agg_data = $urandom; agg_fill = NW'($urandom % WB);
      #1;
      checks++;
      if (pop != rd_valid || free_v != rd_valid || tb_re != rd_valid ||
          (rd_valid && (free_addr != lu_head || tb_raddr != lu_head || pop_next != lu_head + 1'b1))) begin
        failures++; $display("strobes wrong");
      end
      pk = kind; pf = rd_flow; pd = rd_d; ph = lu_head;
      // partial data are presented by the aggregation module in the next cycle
      @(posedge clk);
      #1 agg_data = $urandom;
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
