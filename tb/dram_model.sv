// Behavioural model of the K parallel DRAMs (banks) behind the packet buffer.
// Not synthesizable logic of the design: it stands in for commodity DRAM in
// the testbenches. Each bank holds one FIFO per flow (DQ blocks deep). A write
// appends dram_wr_data to FIFO (bank, flow); a read removes the oldest block
// of FIFO (bank, flow) and returns it with its tag RD_LAT cycles later. The
// array is read when the data return, so a block written in the cycle a read
// for it is issued is still seen. errors_o counts protocol violations: a bank
// accessed more than once per K cycles in one direction, a full or empty FIFO.
module dram_model #(
  parameter int unsigned W      = 512,
  parameter int unsigned Q      = 256,
  parameter int unsigned K      = 20,
  parameter int unsigned SW     = 14,
  parameter int unsigned DQ     = 8,
  parameter int unsigned RD_LAT = 20,
  localparam int unsigned FW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned DW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  input  logic [DW-1:0] wr_bank,
  input  logic [FW-1:0] wr_flow,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_valid,
  input  logic [DW-1:0] rd_bank,
  input  logic [FW-1:0] rd_flow,
  input  logic [SW-1:0] rd_tag,
  output logic          rsp_valid,
  output logic [SW-1:0] rsp_tag,
  output logic [W-1:0]  rsp_data,
  output int            errors_o,
  output int            writes_o,
  output int            reads_o
);
  logic [W-1:0] mem [K*Q*DQ];
  int unsigned  wp [K*Q];
  int unsigned  rp [K*Q];
  int unsigned  last_wr [K];
  int unsigned  last_rd [K];
  int unsigned  cyc;

  logic         pv [RD_LAT];
  logic [SW-1:0] pt [RD_LAT];
  int unsigned  pa [RD_LAT];

  assign rsp_valid = pv[RD_LAT-1];
  assign rsp_tag   = pt[RD_LAT-1];
  assign rsp_data  = mem[pa[RD_LAT-1]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K*Q; i++) begin wp[i] <= 0; rp[i] <= 0; end
      for (int i = 0; i < K; i++) begin last_wr[i] <= 0; last_rd[i] <= 0; end
      for (int i = 0; i < RD_LAT; i++) begin pv[i] <= 1'b0; pt[i] <= '0; pa[i] <= 0; end
      cyc <= 0; errors_o <= 0; writes_o <= 0; reads_o <= 0;
    end else begin
      int unsigned q;
      cyc <= cyc + 1;
      if (wr_valid) begin
        q = int'(wr_bank) * Q + int'(wr_flow);
        if (wp[q] - rp[q] >= DQ) errors_o <= errors_o + 1;
        if (last_wr[wr_bank] != 0 && cyc - last_wr[wr_bank] < K) errors_o <= errors_o + 1;
        mem[q * DQ + (wp[q] % DQ)] <= wr_data;
        wp[q] <= wp[q] + 1;
        last_wr[wr_bank] <= cyc;
        writes_o <= writes_o + 1;
      end
      for (int i = RD_LAT - 1; i > 0; i--) begin
        pv[i] <= pv[i-1]; pt[i] <= pt[i-1]; pa[i] <= pa[i-1];
      end
      pv[0] <= rd_valid;
      pt[0] <= rd_tag;
      if (rd_valid) begin
        q = int'(rd_bank) * Q + int'(rd_flow);
        if (rp[q] == wp[q] && !(wr_valid && q == int'(wr_bank) * Q + int'(wr_flow)))
          errors_o <= errors_o + 1;
        if (last_rd[rd_bank] != 0 && cyc - last_rd[rd_bank] < K) errors_o <= errors_o + 1;
        pa[0] <= q * DQ + (rp[q] % DQ);
        rp[q] <= rp[q] + 1;
        last_rd[rd_bank] <= cyc;
        reads_o <= reads_o + 1;
      end
    end
  end
endmodule
