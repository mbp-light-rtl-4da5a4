// tb_mbp_mmc: the MMC with a PBR file, a cluster-memory model and a stream
// of L2 requests. Checks that requests land in consecutive receive PBRs and
// raise one interrupt each with the right PBR number, that the ring pushes
// back when full and resumes after a release, and that REPLY, MWR and MRD
// move exactly the expected data. Uses a 4-PBR ring to reach "full" fast.
`timescale 1ns/1ps
module tb_mbp_mmc;
  import mbp_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  logic req_valid = 0, req_ready; pbr_t req_pkt = '0;
  logic rep_valid, rep_ready = 0; pbr_t rep_pkt;
  logic cm_en, cm_we; word_t cm_addr; logic [63:0] cm_wdata, cm_rdata;
  unit_cmd_t cmd = '0; logic cmd_ready;
  pbr_idx_t rd_idx [1]; pbr_t rd_data [1];
  logic wr_en [1]; pbr_idx_t wr_idx [1]; pbr_t wr_data [1];
  logic irq, irq_take = 0; pbr_idx_t irq_pbr;

  mbp_pbr_file #(.NRD(1), .NWR(1)) u_pbr (.clk, .rst, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data);
  mbp_mmc #(.RX_BASE(100), .RX_COUNT(4)) dut (
    .clk, .rst, .req_valid, .req_ready, .req_pkt, .rep_valid, .rep_ready, .rep_pkt,
    .cm_en, .cm_we, .cm_addr, .cm_wdata, .cm_rdata, .cmd, .cmd_ready,
    .pbr_rd_idx (rd_idx[0]), .pbr_rd_data (rd_data[0]),
    .pbr_we (wr_en[0]), .pbr_wr_idx (wr_idx[0]), .pbr_wr_data (wr_data[0]),
    .irq, .irq_pbr, .irq_take);

  logic [63:0] cmem [256];
  always_ff @(posedge clk) if (cm_en) begin
    if (cm_we) cmem[cm_addr[7:0]] <= cm_wdata; else cm_rdata <= cmem[cm_addr[7:0]];
  end

  function automatic pbr_t mkpkt(int n);
    return {8'(PT_READ), 8'(n), 8'h00, 40'h12_3456_0000 + 40'(n), 4'(n)};
  endfunction

  task automatic send_req(int n);
    @(negedge clk); req_valid = 1; req_pkt = mkpkt(n);
    @(posedge clk iff req_ready); #1 req_valid = 0;
  endtask
  task automatic do_cmd(mmc_op_e op, int pbr, int arg);
    @(negedge clk); cmd = '{valid: 1'b1, op: op, pbr: 7'(pbr), arg: 16'(arg)};
    @(posedge clk iff cmd_ready); #1 cmd = '0;
  endtask
  task automatic take_irq(int exp_pbr);
    @(negedge clk);
    check("irq raised", 128'(irq), 128'd1);
    check("irq pbr", 128'(irq_pbr), 128'(exp_pbr));
    irq_take = 1; @(posedge clk); #1 irq_take = 0;
  endtask

  int full_cycles = 0;
  always @(posedge clk) if (req_valid && !req_ready) full_cycles++;

  initial begin
    for (int i = 0; i < 256; i++) cmem[i] = {32'hC0DE0000, 32'(i)};
    repeat (2) @(posedge clk); rst <= 1'b0;
    // four requests fill the ring
    for (int n = 1; n <= 4; n++) send_req(n);
    for (int n = 0; n < 4; n++) check("request stored", 128'(u_pbr.regs[100 + n]), 128'(mkpkt(n + 1)));
    take_irq(100);
    take_irq(101);
    // a fifth request must wait until a buffer is released
    fork
      send_req(5);
      begin repeat (5) @(posedge clk); do_cmd(MMC_REL, 0, 0); end
    join
    check("backpressure while full", 128'(full_cycles >= 4), 128'd1);
    check("wrapped into first slot", 128'(u_pbr.regs[100]), 128'(mkpkt(5)));
    take_irq(102);
    take_irq(103);
    take_irq(100);
    @(negedge clk); check("no more irq", 128'(irq), 128'd0);
    // REPLY sends a PBR to the L2 side; hold it two cycles
    do_cmd(MMC_REPLY, 101, 0);
    @(negedge clk); check("reply valid", 128'(rep_valid), 128'd1);
    check("reply packet", 128'(rep_pkt), 128'(mkpkt(2)));
    check("busy while reply pending", 128'(cmd_ready), 128'd0);
    @(negedge clk); rep_ready = 1; @(posedge clk); #1 rep_ready = 0;
    @(negedge clk); check("reply done", 128'(rep_valid), 128'd0);
    // MWR then MRD into another PBR
    do_cmd(MMC_MWR, 102, 'h33);
    @(negedge clk); check("memory written", 128'(cmem[8'h33]), 128'(mkpkt(3) >> 4));
    do_cmd(MMC_MRD, 10, 'h07);
    repeat (2) @(negedge clk);
    check("memory read into PBR", 128'(u_pbr.regs[10]), 128'({64'hC0DE0000_00000007, 4'h0}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
