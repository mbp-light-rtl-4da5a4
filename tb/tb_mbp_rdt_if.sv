// tb_mbp_rdt_if: the RDT interface with a PBR file and a router model.
// Checks a unicast SEND, a MULTICAST to the clusters of a bitmap (one copy
// per set bit, in bit order, each with its own destination, under router
// backpressure), that a second multicast waits while acks are awaited, that
// returning ack packets are counted in hardware and raise the ack interrupt
// only with the last one, that other packets land in the receive ring with
// an interrupt, and that ACK builds the answer to a received packet.
`timescale 1ns/1ps
module tb_mbp_rdt_if;
  import mbp_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  logic tx_valid, tx_ready; pbr_t tx_pkt; logic [7:0] tx_dest;
  logic rx_valid = 0, rx_ready; pbr_t rx_pkt = '0;
  unit_cmd_t cmd = '0; logic cmd_ready;
  pbr_idx_t rd_idx [2]; pbr_t rd_data [2];
  logic wr_en [2]; pbr_idx_t wr_idx [2]; pbr_t wr_data [2];
  logic irq, irq_take = 0, ack_irq, ack_irq_take = 0; pbr_idx_t irq_pbr; word_t ack_remaining;

  mbp_pbr_file #(.NRD(2), .NWR(2)) u_pbr (.clk, .rst, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data);
  mbp_rdt_if dut (
    .clk, .rst, .cluster_id (8'h21), .tx_valid, .tx_ready, .tx_pkt, .tx_dest,
    .rx_valid, .rx_ready, .rx_pkt, .cmd, .cmd_ready,
    .pbr_rd_idx (rd_idx[0]), .pbr_rd_data (rd_data[0]),
    .pbr_we (wr_en[0]), .pbr_wr_idx (wr_idx[0]), .pbr_wr_data (wr_data[0]),
    .irq, .irq_pbr, .irq_take, .ack_irq, .ack_irq_take, .ack_remaining);

  // test-side writes into the PBR file
  logic tb_we = 0; pbr_idx_t tb_idx = '0; pbr_t tb_data = '0;
  assign wr_en[1] = tb_we; assign wr_idx[1] = tb_idx; assign wr_data[1] = tb_data;
  assign rd_idx[1] = '0;

  // router model: takes a packet every other cycle, records them
  pbr_t sent [$]; logic [7:0] sent_dest [$];
  logic tog = 0;
  always_ff @(posedge clk) tog <= ~tog;
  assign tx_ready = tog;
  always @(posedge clk) if (tx_valid && tx_ready) begin sent.push_back(tx_pkt); sent_dest.push_back(tx_dest); end

  task automatic put_pbr(int idx, pbr_t v);
    @(negedge clk); tb_we = 1; tb_idx = 7'(idx); tb_data = v;
    @(posedge clk); #1 tb_we = 0;
  endtask
  task automatic do_cmd(rdt_op_e op, int pbr, int arg);
    @(negedge clk); cmd = '{valid: 1'b1, op: op, pbr: 7'(pbr), arg: 16'(arg)};
    @(posedge clk iff cmd_ready); #1 cmd = '0;
  endtask
  task automatic recv(pbr_t v);
    @(negedge clk); rx_valid = 1; rx_pkt = v;
    @(posedge clk iff rx_ready); #1 rx_valid = 0;
  endtask
  function automatic pbr_t pkt(logic [7:0] ty, logic [7:0] src, logic [7:0] dst, logic [39:0] rest, logic [3:0] tag);
    return {ty, src, dst, rest, tag};
  endfunction

  int held = 0;
  initial begin
    repeat (2) @(posedge clk); rst <= 1'b0;
    // unicast
    put_pbr(3, pkt(PT_WRITE, 8'h21, 8'h47, 40'hAA_BBCC_DDEE, 4'h5));
    do_cmd(RDT_SEND, 3, 0);
    wait (sent.size() == 1);
    check("unicast packet", 128'(sent[0]), 128'(pkt(PT_WRITE, 8'h21, 8'h47, 40'hAA_BBCC_DDEE, 4'h5)));
    check("unicast dest", 128'(sent_dest[0]), 128'h47);
    // multicast to clusters 0x30, 0x32, 0x3F
    put_pbr(4, pkt(PT_INVAL, 8'h21, 8'h30, 40'h01_0203_0405, 4'h1));
    do_cmd(RDT_MCAST, 4, 16'h8005);
    check("acks awaited", 128'(ack_remaining), 128'd3);
    wait (sent.size() == 4);
    check("mcast dest 1", 128'(sent_dest[1]), 128'h30);
    check("mcast dest 2", 128'(sent_dest[2]), 128'h32);
    check("mcast dest 3", 128'(sent_dest[3]), 128'h3F);
    check("mcast copy 3", 128'(sent[3]), 128'(pkt(PT_INVAL, 8'h21, 8'h3F, 40'h01_0203_0405, 4'h1)));
    // a second multicast is held while acks are awaited
    @(negedge clk); cmd = '{valid: 1'b1, op: RDT_MCAST, pbr: 7'd4, arg: 16'h0001};
    repeat (3) begin @(negedge clk); if (!cmd_ready) held++; end
    cmd = '0;
    check("mcast held", 128'(held), 128'd3);
    // acks come back; a data packet arrives in between
    recv(pkt(PT_ACK, 8'h30, 8'h21, 40'h0, 4'h0));
    recv(pkt(PT_DATA, 8'h55, 8'h21, 40'h99_8877_6655, 4'h2));
    recv(pkt(PT_ACK, 8'h32, 8'h21, 40'h0, 4'h0));
    @(negedge clk);
    check("ack count", 128'(ack_remaining), 128'd1);
    check("no ack irq yet", 128'(ack_irq), 128'd0);
    check("data irq", 128'(irq), 128'd1);
    check("data irq pbr", 128'(irq_pbr), 128'd80);
    check("data stored", 128'(u_pbr.regs[80]), 128'(pkt(PT_DATA, 8'h55, 8'h21, 40'h99_8877_6655, 4'h2)));
    check("acks not stored", 128'(u_pbr.regs[81]), 128'd0);
    recv(pkt(PT_ACK, 8'h3F, 8'h21, 40'h0, 4'h0));
    @(negedge clk);
    check("all acks", 128'(ack_remaining), 128'd0);
    check("ack irq", 128'(ack_irq), 128'd1);
    ack_irq_take = 1; irq_take = 1; @(posedge clk); #1 ack_irq_take = 0; irq_take = 0;
    @(negedge clk);
    check("ack irq cleared", 128'(ack_irq), 128'd0);
    check("data irq cleared", 128'(irq), 128'd0);
    // answer the data packet with an ack built in hardware
    do_cmd(RDT_ACK, 80, 0);
    wait (sent.size() == 5);
    check("ack packet", 128'(sent[4]), 128'(pkt(PT_ACK, 8'h21, 8'h55, 40'h99_8877_6655, 4'h2)));
    check("ack dest", 128'(sent_dest[4]), 128'h55);
    do_cmd(RDT_REL, 0, 0);
    recv(pkt(PT_DATA, 8'h56, 8'h21, 40'h1, 4'h0));
    @(negedge clk);
    check("next slot after release", 128'(irq_pbr), 128'd81);
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
