// tb_mbp_light: end-to-end test of the MBP-light chip at its default size.
//
// The core runs a small coherence-protocol program (below) and the test
// plays the L2 caches, the cluster memory and the rest of the RDT network:
//   1. A write request from an L2 cache arrives at the MMC. The core takes
//      the MMC interrupt, decodes the packet in its PBR, dispatches on the
//      packet type with a table jump, writes the update data to cluster
//      memory, looks up the sharers in a bitmap directory kept in internal
//      memory and multicasts an invalidation to them. The network model
//      answers every invalidation with an ack; the RDT interface counts them
//      and interrupts the core after the last one, and the core has the MMC
//      send the reply to the L2 cache.
//   2. The same write again, this time with slow acks; a read request
//      arrives meanwhile and is served (cluster memory line into a PBR,
//      reply) before the write completes.
//   3. An invalidation from another cluster arrives on the RDT side; the
//      core answers it with a hardware-built ack packet.
// Every packet leaving the chip is compared with the expected one, and each
// mechanism (the three interrupts, multicast, hardware ack counting and
// generation, GM-stage stalls, operand bypass, table jump, interrupt taken
// while acks are outstanding) must have happened at least once.
`timescale 1ns/1ps
module tb_mbp_light;
  import mbp_pkg::*;
  import mbp_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  localparam logic [7:0] ME = 8'h21;

  logic halted;
  logic imem_en; pc_t imem_addr; instr_t imem_rdata;
  logic lm_en, lm_we; word_t lm_addr, lm_wdata, lm_rdata;
  logic req_valid = 0, req_ready; pbr_t req_pkt = '0;
  logic rep_valid, rep_ready; pbr_t rep_pkt;
  logic cm_en, cm_we; word_t cm_addr; logic [63:0] cm_wdata, cm_rdata;
  logic tx_valid, tx_ready; pbr_t tx_pkt; logic [7:0] tx_dest;
  logic rx_valid, rx_ready; pbr_t rx_pkt;

  mbp_light dut (
    .clk, .rst, .cluster_id (ME), .halted,
    .imem_en, .imem_addr, .imem_rdata,
    .lm_en, .lm_we, .lm_addr, .lm_wdata, .lm_rdata,
    .req_valid, .req_ready, .req_pkt, .rep_valid, .rep_ready, .rep_pkt,
    .cm_en, .cm_we, .cm_addr, .cm_wdata, .cm_rdata,
    .tx_valid, .tx_ready, .tx_pkt, .tx_dest, .rx_valid, .rx_ready, .rx_pkt
  );

  // ------------------------------------------------------------ memories
  instr_t prog [1024];
  word_t  lmem [1024];
  logic [63:0] cmem [256];
  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= prog[imem_addr];
    if (lm_en) begin
      if (lm_we) lmem[lm_addr[9:0]] <= lm_wdata; else lm_rdata <= lmem[lm_addr[9:0]];
    end
    if (cm_en) begin
      if (cm_we) cmem[cm_addr[7:0]] <= cm_wdata; else cm_rdata <= cmem[cm_addr[7:0]];
    end
  end

  // ------------------------------------------------------------ L2 side
  pbr_t replies [$];
  int rep_cnt = 0;
  assign rep_ready = rep_cnt[0];   // accept on every other cycle
  always @(posedge clk) begin
    rep_cnt <= rep_cnt + 1;
    if (rep_valid && rep_ready) replies.push_back(rep_pkt);
  end
  task automatic l2_request(pbr_t p);
    @(negedge clk); req_valid = 1; req_pkt = p;
    @(posedge clk iff req_ready); #1 req_valid = 0;
  endtask

  // ------------------------------------------------------------ network
  // Everything driven into the chip changes only through nonblocking
  // assignments, so the chip and the models never race at a clock edge.
  pbr_t sent [$]; logic [7:0] sent_dest [$];
  pbr_t inbox [$]; int due [$];
  int ack_delay = 5, cyc = 0;
  assign tx_ready = (cyc % 3 != 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tx_valid && tx_ready) begin
      sent.push_back(tx_pkt); sent_dest.push_back(tx_dest);
      if (pbr_byte(tx_pkt, 4'd0) == PT_INVAL) begin
        inbox.push_back({PT_ACK, tx_dest, ME, 40'h0, 4'h0});
        due.push_back(cyc + ack_delay);
      end
    end
    if (rx_valid && rx_ready) rx_valid <= 1'b0;
    else if (!rx_valid && inbox.size() > 0 && due[0] <= cyc) begin
      rx_pkt   <= inbox.pop_front();
      void'(due.pop_front());
      rx_valid <= 1'b1;
    end
  end
  initial begin rx_valid = 1'b0; rx_pkt = '0; end

  // ------------------------------------------------------------ mechanism counters
  int n_irq_mmc = 0, n_irq_rdt = 0, n_irq_ack = 0, n_mcast_copies = 0, n_acks_counted = 0;
  int n_hw_acks = 0, n_stall = 0, n_bypass = 0, n_tj = 0, n_irq_while_acks = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.irq_take == IRQ_MMC) n_irq_mmc++;
    if (dut.irq_take == IRQ_RDT) n_irq_rdt++;
    if (dut.irq_take == IRQ_ACK) n_irq_ack++;
    if (dut.irq_take == IRQ_MMC && dut.ack_remaining != 0) n_irq_while_acks++;
    if (tx_valid && tx_ready && dut.u_rdt.mcast) n_mcast_copies++;
    if (tx_valid && tx_ready && pbr_byte(tx_pkt, 4'd0) == PT_ACK) n_hw_acks++;
    if (dut.u_rdt.ack_in) n_acks_counted++;
    if (dut.u_core.stall) n_stall++;
    if (dut.u_core.x_valid && dut.u_core.wb_we &&
        (dut.u_core.wb_rd == dut.u_core.ra_f || dut.u_core.wb_rd == dut.u_core.rb_f)) n_bypass++;
    if (dut.u_core.x_go && dut.u_core.cls == C_TJ) n_tj++;
  end

  // ------------------------------------------------------------ program
  int pa;
  task automatic emit(instr_t i); prog[pa] = i; pa++; endtask
  localparam int H_MMC = 'h100, H_TBL = 'h110, H_RD = 'h120, H_WR = 'h140, H_BAD = 'h170,
                 H_RDT = 'h180, H_ACK = 'h1C0;
  int idle;

  task automatic load_program();
    for (int i = 0; i < 1024; i++) prog[i] = NOP();
    pa = 0;     emit(BR(BR_ALWAYS, 0, 'h40));
    pa = 'h10;  emit(BR(BR_ALWAYS, 0, H_MMC));
    pa = 'h20;  emit(BR(BR_ALWAYS, 0, H_RDT));
    pa = 'h30;  emit(BR(BR_ALWAYS, 0, H_ACK));
    // main: directory entry for line 0x33 = clusters 0x41, 0x42, 0x44
    pa = 'h40;
    emit(LI(15, 0));
    emit(LI(5, 'h16)); emit(LI(7, 'h33)); emit(IST(5, 7, 0));
    emit(INT(INT_EI));
    idle = pa;
    emit(SPE(SPE_HALT, 0)); emit(BR(BR_ALWAYS, 0, idle));
    // MMC request: r1 = PBR, r2 = type, r7 = line address (bytes 3..4)
    pa = H_MMC;
    emit(SPE(SPE_MFIR, 1)); emit(WGI(F_AND, 1, 'h7F));
    emit(LDPG(2, 1, 0)); emit(WGI(F_SRL, 2, 8));
    emit(LDPG(7, 1, 3));
    emit(TJ(3, 2, H_TBL));
    pa = H_TBL;
    emit(BR(BR_ALWAYS, 0, H_BAD)); emit(BR(BR_ALWAYS, 0, H_RD)); emit(BR(BR_ALWAYS, 0, H_WR));
    for (int i = 3; i < 8; i++) emit(BR(BR_ALWAYS, 0, H_BAD));
    // read: line into PBR 2, reply, release
    pa = H_RD;
    emit(LI(6, 2)); emit(MMC(MMC_MRD, 6, 7)); emit(MMC(MMC_REPLY, 6, 0));
    emit(MMC(MMC_REL, 15, 0)); emit(INT(INT_RETI));
    // write: update memory, remember the request, multicast invalidations
    pa = H_WR;
    emit(MMC(MMC_MWR, 1, 7));
    emit(IST(1, 15, 63));
    emit(ILD(5, 7, 0));
    emit(LI(4, 0)); emit(MVLPP(4, 1));
    emit(BPI(BPI_MOV, 4, 0, PT_INVAL)); emit(BPI(BPI_MOV, 4, 2, 'h40));
    emit(RDT(RDT_MCAST, 4, 5));
    emit(INT(INT_RETI));
    pa = H_BAD;
    emit(LI(1, 'hBAD)); emit(ST(1, 15, 0)); emit(INT(INT_RETI));
    // RDT packet: answer it with an ack, release the buffer
    pa = H_RDT;
    emit(SPE(SPE_MFIR, 1)); emit(WGI(F_AND, 1, 'h7F));
    emit(RDT(RDT_ACK, 1, 0)); emit(RDT(RDT_REL, 15, 0)); emit(INT(INT_RETI));
    // all acks in: reply to the waiting write request
    pa = H_ACK;
    emit(ILD(1, 15, 63)); emit(BPI(BPI_MOV, 1, 0, PT_REPLY));
    emit(MMC(MMC_REPLY, 1, 0)); emit(MMC(MMC_REL, 15, 0)); emit(INT(INT_RETI));
  endtask

  function automatic pbr_t pk(logic [7:0] ty, logic [7:0] src, logic [7:0] dst,
                              logic [15:0] line, logic [23:0] data, logic [3:0] tag);
    return {ty, src, dst, line, data, tag};
  endfunction

  task automatic check_invals(int first, logic [15:0] line, logic [23:0] data);
    logic [7:0] dests [3] = '{8'h41, 8'h42, 8'h44};
    for (int i = 0; i < 3; i++) begin
      check("inval dest", 128'(sent_dest[first + i]), 128'(dests[i]));
      check("inval packet", 128'(sent[first + i]), 128'(pk(PT_INVAL, 8'h01, dests[i], line, data, 4'h5)));
    end
  endtask

  initial begin
    load_program();
    for (int i = 0; i < 1024; i++) lmem[i] = '0;
    for (int i = 0; i < 256; i++) cmem[i] = {32'hFACE0000, 32'(i)};
    repeat (3) @(posedge clk); rst <= 1'b0;
    wait (halted);

    // ---- 1: write request, invalidation multicast, acks, reply
    l2_request(pk(PT_WRITE, 8'h01, ME, 16'h0033, 24'hABCDEF, 4'h5));
    wait (replies.size() == 1);
    check("three invalidations", 128'(sent.size()), 128'd3);
    check_invals(0, 16'h0033, 24'hABCDEF);
    check("write reply", 128'(replies[0]), 128'(pk(PT_REPLY, 8'h01, ME, 16'h0033, 24'hABCDEF, 4'h5)));
    check("update data in cluster memory", 128'(cmem[8'h33]),
          128'(pk(PT_WRITE, 8'h01, ME, 16'h0033, 24'hABCDEF, 4'h5) >> 4));

    // ---- 2: write with slow acks; a read is served meanwhile
    ack_delay = 200;
    l2_request(pk(PT_WRITE, 8'h01, ME, 16'h0033, 24'h123456, 4'h5));
    wait (sent.size() == 6);
    l2_request(pk(PT_READ, 8'h02, ME, 16'h0007, 24'h0, 4'h0));
    wait (replies.size() == 3);
    check_invals(3, 16'h0033, 24'h123456);
    check("read reply first", 128'(replies[1]), 128'({64'hFACE0000_00000007, 4'h0}));
    check("write reply second", 128'(replies[2]), 128'(pk(PT_REPLY, 8'h01, ME, 16'h0033, 24'h123456, 4'h5)));

    // ---- 3: invalidation from cluster 0x55 answered with a hardware ack
    ack_delay = 0;
    @(negedge clk);
    inbox.push_back(pk(PT_INVAL, 8'h55, ME, 16'h0007, 24'h0, 4'h0)); due.push_back(cyc);
    wait (sent.size() == 7);
    check("ack dest", 128'(sent_dest[6]), 128'h55);
    check("ack packet", 128'(sent[6]), 128'(pk(PT_ACK, ME, 8'h55, 16'h0007, 24'h0, 4'h0)));
    repeat (20) @(posedge clk);
    check("no bad packet type seen", 128'(lmem[0]), 128'd0);
    check("back to idle", 128'(halted), 128'd1);

    // ---- every mechanism happened
    check("MMC interrupts", 128'(n_irq_mmc), 128'd3);
    check("RDT interrupts", 128'(n_irq_rdt), 128'd1);
    check("ack-collection interrupts", 128'(n_irq_ack), 128'd2);
    check("multicast copies", 128'(n_mcast_copies), 128'd6);
    check("acks counted in hardware", 128'(n_acks_counted), 128'd6);
    check("acks generated in hardware", 128'(n_hw_acks), 128'd1);
    check("table jumps", 128'(n_tj), 128'd3);
    check("interrupt while acks outstanding", 128'(n_irq_while_acks > 0), 128'd1);
    check("GM-stage stalls happened", 128'(n_stall > 0), 128'd1);
    check("operand bypass happened", 128'(n_bypass > 0), 128'd1);
    $display("stalls=%0d bypasses=%0d", n_stall, n_bypass);
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
