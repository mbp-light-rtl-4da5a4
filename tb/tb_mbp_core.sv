// tb_mbp_core: self-checking test of the MBP core with its PBR file.
//
// Runs one program that exercises every instruction class: the two
// published examples (ADDPG R1, R2(0) giving 0x4321 + 0x1234 = 0x5555, and
// MVLPP copying 01 23 45 67 89 87 65 43 with tag 3), the 16-bit PBR word at
// an offset (0x31, 0x41 read as 0x3141), forwarding chains, a loop, local
// and internal memory, a table jump, JAL/JR, MMC and RDT commands against
// units that hold off (stalls), and two interrupts: one that wakes a HALT
// and one that arrives in the middle of a loop. Results are stored to local
// memory and compared with values worked out by hand.
`timescale 1ns/1ps
module tb_mbp_core;
  import mbp_pkg::*;
  import mbp_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // instruction memory and local memory models
  instr_t prog [1024];
  word_t  lmem [1024];
  logic imem_en; pc_t imem_addr; instr_t imem_rdata;
  logic lm_en, lm_we; word_t lm_addr, lm_wdata, lm_rdata;
  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= prog[imem_addr];
    if (lm_en) begin
      if (lm_we) lmem[lm_addr[9:0]] <= lm_wdata;
      else lm_rdata <= lmem[lm_addr[9:0]];
    end
  end

  pbr_idx_t rd_idx [2]; pbr_t rd_data [2];
  logic wr_en [1]; pbr_idx_t wr_idx [1]; pbr_t wr_data [1];
  mbp_pbr_file #(.NRD(2), .NWR(1)) u_pbr (.clk, .rst, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data);

  unit_cmd_t mmc_cmd, rdt_cmd;
  logic mmc_ready, rdt_ready;
  logic irq_mmc = 0, irq_rdt = 0, irq_ack = 0;
  pbr_idx_t irq_mmc_pbr = '0, irq_rdt_pbr = '0;
  irq_e irq_take;
  logic halted;

  mbp_core dut (
    .clk, .rst, .imem_en, .imem_addr, .imem_rdata,
    .lm_en, .lm_we, .lm_addr, .lm_wdata, .lm_rdata,
    .pbr_rd0_idx (rd_idx[0]), .pbr_rd0_data (rd_data[0]),
    .pbr_rd1_idx (rd_idx[1]), .pbr_rd1_data (rd_data[1]),
    .pbr_we (wr_en[0]), .pbr_wr_idx (wr_idx[0]), .pbr_wr_data (wr_data[0]),
    .mmc_cmd, .mmc_cmd_ready (mmc_ready), .rdt_cmd, .rdt_cmd_ready (rdt_ready),
    .irq_mmc, .irq_mmc_pbr, .irq_rdt, .irq_rdt_pbr, .irq_ack,
    .irq_take, .cluster_id (8'h2A), .ack_remaining (16'd0), .halted
  );

  // units that accept a command only after it has waited three cycles
  int mmc_wait = 0, rdt_wait = 0, stall_cycles = 0;
  unit_cmd_t mmc_got, rdt_got;
  int mmc_n = 0, rdt_n = 0;
  assign mmc_ready = (mmc_wait >= 3);
  assign rdt_ready = (rdt_wait >= 3);
  always_ff @(posedge clk) begin
    if (mmc_cmd.valid && !mmc_ready) mmc_wait <= mmc_wait + 1; else mmc_wait <= 0;
    if (rdt_cmd.valid && !rdt_ready) rdt_wait <= rdt_wait + 1; else rdt_wait <= 0;
    if (mmc_cmd.valid && mmc_ready) begin mmc_got <= mmc_cmd; mmc_n <= mmc_n + 1; end
    if (rdt_cmd.valid && rdt_ready) begin rdt_got <= rdt_cmd; rdt_n <= rdt_n + 1; end
    if ((mmc_cmd.valid && !mmc_ready) || (rdt_cmd.valid && !rdt_ready)) stall_cycles <= stall_cycles + 1;
  end

  // ---- assembler
  int pa;
  task automatic emit(instr_t i); prog[pa] = i; pa++; endtask

  int loop1, loop2, jal_at, cycles;
  localparam int TBL = 'h100, SUB = 'h120, JOIN = 'h110;

  initial begin
    for (int i = 0; i < 1024; i++) begin prog[i] = NOP(); lmem[i] = '0; end
    pa = 0;      emit(BR(BR_ALWAYS, 0, 'h40));
    // MMC vector: record the cause word, return
    pa = 'h10;   emit(SPE(SPE_MFIR, 14)); emit(ST(14, 15, 10)); emit(INT(INT_RETI));
    // RDT vector
    pa = 'h20;   emit(SPE(SPE_MFIR, 14)); emit(ST(14, 15, 8)); emit(INT(INT_RETI));
    pa = 'h40;
    emit(LI(1, 'h43)); emit(WGI(F_SLL, 1, 8)); emit(WGI(F_OR, 1, 'h21));   // r1 = 0x4321
    emit(LI(2, 5));                                                        // r2 -> PBR 5
    emit(BPI(BPI_MOV, 2, 0, 'h12)); emit(BPI(BPI_MOV, 2, 1, 'h34));
    emit(ADDPG(1, 2, 0));                                                  // r1 = 0x5555
    emit(LI(15, 0));
    emit(ST(1, 15, 0));
    emit(BPI(BPI_MOV, 2, 1, 'h31)); emit(BPI(BPI_MOV, 2, 2, 'h41));
    emit(LDPG(3, 2, 1));                                                   // 0x3141
    emit(ST(3, 15, 1));
    emit(LI(4, 7));
    emit(LI(5, 'h123)); emit(STPG(5, 4, 0));
    emit(LI(5, 'h45)); emit(WGI(F_SLL, 5, 8)); emit(WGI(F_OR, 5, 'h67)); emit(STPG(5, 4, 2));
    emit(LI(5, 'h89)); emit(WGI(F_SLL, 5, 8)); emit(WGI(F_OR, 5, 'h87)); emit(STPG(5, 4, 4));
    emit(LI(5, 'h65)); emit(WGI(F_SLL, 5, 8)); emit(WGI(F_OR, 5, 'h43)); emit(STPG(5, 4, 6));
    emit(BPI(BPI_TAG, 4, 0, 3));
    emit(LI(6, 6));
    emit(MVLPP(6, 4));                                                     // PBR6 = PBR7
    emit(LDPG(7, 6, 7)); emit(ST(7, 15, 2));                               // {0x43, tag 3}
    emit(LI(8, 5)); emit(LI(9, 0));
    loop1 = pa;
    emit(WGI(F_ADD, 9, 3)); emit(WGI(F_SUB, 8, 1)); emit(BR(BR_NEZ, 8, loop1));
    emit(ST(9, 15, 3));                                                    // 15
    emit(IST(1, 15, 10)); emit(ILD(10, 15, 10)); emit(WGI(F_ADD, 10, 1));
    emit(ST(10, 15, 4));                                                   // 0x5556
    emit(LD(11, 15, 0)); emit(ST(11, 15, 5));                              // 0x5555
    emit(LI(12, 6)); emit(TJ(2, 12, TBL));                                 // index 6 & 3 = 2
    // JOIN: r13 was set by the table entry
    pa = JOIN;
    emit(ST(13, 15, 6));                                                   // 0x77
    jal_at = pa;
    emit(BR(BR_JAL, 14, SUB));
    emit(ST(14, 15, 7));                                                   // return address
    emit(LI(3, 'h1AB));
    emit(MMC(MMC_MWR, 2, 3));
    emit(RDT(RDT_MCAST, 2, 3));
    emit(INT(INT_EI));
    emit(SPE(SPE_HALT, 0));
    emit(LI(1, 'h99)); emit(ST(1, 15, 9));
    emit(LI(8, 20));
    loop2 = pa;
    emit(WGI(F_ADD, 9, 1)); emit(WGI(F_SUB, 8, 1)); emit(BR(BR_NEZ, 8, loop2));
    emit(ST(9, 15, 11));                                                   // 35
    emit(ST(9, 15, 63));                                                   // done marker
    emit(SPE(SPE_HALT, 0));
    pa = TBL;
    emit(BR(BR_ALWAYS, 0, 'h3F0)); emit(BR(BR_ALWAYS, 0, 'h3F0));
    emit(BR(BR_ALWAYS, 0, TBL + 8)); emit(BR(BR_ALWAYS, 0, 'h3F0));
    pa = TBL + 8; emit(LI(13, 'h77)); emit(BR(BR_ALWAYS, 0, JOIN));
    pa = SUB; emit(BR(BR_JR, 14, 0));
    pa = 'h3F0; emit(LI(13, 'h3EE)); emit(BR(BR_ALWAYS, 0, JOIN));

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // first interrupt: wake the HALT
    wait (halted);
    repeat (4) @(posedge clk);
    irq_rdt_pbr <= 7'h55; irq_rdt <= 1'b1;
    @(posedge clk iff irq_take == IRQ_RDT); irq_rdt <= 1'b0;
    // second interrupt: in the middle of loop2
    @(posedge clk iff dut.x_pc == pc_t'(loop2 + 1));
    repeat (7) @(posedge clk);
    irq_mmc_pbr <= 7'h60; irq_mmc <= 1'b1;
    @(posedge clk iff irq_take == IRQ_MMC); irq_mmc <= 1'b0;
    wait (lmem[63] != 0);
    repeat (3) @(posedge clk);
    check("ADDPG R1,R2(0)", 128'(lmem[0]), 128'h5555);
    check("PBR word at offset 1", 128'(lmem[1]), 128'h3141);
    check("word at offset 7 = byte 7 and tag", 128'(lmem[2]), 128'h4303);
    check("loop", 128'(lmem[3]), 128'd15);
    check("internal memory + forwarding", 128'(lmem[4]), 128'h5556);
    check("local memory load", 128'(lmem[5]), 128'h5555);
    check("table jump", 128'(lmem[6]), 128'h77);
    check("JAL link", 128'(lmem[7]), 128'(jal_at + 1));
    check("MFIR after RDT interrupt", 128'(lmem[8]), 128'h8055);
    check("resume after HALT", 128'(lmem[9]), 128'h99);
    check("MFIR after MMC interrupt", 128'(lmem[10]), 128'h4060);
    check("loop across an interrupt", 128'(lmem[11]), 128'd35);
    check("PBR7 built", 128'(u_pbr.regs[7]), 128'h0_0123_4567_8987_6543_3);
    check("MVLPP PBR6 = PBR7", 128'(u_pbr.regs[6]), 128'h0_0123_4567_8987_6543_3);
    check("MMC command count", 128'(mmc_n), 128'd1);
    check("MMC command", 128'({mmc_got.op, mmc_got.pbr, mmc_got.arg}), 128'({MMC_MWR, 7'd5, 16'h1AB}));
    check("RDT command count", 128'(rdt_n), 128'd1);
    check("RDT command", 128'({rdt_got.op, rdt_got.pbr, rdt_got.arg}), 128'({RDT_MCAST, 7'd5, 16'h1AB}));
    check("stall cycles", 128'(stall_cycles), 128'd6);
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
