// tb_mbp_core_random: the MBP core against an instruction-set reference
// model on random programs.
//
// Each program starts by loading all GPRs with random values (small ones,
// so that many are valid PBR pointers and memory addresses), followed by
// random instructions of every class except INT and MFIR: GPR, PBR, PBR-PBR, local
// and internal memory, forward branches, JAL, table jumps, MFID, and MMC/RDT
// commands against units whose ready signal is random (so stalls meet
// forwarding). The program ends in HALT. The reference model executes the
// same program one instruction at a time; afterwards all GPRs, PBRs, local
// and internal memory and the sequence of commands handed to the units must
// match. Several programs run back to back, each after a reset. Every
// second program enables interrupts and is hit by random requests from all
// three sources; the handlers only return, so any instruction lost or run
// twice around an interrupt shows up as a difference.
`timescale 1ns/1ps
module tb_mbp_core_random;
  import mbp_pkg::*;
  import mbp_asm_pkg::*;

  localparam int NPROG = 12, LEN = 300;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  instr_t prog [1024];
  word_t  lmem [1024];
  logic imem_en; pc_t imem_addr; instr_t imem_rdata;
  logic lm_en, lm_we; word_t lm_addr, lm_wdata, lm_rdata;
  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= prog[imem_addr];
    if (lm_en) begin
      if (lm_we) lmem[lm_addr[9:0]] <= lm_wdata; else lm_rdata <= lmem[lm_addr[9:0]];
    end
  end

  pbr_idx_t rd_idx [2]; pbr_t rd_data [2];
  logic wr_en [1]; pbr_idx_t wr_idx [1]; pbr_t wr_data [1];
  mbp_pbr_file #(.NRD(2), .NWR(1)) u_pbr (.clk, .rst, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data);

  unit_cmd_t mmc_cmd, rdt_cmd;
  logic mmc_ready = 0, rdt_ready = 0;
  irq_e irq_take;
  logic halted;
  mbp_core dut (
    .clk, .rst, .imem_en, .imem_addr, .imem_rdata,
    .lm_en, .lm_we, .lm_addr, .lm_wdata, .lm_rdata,
    .pbr_rd0_idx (rd_idx[0]), .pbr_rd0_data (rd_data[0]),
    .pbr_rd1_idx (rd_idx[1]), .pbr_rd1_data (rd_data[1]),
    .pbr_we (wr_en[0]), .pbr_wr_idx (wr_idx[0]), .pbr_wr_data (wr_data[0]),
    .mmc_cmd, .mmc_cmd_ready (mmc_ready), .rdt_cmd, .rdt_cmd_ready (rdt_ready),
    .irq_mmc, .irq_mmc_pbr ('0), .irq_rdt, .irq_rdt_pbr ('0), .irq_ack,
    .irq_take, .cluster_id (8'h5C), .ack_remaining (16'd0), .halted
  );

  // random interrupt requests, each held until the core takes it
  logic irq_mmc = 0, irq_rdt = 0, irq_ack = 0, irq_on = 0;
  int takes = 0;
  always @(posedge clk) begin
    if (irq_take != IRQ_NONE) takes++;
    if (irq_take == IRQ_MMC) irq_mmc <= 1'b0;
    else if (irq_on && !halted && $urandom_range(0, 29) == 0) irq_mmc <= 1'b1;
    if (irq_take == IRQ_RDT) irq_rdt <= 1'b0;
    else if (irq_on && !halted && $urandom_range(0, 29) == 0) irq_rdt <= 1'b1;
    if (irq_take == IRQ_ACK) irq_ack <= 1'b0;
    else if (irq_on && !halted && $urandom_range(0, 59) == 0) irq_ack <= 1'b1;
  end

  // random ready, recorded commands
  logic [26:0] got_cmds [$];
  int stalls = 0;
  always @(posedge clk) begin
    mmc_ready <= ($urandom_range(0, 2) == 0);
    rdt_ready <= ($urandom_range(0, 2) == 0);
    if (!rst) begin
      if (mmc_cmd.valid && mmc_ready) got_cmds.push_back({1'b0, mmc_cmd.op, mmc_cmd.pbr, mmc_cmd.arg});
      if (rdt_cmd.valid && rdt_ready) got_cmds.push_back({1'b1, rdt_cmd.op, rdt_cmd.pbr, rdt_cmd.arg});
      if (dut.stall) stalls++;
    end
  end

  // ---------------------------------------------------------------- reference model
  word_t m_gpr [16];
  pbr_t  m_pbr [112];
  word_t m_lm  [1024];
  word_t m_im  [256];
  logic [26:0] m_cmds [$];

  function automatic word_t alu(logic [2:0] f, word_t p, word_t q);
    case (f)
      F_ADD: return p + q;  F_SUB: return p - q;  F_AND: return p & q;
      F_OR:  return p | q;  F_XOR: return p ^ q;
      F_SLL: return p << q[3:0];  F_SRL: return p >> q[3:0];
      default: return q;
    endcase
  endfunction
  function automatic pbr_t rp(word_t ptr);
    return (ptr[6:0] < 7'd112) ? m_pbr[ptr[6:0]] : '0;
  endfunction
  task automatic wp(word_t ptr, pbr_t v);
    if (ptr[6:0] < 7'd112) m_pbr[ptr[6:0]] = v;
  endtask

  task automatic run_model();
    int pc = 0, steps = 0;
    forever begin
      instr_t in = prog[pc];
      logic [3:0] cl = in[20:17];
      logic [2:0] f = in[16:14], off = in[5:3];
      int ra = in[13:10], rb = in[9:6];
      logic [9:0] imm = in[9:0];
      word_t a = m_gpr[ra], b = m_gpr[rb];
      word_t addr = b + word_t'(in[5:0]);
      int npc = pc + 1;
      steps++;
      if (steps > 5000) begin failures++; $display("model runaway"); return; end
      case (cl)
        C_WGG: m_gpr[ra] = alu(f, a, b);
        C_WGI: m_gpr[ra] = alu(f, a, word_t'(imm));
        C_WPG: if (f == F_STPG) wp(b, pbr_set_word(rp(b), off, a));
               else m_gpr[ra] = alu(f, a, pbr_word(rp(b), off));
        C_BPI: begin
          pbr_t p = rp(a);
          logic [3:0] bi = {1'b0, in[9:7]};
          logic [7:0] by = pbr_byte(p, bi), im7 = {1'b0, in[6:0]};
          case (f)
            BPI_MOV: p = pbr_set_byte(p, bi, im7);
            BPI_ADD: p = pbr_set_byte(p, bi, by + im7);
            BPI_AND: p = pbr_set_byte(p, bi, by & im7);
            BPI_OR:  p = pbr_set_byte(p, bi, by | im7);
            BPI_XOR: p = pbr_set_byte(p, bi, by ^ im7);
            BPI_TAG: p[3:0] = in[3:0];
            default: ;
          endcase
          wp(a, p);
        end
        C_MPP: if (f == MPP_MVLPP) wp(a, rp(b));
               else if (f == MPP_MVPP) wp(a, pbr_set_word(rp(a), off, pbr_word(rp(b), off)));
        C_BRANCH: case (f)
          BR_ALWAYS: npc = imm;
          BR_EQZ: if (a == 0) npc = imm;
          BR_NEZ: if (a != 0) npc = imm;
          BR_LTZ: if (a[15]) npc = imm;
          BR_JAL: begin m_gpr[ra] = word_t'(pc + 1); npc = imm; end
          BR_JR:  npc = a[9:0];
          default: ;
        endcase
        C_TJ: npc = 10'(imm + 10'(a & word_t'((1 << (f + 1)) - 1)));
        C_LMA: if (f == MEM_LD) m_gpr[ra] = m_lm[addr[9:0]];
               else if (f == MEM_ST) m_lm[addr[9:0]] = a;
        C_IMA: if (f == MEM_LD) m_gpr[ra] = m_im[addr[7:0]];
               else if (f == MEM_ST) m_im[addr[7:0]] = a;
        C_MMC: m_cmds.push_back({1'b0, f[1:0], a[6:0], b});
        C_RDT: m_cmds.push_back({1'b1, f[1:0], a[6:0], b});
        C_SPE: case (f)
          SPE_MFIR: m_gpr[ra] = '0;
          SPE_MFID: m_gpr[ra] = 16'h005C;
          SPE_MFAC: m_gpr[ra] = '0;
          SPE_HALT: return;
          default: ;
        endcase
        default: ;
      endcase
      pc = npc;
    end
  endtask

  // ---------------------------------------------------------------- program generator
  function automatic instr_t rnd_instr(int pc);
    int r = $urandom_range(0, 99);
    int ra = $urandom_range(0, 15), rb = $urandom_range(0, 15), off = $urandom_range(0, 7);
    logic [2:0] f = 3'($urandom_range(0, 7));
    if (r < 15) return WGG(alu_f_e'(f), ra, rb);
    if (r < 28) return WGI(alu_f_e'(f), ra, $urandom_range(0, 1023));
    if (r < 43) return r3(C_WPG, f, ra, rb, off);
    if (r < 53) return BPI(3'($urandom_range(0, 5)), ra, off, $urandom_range(0, 127));
    if (r < 60) return r3(C_MPP, 3'($urandom_range(0, 1)), ra, rb, off);
    if (r < 66) return BR(3'($urandom_range(0, 4)), ra, pc + $urandom_range(1, 4));
    if (r < 68) return TJ($urandom_range(1, 2), ra, pc + 1);
    if (r < 76) return MEM(C_LMA, 3'($urandom_range(0, 1)), ra, rb, $urandom_range(0, 63));
    if (r < 84) return MEM(C_IMA, 3'($urandom_range(0, 1)), ra, rb, $urandom_range(0, 63));
    if (r < 89) return r3(C_MMC, 3'($urandom_range(0, 3)), ra, rb, 0);
    if (r < 94) return r3(C_RDT, 3'($urandom_range(0, 3)), ra, rb, 0);
    if (r < 96) return SPE(SPE_MFID, ra);
    return NOP();
  endfunction

  task automatic compare(int n);
    int bad = 0;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dut.u_gpr.regs[i] !== m_gpr[i]) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL prog %0d r%0d: %h vs %h", n, i, dut.u_gpr.regs[i], m_gpr[i]);
      end
    end
    for (int i = 0; i < 112; i++) begin
      checks++;
      if (u_pbr.regs[i] !== m_pbr[i]) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL prog %0d PBR%0d: %h vs %h", n, i, u_pbr.regs[i], m_pbr[i]);
      end
    end
    for (int i = 0; i < 1024; i++) if (lmem[i] !== m_lm[i]) begin failures++; bad++; end
    for (int i = 0; i < 256; i++) if (dut.u_imem_int.mem[i] !== m_im[i]) begin failures++; bad++; end
    checks += 2;
    checks++;
    if (got_cmds.size() != m_cmds.size()) begin
      failures++; $display("FAIL prog %0d: %0d commands vs %0d", n, got_cmds.size(), m_cmds.size());
    end else begin
      for (int i = 0; i < m_cmds.size(); i++) if (got_cmds[i] !== m_cmds[i]) begin
        failures++; $display("FAIL prog %0d command %0d", n, i);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < NPROG; n++) begin
      rst = 1'b1;
      for (int i = 0; i < 1024; i++) begin prog[i] = NOP(); lmem[i] = '0; m_lm[i] = '0; end
      for (int i = 0; i < 256; i++) m_im[i] = '0;
      for (int i = 0; i < 112; i++) m_pbr[i] = '0;
      for (int i = 0; i < 16; i++) m_gpr[i] = '0;
      // 0: jump to the program; vectors hold handlers that only return, so
      // interrupts must leave no trace in the architectural state
      prog[0] = BR(BR_ALWAYS, 0, 'h40);
      prog['h10] = INT(INT_RETI); prog['h20] = INT(INT_RETI); prog['h30] = INT(INT_RETI);
      for (int i = 0; i < 16; i++) prog['h40 + i] = LI(i, (n % 3 == 0) ? $urandom_range(0, 1023) : $urandom_range(0, 127));
      prog['h50] = (n % 2 == 1) ? INT(INT_EI) : NOP();
      for (int i = 'h51; i < 'h51 + LEN; i++) prog[i] = rnd_instr(i);
      for (int i = 'h51 + LEN; i < 'h51 + LEN + 5; i++) prog[i] = SPE(SPE_HALT, 0);
      irq_on = (n % 2 == 1);
      got_cmds.delete(); m_cmds.delete();
      run_model();
      repeat (3) @(posedge clk);
      rst <= 1'b0;
      @(posedge clk);
      wait (halted);
      repeat (4) @(posedge clk);
      compare(n);
    end
    $display("stall cycles=%0d interrupts taken=%0d", stalls, takes);
    checks += 2;
    if (stalls == 0) begin failures++; $display("FAIL no stalls"); end
    if (takes == 0) begin failures++; $display("FAIL no interrupts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
