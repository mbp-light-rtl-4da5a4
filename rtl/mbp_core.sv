// mbp_core: the MBP core, the protocol processor of MBP-light.
//
// A 16-bit processor with 21-bit instructions, 16 GPRs and direct access to
// the packet buffer registers (PBRs). A GPR holds a pointer to a PBR and the
// instruction adds a byte offset (0..7), so an arithmetic instruction can
// take its operand straight out of a packet, e.g. ADDPG R1, R2(0) adds the
// 16-bit word at bytes 0..1 of the PBR that R2 points to into R1, and MVLPP
// copies a whole 68-bit PBR in one instruction. These, the register counts
// and widths, the 14 instruction classes and the four pipeline stages
// IF, RF, LM/EX/GM, WB follow the published description. The instruction
// encoding (see mbp_pkg), the individual instructions beyond ADDPG and MVLPP,
// and all timing below are this design's own choices.
//
// Pipeline:
//   IF  presents the fetch address to the instruction memory (synchronous,
//       data back in the next cycle).
//   RF  decodes and reads two GPRs.
//   X   one of three parallel units, chosen by the class: LM (local and
//       internal memory access), EX (ALU, PBR operate/move, branches) or GM
//       (commands to the MMC and RDT interface). PBR reads and writes are
//       done here, so a PBR written by one instruction is seen by the next.
//   WB  writes the GPR; loads return their data here.
// A GPR result in WB is forwarded into X, and the GPR file passes a value
// being written straight to RF, so back-to-back dependent instructions do
// not stall. Taken branches, jumps and RETI resolve in X and cost one
// bubble (the instruction in RF is squashed; the target is fetched in the
// same cycle). A GM command waits in X (stalling IF/RF/X) until its unit
// accepts it.
//
// Interrupts: three sources (MMC request, RDT packet, ack collection done)
// with fixed vectors (mbp_pkg). When interrupts are enabled, an interrupt is
// taken at an instruction boundary: the return address goes to EPC, the
// cause and the PBR holding the packet are latched for MFIR, interrupts are
// disabled, and irq_take tells the source. RETI returns and re-enables.
// HALT waits for an interrupt.
module mbp_core
  import mbp_pkg::*;
#(
  parameter int unsigned IM_DEPTH = 256   // internal memory words (assumed)
) (
  input  logic      clk,
  input  logic      rst,
  // instruction memory (synchronous read, one-cycle latency)
  output logic      imem_en,
  output pc_t       imem_addr,
  input  instr_t    imem_rdata,
  // local memory data port (synchronous, one-cycle read latency)
  output logic      lm_en,
  output logic      lm_we,
  output word_t     lm_addr,
  output word_t     lm_wdata,
  input  word_t     lm_rdata,
  // PBR file: two read ports and one write port
  output pbr_idx_t  pbr_rd0_idx,
  input  pbr_t      pbr_rd0_data,
  output pbr_idx_t  pbr_rd1_idx,
  input  pbr_t      pbr_rd1_data,
  output logic      pbr_we,
  output pbr_idx_t  pbr_wr_idx,
  output pbr_t      pbr_wr_data,
  // commands to the MMC and the RDT interface
  output unit_cmd_t mmc_cmd,
  input  logic      mmc_cmd_ready,
  output unit_cmd_t rdt_cmd,
  input  logic      rdt_cmd_ready,
  // interrupts
  input  logic      irq_mmc,
  input  pbr_idx_t  irq_mmc_pbr,
  input  logic      irq_rdt,
  input  pbr_idx_t  irq_rdt_pbr,
  input  logic      irq_ack,
  output irq_e      irq_take,
  // status
  input  logic [7:0] cluster_id,
  input  word_t     ack_remaining,
  output logic      halted
);

  // ---------------------------------------------------------------- state
  pc_t     pc;                 // next fetch address
  logic    rf_valid;
  pc_t     rf_pc;
  logic    x_valid;
  pc_t     x_pc;
  instr_t  x_ins;
  word_t   x_a, x_b;           // GPR values read in RF
  logic    wb_we;
  logic [3:0] wb_rd;
  logic [1:0] wb_src;          // 0 ALU, 1 local memory, 2 internal memory
  word_t   wb_alu;
  logic    int_en;
  pc_t     epc;
  irq_e    ir_cause;
  pbr_idx_t ir_pbr;

  // ---------------------------------------------------------------- RF
  instr_t rf_ins;
  assign rf_ins = imem_rdata;
  word_t rf_a, rf_b;

  // ---------------------------------------------------------------- WB
  word_t im_rdata;
  word_t wb_res;
  always_comb begin
    unique case (wb_src)
      2'd1:    wb_res = lm_rdata;
      2'd2:    wb_res = im_rdata;
      default: wb_res = wb_alu;
    endcase
  end

  mbp_gpr_file u_gpr (
    .clk, .rst,
    .ra_idx (rf_ins[13:10]), .ra_data (rf_a),
    .rb_idx (rf_ins[9:6]),   .rb_data (rf_b),
    .we     (wb_we), .w_idx (wb_rd), .w_data (wb_res)
  );

  // ---------------------------------------------------------------- X
  iclass_e    cls;
  logic [2:0] fn;
  logic [3:0] ra_f, rb_f;
  logic [2:0] off;
  logic [9:0] imm10;
  assign cls   = iclass_e'(x_ins[20:17]);
  assign fn    = x_ins[16:14];
  assign ra_f  = x_ins[13:10];
  assign rb_f  = x_ins[9:6];
  assign off   = x_ins[5:3];
  assign imm10 = x_ins[9:0];

  // operand forwarding from WB
  word_t a, b;
  assign a = (wb_we && wb_rd == ra_f) ? wb_res : x_a;
  assign b = (wb_we && wb_rd == rb_f) ? wb_res : x_b;

  function automatic word_t alu(logic [2:0] f, word_t p, word_t q);
    unique case (f)
      F_ADD:   return p + q;
      F_SUB:   return p - q;
      F_AND:   return p & q;
      F_OR:    return p | q;
      F_XOR:   return p ^ q;
      F_SLL:   return p << q[3:0];
      F_SRL:   return p >> q[3:0];
      default: return q;
    endcase
  endfunction

  // PBR ports: port 0 is the PBR operated on (pointer rb for WPG, ra
  // otherwise), port 1 the source of a PBR-PBR move.
  assign pbr_rd0_idx = (cls == C_WPG) ? b[6:0] : a[6:0];
  assign pbr_rd1_idx = b[6:0];

  logic       x_go;          // instruction in X completes this cycle
  logic       stall;
  logic       redirect;
  pc_t        target;
  logic       x_wgpr;
  word_t      x_res;
  logic [1:0] x_src;
  logic       do_halt, do_ei, do_di, do_reti;
  word_t      pw;
  logic [7:0] pbyte, nbyte;
  word_t      maddr;
  word_t      tj_mask;

  assign pw    = pbr_word(pbr_rd0_data, off);
  assign pbyte = pbr_byte(pbr_rd0_data, {1'b0, x_ins[9:7]});
  assign maddr = b + {10'b0, x_ins[5:0]};
  assign tj_mask = word_t'((17'd1 << (32'(fn) + 1)) - 17'd1);

  always_comb begin
    redirect    = 1'b0;
    target      = '0;
    x_wgpr      = 1'b0;
    x_res       = '0;
    x_src       = 2'd0;
    pbr_we      = 1'b0;
    pbr_wr_idx  = a[6:0];
    pbr_wr_data = pbr_rd0_data;
    lm_en       = 1'b0;
    lm_we       = 1'b0;
    lm_addr     = maddr;
    lm_wdata    = a;
    do_halt = 1'b0; do_ei = 1'b0; do_di = 1'b0; do_reti = 1'b0;
    nbyte = pbyte;
    if (x_valid) begin
      unique case (cls)
        C_WGG: begin x_wgpr = 1'b1; x_res = alu(fn, a, b); end
        C_WGI: begin x_wgpr = 1'b1; x_res = alu(fn, a, {6'b0, imm10}); end
        C_WPG: begin
          if (fn == F_STPG) begin
            pbr_we      = 1'b1;
            pbr_wr_idx  = b[6:0];
            pbr_wr_data = pbr_set_word(pbr_rd0_data, off, a);
          end else begin
            x_wgpr = 1'b1;
            x_res  = alu(fn, a, pw);
          end
        end
        C_BPI: begin
          pbr_we = 1'b1;
          unique case (fn)
            BPI_MOV: nbyte = {1'b0, x_ins[6:0]};
            BPI_ADD: nbyte = pbyte + {1'b0, x_ins[6:0]};
            BPI_AND: nbyte = pbyte & {1'b0, x_ins[6:0]};
            BPI_OR:  nbyte = pbyte | {1'b0, x_ins[6:0]};
            BPI_XOR: nbyte = pbyte ^ {1'b0, x_ins[6:0]};
            default: nbyte = pbyte;
          endcase
          if (fn == BPI_TAG)
            pbr_wr_data = {pbr_rd0_data[67:4], x_ins[3:0]};
          else
            pbr_wr_data = pbr_set_byte(pbr_rd0_data, {1'b0, x_ins[9:7]}, nbyte);
        end
        C_MPP: begin
          pbr_we = 1'b1;
          if (fn == MPP_MVLPP) pbr_wr_data = pbr_rd1_data;
          else pbr_wr_data = pbr_set_word(pbr_rd0_data, off, pbr_word(pbr_rd1_data, off));
        end
        C_BRANCH: begin
          target = imm10;
          unique case (fn)
            BR_ALWAYS: redirect = 1'b1;
            BR_EQZ:    redirect = (a == '0);
            BR_NEZ:    redirect = (a != '0);
            BR_LTZ:    redirect = a[15];
            BR_JAL: begin
              redirect = 1'b1;
              x_wgpr   = 1'b1;
              x_res    = {6'b0, x_pc + pc_t'(1)};
            end
            BR_JR: begin redirect = 1'b1; target = a[9:0]; end
            default: ;
          endcase
        end
        C_TJ: begin
          redirect = 1'b1;
          target   = imm10 + pc_t'(a & tj_mask);
        end
        C_LMA: begin
          lm_en  = 1'b1;
          lm_we  = (fn == MEM_ST);
          x_wgpr = (fn == MEM_LD);
          x_src  = 2'd1;
        end
        C_IMA: begin
          x_wgpr = (fn == MEM_LD);
          x_src  = 2'd2;
        end
        C_MMC, C_RDT: ;   // GM stage, see below
        C_INT: begin
          unique case (fn)
            INT_EI:   do_ei = 1'b1;
            INT_DI:   do_di = 1'b1;
            INT_RETI: begin do_reti = 1'b1; redirect = 1'b1; target = epc; end
            default: ;
          endcase
        end
        C_SPE: begin
          unique case (fn)
            SPE_MFIR: begin x_wgpr = 1'b1; x_res = {ir_cause, 7'b0, ir_pbr}; end
            SPE_MFID: begin x_wgpr = 1'b1; x_res = {8'b0, cluster_id}; end
            SPE_MFAC: begin x_wgpr = 1'b1; x_res = ack_remaining; end
            SPE_HALT: begin do_halt = 1'b1; redirect = 1'b1; target = x_pc + pc_t'(1); end
            default: ;
          endcase
        end
        default: ;   // NOP and unused classes
      endcase
    end
  end

  // GM stage: commands to the MMC and the RDT interface
  assign mmc_cmd = '{valid: x_valid && cls == C_MMC, op: fn[1:0], pbr: a[6:0], arg: b};
  assign rdt_cmd = '{valid: x_valid && cls == C_RDT, op: fn[1:0], pbr: a[6:0], arg: b};
  assign stall   = (mmc_cmd.valid && !mmc_cmd_ready) || (rdt_cmd.valid && !rdt_cmd_ready);

  assign x_go = x_valid && !stall;

  // internal memory (IMA)
  mbp_sram #(.DEPTH(IM_DEPTH), .WIDTH(16)) u_imem_int (
    .clk, .rst,
    .en    (x_valid && cls == C_IMA),
    .we    (fn == MEM_ST),
    .addr  (maddr[$clog2(IM_DEPTH)-1:0]),
    .wdata (a),
    .rdata (im_rdata)
  );

  // ---------------------------------------------------------------- interrupts
  irq_e     pend;
  pbr_idx_t pend_pbr;
  pc_t      vec;
  always_comb begin
    pend = IRQ_NONE; pend_pbr = '0; vec = VEC_MMC;
    if (irq_ack)      begin pend = IRQ_ACK; vec = VEC_ACK; end
    else if (irq_rdt) begin pend = IRQ_RDT; pend_pbr = irq_rdt_pbr; vec = VEC_RDT; end
    else if (irq_mmc) begin pend = IRQ_MMC; pend_pbr = irq_mmc_pbr; vec = VEC_MMC; end
  end

  logic x_ctrl;
  assign x_ctrl = x_valid && (cls inside {C_BRANCH, C_TJ, C_INT, C_SPE});

  logic take;
  assign take = int_en && pend != IRQ_NONE && !stall &&
                (halted ? !x_valid : (rf_valid && !x_ctrl));
  assign irq_take = take ? pend : IRQ_NONE;

  // ---------------------------------------------------------------- fetch
  logic fetch_redirect;
  pc_t  fetch_target;
  assign fetch_redirect = take || (x_go && redirect);
  assign fetch_target   = take ? vec : target;

  logic halt_next;
  assign halt_next = take ? 1'b0 : (halted || (x_go && do_halt));

  assign imem_en   = !stall && !halt_next;
  assign imem_addr = fetch_redirect ? fetch_target : pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= '0;
      rf_valid <= 1'b0;
      rf_pc    <= '0;
      x_valid  <= 1'b0;
      x_pc     <= '0;
      x_ins    <= '0;
      x_a      <= '0;
      x_b      <= '0;
      wb_we    <= 1'b0;
      wb_rd    <= '0;
      wb_src   <= '0;
      wb_alu   <= '0;
      int_en   <= 1'b0;
      epc      <= '0;
      ir_cause <= IRQ_NONE;
      ir_pbr   <= '0;
      halted   <= 1'b0;
    end else begin
      halted <= halt_next;
      // WB
      wb_we  <= x_go && x_wgpr;
      wb_rd  <= ra_f;
      wb_src <= x_src;
      wb_alu <= x_res;
      if (stall) begin
        // hold X; keep forwarded operands, WB becomes a bubble
        x_a <= a;
        x_b <= b;
      end else begin
        // RF -> X (squashed on a redirect or an interrupt)
        x_valid <= rf_valid && !fetch_redirect && !halt_next;
        x_pc    <= rf_pc;
        x_ins   <= rf_ins;
        x_a     <= rf_a;
        x_b     <= rf_b;
        // IF -> RF
        rf_valid <= imem_en;
        rf_pc    <= imem_addr;
        if (imem_en) pc <= imem_addr + pc_t'(1);
        else if (fetch_redirect) pc <= fetch_target;
      end
      // interrupt control
      if (take) begin
        epc      <= halted ? pc : rf_pc;
        ir_cause <= pend;
        ir_pbr   <= pend_pbr;
        int_en   <= 1'b0;
      end else if (x_go) begin
        if (do_ei || do_reti) int_en <= 1'b1;
        if (do_di)            int_en <= 1'b0;
      end
    end
  end

  // A command offered to a unit stays offered, unchanged, until taken.
  property p_cmd_hold(logic v, logic rdy, unit_cmd_t c);
    @(posedge clk) disable iff (rst) v && !rdy |=> v && c == $past(c);
  endproperty
  a_mmc_hold: assert property (p_cmd_hold(mmc_cmd.valid, mmc_cmd_ready, mmc_cmd));
  a_rdt_hold: assert property (p_cmd_hold(rdt_cmd.valid, rdt_cmd_ready, rdt_cmd));

endmodule
