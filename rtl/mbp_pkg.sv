// mbp_pkg: types and constants shared by the MBP-light blocks.
//
// MBP-light is a distributed-shared-memory controller. Its core is a 16-bit
// processor with 16 general purpose registers (GPRs) and 112 packet buffer
// registers (PBRs) of 68 bits each, fed by 21-bit instructions in 14 classes.
// The register counts, widths, instruction width and class names follow the
// published description of the chip. The binary encoding of the instructions,
// the packet header layout and the interrupt vectors are this design's own
// choices; the published description gives none of them.
//
// Instruction word (21 bits):
//   [20:17] class   [16:14] func   [13:10] ra   [9:6] rb   [5:3] off
//   imm10 = [9:0] (WGI, Branch, TJ)
//   BPI:  ra [13:10], off [9:7], imm7 [6:0]
//   LMA/IMA: ra [13:10], rb [9:6], disp6 [5:0]
//
// PBR layout: bytes 0..7 in bits [67:4] (byte 0 in [67:60]) and a 4-bit tag in
// bits [3:0], which pointer+offset addressing reaches as "offset 8".
//
// Packet header (byte numbers of a PBR): 0 type, 1 source cluster,
// 2 destination cluster, 3..7 address / payload.
package mbp_pkg;

  localparam int unsigned XLEN      = 16;   // GPR width
  localparam int unsigned NGPR      = 16;   // number of GPRs
  localparam int unsigned NPBR      = 112;  // number of PBRs
  localparam int unsigned PBR_W     = 68;   // PBR width: 8 bytes + 4-bit tag
  localparam int unsigned PBR_IDX_W = 7;    // enough for 112 PBRs
  localparam int unsigned ILEN      = 21;   // instruction width
  localparam int unsigned PC_W      = 10;   // instruction address width (assumed)

  typedef logic [PBR_W-1:0]     pbr_t;
  typedef logic [PBR_IDX_W-1:0] pbr_idx_t;
  typedef logic [XLEN-1:0]      word_t;
  typedef logic [ILEN-1:0]      instr_t;
  typedef logic [PC_W-1:0]      pc_t;

  // The 14 instruction classes.
  typedef enum logic [3:0] {
    C_NOP    = 4'd0,
    C_WGG    = 4'd1,   // GPR-GPR operate
    C_WGI    = 4'd2,   // GPR-immediate operate
    C_WPG    = 4'd3,   // PBR-GPR operate
    C_BPI    = 4'd4,   // PBR-immediate operate
    C_MPP    = 4'd5,   // PBR-PBR move
    C_BRANCH = 4'd6,
    C_TJ     = 4'd7,   // table jump
    C_LMA    = 4'd8,   // local memory access
    C_IMA    = 4'd9,   // internal memory access
    C_MMC    = 4'd10,  // MMC control
    C_RDT    = 4'd11,  // RDT interface control
    C_INT    = 4'd12,  // interrupt control
    C_SPE    = 4'd13   // special
  } iclass_e;

  // ALU functions shared by WGG, WGI and WPG (func field).
  typedef enum logic [2:0] {
    F_ADD = 3'd0, F_SUB = 3'd1, F_AND = 3'd2, F_OR  = 3'd3,
    F_XOR = 3'd4, F_SLL = 3'd5, F_SRL = 3'd6, F_MOV = 3'd7
  } alu_f_e;
  // WGI: func 7 (MOV) is LI, rd = zero-extended imm10.
  // WPG: func 5 stores the GPR into the PBR word (STPG), func 7 loads it (LDPG).
  localparam logic [2:0] F_STPG = 3'd5;

  // BPI functions (operate on one PBR byte with a 7-bit immediate).
  localparam logic [2:0] BPI_MOV = 3'd0, BPI_ADD = 3'd1, BPI_AND = 3'd2,
                         BPI_OR  = 3'd3, BPI_XOR = 3'd4, BPI_TAG = 3'd5;
  // MPP functions.
  localparam logic [2:0] MPP_MVLPP = 3'd0,  // whole 68-bit PBR
                         MPP_MVPP  = 3'd1;  // one 16-bit PBR word, same offset
  // Branch functions (imm10 is the absolute target).
  localparam logic [2:0] BR_ALWAYS = 3'd0, BR_EQZ = 3'd1, BR_NEZ = 3'd2,
                         BR_LTZ = 3'd3, BR_JAL = 3'd4, BR_JR = 3'd5;
  // Memory access functions (LMA, IMA).
  localparam logic [2:0] MEM_LD = 3'd0, MEM_ST = 3'd1;
  // INT functions.
  localparam logic [2:0] INT_EI = 3'd0, INT_DI = 3'd1, INT_RETI = 3'd2;
  // SPE functions.
  localparam logic [2:0] SPE_MFIR = 3'd0,  // rd = {cause, 7'b0, PBR index}
                         SPE_MFID = 3'd1,  // rd = own cluster id
                         SPE_MFAC = 3'd2,  // rd = acks still awaited
                         SPE_HALT = 3'd7;

  // Commands the core hands to the MMC and to the RDT interface (GM stage).
  typedef enum logic [1:0] {
    MMC_REPLY = 2'd0,   // send PBR[ra] to the L2 caches as a reply packet
    MMC_MWR   = 2'd1,   // write PBR[ra] bytes 0..7 to cluster memory line rb
    MMC_MRD   = 2'd2,   // read cluster memory line rb into PBR[ra] bytes 0..7
    MMC_REL   = 2'd3    // release the oldest MMC receive buffer
  } mmc_op_e;

  typedef enum logic [1:0] {
    RDT_SEND  = 2'd0,   // unicast PBR[ra] to the cluster in its byte 2
    RDT_MCAST = 2'd1,   // multicast PBR[ra] to the clusters in bitmap rb
    RDT_ACK   = 2'd2,   // answer the packet in PBR[ra] with an ack packet
    RDT_REL   = 2'd3    // release the oldest RDT receive buffer
  } rdt_op_e;

  typedef struct packed {
    logic     valid;
    logic [1:0] op;
    pbr_idx_t pbr;
    word_t    arg;
  } unit_cmd_t;

  // Packet types (header byte 0).
  localparam logic [7:0] PT_READ  = 8'h01,
                         PT_WRITE = 8'h02,
                         PT_INVAL = 8'h03,
                         PT_ACK   = 8'h04,
                         PT_DATA  = 8'h05,
                         PT_REPLY = 8'h06;

  // Interrupt causes and their vectors.
  typedef enum logic [1:0] {
    IRQ_NONE = 2'd0,
    IRQ_MMC  = 2'd1,   // request packet from the L2 caches
    IRQ_RDT  = 2'd2,   // packet from the RDT network
    IRQ_ACK  = 2'd3    // all awaited ack packets collected
  } irq_e;

  localparam pc_t VEC_MMC = 10'h010;
  localparam pc_t VEC_RDT = 10'h020;
  localparam pc_t VEC_ACK = 10'h030;

  // Byte i of a PBR (i = 8 is the zero-extended tag).
  function automatic logic [7:0] pbr_byte(pbr_t p, logic [3:0] i);
    if (i == 4'd8) return {4'b0, p[3:0]};
    return p[67 - 8*i -: 8];
  endfunction

  // 16-bit word at an offset: byte[off] high, byte[off+1] low.
  function automatic word_t pbr_word(pbr_t p, logic [2:0] off);
    return {pbr_byte(p, {1'b0, off}), pbr_byte(p, {1'b0, off} + 4'd1)};
  endfunction

  // Write a byte of a PBR (i = 8 writes the low nibble into the tag).
  function automatic pbr_t pbr_set_byte(pbr_t p, logic [3:0] i, logic [7:0] b);
    pbr_t r = p;
    if (i == 4'd8) r[3:0] = b[3:0];
    else r[67 - 8*i -: 8] = b;
    return r;
  endfunction

  function automatic pbr_t pbr_set_word(pbr_t p, logic [2:0] off, word_t w);
    pbr_t r = pbr_set_byte(p, {1'b0, off}, w[15:8]);
    return pbr_set_byte(r, {1'b0, off} + 4'd1, w[7:0]);
  endfunction

endpackage
