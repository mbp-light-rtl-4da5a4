// mbp_light: the MBP-light chip, the distributed-shared-memory controller of
// one JUMP-1 cluster.
//
// Three blocks around one register file, as in the published block diagram:
// the MMC faces the cluster bus (four processors with L2 caches) and the
// cluster memory, the RDT interface faces the RDT router chip, and the MBP
// core runs the coherence protocol in software, reached by interrupts from
// both. All three share the 112 packet buffer registers (PBRs): a packet
// arriving from either side is written into a PBR and the core works on it
// there. Core port 0/1 read and port 0 write have priority over the RDT
// interface (port 1 write) and the MMC (port 2 write).
//
// A typical remote-invalidation flow: an L2 request arrives at the MMC, the
// core is interrupted, decodes the packet in its PBR, and tells the RDT
// interface to multicast invalidations; the RDT interface counts the
// returning acks itself and interrupts the core once all are in; the core
// then has the MMC send the reply to the L2 cache.
//
// External parts are reached through ports: instruction memory and local
// memory (the core's local memory and I/O), the cluster memory, the cluster
// bus and the router. Their timing is described in the block modules.
module mbp_light
  import mbp_pkg::*;
#(
  parameter int unsigned IM_DEPTH     = 256,
  parameter int unsigned RDT_RX_BASE  = 80,
  parameter int unsigned RDT_RX_COUNT = 16,
  parameter int unsigned MMC_RX_BASE  = 96,
  parameter int unsigned MMC_RX_COUNT = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] cluster_id,
  output logic       halted,
  // instruction memory
  output logic       imem_en,
  output pc_t        imem_addr,
  input  instr_t     imem_rdata,
  // local memory
  output logic       lm_en,
  output logic       lm_we,
  output word_t      lm_addr,
  output word_t      lm_wdata,
  input  word_t      lm_rdata,
  // cluster bus
  input  logic       req_valid,
  output logic       req_ready,
  input  pbr_t       req_pkt,
  output logic       rep_valid,
  input  logic       rep_ready,
  output pbr_t       rep_pkt,
  // cluster memory
  output logic       cm_en,
  output logic       cm_we,
  output word_t      cm_addr,
  output logic [63:0] cm_wdata,
  input  logic [63:0] cm_rdata,
  // RDT router
  output logic       tx_valid,
  input  logic       tx_ready,
  output pbr_t       tx_pkt,
  output logic [7:0] tx_dest,
  input  logic       rx_valid,
  output logic       rx_ready,
  input  pbr_t       rx_pkt
);

  pbr_idx_t rd_idx  [4];
  pbr_t     rd_data [4];
  logic     wr_en   [3];
  pbr_idx_t wr_idx  [3];
  pbr_t     wr_data [3];

  mbp_pbr_file #(.N(NPBR), .NRD(4), .NWR(3)) u_pbr (
    .clk, .rst, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data
  );

  unit_cmd_t mmc_cmd, rdt_cmd;
  logic      mmc_cmd_ready, rdt_cmd_ready;
  logic      irq_mmc, irq_rdt, irq_ack;
  pbr_idx_t  irq_mmc_pbr, irq_rdt_pbr;
  irq_e      irq_take;
  word_t     ack_remaining;

  mbp_core #(.IM_DEPTH(IM_DEPTH)) u_core (
    .clk, .rst,
    .imem_en, .imem_addr, .imem_rdata,
    .lm_en, .lm_we, .lm_addr, .lm_wdata, .lm_rdata,
    .pbr_rd0_idx (rd_idx[0]), .pbr_rd0_data (rd_data[0]),
    .pbr_rd1_idx (rd_idx[1]), .pbr_rd1_data (rd_data[1]),
    .pbr_we (wr_en[0]), .pbr_wr_idx (wr_idx[0]), .pbr_wr_data (wr_data[0]),
    .mmc_cmd, .mmc_cmd_ready, .rdt_cmd, .rdt_cmd_ready,
    .irq_mmc, .irq_mmc_pbr, .irq_rdt, .irq_rdt_pbr, .irq_ack,
    .irq_take, .cluster_id, .ack_remaining, .halted
  );

  mbp_rdt_if #(.RX_BASE(RDT_RX_BASE), .RX_COUNT(RDT_RX_COUNT)) u_rdt (
    .clk, .rst, .cluster_id,
    .tx_valid, .tx_ready, .tx_pkt, .tx_dest,
    .rx_valid, .rx_ready, .rx_pkt,
    .cmd (rdt_cmd), .cmd_ready (rdt_cmd_ready),
    .pbr_rd_idx (rd_idx[2]), .pbr_rd_data (rd_data[2]),
    .pbr_we (wr_en[1]), .pbr_wr_idx (wr_idx[1]), .pbr_wr_data (wr_data[1]),
    .irq (irq_rdt), .irq_pbr (irq_rdt_pbr), .irq_take (irq_take == IRQ_RDT),
    .ack_irq (irq_ack), .ack_irq_take (irq_take == IRQ_ACK),
    .ack_remaining
  );

  mbp_mmc #(.RX_BASE(MMC_RX_BASE), .RX_COUNT(MMC_RX_COUNT)) u_mmc (
    .clk, .rst,
    .req_valid, .req_ready, .req_pkt,
    .rep_valid, .rep_ready, .rep_pkt,
    .cm_en, .cm_we, .cm_addr, .cm_wdata, .cm_rdata,
    .cmd (mmc_cmd), .cmd_ready (mmc_cmd_ready),
    .pbr_rd_idx (rd_idx[3]), .pbr_rd_data (rd_data[3]),
    .pbr_we (wr_en[2]), .pbr_wr_idx (wr_idx[2]), .pbr_wr_data (wr_data[2]),
    .irq (irq_mmc), .irq_pbr (irq_mmc_pbr), .irq_take (irq_take == IRQ_MMC)
  );

endmodule
