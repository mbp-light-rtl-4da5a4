// mbp_mmc: memory and cluster-bus controller (MMC) of MBP-light.
//
// Between the L2 caches on the cluster bus, the cluster memory and the MBP
// core. A request packet from an L2 cache is stored in the next free PBR of
// the MMC's receive ring and the core is interrupted with that PBR's number;
// the core decodes the packet in place and then drives the MMC with
// commands (mmc_op_e):
//   REPLY  send the PBR as a reply packet to the L2 caches,
//   MWR    write the PBR's eight bytes to cluster memory line `arg`
//          (update data),
//   MRD    read cluster memory line `arg` into the PBR's eight bytes
//          (tag kept),
//   REL    hand the oldest receive PBR back to the ring.
// The published description gives only this division of work (requests from
// L2 raise an interrupt, replies and update data leave through the MMC); the
// commands, the one-PBR packets and the one-line memory access are this
// design's own simplest reading. Directory handling, the L3-cache use of the
// cluster memory and bus snooping are not modelled.
//
// Interfaces are valid/ready. The cluster memory port is a synchronous RAM
// port with a read latency of one cycle, 64-bit lines addressed by 16 bits.
// cmd_ready is high when the MMC is idle; a REPLY keeps it busy until the
// reply is taken, an MRD for one extra cycle.
module mbp_mmc
  import mbp_pkg::*;
#(
  parameter int unsigned RX_BASE  = 96,
  parameter int unsigned RX_COUNT = 16
) (
  input  logic      clk,
  input  logic      rst,
  // cluster bus: requests from and replies to the L2 caches
  input  logic      req_valid,
  output logic      req_ready,
  input  pbr_t      req_pkt,
  output logic      rep_valid,
  input  logic      rep_ready,
  output pbr_t      rep_pkt,
  // cluster memory
  output logic      cm_en,
  output logic      cm_we,
  output word_t     cm_addr,
  output logic [63:0] cm_wdata,
  input  logic [63:0] cm_rdata,
  // core command port
  input  unit_cmd_t cmd,
  output logic      cmd_ready,
  // PBR file port
  output pbr_idx_t  pbr_rd_idx,
  input  pbr_t      pbr_rd_data,
  output logic      pbr_we,
  output pbr_idx_t  pbr_wr_idx,
  output pbr_t      pbr_wr_data,
  // interrupt
  output logic      irq,
  output pbr_idx_t  irq_pbr,
  input  logic      irq_take
);

  typedef enum logic [1:0] {S_IDLE, S_REPLY, S_MRD} state_e;
  state_e   state;
  pbr_idx_t mrd_pbr;

  logic     ring_full, push;
  pbr_idx_t ring_wr_idx;
  logic     accept;
  mmc_op_e  op;

  assign op        = mmc_op_e'(cmd.op);
  assign cmd_ready = (state == S_IDLE);
  assign accept    = cmd.valid && cmd_ready;

  mbp_rx_ring #(.BASE(RX_BASE), .COUNT(RX_COUNT)) u_ring (
    .clk, .rst,
    .push, .take (irq_take), .release_buf (accept && op == MMC_REL),
    .full (ring_full), .wr_idx (ring_wr_idx),
    .irq, .irq_pbr
  );

  // PBR read: the PBR of an MRD being completed, else the command's PBR.
  assign pbr_rd_idx = (state == S_MRD) ? mrd_pbr : cmd.pbr;

  // The PBR write port serves MRD data first, incoming requests otherwise.
  assign req_ready = !ring_full && state != S_MRD;
  assign push      = req_valid && req_ready;

  always_comb begin
    pbr_we      = 1'b0;
    pbr_wr_idx  = ring_wr_idx;
    pbr_wr_data = req_pkt;
    if (state == S_MRD) begin
      pbr_we      = 1'b1;
      pbr_wr_idx  = mrd_pbr;
      pbr_wr_data = {cm_rdata, pbr_rd_data[3:0]};
    end else if (push) begin
      pbr_we = 1'b1;
    end
  end

  assign cm_en    = accept && (op == MMC_MWR || op == MMC_MRD);
  assign cm_we    = (op == MMC_MWR);
  assign cm_addr  = cmd.arg;
  assign cm_wdata = pbr_rd_data[67:4];

  assign rep_valid = (state == S_REPLY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      mrd_pbr <= '0;
      rep_pkt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          if (op == MMC_REPLY) begin
            rep_pkt <= pbr_rd_data;
            state   <= S_REPLY;
          end else if (op == MMC_MRD) begin
            mrd_pbr <= cmd.pbr;
            state   <= S_MRD;
          end
        end
        S_REPLY: if (rep_ready) state <= S_IDLE;
        S_MRD:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rep_stable: assert property (@(posedge clk) disable iff (rst)
    rep_valid && !rep_ready |=> rep_valid && rep_pkt == $past(rep_pkt));

endmodule
