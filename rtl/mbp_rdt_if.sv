// mbp_rdt_if: interface between MBP-light and the RDT router chip.
//
// The published design point is that generating and collecting
// acknowledgment packets in the RDT network must be fast, so it is done by
// hardwired logic next to the core rather than by core software. This block
// does that, and moves packets between the router and the PBRs:
//   SEND   send PBR[pbr] to the cluster named in its byte 2;
//   MCAST  send a copy of PBR[pbr] to every cluster whose bit is set in the
//          16-bit bitmap `arg` (cluster = {byte 2 high nibble, bit number}),
//          with byte 2 of each copy set to its destination, and arm the ack
//          counter with the number of copies;
//   ACK    answer the packet in PBR[pbr]: an ack packet (type PT_ACK, source
//          this cluster, destination the packet's source, bytes 3..7 and the
//          tag copied) is built and sent without the core composing it;
//   REL    hand the oldest receive PBR back to the ring.
// Incoming ack packets are counted here and never reach a PBR; when the
// count of awaited acks reaches zero, ack_irq interrupts the core. Other
// incoming packets go into the next PBR of the receive ring and interrupt
// the core with that PBR's number.
// The split of work follows the published description; the commands, the
// header layout (mbp_pkg), the bitmap form of a multicast (the published
// scheme is a hierarchical bit-map directory that it does not spell out) and
// one-PBR packets are this design's own choices.
//
// Timing: router ports are valid/ready, one packet (68 bits plus an 8-bit
// destination) per transfer. cmd_ready is high when no packet is being sent;
// an MCAST is also held back while acks of the previous one are awaited.
module mbp_rdt_if
  import mbp_pkg::*;
#(
  parameter int unsigned RX_BASE  = 80,
  parameter int unsigned RX_COUNT = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  logic [7:0] cluster_id,
  // to the router
  output logic      tx_valid,
  input  logic      tx_ready,
  output pbr_t      tx_pkt,
  output logic [7:0] tx_dest,
  // from the router
  input  logic      rx_valid,
  output logic      rx_ready,
  input  pbr_t      rx_pkt,
  // core command port
  input  unit_cmd_t cmd,
  output logic      cmd_ready,
  // PBR file port
  output pbr_idx_t  pbr_rd_idx,
  input  pbr_t      pbr_rd_data,
  output logic      pbr_we,
  output pbr_idx_t  pbr_wr_idx,
  output pbr_t      pbr_wr_data,
  // interrupts
  output logic      irq,
  output pbr_idx_t  irq_pbr,
  input  logic      irq_take,
  output logic      ack_irq,
  input  logic      ack_irq_take,
  output word_t     ack_remaining
);

  rdt_op_e op;
  logic    accept;
  logic    sending;
  pbr_t    pkt;            // packet being sent
  word_t   bitmap;         // multicast copies still to send
  logic    mcast;

  assign op        = rdt_op_e'(cmd.op);
  assign cmd_ready = !sending && !(op == RDT_MCAST && ack_remaining != '0);
  assign accept    = cmd.valid && cmd_ready;
  assign pbr_rd_idx = cmd.pbr;

  // ---------------------------------------------------------------- send
  logic [3:0] low_bit;
  always_comb begin
    low_bit = '0;
    for (int i = 15; i >= 0; i--) if (bitmap[i]) low_bit = 4'(i);
  end

  logic [7:0] dest;
  assign dest     = mcast ? {pkt[67-16 -: 4], low_bit} : pbr_byte(pkt, 4'd2);
  assign tx_valid = sending;
  assign tx_dest  = dest;
  assign tx_pkt   = pbr_set_byte(pkt, 4'd2, dest);

  function automatic logic [4:0] popcount16(word_t v);
    logic [4:0] c = '0;
    for (int i = 0; i < 16; i++) c += 5'(v[i]);
    return c;
  endfunction

  pbr_t ack_pkt;
  always_comb begin
    ack_pkt = pbr_rd_data;
    ack_pkt = pbr_set_byte(ack_pkt, 4'd0, PT_ACK);
    ack_pkt = pbr_set_byte(ack_pkt, 4'd1, cluster_id);
    ack_pkt = pbr_set_byte(ack_pkt, 4'd2, pbr_byte(pbr_rd_data, 4'd1));
  end

  // ---------------------------------------------------------------- receive
  logic     is_ack;
  logic     ring_full, push;
  pbr_idx_t ring_wr_idx;
  assign is_ack   = (pbr_byte(rx_pkt, 4'd0) == PT_ACK);
  assign rx_ready = is_ack || !ring_full;
  assign push     = rx_valid && !is_ack && !ring_full;

  mbp_rx_ring #(.BASE(RX_BASE), .COUNT(RX_COUNT)) u_ring (
    .clk, .rst,
    .push, .take (irq_take), .release_buf (accept && op == RDT_REL),
    .full (ring_full), .wr_idx (ring_wr_idx),
    .irq, .irq_pbr
  );

  assign pbr_we      = push;
  assign pbr_wr_idx  = ring_wr_idx;
  assign pbr_wr_data = rx_pkt;

  logic ack_in;
  assign ack_in = rx_valid && is_ack && ack_remaining != '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      sending       <= 1'b0;
      pkt           <= '0;
      bitmap        <= '0;
      mcast         <= 1'b0;
      ack_remaining <= '0;
      ack_irq       <= 1'b0;
    end else begin
      if (sending && tx_ready) begin
        if (mcast) begin
          bitmap <= bitmap & (bitmap - word_t'(1));
          if ((bitmap & (bitmap - word_t'(1))) == '0) sending <= 1'b0;
        end else begin
          sending <= 1'b0;
        end
      end
      if (accept) begin
        unique case (op)
          RDT_SEND: begin
            pkt <= pbr_rd_data; mcast <= 1'b0; sending <= 1'b1;
          end
          RDT_MCAST: begin
            pkt    <= pbr_rd_data;
            mcast  <= 1'b1;
            bitmap <= cmd.arg;
            sending <= (cmd.arg != '0);
          end
          RDT_ACK: begin
            pkt <= ack_pkt; mcast <= 1'b0; sending <= 1'b1;
          end
          default: ;
        endcase
      end
      if (accept && op == RDT_MCAST) begin
        ack_remaining <= word_t'(popcount16(cmd.arg));
      end else if (ack_in) begin
        ack_remaining <= ack_remaining - word_t'(1);
        if (ack_remaining == word_t'(1)) ack_irq <= 1'b1;
      end
      if (ack_irq_take) ack_irq <= 1'b0;
    end
  end

  a_tx_stable: assert property (@(posedge clk) disable iff (rst)
    tx_valid && !tx_ready |=> tx_valid && tx_pkt == $past(tx_pkt));

endmodule
