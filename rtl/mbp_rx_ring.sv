// mbp_rx_ring: bookkeeping for a ring of PBRs that receives packets.
//
// The MMC and the RDT interface each own COUNT consecutive PBRs starting at
// BASE and fill them with incoming packets in order. The ring counts the
// packets that are held (used) and how many of them the core has already
// been interrupted for (notified). While a held packet has not been
// announced, irq is high and irq_pbr names its PBR; take (the core entering
// the interrupt) moves on to the next packet. The core hands a buffer back
// with release, always the oldest one. The published description says only
// that packet buffers live in the PBRs; this ring discipline is this
// design's own choice.
//
// Timing: push, take and release act on the rising edge; wr_idx is where the
// next push goes and full says no push may happen.
module mbp_rx_ring
  import mbp_pkg::*;
#(
  parameter int unsigned BASE  = 96,
  parameter int unsigned COUNT = 16
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     push,
  input  logic     take,
  input  logic     release_buf,
  output logic     full,
  output pbr_idx_t wr_idx,
  output logic     irq,
  output pbr_idx_t irq_pbr
);

  localparam int unsigned PW = $clog2(COUNT);
  localparam int unsigned CW = $clog2(COUNT + 1);

  logic [PW-1:0] head;
  logic [CW-1:0] used;
  logic [CW-1:0] notified;

  function automatic pbr_idx_t slot(logic [PW-1:0] h, logic [CW-1:0] n);
    logic [CW:0] s = CW'(h) + n;
    if (s >= (CW+1)'(COUNT)) s = s - (CW+1)'(COUNT);
    return pbr_idx_t'(BASE) + pbr_idx_t'(s);
  endfunction

  assign full    = (used == CW'(COUNT));
  assign wr_idx  = slot(head, used);
  assign irq     = (notified != used);
  assign irq_pbr = slot(head, notified);

  logic do_rel;
  assign do_rel = release_buf && used != '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      head     <= '0;
      used     <= '0;
      notified <= '0;
    end else begin
      used     <= used + CW'(push && !full) - CW'(do_rel);
      notified <= notified + CW'(take && irq) - CW'(do_rel && notified != '0);
      if (do_rel) head <= (32'(head) == COUNT - 1) ? '0 : head + PW'(1);
    end
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (rst) !(push && full));

endmodule
