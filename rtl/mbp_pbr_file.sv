// mbp_pbr_file: the packet buffer registers (PBRs) of MBP-light.
//
// The PBRs serve both as the core's wide registers and as the buffers in
// which the MMC and the RDT interface keep packets, so a received packet is
// operated on where it lies, without load/store copies ("buffer-register
// architecture"). NPBR registers of 68 bits: eight bytes and a 4-bit tag
// (see mbp_pkg for the bit layout). Count and width follow the published
// description; the split into ports is this design's own choice.
//
// Interface: NRD combinational read ports and NWR write ports, each writing a
// whole 68-bit register on the rising clock edge. The clients do byte and
// word updates by read-modify-write within one cycle. Port 0 is the core,
// port 1 the RDT interface, port 2 the MMC; when two ports write the same
// register in one cycle the lower-numbered port wins. An index at or above
// NPBR reads as zero and is not written. Synchronous reset clears every PBR.
module mbp_pbr_file
  import mbp_pkg::*;
#(
  parameter int unsigned N   = NPBR,
  parameter int unsigned NRD = 3,
  parameter int unsigned NWR = 3
) (
  input  logic     clk,
  input  logic     rst,
  input  pbr_idx_t rd_idx  [NRD],
  output pbr_t     rd_data [NRD],
  input  logic     wr_en   [NWR],
  input  pbr_idx_t wr_idx  [NWR],
  input  pbr_t     wr_data [NWR]
);

  pbr_t regs [N];

  always_comb begin
    for (int p = 0; p < NRD; p++)
      rd_data[p] = (32'(rd_idx[p]) < N) ? regs[rd_idx[p]] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      // Highest-numbered port first so that a lower port overrides it.
      for (int p = NWR - 1; p >= 0; p--)
        if (wr_en[p] && 32'(wr_idx[p]) < N) regs[wr_idx[p]] <= wr_data[p];
    end
  end

endmodule
