// mbp_sram: single-port synchronous RAM used as the core's internal memory
// (reached by IMA instructions). One access per cycle: with en high, a write
// stores wdata at addr, and a read returns the word at addr on rdata after
// the next rising edge (one-cycle latency). The published description names
// the internal memory but gives neither its size nor its timing; depth,
// width and latency here are this design's own choices. The whole array is
// cleared to zero in a single reset cycle, so that programs start from a
// known state.
module mbp_sram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata <= '0;
    end else if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end

endmodule
