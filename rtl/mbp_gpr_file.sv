// mbp_gpr_file: the 16 general purpose registers of the MBP core, 16 bits
// each (count and width as published). Two combinational read ports and one
// write port; a read of the register being written in the same cycle returns
// the new value (write-through), which covers the hazard between the
// write-back stage and the register-fetch stage. The GPRs hold plain data
// and the pointers that select PBRs. Synchronous reset clears them; the
// port arrangement and the bypass are this design's own choices.
module mbp_gpr_file
  import mbp_pkg::*;
#(
  parameter int unsigned N = NGPR
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [$clog2(N)-1:0] ra_idx,
  output word_t              ra_data,
  input  logic [$clog2(N)-1:0] rb_idx,
  output word_t              rb_data,
  input  logic               we,
  input  logic [$clog2(N)-1:0] w_idx,
  input  word_t              w_data
);

  word_t regs [N];

  assign ra_data = (we && w_idx == ra_idx) ? w_data : regs[ra_idx];
  assign rb_data = (we && w_idx == rb_idx) ? w_data : regs[rb_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we) begin
      regs[w_idx] <= w_data;
    end
  end

endmodule
