// tb_mbp_pbr_file: checks the PBR file against a reference array. Writes
// random 68-bit values through all ports (including same-index collisions,
// where the lower port must win and out-of-range indices, which must be
// ignored), reads back through every read port, and checks the published
// byte layout: with bytes 0x31, 0x41 at offsets 1 and 2 the 16-bit word at
// offset 1 is 0x3141, and offset 8 holds the 4-bit tag.
`timescale 1ns/1ps
module tb_mbp_pbr_file;
  import mbp_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pbr_idx_t rd_idx [3]; pbr_t rd_data [3];
  logic wr_en [3]; pbr_idx_t wr_idx [3]; pbr_t wr_data [3];
  mbp_pbr_file dut (.clk, .rst, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data);

  pbr_t ref_regs [128];

  function automatic pbr_t rnd68();
    return {$urandom(), $urandom(), 4'($urandom())};
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) ref_regs[i] = '0;
    for (int p = 0; p < 3; p++) begin wr_en[p] = 0; wr_idx[p] = '0; wr_data[p] = '0; rd_idx[p] = '0; end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        wr_en[p]   = ($urandom_range(0, 1) == 1);
        wr_idx[p]  = (t % 7 == 0) ? 7'd20 : 7'($urandom_range(0, 127));
        wr_data[p] = rnd68();
      end
      for (int p = 2; p >= 0; p--)
        if (wr_en[p] && wr_idx[p] < 112) ref_regs[wr_idx[p]] = wr_data[p];
      @(posedge clk); #1;
      for (int p = 0; p < 3; p++) begin
        rd_idx[p] = 7'($urandom_range(0, 127));
        #1;
        checks++;
        if (rd_data[p] !== (rd_idx[p] < 112 ? ref_regs[rd_idx[p]] : '0)) begin
          failures++;
          $display("FAIL read port %0d idx %0d: %h vs %h", p, rd_idx[p], rd_data[p], ref_regs[rd_idx[p]]);
        end
      end
    end
    // byte layout as in the published example
    @(negedge clk);
    for (int p = 0; p < 3; p++) wr_en[p] = 0;
    wr_en[0] = 1; wr_idx[0] = 7'd9;
    wr_data[0] = pbr_set_byte(pbr_set_byte('0, 4'd1, 8'h31), 4'd2, 8'h41);
    wr_data[0][3:0] = 4'h3;
    @(posedge clk); #1;
    wr_en[0] = 0; rd_idx[0] = 7'd9; #1;
    checks++; if (pbr_word(rd_data[0], 3'd1) !== 16'h3141) begin failures++; $display("FAIL word layout"); end
    checks++; if (pbr_byte(rd_data[0], 4'd8) !== 8'h03) begin failures++; $display("FAIL tag as offset 8"); end
    checks++; if (rd_data[0][67:4] !== 64'h0031_4100_0000_0000) begin failures++; $display("FAIL byte order"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
