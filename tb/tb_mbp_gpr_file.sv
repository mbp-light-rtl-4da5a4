// tb_mbp_gpr_file: random writes and reads of the 16 GPRs against a
// reference array, including reads of the register being written in the
// same cycle, which must return the new value.
`timescale 1ns/1ps
module tb_mbp_gpr_file;
  import mbp_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] ra_idx, rb_idx, w_idx; word_t ra_data, rb_data, w_data; logic we;
  mbp_gpr_file dut (.clk, .rst, .ra_idx, .ra_data, .rb_idx, .rb_data, .we, .w_idx, .w_data);
  word_t ref_r [16];
  initial begin
    for (int i = 0; i < 16; i++) ref_r[i] = '0;
    we = 0; w_idx = 0; w_data = 0; ra_idx = 0; rb_idx = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      w_idx = 4'($urandom()); w_data = 16'($urandom());
      ra_idx = (t % 3 == 0) ? w_idx : 4'($urandom());
      rb_idx = 4'($urandom());
      #1;
      checks += 2;
      if (ra_data !== ((we && ra_idx == w_idx) ? w_data : ref_r[ra_idx])) begin failures++; $display("FAIL ra %0d", ra_idx); end
      if (rb_data !== ((we && rb_idx == w_idx) ? w_data : ref_r[rb_idx])) begin failures++; $display("FAIL rb %0d", rb_idx); end
      @(posedge clk);
      if (we) ref_r[w_idx] = w_data;
    end
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
