// tb_mbp_sram: random reads and writes of the internal memory against a
// reference array; read data must appear exactly one cycle after the read.
`timescale 1ns/1ps
module tb_mbp_sram;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, we; logic [7:0] addr; logic [15:0] wdata, rdata;
  mbp_sram dut (.clk, .rst, .en, .we, .addr, .wdata, .rdata);
  logic [15:0] ref_m [256];
  logic [15:0] expect_q; logic pend;
  initial begin
    for (int i = 0; i < 256; i++) ref_m[i] = '0;
    en = 0; we = 0; addr = 0; wdata = 0; pend = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expect_q) begin failures++; $display("FAIL read %h vs %h", rdata, expect_q); end
      end
      en = ($urandom_range(0, 3) != 0); we = $urandom_range(0, 1) == 1;
      addr = 8'($urandom_range(0, 31)); wdata = 16'($urandom());
      pend = en && !we;
      expect_q = ref_m[addr];
      if (en && we) ref_m[addr] = wdata;
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
