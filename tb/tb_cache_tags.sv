// tb_cache_tags: random writes and reads into both ways against an array model; the port's
// dependent label follows the selected way.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_cache_tags;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, way = 0, port_trusted;
  logic [18:0] tag_i = 0, tag_o;
  logic [7:0] index = 0;
  logic [18:0] m0 [256], m1 [256];
  cache_tags dut (.*);
  initial begin
    // fill both ways
    for (int i = 0; i < 256; i++)
      for (int w = 0; w < 2; w++) begin
        we = 1; way = w[0]; index = 8'(i); tag_i = 19'($urandom);
        #1 `CHECK(tag_o == '0 && port_trusted == (w == 0), "write cycle output and label")
        @(posedge clk); #1;
        if (w == 0) m0[i] = tag_i; else m1[i] = tag_i;
      end
    for (int t = 0; t < 600; t++) begin
      we = ($urandom_range(0, 2) == 0); way = 1'($urandom); index = 8'($urandom); tag_i = 19'($urandom);
      #1;
      if (!we) `CHECK(tag_o == (way ? m1[index] : m0[index]), "read")
      @(posedge clk); #1;
      if (we) begin if (way) m1[index] = tag_i; else m0[index] = tag_i; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
