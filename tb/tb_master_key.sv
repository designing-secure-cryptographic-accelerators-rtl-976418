// tb_master_key: only the supervisor writes the master key; the key is always tagged (top, top).
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_master_key;
  import ifc_pkg::*, aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_ok;
  always #5 clk = ~clk;
  block_t wr_data = '0, key, model = '0;
  label_t wr_label = '0, key_tag;
  master_key dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    `CHECK(key == '0 && key_tag == LBL_MASTER, "reset value and label")
    for (int i = 0; i < 60; i++) begin
      automatic label_t who = (i % 3 == 0) ? LBL_MASTER : label_t'(8'($urandom_range(0, 254)));
      wr_en = 1; wr_label = who; wr_data = {$urandom, $urandom, $urandom, $urandom};
      #1 `CHECK(wr_ok == (who.integ == 4'hF), $sformatf("write permission for %h", who))
      @(posedge clk); #1;
      if (who.integ == 4'hF) model = wr_data;
      wr_en = 0;
      `CHECK(key == model && key_tag == LBL_MASTER, "master key contents")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
