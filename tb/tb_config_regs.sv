// tb_config_regs: anyone reads, only the supervisor writes; control bits follow register 0.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_config_regs;
  import ifc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_ok, accel_en, debug_en;
  always #5 clk = ~clk;
  logic [1:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  label_t wr_label = '0;
  logic [31:0] model [4];
  config_regs dut (.*);
  initial begin
    model = '{32'h1, 32'h0, 32'h0, 32'h0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    `CHECK(accel_en == 1 && debug_en == 0, "reset controls")
    for (int i = 0; i < 80; i++) begin
      automatic label_t who = (i % 4 == 0) ? '{conf: 4'($urandom), integ: 4'hF} : label_t'(8'($urandom_range(0, 254)));
      wr_en = 1; wr_label = who; wr_addr = 2'($urandom); wr_data = $urandom;
      #1 `CHECK(wr_ok == (who.integ == 4'hF), "write permission")
      @(posedge clk); #1;
      if (who.integ == 4'hF) model[wr_addr] = wr_data;
      wr_en = 0;
      for (int a = 0; a < 4; a++) begin
        rd_addr = 2'(a);
        #1 `CHECK(rd_data == model[a], $sformatf("read register %0d", a))
      end
      `CHECK(accel_en == model[0][0] && debug_en == model[0][1], "control bits")
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
