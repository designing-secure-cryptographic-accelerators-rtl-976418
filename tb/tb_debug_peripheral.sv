// tb_debug_peripheral: debug reads answered only when enabled and when the register's tag is
// no more confidential than the reader.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_debug_peripheral;
  import ifc_pkg::*, aes_pkg::*;
  int checks = 0, failures = 0;
  data_slot_t slots [30];
  logic debug_en, rd_en, rd_ok;
  logic [4:0] rd_idx;
  label_t rd_label, rd_tag;
  block_t rd_data;
  debug_peripheral #(.N(30)) dut (.*);
  initial begin
    for (int i = 0; i < 30; i++) begin
      slots[i] = '0;
      slots[i].valid = 1;
      slots[i].tag   = label_t'(8'($urandom));
      slots[i].state = {$urandom, $urandom, $urandom, $urandom};
    end
    for (int t = 0; t < 400; t++) begin
      automatic bit ok;
      debug_en = ($urandom_range(0, 3) != 0);
      rd_en    = ($urandom_range(0, 7) != 0);
      rd_idx   = 5'($urandom);
      rd_label = label_t'(8'($urandom));
      #1;
      ok = rd_en && debug_en && rd_idx < 30 && slots[rd_idx].tag.conf <= rd_label.conf;
      `CHECK(rd_ok == ok, $sformatf("permission idx %0d", rd_idx))
      `CHECK(rd_data == (ok ? slots[rd_idx].state : '0), "data only when permitted")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
