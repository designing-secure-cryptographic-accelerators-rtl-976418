// tb_aes_round: checks one AES round stage in both directions, its tag join and its stall.
// Drives random states and round keys into a middle round and a last round and compares the
// result three cycles later with the reference model's round functions.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_aes_round;
  import ifc_pkg::*, aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, stall = 0;
  always #5 clk = ~clk;

  data_slot_t in, out_m, out_l;
  data_slot_t sl_m [3], sl_l [3];
  block_t rk;
  label_t rk_tag;

  aes_round #(.LAST(1'b0)) dut_mid  (.clk, .rst_n, .stall, .in, .rk, .rk_tag, .out(out_m), .slots(sl_m));
  aes_round #(.LAST(1'b1)) dut_last (.clk, .rst_n, .stall, .in, .rk, .rk_tag, .out(out_l), .slots(sl_l));

  function automatic block_t exp_round(block_t s, block_t k, mode_e m, bit last);
    block_t t;
    if (m == MODE_ENC) begin
      t = aes_ref_pkg::t_shift(aes_ref_pkg::t_sub(s, 0), 0);
      if (!last) t = aes_ref_pkg::t_mix(t, 0);
      return t ^ k;
    end
    t = aes_ref_pkg::t_sub(aes_ref_pkg::t_shift(s, 1), 1) ^ k;
    return last ? t : aes_ref_pkg::t_mix(t, 1);
  endfunction

  initial begin
    in = '0; rk = '0; rk_tag = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    `CHECK(out_m.valid == 0 && out_m.tag == LBL_EMPTY, "reset state empty")
    for (int i = 0; i < 12; i++) begin
      automatic block_t s = {$urandom, $urandom, $urandom, $urandom};
      automatic block_t k = {$urandom, $urandom, $urandom, $urandom};
      automatic mode_e  m = mode_e'(i % 2);
      automatic label_t t = '{conf: 4'($urandom_range(0, 15)), integ: 4'($urandom_range(0, 15))};
      automatic label_t kt = '{conf: 4'($urandom_range(0, 15)), integ: 4'($urandom_range(0, 15))};
      in = '0; in.valid = 1; in.mode = m; in.tag = t; in.owner = t; in.id = 4'(i); in.state = s;
      @(posedge clk); #1;
      in.valid = 0;
      @(posedge clk); #1;
      rk = k; rk_tag = kt;  // key aligned with the second register
      if (i == 5) begin     // hold the stage for three cycles
        stall = 1;
        repeat (3) @(posedge clk);
        #1;
        `CHECK(sl_m[1].valid && sl_m[1].id == 4'(i) && !sl_m[2].valid, "stalled stage holds its slot")
        stall = 0;
      end
      @(posedge clk); #1;
      `CHECK(out_m.valid && out_m.id == 4'(i), "middle round valid after three cycles")
      `CHECK(out_m.state == exp_round(s, k, m, 0), $sformatf("middle round %0d mode %0d", i, m))
      `CHECK(out_l.state == exp_round(s, k, m, 1), $sformatf("last round %0d mode %0d", i, m))
      `CHECK(out_m.tag == label_join(t, kt) && out_m.owner == t, "tag joined with key tag")
      @(posedge clk); #1;
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
