// tb_aes_key_stage: checks forward and inverse key-schedule steps of several key stages.
// Each stage receives round key r-1 (encrypt) or round key 11-r (decrypt) of a random key and
// must deliver round key r (or 10-r) two cycles later on rk, with its tag, and pass it on.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_aes_key_stage;
  import ifc_pkg::*, aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, stall = 0;
  always #5 clk = ~clk;

  mode_e     mode_in;
  key_slot_t in;
  key_slot_t out [3];
  block_t    rk  [3];
  label_t    rk_tag [3];

  aes_key_stage #(.ROUND(1))  u1  (.clk, .rst_n, .stall, .mode_in, .in, .out(out[0]), .rk(rk[0]), .rk_tag(rk_tag[0]));
  aes_key_stage #(.ROUND(5))  u5  (.clk, .rst_n, .stall, .mode_in, .in, .out(out[1]), .rk(rk[1]), .rk_tag(rk_tag[1]));
  aes_key_stage #(.ROUND(10)) u10 (.clk, .rst_n, .stall, .mode_in, .in, .out(out[2]), .rk(rk[2]), .rk_tag(rk_tag[2]));

  int rounds [3] = '{1, 5, 10};

  initial begin
    mode_in = MODE_ENC; in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // FIPS-197 A.1: round key 1 of 2b7e1516...
    in.rk = 128'h2b7e151628aed2a6abf7158809cf4f3c; in.tag = '{conf: 4'd5, integ: 4'd6};
    repeat (2) @(posedge clk);
    #1;
    `CHECK(rk[0] == 128'ha0fafe1788542cb123a339392a6c7605, "FIPS-197 round key 1")
    `CHECK(rk_tag[0] == '{conf: 4'd5, integ: 4'd6}, "key tag travels")
    for (int i = 0; i < 8; i++) begin
      automatic block_t key = {$urandom, $urandom, $urandom, $urandom};
      automatic mode_e  m = mode_e'(i % 2);
      for (int s = 0; s < 3; s++) begin
        mode_in = m;
        in.rk  = (m == MODE_ENC) ? aes_ref_pkg::round_key(key, rounds[s] - 1)
                                 : aes_ref_pkg::round_key(key, 11 - rounds[s]);
        in.tag = label_t'(8'(i));
        @(posedge clk); #1;
        if (i == 3) begin
          stall = 1;
          in.rk = '0;
          repeat (2) @(posedge clk);
          #1 stall = 0;
        end
        @(posedge clk); #1;
        `CHECK(((s == 0) ? rk[0] : (s == 1) ? rk[1] : rk[2]) ==
               ((m == MODE_ENC) ? aes_ref_pkg::round_key(key, rounds[s])
                                : aes_ref_pkg::round_key(key, 10 - rounds[s])),
               $sformatf("round %0d mode %0d", rounds[s], m))
        @(posedge clk); #1;
        `CHECK(out[s].rk == ((m == MODE_ENC) ? aes_ref_pkg::round_key(key, rounds[s])
                                             : aes_ref_pkg::round_key(key, 10 - rounds[s]))
               && out[s].tag == label_t'(8'(i)), "key passed on")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
