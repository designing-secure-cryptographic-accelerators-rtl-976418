// tb_declassifier: release rule at the pipeline end. Random labels against an independent
// formula, plus the cases of a user's own key, the master key used by a user and by the
// supervisor, and decryption output returned to the owner's confidentiality.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_declassifier;
  import ifc_pkg::*, aes_pkg::*;
  int checks = 0, failures = 0;
  data_slot_t in;
  logic out_valid, violation;
  block_t out_data;
  label_t out_label, out_owner;
  logic [3:0] out_id;

  declassifier dut (.*);

  task automatic try(mode_e m, label_t owner, label_t key, bit exp_ok, string what);
    in = '0; in.valid = 1; in.mode = m; in.owner = owner; in.id = 4'hA;
    in.tag = '{conf: (owner.conf > key.conf) ? owner.conf : key.conf,
               integ: (owner.integ < key.integ) ? owner.integ : key.integ};
    in.state = 128'hfeedface_01234567_89abcdef_cafef00d;
    #1;
    `CHECK(violation == !exp_ok, what)
    `CHECK(out_data == (exp_ok ? in.state : '0), {what, " data"})
    `CHECK(out_label.conf == ((m == MODE_ENC) ? 4'h0 : owner.conf) && out_label.integ == in.tag.integ,
           {what, " label"})
    `CHECK(out_owner == owner && out_id == 4'hA && out_valid, {what, " fields"})
  endtask

  initial begin
    try(MODE_ENC, '{conf: 4'd2, integ: 4'd6}, '{conf: 4'd5, integ: 4'd7}, 1, "user key within its integrity");
    try(MODE_ENC, '{conf: 4'd2, integ: 4'd6}, LBL_MASTER,                 0, "master key by user");
    try(MODE_ENC, LBL_MASTER,                 LBL_MASTER,                 1, "master key by supervisor");
    try(MODE_DEC, '{conf: 4'd4, integ: 4'd4}, '{conf: 4'd4, integ: 4'd9}, 1, "decrypt to owner");
    try(MODE_DEC, '{conf: 4'd4, integ: 4'd4}, '{conf: 4'd9, integ: 4'd9}, 0, "decrypt with too secret key");
    for (int i = 0; i < 200; i++) begin
      automatic label_t o = label_t'(8'($urandom)), k = label_t'(8'($urandom));
      automatic mode_e  m = mode_e'($urandom_range(0, 1));
      automatic int tc = (o.conf > k.conf) ? o.conf : k.conf;
      automatic int rc = (m == MODE_ENC) ? 0 : o.conf;
      automatic int lim = (rc > o.integ) ? rc : o.integ;
      try(m, o, k, tc <= lim, "random labels");
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
