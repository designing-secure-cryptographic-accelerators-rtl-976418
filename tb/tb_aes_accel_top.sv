// tb_aes_accel_top: end-to-end test of the accelerator at its default sizes.
//
// Two users and the supervisor share the accelerator:
//   Alice (conf 6, integ 9) keys labelled (7, 9);  Eve (conf 2, integ 2) keys labelled (2, 2);
//   the supervisor (top, top) owns the master key and the configuration.
// The test goes through key allocation and storage (with Eve's overrun and over-read into
// Alice's key cells blocked), configuration and master-key writes by unprivileged users
// (refused), a known-answer encryption with its 31-cycle request-to-result latency, a
// decryption, use of the master key by Eve (release refused) and by the supervisor, a
// back-to-back stream of mixed users at one block per cycle, a stall granted while only
// Alice's data is in flight, a stall denied while Eve's data is in flight (results then go
// through the extra buffer), refused pops of another user's results, and debug reads. Every
// result is compared with a reference model, and each mechanism must have happened.
// The cache-tag store beside the accelerator gets a short write/read check.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_aes_accel_top;
  import ifc_pkg::*, aes_pkg::*, accel_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 1;
  cmd_t  cmd = '0;
  resp_t resp;
  logic ct_we = 0, ct_way = 0, ct_port_trusted;
  logic [18:0] ct_tag_i = 0, ct_tag_o;
  logic [7:0]  ct_index = 0;

  aes_accel_top dut (.*);

  localparam label_t ALICE = '{conf: 4'd6, integ: 4'd9};
  localparam label_t AKEY  = '{conf: 4'd7, integ: 4'd9};
  localparam label_t EVE   = '{conf: 4'd2, integ: 4'd2};
  localparam label_t SUPER = LBL_MASTER;

  localparam block_t KA  = 128'h000102030405060708090a0b0c0d0e0f;
  localparam block_t PT  = 128'h00112233445566778899aabbccddeeff;
  localparam block_t CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

  // ---------------- mechanism counters ----------------
  longint cycle = 0;
  int n_stall = 0, n_denied = 0, n_extra = 0, n_refused_release = 0, n_direct = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (dut.stall) n_stall++;
      if (dut.stall_denied) n_denied++;
      if (dut.to_extra) n_extra++;
      if (dut.to_out_direct) n_direct++;
      if (dut.p_out_valid && dut.p_out_violation) n_refused_release++;
    end
  end
  int n_overrun_blocked = 0, n_overread_blocked = 0, n_cfg_refused = 0, n_mkey_refused = 0;
  int n_pop_refused = 0, n_dbg_refused = 0, n_dbg_ok = 0, n_dec = 0, n_results = 0;

  // ---------------- command helpers ----------------
  resp_t resp_q [$];
  always @(posedge clk) if (rst_n && resp_valid && resp_ready) resp_q.push_back(resp);

  task automatic issue(op_e op, label_t lbl, logic [7:0] addr, block_t wdata, logic [3:0] id = 0);
    cmd_valid = 1;
    cmd = '{op: op, label: lbl, id: id, addr: addr, wdata: wdata};
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  task automatic do_cmd(op_e op, label_t lbl, logic [7:0] addr, block_t wdata, output resp_t r);
    issue(op, lbl, addr, wdata);
    @(posedge clk); #1;
    r = resp_q.pop_back();
    resp_q.delete();
  endtask

  // expected results, in pipeline order
  typedef struct { block_t data; logic err; logic [3:0] id; label_t label; label_t owner; } exp_t;
  exp_t exp_q [$];

  function automatic exp_t expect_res(mode_e m, label_t owner, label_t ktag, block_t key, block_t d, logic [3:0] id);
    exp_t e;
    label_t t = label_join(owner, ktag);
    e.label.conf  = (m == MODE_ENC) ? LVL_BOT : owner.conf;
    e.label.integ = t.integ;
    e.err   = !(t.conf <= ((e.label.conf > owner.integ) ? e.label.conf : owner.integ));
    e.data  = e.err ? '0 : ((m == MODE_ENC) ? aes_ref_pkg::encrypt(key, d) : aes_ref_pkg::decrypt(key, d));
    e.id    = id;
    e.owner = owner;
    return e;
  endfunction

  // read one result as `who` and compare it with the oldest expected one
  task automatic read_result(label_t who);
    resp_t r;
    exp_t e;
    do_cmd(OP_READ_OUT, who, 0, '0, r);
    if (exp_q.size() == 0) begin `CHECK(0, "no result expected") return; end
    e = exp_q[0];
    if (!r.ok) begin
      `CHECK(!(e.label.conf <= who.conf && who.integ >= e.owner.integ), "pop refused only without permission")
      n_pop_refused++;
      return;
    end
    void'(exp_q.pop_front());
    n_results++;
    `CHECK(r.rdata == e.data && r.err == e.err && r.id == e.id && r.label == e.label,
           $sformatf("result id %0d: %h err %0b label %h, exp %h err %0b label %h",
                     r.id, r.rdata, r.err, r.label, e.data, e.err, e.label))
  endtask

  task automatic drain();
    repeat (40) @(posedge clk);
    #1;
    while (exp_q.size() > 0) read_result(SUPER);
  endtask

  resp_t r;
  longint t0;
  block_t kE, kD;
  initial begin
    kE = {$urandom, $urandom, $urandom, $urandom};
    kD = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // ---- keys ----
    do_cmd(OP_MKEY_WRITE, EVE, 0, 128'hdead, r);          `CHECK(!r.ok, "Eve may not write the master key")
    if (!r.ok) n_mkey_refused++;
    do_cmd(OP_MKEY_WRITE, SUPER, 0, KA ^ 128'h1, r);       `CHECK(r.ok, "supervisor writes the master key")
    for (int c = 2; c < 6; c++) begin
      do_cmd(OP_KEY_ALLOC, ALICE, 8'(c), 128'(AKEY), r);   `CHECK(r.ok, "Alice allocates")
    end
    for (int c = 0; c < 2; c++) begin
      do_cmd(OP_KEY_ALLOC, EVE, 8'(c), 128'(EVE), r);      `CHECK(r.ok, "Eve allocates")
    end
    do_cmd(OP_KEY_WRITE, ALICE, 2, 128'(KA[127:64]), r);   `CHECK(r.ok, "Alice key high")
    do_cmd(OP_KEY_WRITE, ALICE, 3, 128'(KA[63:0]), r);     `CHECK(r.ok, "Alice key low")
    kD = aes_ref_pkg::round_key(KA, 10);                   // decryption key = last round key
    do_cmd(OP_KEY_WRITE, ALICE, 4, 128'(kD[127:64]), r);   `CHECK(r.ok, "Alice decryption key high")
    do_cmd(OP_KEY_WRITE, ALICE, 5, 128'(kD[63:0]), r);     `CHECK(r.ok, "Alice decryption key low")
    do_cmd(OP_KEY_WRITE, EVE, 0, 128'(kE[127:64]), r);     `CHECK(r.ok, "Eve key high")
    do_cmd(OP_KEY_WRITE, EVE, 1, 128'(kE[63:0]), r);       `CHECK(r.ok, "Eve key low")
    do_cmd(OP_KEY_WRITE, EVE, 2, 128'hbad, r);             `CHECK(!r.ok, "Eve's overrun into Alice's cell blocked")
    if (!r.ok) n_overrun_blocked++;
    do_cmd(OP_KEY_READ, EVE, 2, '0, r);                    `CHECK(!r.ok && r.rdata == '0, "Eve's over-read blocked")
    if (!r.ok) n_overread_blocked++;
    do_cmd(OP_KEY_READ, EVE, 1, '0, r);                    `CHECK(r.ok && r.rdata == 128'(kE[63:0]), "Eve reads her own key")
    do_cmd(OP_KEY_ALLOC, EVE, 2, 128'(EVE), r);            `CHECK(!r.ok, "Eve cannot take Alice's cell")

    // ---- configuration ----
    do_cmd(OP_CFG_WRITE, EVE, 0, 128'h0, r);               `CHECK(!r.ok, "Eve cannot disable the accelerator")
    if (!r.ok) n_cfg_refused++;
    do_cmd(OP_CFG_READ, EVE, 0, '0, r);                    `CHECK(r.ok && r.rdata[1:0] == 2'b01, "anyone reads the configuration")

    // ---- known answer and latency ----
    issue(OP_ENCRYPT, ALICE, 1, PT, 4'd1);
    t0 = cycle;
    exp_q.push_back(expect_res(MODE_ENC, ALICE, AKEY, KA, PT, 4'd1));
    while (!dut.to_out_direct) @(posedge clk);
    @(posedge clk);
    `CHECK(cycle - t0 == 31, $sformatf("request-to-result latency %0d cycles", cycle - t0))
    #1;
    read_result(EVE);                                      // Eve may not remove Alice's result
    read_result(ALICE);
    `CHECK(aes_ref_pkg::encrypt(KA, PT) == CT, "reference model FIPS-197 C.1")

    // ---- decryption, master key ----
    issue(OP_DECRYPT, ALICE, 2, CT, 4'd2);   exp_q.push_back(expect_res(MODE_DEC, ALICE, AKEY, KA, CT, 4'd2)); n_dec++;
    issue(OP_ENCRYPT, EVE, 4, PT, 4'd3);     exp_q.push_back(expect_res(MODE_ENC, EVE, SUPER, KA ^ 128'h1, PT, 4'd3));
    issue(OP_ENCRYPT, SUPER, 4, PT, 4'd4);   exp_q.push_back(expect_res(MODE_ENC, SUPER, SUPER, KA ^ 128'h1, PT, 4'd4));
    issue(OP_ENCRYPT, EVE, 0, PT, 4'd5);     exp_q.push_back(expect_res(MODE_ENC, EVE, EVE, kE, PT, 4'd5));
    issue(OP_ENCRYPT, EVE, 7, PT, 4'd6);     // unknown key selector: refused at the port
    `CHECK(exp_q[0].data == PT, "decryption recovers the plaintext")
    drain();

    // ---- debug peripheral ----
    do_cmd(OP_CFG_WRITE, SUPER, 0, 128'h3, r);             `CHECK(r.ok, "supervisor enables debug")
    issue(OP_ENCRYPT, ALICE, 1, PT, 4'd7);   exp_q.push_back(expect_res(MODE_ENC, ALICE, AKEY, KA, PT, 4'd7));
    repeat (5) @(posedge clk);
    #1;
    for (int i = 0; i < 30; i++) begin
      do_cmd(OP_DEBUG_READ, EVE, 8'(i), '0, r);
      `CHECK(!r.ok && r.rdata == '0, "Eve sees no pipeline register")
      if (!r.ok) n_dbg_refused++;
      if (i >= 28) break;
    end
    do_cmd(OP_DEBUG_READ, SUPER, 8'd29, '0, r);
    `CHECK(r.ok, "supervisor reads a pipeline register")
    if (r.ok) n_dbg_ok++;
    drain();

    // ---- back-to-back stream from two users ----
    for (int i = 0; i < 40; i++) begin
      automatic bit a = ($urandom_range(0, 1) != 0);
      automatic block_t d = {$urandom, $urandom, $urandom, $urandom};
      automatic bit dec = a && ($urandom_range(0, 3) == 0);
      issue(dec ? OP_DECRYPT : OP_ENCRYPT, a ? ALICE : EVE, a ? (dec ? 8'd2 : 8'd1) : 8'd0, d, 4'(i));
      exp_q.push_back(expect_res(dec ? MODE_DEC : MODE_ENC, a ? ALICE : EVE, a ? AKEY : EVE, a ? KA : kE, d, 4'(i)));
      if (dec) n_dec++;
    end
    drain();

    // ---- stall granted: only Alice's data in flight, Alice does not read ----
    for (int i = 0; i < 40; i++) begin
      automatic block_t d = {$urandom, $urandom, $urandom, $urandom};
      issue(OP_ENCRYPT, ALICE, 1, d, 4'(i));
      exp_q.push_back(expect_res(MODE_ENC, ALICE, AKEY, KA, d, 4'(i)));
    end
    repeat (60) @(posedge clk);
    `CHECK(n_stall > 0, "stall granted when only Alice's data is in flight")
    drain();

    // ---- stall denied: Eve's data in flight while Alice's results wait ----
    for (int i = 0; i < 20; i++) begin
      automatic block_t d = {$urandom, $urandom, $urandom, $urandom};
      issue(OP_ENCRYPT, ALICE, 1, d, 4'(i));
      exp_q.push_back(expect_res(MODE_ENC, ALICE, AKEY, KA, d, 4'(i)));
    end
    for (int i = 0; i < 20; i++) begin
      automatic block_t d = {$urandom, $urandom, $urandom, $urandom};
      issue(OP_ENCRYPT, EVE, 0, d, 4'(i));
      exp_q.push_back(expect_res(MODE_ENC, EVE, EVE, kE, d, 4'(i)));
    end
    repeat (60) @(posedge clk);
    `CHECK(n_denied > 0 && n_extra > 0, "stall denied and results caught by the extra buffer")
    #1;
    read_result(EVE);                                      // head is Alice's: refused
    drain();

    // ---- cache-tag store ----
    for (int i = 0; i < 8; i++) begin
      ct_we = 1; ct_way = i[0]; ct_index = 8'(i * 3); ct_tag_i = 19'(i * 1111);
      @(posedge clk); #1;
    end
    ct_we = 0;
    for (int i = 0; i < 8; i++) begin
      ct_way = i[0]; ct_index = 8'(i * 3);
      #1 `CHECK(ct_tag_o == 19'(i * 1111) && ct_port_trusted == !i[0], "cache-tag store read back")
    end

    `CHECK(exp_q.size() == 0, "all results read")
    `CHECK(n_overrun_blocked > 0 && n_overread_blocked > 0 && n_cfg_refused > 0 && n_mkey_refused > 0,
           "key and configuration protections exercised")
    `CHECK(n_refused_release > 0 && n_pop_refused > 0 && n_dbg_refused > 0 && n_dbg_ok > 0 && n_dec > 0,
           "release, buffer, debug and decryption mechanisms exercised")
    $display("results %0d (direct %0d, via extra buffer %0d); stall cycles granted %0d denied %0d;",
             n_results, n_direct, n_extra, n_stall, n_denied);
    $display("refused: releases %0d, overruns %0d, over-reads %0d, config writes %0d, master-key writes %0d, pops %0d, debug reads %0d; debug reads granted %0d; decryptions %0d",
             n_refused_release, n_overrun_blocked, n_overread_blocked, n_cfg_refused, n_mkey_refused,
             n_pop_refused, n_dbg_refused, n_dbg_ok, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
