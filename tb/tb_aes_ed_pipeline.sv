// tb_aes_ed_pipeline: end-to-end check of the pipelined AES E/D datapath.
//
// Checks the reference model against the FIPS-197 vectors, then drives the pipeline with a
// known-answer block, a back-to-back stream of random encryptions and decryptions with
// random keys and labels, blocks whose release must be refused, and stall requests that must
// be granted (only high-confidentiality data in flight) or denied (low data in flight).
// Every result is compared with the reference model, its label and id, and its latency
// (30 cycles plus the cycles the pipeline was stalled).
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_aes_ed_pipeline;
  import ifc_pkg::*, aes_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, stall_req, stall, stall_denied;
  mode_e      in_mode;
  block_t     in_data, in_key, out_data;
  label_t     in_owner, in_key_tag, stall_req_label, out_label, out_owner;
  logic [3:0] in_id, out_id;
  logic       out_valid, out_violation;
  data_slot_t dbg_slots [30];
  logic [4:0] in_flight;

  aes_ed_pipeline dut (.*);

  typedef struct {
    block_t data; logic [3:0] id; label_t label; label_t owner; logic viol; longint t_in;
  } exp_t;
  exp_t exp_q[$];

  longint cycle = 0, stalled_cycles = 0;
  int n_out = 0, n_stall_granted = 0, n_stall_denied = 0, n_viol = 0, n_dec = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && stall) stalled_cycles <= stalled_cycles + 1;
    if (rst_n && stall) n_stall_granted++;
    if (rst_n && stall_denied) n_stall_denied++;
  end

  // scoreboard
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    n_out++;
    if (exp_q.size() == 0) begin
      `CHECK(0, "unexpected output")
    end else begin
      e = exp_q.pop_front();
      `CHECK(out_data == e.data, $sformatf("id %0d data %h exp %h", out_id, out_data, e.data))
      `CHECK(out_id == e.id, $sformatf("id %0d exp %0d", out_id, e.id))
      `CHECK(out_label == e.label && out_owner == e.owner, $sformatf("id %0d label %h exp %h", out_id, out_label, e.label))
      `CHECK(out_violation == e.viol, $sformatf("id %0d violation %0b", out_id, out_violation))
      `CHECK(cycle - e.t_in == 30 + stalled_cycles_since(e.t_in), $sformatf("id %0d latency %0d", out_id, cycle - e.t_in))
      if (e.viol) n_viol++;
    end
  end

  // stall cycles are counted per cycle; remember the count at each issue time
  longint stall_at [longint];
  always @(posedge clk) stall_at[cycle] = stalled_cycles;
  function automatic longint stalled_cycles_since(longint t);
    return stalled_cycles - stall_at[t];
  endfunction

  logic [3:0] next_id = 0;

  task automatic idle();
    in_valid = 0;
    @(posedge clk); #1;
  endtask

  // present one block; waits until it is accepted
  task automatic send(mode_e m, block_t d, block_t base_key, label_t owner, label_t ktag);
    exp_t e;
    label_t t;
    in_valid   = 1;
    in_mode    = m;
    in_data    = d;
    in_key     = (m == MODE_ENC) ? base_key : aes_ref_pkg::round_key(base_key, 10);
    in_owner   = owner;
    in_key_tag = ktag;
    in_id      = next_id;
    while (!in_ready) begin @(posedge clk); #1; end
    t = label_join(owner, ktag);
    e.label.conf  = (m == MODE_ENC) ? 4'h0 : owner.conf;
    e.label.integ = t.integ;
    e.viol  = !(t.conf <= ((e.label.conf > owner.integ) ? e.label.conf : owner.integ));
    e.data  = e.viol ? '0 : ((m == MODE_ENC) ? aes_ref_pkg::encrypt(base_key, d)
                                             : aes_ref_pkg::decrypt(base_key, d));
    e.id    = next_id;
    e.owner = owner;
    e.t_in  = cycle;
    exp_q.push_back(e);
    if (m == MODE_DEC) n_dec++;
    next_id++;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  function automatic block_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  label_t lo, hi;
  initial begin
    in_valid = 0; stall_req = 0; stall_req_label = '0;
    in_mode = MODE_ENC; in_data = '0; in_key = '0; in_owner = '0; in_key_tag = '0; in_id = 0;

    // reference model against FIPS-197
    `CHECK(aes_ref_pkg::encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
           == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model C.1")
    `CHECK(aes_ref_pkg::encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
           == 128'h3925841d02dc09fbdc118597196a0b32, "reference model B")
    `CHECK(aes_ref_pkg::decrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a)
           == 128'h00112233445566778899aabbccddeeff, "reference model inverse C.1")

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    lo = '{conf: 4'd1, integ: 4'd9};
    hi = '{conf: 4'd8, integ: 4'd9};

    // 1. known answer, encrypt and decrypt
    send(MODE_ENC, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, lo, hi);
    send(MODE_DEC, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f, lo, hi);
    repeat (35) idle();

    // 2. back-to-back random stream, one block per cycle
    for (int i = 0; i < 48; i++)
      send(($urandom_range(0, 1) != 0) ? MODE_DEC : MODE_ENC, rnd128(), rnd128(),
           '{conf: 4'($urandom_range(0, 7)), integ: 4'($urandom_range(8, 14))},
           '{conf: 4'($urandom_range(0, 8)), integ: 4'($urandom_range(9, 15))});
    repeat (35) idle();

    // 3. master key used by a regular user (refused) and by the supervisor (released)
    send(MODE_ENC, rnd128(), rnd128(), '{conf: 4'd3, integ: 4'd3}, LBL_MASTER);
    send(MODE_ENC, rnd128(), rnd128(), LBL_MASTER, LBL_MASTER);
    repeat (35) idle();

    // 4. stall granted: only high-confidentiality blocks in flight
    for (int i = 0; i < 5; i++) send(MODE_ENC, rnd128(), rnd128(), hi, hi);
    repeat (5) idle();
    stall_req = 1; stall_req_label = hi;
    #0;
    `CHECK(stall == 1 && in_ready == 0, "stall by high user with only high data in flight")
    repeat (7) idle();
    stall_req = 0;
    repeat (35) idle();

    // 5. stall denied: a low block is in flight
    send(MODE_ENC, rnd128(), rnd128(), hi, hi);
    send(MODE_ENC, rnd128(), rnd128(), lo, lo);
    repeat (3) idle();
    stall_req = 1; stall_req_label = hi;
    #0;
    `CHECK(stall == 0 && stall_denied == 1, "stall by high user denied while low data in flight")
    repeat (4) idle();
    // a stall by the low user is granted even then
    stall_req_label = lo;
    #0;
    `CHECK(stall == 1, "stall by the lowest user granted")
    repeat (3) idle();
    stall_req = 0;
    repeat (40) idle();

    `CHECK(exp_q.size() == 0, $sformatf("%0d results missing", exp_q.size()))
    `CHECK(n_stall_granted > 0 && n_stall_denied > 0 && n_viol > 0 && n_dec > 0,
           $sformatf("mechanisms: granted %0d denied %0d refused %0d decrypt %0d",
                     n_stall_granted, n_stall_denied, n_viol, n_dec))
    $display("outputs %0d, stall cycles granted %0d, denied %0d, refused releases %0d, decryptions %0d",
             n_out, n_stall_granted, n_stall_denied, n_viol, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
