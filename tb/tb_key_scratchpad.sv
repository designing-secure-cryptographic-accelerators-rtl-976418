// tb_key_scratchpad: the Alice/Eve scenario of the tagged key memory. Alice and Eve allocate
// their cells, write their keys, Eve's overrun into Alice's cell and over-read of Alice's key
// are blocked, the key port returns each slot with its label, freeing clears a cell, and the
// supervisor may relabel any cell. A shadow model tracks what each cell must hold.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_key_scratchpad;
  import ifc_pkg::*, aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_en = 0, cfg_alloc = 0, cfg_ok, wr_en = 0, wr_ok, rd_en = 0, rd_ok;
  logic [2:0]  cfg_cell = 0, wr_cell = 0, rd_cell = 0;
  logic [1:0]  key_slot = 0;
  label_t      cfg_key_label = '0, cfg_req_label = '0, wr_label = '0, rd_label = '0, key_tag;
  logic [63:0] wr_data = '0, rd_data;
  logic [127:0] key;

  key_scratchpad dut (.*);

  localparam label_t ALICE = '{conf: 4'd6, integ: 4'd6};
  localparam label_t AKEY  = '{conf: 4'd7, integ: 4'd6};
  localparam label_t EVE   = '{conf: 4'd2, integ: 4'd2};
  localparam label_t EKEY  = '{conf: 4'd2, integ: 4'd2};
  localparam label_t SUP   = '{conf: 4'd0, integ: 4'd15};

  logic [63:0] shadow [8];

  task automatic alloc(int cl, label_t req, label_t kl, bit exp);
    cfg_en = 1; cfg_alloc = 1; cfg_cell = 3'(cl); cfg_req_label = req; cfg_key_label = kl;
    #1 `CHECK(cfg_ok == exp, $sformatf("alloc cell %0d", cl))
    @(posedge clk); #1 cfg_en = 0;
    if (exp) shadow[cl] = '0;
  endtask

  task automatic free(int cl, label_t req, bit exp);
    cfg_en = 1; cfg_alloc = 0; cfg_cell = 3'(cl); cfg_req_label = req;
    #1 `CHECK(cfg_ok == exp, $sformatf("free cell %0d", cl))
    @(posedge clk); #1 cfg_en = 0;
    if (exp) shadow[cl] = '0;
  endtask

  task automatic write(int cl, label_t who, logic [63:0] d, bit exp);
    wr_en = 1; wr_cell = 3'(cl); wr_label = who; wr_data = d;
    #1 `CHECK(wr_ok == exp, $sformatf("write cell %0d by %h", cl, who))
    @(posedge clk); #1 wr_en = 0;
    if (exp) shadow[cl] = d;
  endtask

  task automatic read(int cl, label_t who, bit exp);
    rd_en = 1; rd_cell = 3'(cl); rd_label = who;
    #1 `CHECK(rd_ok == exp && rd_data == (exp ? shadow[cl] : 64'h0), $sformatf("read cell %0d by %h", cl, who))
    @(posedge clk); #1 rd_en = 0;
  endtask

  initial begin
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // nothing allocated: writes are blocked, the key port reports (top, top)
    write(0, EVE, 64'h1, 0);
    key_slot = 0; #1 `CHECK(key_tag == LBL_MASTER, "unallocated slot label")
    // Eve may not create a key labelled below herself in integrity above her
    alloc(4, EVE, AKEY, 0);
    alloc(0, EVE, EKEY, 1);  alloc(1, EVE, EKEY, 1);
    alloc(2, ALICE, AKEY, 1); alloc(3, ALICE, AKEY, 1);
    alloc(2, EVE, EKEY, 0);   // taken
    write(2, ALICE, 64'hA11CE000_00000002, 1);
    write(3, ALICE, 64'hA11CE000_00000003, 1);
    write(0, EVE, 64'hEEEE0000_00000000, 1);
    write(1, EVE, 64'hEEEE0000_00000001, 1);
    write(2, EVE, 64'hBAD0BAD0_BAD0BAD0, 0);   // overrun into Alice's key
    read(2, EVE, 0);                            // over-read of Alice's key
    read(1, EVE, 1);
    read(3, ALICE, 0);                          // key more secret than its owner: not readable
    read(0, ALICE, 1);                          // Eve's key is public enough for Alice
    key_slot = 1; #1
    `CHECK(key == {shadow[2], shadow[3]} && key_tag == AKEY, "key port slot 1")
    key_slot = 0; #1
    `CHECK(key == {shadow[0], shadow[1]} && key_tag == EKEY, "key port slot 0")
    free(2, EVE, 0);
    free(2, ALICE, 1);
    key_slot = 1; #1
    `CHECK(key[127:64] == 64'h0 && key_tag.conf == LVL_TOP, "freed cell cleared and closed")
    alloc(3, SUP, EKEY, 1);                     // supervisor relabels
    write(3, EVE, 64'h3333, 1);
    for (int i = 0; i < 40; i++) begin
      automatic int c = $urandom_range(0, 7);
      automatic label_t who = ($urandom_range(0, 1) != 0) ? EVE : ALICE;
      write(c, who, {$urandom, $urandom}, (c == 0 || c == 1 || c == 3) ? (who == EVE) : 0);
    end
    for (int c = 0; c < 8; c++) read(c, LBL_MASTER, c != 2 && c < 4);
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
