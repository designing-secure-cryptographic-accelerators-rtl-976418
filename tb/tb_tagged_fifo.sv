// tb_tagged_fifo: random pushes and checked pops against a queue model; pops by readers who
// may not see or may not remove the head are refused and leave the buffer unchanged.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_tagged_fifo;
  import ifc_pkg::*, aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, pop_ok, full, empty;
  buf_entry_t push_data = '0, head;
  label_t pop_label = '0;
  logic [3:0] count;
  buf_entry_t model [$];
  int refused = 0, fulls = 0;
  tagged_fifo #(.DEPTH(8)) dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      automatic bit allowed;
      push = (i < 300) ? ($urandom_range(0, 2) != 0) : ($urandom_range(0, 3) == 0);
      push_data = '0;
      push_data.tag   = '{conf: 4'($urandom_range(0, 9)), integ: 4'($urandom_range(4, 12))};
      push_data.owner = push_data.tag;
      push_data.id    = 4'($urandom);
      push_data.data  = {$urandom, $urandom, $urandom, $urandom};
      pop = ($urandom_range(0, 1) != 0);
      pop_label = ($urandom_range(0, 3) == 0) ? LBL_MASTER : label_t'(8'($urandom));
      #1;
      allowed = pop && model.size() > 0 && model[0].tag.conf <= pop_label.conf && pop_label.integ >= model[0].owner.integ;
      `CHECK(pop_ok == allowed, "pop check")
      `CHECK(full == (model.size() == 8) && empty == (model.size() == 0) && int'(count) == model.size(), "occupancy")
      if (model.size() > 0) `CHECK(head == model[0], "head entry")
      if (full) fulls++;
      if (pop && !allowed && model.size() > 0) refused++;
      if (push && full && !allowed) push = 0;
      @(posedge clk); #1;
      if (allowed) void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    `CHECK(refused > 0 && fulls > 0, "refused pops and full buffer seen")
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
