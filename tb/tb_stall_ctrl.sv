// tb_stall_ctrl: random tag sets and stall requests against an independently computed
// minimum confidentiality; plus the two cases of the stall rule written out by hand.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_stall_ctrl;
  import ifc_pkg::*;
  int checks = 0, failures = 0;
  localparam int N = 30;
  label_t tags [N];
  logic   stall_req, stall, stall_denied;
  label_t stall_req_label;
  level_t meet_conf;

  stall_ctrl #(.N(N)) dut (.*);

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int mn = 15;
      for (int i = 0; i < N; i++) begin
        tags[i] = '{conf: 4'($urandom_range((t % 3 == 0) ? 6 : 0, 15)), integ: 4'($urandom)};
        if (int'(tags[i].conf) < mn) mn = int'(tags[i].conf);
      end
      stall_req = ($urandom_range(0, 3) != 0);
      stall_req_label = '{conf: 4'($urandom_range(0, 15)), integ: 4'($urandom)};
      #1;
      `CHECK(int'(meet_conf) == mn, $sformatf("meet of confidentiality %0d exp %0d", meet_conf, mn))
      `CHECK(stall == (stall_req && int'(stall_req_label.conf) <= mn), "stall rule")
      `CHECK(stall_denied == (stall_req && int'(stall_req_label.conf) > mn), "denied flag")
    end
    // all slots at 8, request at 8: granted; one slot at 2: denied
    for (int i = 0; i < N; i++) tags[i] = '{conf: 4'd8, integ: 4'd8};
    stall_req = 1; stall_req_label = '{conf: 4'd8, integ: 4'd8};
    #1 `CHECK(stall == 1, "granted with equal levels")
    tags[17] = '{conf: 4'd2, integ: 4'd8};
    #1 `CHECK(stall == 0 && stall_denied == 1, "denied with lower data in flight")
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
