// tb_arbiter: request decoding. The testbench plays every unit with random outcomes, issues
// random requests and checks that exactly the addressed unit is strobed in the accepting
// cycle, that the response one cycle later carries that unit's outcome and data, and that
// encryption requests are refused while disabled, full or with an unknown key selector.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_arbiter;
  import ifc_pkg::*, aes_pkg::*, accel_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 1;
  cmd_t cmd = '0;
  resp_t resp;
  label_t req_label;
  logic [7:0] req_addr;
  block_t req_wdata;
  logic sp_cfg_en, sp_cfg_alloc, sp_cfg_ok, sp_wr_en, sp_wr_ok, sp_rd_en, sp_rd_ok;
  logic [63:0] sp_rd_data;
  logic mk_wr_en, mk_wr_ok, cfg_wr_en, cfg_wr_ok, accel_en;
  logic [31:0] cfg_rd_data;
  logic in_push, in_full, out_pop, out_pop_ok, dbg_rd_en, dbg_rd_ok;
  buf_entry_t in_entry, out_head;
  block_t dbg_rd_data;
  label_t dbg_rd_tag;

  arbiter dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic op_e op = op_e'($urandom_range(0, 11));
      automatic logic exp_ok;
      automatic block_t exp_data = '0;
      cmd_valid = 1;
      cmd = '{op: op, label: label_t'(8'($urandom)), id: 4'($urandom),
              addr: ($urandom_range(0, 7) == 0) ? 8'($urandom) : 8'($urandom_range(0, 5)),
              wdata: {$urandom, $urandom, $urandom, $urandom}};
      {sp_cfg_ok, sp_wr_ok, sp_rd_ok, mk_wr_ok, cfg_wr_ok, accel_en, in_full, out_pop_ok, dbg_rd_ok} = 9'($urandom);
      sp_rd_data = {$urandom, $urandom}; cfg_rd_data = $urandom;
      out_head = '0; out_head.data = {$urandom, $urandom, $urandom, $urandom}; out_head.id = 4'($urandom);
      out_head.err = 1'($urandom); out_head.tag = label_t'(8'($urandom));
      dbg_rd_data = {$urandom, $urandom, $urandom, $urandom}; dbg_rd_tag = label_t'(8'($urandom));
      #1;
      `CHECK(cmd_ready, "ready with response consumed")
      `CHECK(req_label == cmd.label && req_addr == cmd.addr && req_wdata == cmd.wdata, "shared fields")
      `CHECK(sp_cfg_en == (op == OP_KEY_ALLOC || op == OP_KEY_FREE) && sp_wr_en == (op == OP_KEY_WRITE)
             && sp_rd_en == (op == OP_KEY_READ) && mk_wr_en == (op == OP_MKEY_WRITE)
             && cfg_wr_en == (op == OP_CFG_WRITE) && out_pop == (op == OP_READ_OUT)
             && dbg_rd_en == (op == OP_DEBUG_READ), $sformatf("unit strobes for op %0d", op))
      case (op)
        OP_KEY_ALLOC, OP_KEY_FREE: exp_ok = sp_cfg_ok && cmd.addr < 8;
        OP_KEY_WRITE:  exp_ok = sp_wr_ok && cmd.addr < 8;
        OP_KEY_READ:   begin exp_ok = sp_rd_ok && cmd.addr < 8; exp_data = exp_ok ? 128'(sp_rd_data) : '0; end
        OP_MKEY_WRITE: exp_ok = mk_wr_ok;
        OP_CFG_WRITE:  exp_ok = cfg_wr_ok && cmd.addr < 4;
        OP_CFG_READ:   begin exp_ok = cmd.addr < 4; exp_data = exp_ok ? 128'(cfg_rd_data) : '0; end
        OP_ENCRYPT, OP_DECRYPT: exp_ok = accel_en && !in_full && cmd.addr <= 4;
        OP_READ_OUT:   begin exp_ok = out_pop_ok; exp_data = exp_ok ? out_head.data : '0; end
        OP_DEBUG_READ: begin exp_ok = dbg_rd_ok && cmd.addr < 32; exp_data = exp_ok ? dbg_rd_data : '0; end
        default:       exp_ok = 0;
      endcase
      `CHECK(in_push == ((op == OP_ENCRYPT || op == OP_DECRYPT) && exp_ok), "input buffer push")
      if (in_push)
        `CHECK(in_entry.tag == cmd.label && in_entry.owner == cmd.label && in_entry.key_sel == cmd.addr[2:0]
               && in_entry.data == cmd.wdata && in_entry.mode == ((op == OP_DECRYPT) ? MODE_DEC : MODE_ENC),
               "input buffer entry")
      @(posedge clk); #1;
      cmd_valid = 0;
      `CHECK(resp_valid && resp.op == op && resp.ok == exp_ok && resp.rdata == exp_data,
             $sformatf("response op %0d ok %0b exp %0b", op, resp.ok, exp_ok))
      if (op == OP_READ_OUT && exp_ok) `CHECK(resp.id == out_head.id && resp.err == out_head.err && resp.label == out_head.tag, "result fields")
      // sometimes hold the response and check back-pressure
      if (t % 17 == 0) begin
        resp_ready = 0;
        cmd_valid = 1;
        #1 `CHECK(!cmd_ready && !in_push && !sp_wr_en, "no request accepted while the response waits")
        @(posedge clk); #1;
        `CHECK(resp_valid && resp.op == op, "response held")
        cmd_valid = 0; resp_ready = 1;
      end
      @(posedge clk); #1;
      `CHECK(!resp_valid, "response consumed")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
