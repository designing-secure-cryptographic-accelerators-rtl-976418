// arbiter: request decoder between the host command port and the accelerator's units.
//
// One request is accepted per cycle (cmd_ready is high unless an earlier response is still
// waiting). The request's opcode selects one unit, which is driven in the same cycle with the
// request's label, address and data; the unit performs its own security check and reports
// whether the access happened. The arbiter registers the outcome as the response, so a
// response follows its request by one cycle and responses keep request order.
//   key alloc/free/write/read -> key scratchpad (the arbiter configures cell labels here)
//   master key write          -> master key register
//   config write/read         -> configuration registers
//   encrypt/decrypt           -> input data buffer (refused while disabled, full, or with
//                                an unknown key selector)
//   read out                  -> output data buffer
//   debug read                -> debug peripheral
// The source shows an arbiter in front of the units and gives it the job of labelling key
// cells; the request format and the single-request-per-cycle decoding are this design's own.
module arbiter
  import ifc_pkg::*, aes_pkg::*, accel_pkg::*;
#(
  parameter int unsigned CELL_AW = 3,
  parameter int unsigned CFG_AW  = 2,
  parameter int unsigned DBG_AW  = 5
) (
  input  logic clk,
  input  logic rst_n,
  // host port
  input  logic  cmd_valid,
  output logic  cmd_ready,
  input  cmd_t  cmd,
  output logic  resp_valid,
  input  logic  resp_ready,
  output resp_t resp,
  // fields shared by all units
  output label_t              req_label,
  output logic [7:0]          req_addr,
  output block_t              req_wdata,
  // key scratchpad
  output logic                sp_cfg_en,
  output logic                sp_cfg_alloc,
  input  logic                sp_cfg_ok,
  output logic                sp_wr_en,
  input  logic                sp_wr_ok,
  output logic                sp_rd_en,
  input  logic                sp_rd_ok,
  input  logic [63:0]         sp_rd_data,
  // master key
  output logic                mk_wr_en,
  input  logic                mk_wr_ok,
  // configuration registers
  output logic                cfg_wr_en,
  input  logic                cfg_wr_ok,
  input  logic [31:0]         cfg_rd_data,
  input  logic                accel_en,
  // input data buffer
  output logic                in_push,
  output buf_entry_t          in_entry,
  input  logic                in_full,
  // output data buffer
  output logic                out_pop,
  input  logic                out_pop_ok,
  input  buf_entry_t          out_head,
  // debug peripheral
  output logic                dbg_rd_en,
  input  logic                dbg_rd_ok,
  input  block_t              dbg_rd_data,
  input  label_t              dbg_rd_tag
);

  logic fire;
  assign cmd_ready = !resp_valid || resp_ready;
  assign fire      = cmd_valid && cmd_ready;

  assign req_label = cmd.label;
  assign req_addr  = cmd.addr;
  assign req_wdata = cmd.wdata;

  logic is_crypt, crypt_ok;
  assign is_crypt = (cmd.op == OP_ENCRYPT) || (cmd.op == OP_DECRYPT);
  assign crypt_ok = accel_en && !in_full && (cmd.addr[2:0] <= KSEL_MASTER) && (cmd.addr[7:3] == '0);

  always_comb begin
    sp_cfg_en    = fire && (cmd.op == OP_KEY_ALLOC || cmd.op == OP_KEY_FREE);
    sp_cfg_alloc = (cmd.op == OP_KEY_ALLOC);
    sp_wr_en     = fire && (cmd.op == OP_KEY_WRITE);
    sp_rd_en     = fire && (cmd.op == OP_KEY_READ);
    mk_wr_en     = fire && (cmd.op == OP_MKEY_WRITE);
    cfg_wr_en    = fire && (cmd.op == OP_CFG_WRITE);
    in_push      = fire && is_crypt && crypt_ok;
    out_pop      = fire && (cmd.op == OP_READ_OUT);
    dbg_rd_en    = fire && (cmd.op == OP_DEBUG_READ);

    in_entry         = '0;
    in_entry.tag     = cmd.label;
    in_entry.owner   = cmd.label;
    in_entry.id      = cmd.id;
    in_entry.mode    = (cmd.op == OP_DECRYPT) ? MODE_DEC : MODE_ENC;
    in_entry.key_sel = cmd.addr[2:0];
    in_entry.data    = cmd.wdata;
  end

  // address fields wider than the units use must be zero
  logic cell_in_range, cfg_in_range, dbg_in_range;
  assign cell_in_range = (cmd.addr >> CELL_AW) == '0;
  assign cfg_in_range  = (cmd.addr >> CFG_AW) == '0;
  assign dbg_in_range  = (cmd.addr >> DBG_AW) == '0;

  resp_t r;
  always_comb begin
    r       = '0;
    r.op    = cmd.op;
    r.id    = cmd.id;
    r.label = cmd.label;
    unique case (cmd.op)
      OP_KEY_ALLOC, OP_KEY_FREE: r.ok = sp_cfg_ok && cell_in_range;
      OP_KEY_WRITE:  r.ok = sp_wr_ok && cell_in_range;
      OP_KEY_READ: begin
        r.ok    = sp_rd_ok && cell_in_range;
        r.rdata = r.ok ? {64'h0, sp_rd_data} : '0;
      end
      OP_MKEY_WRITE: r.ok = mk_wr_ok;
      OP_CFG_WRITE:  r.ok = cfg_wr_ok && cfg_in_range;
      OP_CFG_READ: begin
        r.ok    = cfg_in_range;
        r.rdata = cfg_in_range ? {96'h0, cfg_rd_data} : '0;
        r.label = LBL_CFG;
      end
      OP_ENCRYPT, OP_DECRYPT: r.ok = crypt_ok;
      OP_READ_OUT: begin
        r.ok    = out_pop_ok;
        r.err   = out_pop_ok && out_head.err;
        r.id    = out_pop_ok ? out_head.id : cmd.id;
        r.label = out_pop_ok ? out_head.tag : cmd.label;
        r.rdata = out_pop_ok ? out_head.data : '0;
      end
      OP_DEBUG_READ: begin
        r.ok    = dbg_rd_ok && dbg_in_range;
        r.label = (dbg_rd_ok && dbg_in_range) ? dbg_rd_tag : cmd.label;
        r.rdata = r.ok ? dbg_rd_data : '0;
      end
      default: r.ok = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      resp       <= '0;
    end else begin
      if (fire) begin
        resp_valid <= 1'b1;
        resp       <= r;
      end else if (resp_ready) begin
        resp_valid <= 1'b0;
      end
    end
  end

endmodule
