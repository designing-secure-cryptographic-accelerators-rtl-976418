// aes_accel_top: AES-128 accelerator shared by users of different security levels, with
// run-time information-flow tags, plus a small tagged cache-tag store beside it.
//
// Accelerator. Users talk to it through one command port; every request carries the user's
// label. The arbiter decodes requests to the master key (label (top, top)), the configuration
// registers (label (public, trusted)), the tagged key scratchpad, the tagged input data buffer,
// the tagged output data buffer and the debug peripheral. Blocks queued in the input buffer
// enter the pipelined E/D module one per cycle with the key they selected (a scratchpad slot
// or the master key) and come out 30 cycles later through the declassifier into the output
// buffer, from which the owner reads them with OP_READ_OUT.
//
// Output path. If the output buffer is full (its reader is not reading), the pipeline asks to
// stall with the label of the user at the head of the output buffer. The stall is granted only
// if no block of lower confidentiality is in the pipeline; otherwise the pipeline keeps going
// and its results go to the extra buffer, which drains into the output buffer in order as
// space frees up. A block is admitted into the pipeline only while the extra buffer can take
// every block in flight, so no result is ever lost.
//
// Timing: a request is answered one cycle after it is accepted; an encryption request pushed
// into an empty input buffer is written into the output buffer 31 clock edges after the edge
// that accepted it (one edge into the input buffer, 30 through the pipeline). Buffer depths and the admission rule are this
// design's choices; the pipeline depth, 512-bit scratchpad, tag widths and stall rule follow
// the source.
//
// Cache-tag store: independent of the accelerator, with its own ports (ct_*).
// The protocol assertion at the end is disabled during reset; lint reports rst_n as used both
// asynchronously and synchronously because of that qualifier only, not because of any flip-flop.
module aes_accel_top
  import ifc_pkg::*, aes_pkg::*, accel_pkg::*;
#(
  parameter int unsigned IN_DEPTH    = 16,
  parameter int unsigned OUT_DEPTH   = 16,
  parameter int unsigned EXTRA_DEPTH = 32,
  parameter int unsigned KEY_CELLS   = 8,
  parameter int unsigned CFG_NUM     = 4,
  parameter int unsigned CT_SETS     = 256,
  parameter int unsigned CT_TAG_W    = 19
) (
  input  logic  clk,
  input  logic  rst_n,
  // host command port
  input  logic  cmd_valid,
  output logic  cmd_ready,
  input  cmd_t  cmd,
  output logic  resp_valid,
  input  logic  resp_ready,
  output resp_t resp,
  // cache-tag store
  input  logic                       ct_we,
  input  logic                       ct_way,
  input  logic [CT_TAG_W-1:0]        ct_tag_i,
  input  logic [$clog2(CT_SETS)-1:0] ct_index,
  output logic [CT_TAG_W-1:0]        ct_tag_o,
  output logic                       ct_port_trusted
);

  localparam int unsigned NS      = NR * SUB_STAGES;
  localparam int unsigned CELL_AW = $clog2(KEY_CELLS);
  localparam int unsigned CFG_AW  = $clog2(CFG_NUM);
  localparam int unsigned DBG_AW  = $clog2(NS);

  // ---------------- arbiter ----------------
  label_t     req_label;
  logic [7:0] req_addr;
  block_t     req_wdata;
  logic sp_cfg_en, sp_cfg_alloc, sp_cfg_ok, sp_wr_en, sp_wr_ok, sp_rd_en, sp_rd_ok;
  logic [63:0] sp_rd_data;
  logic mk_wr_en, mk_wr_ok, cfg_wr_en, cfg_wr_ok, accel_en, debug_en;
  logic [31:0] cfg_rd_data;
  logic in_push, in_full, in_empty, in_pop, out_pop, out_pop_ok;
  buf_entry_t in_entry, in_head, out_head;
  logic dbg_rd_en, dbg_rd_ok;
  block_t dbg_rd_data;
  label_t dbg_rd_tag;

  arbiter #(.CELL_AW(CELL_AW), .CFG_AW(CFG_AW), .DBG_AW(DBG_AW)) u_arbiter (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp,
    .req_label, .req_addr, .req_wdata,
    .sp_cfg_en, .sp_cfg_alloc, .sp_cfg_ok, .sp_wr_en, .sp_wr_ok, .sp_rd_en, .sp_rd_ok, .sp_rd_data,
    .mk_wr_en, .mk_wr_ok,
    .cfg_wr_en, .cfg_wr_ok, .cfg_rd_data, .accel_en,
    .in_push, .in_entry, .in_full,
    .out_pop, .out_pop_ok, .out_head,
    .dbg_rd_en, .dbg_rd_ok, .dbg_rd_data, .dbg_rd_tag
  );

  // ---------------- keys and configuration ----------------
  logic [CELL_AW-2:0] key_slot;
  logic [127:0]       sp_key;
  label_t             sp_key_tag;
  block_t             mkey;
  label_t             mkey_tag;

  key_scratchpad #(.CELLS(KEY_CELLS), .CELL_W(64)) u_scratchpad (
    .clk, .rst_n,
    .cfg_en (sp_cfg_en), .cfg_alloc (sp_cfg_alloc), .cfg_cell (req_addr[CELL_AW-1:0]),
    .cfg_key_label (req_wdata[7:0]), .cfg_req_label (req_label), .cfg_ok (sp_cfg_ok),
    .wr_en (sp_wr_en), .wr_cell (req_addr[CELL_AW-1:0]), .wr_data (req_wdata[63:0]),
    .wr_label (req_label), .wr_ok (sp_wr_ok),
    .rd_en (sp_rd_en), .rd_cell (req_addr[CELL_AW-1:0]), .rd_label (req_label),
    .rd_data (sp_rd_data), .rd_ok (sp_rd_ok),
    .key_slot, .key (sp_key), .key_tag (sp_key_tag)
  );

  master_key u_master_key (
    .clk, .rst_n,
    .wr_en (mk_wr_en), .wr_data (req_wdata), .wr_label (req_label), .wr_ok (mk_wr_ok),
    .key (mkey), .key_tag (mkey_tag)
  );

  config_regs #(.NUM(CFG_NUM), .W(32)) u_config (
    .clk, .rst_n,
    .wr_en (cfg_wr_en), .wr_addr (req_addr[CFG_AW-1:0]), .wr_data (req_wdata[31:0]),
    .wr_label (req_label), .wr_ok (cfg_wr_ok),
    .rd_addr (req_addr[CFG_AW-1:0]), .rd_data (cfg_rd_data),
    .accel_en, .debug_en
  );

  // ---------------- input data buffer ----------------
  tagged_fifo #(.DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst_n,
    .push (in_push), .push_data (in_entry),
    .pop (in_pop), .pop_label (LBL_MASTER), .pop_ok (),
    .head (in_head), .full (in_full), .empty (in_empty), .count ()
  );

  // ---------------- E/D pipeline ----------------
  logic       p_in_valid, p_in_ready;
  block_t     p_key;
  label_t     p_key_tag;
  logic       stall_req, stall, stall_denied;
  label_t     stall_req_label;
  logic       p_out_valid, p_out_violation;
  block_t     p_out_data;
  label_t     p_out_label, p_out_owner;
  logic [3:0] p_out_id;
  data_slot_t dbg_slots [NS];
  logic [$clog2(NS+1)-1:0] in_flight;
  logic [$clog2(EXTRA_DEPTH):0] extra_count;

  assign key_slot   = in_head.key_sel[CELL_AW-2:0];
  assign p_key      = (in_head.key_sel == KSEL_MASTER) ? mkey : sp_key;
  assign p_key_tag  = (in_head.key_sel == KSEL_MASTER) ? mkey_tag : sp_key_tag;
  // admit a block only if the extra buffer could hold everything in flight
  assign p_in_valid = !in_empty && (32'(in_flight) + 32'(extra_count) < EXTRA_DEPTH);
  assign in_pop     = p_in_valid && p_in_ready;

  aes_ed_pipeline u_pipeline (
    .clk, .rst_n,
    .in_valid (p_in_valid), .in_ready (p_in_ready), .in_mode (in_head.mode),
    .in_data (in_head.data), .in_owner (in_head.owner), .in_id (in_head.id),
    .in_key (p_key), .in_key_tag (p_key_tag),
    .stall_req, .stall_req_label, .stall, .stall_denied,
    .out_valid (p_out_valid), .out_data (p_out_data), .out_label (p_out_label),
    .out_owner (p_out_owner), .out_id (p_out_id), .out_violation (p_out_violation),
    .dbg_slots, .in_flight
  );

  // ---------------- output data buffer and extra buffer ----------------
  buf_entry_t p_entry, extra_head;
  logic out_full, extra_empty, extra_full;
  logic to_out_direct, to_extra, extra_to_out;

  always_comb begin
    p_entry       = '0;
    p_entry.tag   = p_out_label;
    p_entry.owner = p_out_owner;
    p_entry.id    = p_out_id;
    p_entry.err   = p_out_violation;
    p_entry.data  = p_out_data;
  end

  assign extra_to_out  = !extra_empty && !out_full;
  assign to_out_direct = p_out_valid && extra_empty && !out_full;
  assign to_extra      = p_out_valid && !to_out_direct;

  assign stall_req       = out_full;
  assign stall_req_label = out_head.owner;

  tagged_fifo #(.DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .push (to_out_direct || extra_to_out),
    .push_data (extra_to_out ? extra_head : p_entry),
    .pop (out_pop), .pop_label (req_label), .pop_ok (out_pop_ok),
    .head (out_head), .full (out_full), .empty (), .count ()
  );

  tagged_fifo #(.DEPTH(EXTRA_DEPTH)) u_extra_buf (
    .clk, .rst_n,
    .push (to_extra), .push_data (p_entry),
    .pop (extra_to_out), .pop_label (LBL_MASTER), .pop_ok (),
    .head (extra_head), .full (extra_full), .empty (extra_empty), .count (extra_count)
  );

  // ---------------- debug peripheral ----------------
  debug_peripheral #(.N(NS)) u_debug (
    .slots (dbg_slots), .debug_en,
    .rd_en (dbg_rd_en), .rd_idx (req_addr[DBG_AW-1:0]), .rd_label (req_label),
    .rd_data (dbg_rd_data), .rd_tag (dbg_rd_tag), .rd_ok (dbg_rd_ok)
  );

  // the admission rule guarantees room for every result
  assert property (@(posedge clk) disable iff (!rst_n) !(to_extra && extra_full && !extra_to_out));

  // ---------------- cache-tag store ----------------
  cache_tags #(.SETS(CT_SETS), .TAG_W(CT_TAG_W)) u_cache_tags (
    .clk, .we (ct_we), .way (ct_way), .tag_i (ct_tag_i), .index (ct_index),
    .tag_o (ct_tag_o), .port_trusted (ct_port_trusted)
  );

endmodule
