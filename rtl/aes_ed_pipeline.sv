// aes_ed_pipeline: pipelined AES-128 encryption/decryption (E/D) datapath with run-time tags.
//
// A block enters together with its key, the key's label and its owner's label, and leaves
// 30 cycles later; a new block can enter every cycle (128 bits per cycle). The key travels
// beside the data through ten key-expansion stages (aes_key_stage), so blocks of different
// users with different keys can be in the pipeline at the same time. Each of the ten rounds
// (aes_round) has three registers, each with its own tag. On entry the block is XORed with
// its key (the initial AddRoundKey) and its tag becomes the join of owner and key labels.
// After the last round the declassifier releases the result; no intermediate result leaves
// the pipeline except through the debug port, which is checked separately.
//
// Stalls: a stall request (with the label of the requester) is granted by stall_ctrl only
// when no slot holds less confidential data. When granted, every register holds and
// `in_ready` is low. When denied the pipeline keeps moving and the caller must catch the
// result (the accelerator has an extra buffer for that).
//
// Timing: a block accepted in cycle t (in_valid && in_ready) appears with out_valid in cycle
// t+30 if no stall intervenes; out_valid is high for exactly one cycle per block.
// Decryption takes the last round key (round key 10) as its key input.
module aes_ed_pipeline
  import ifc_pkg::*, aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // block in
  input  logic       in_valid,
  output logic       in_ready,
  input  mode_e      in_mode,
  input  block_t     in_data,
  input  label_t     in_owner,
  input  logic [3:0] in_id,
  input  block_t     in_key,
  input  label_t     in_key_tag,
  // stall request from the output side
  input  logic       stall_req,
  input  label_t     stall_req_label,
  output logic       stall,
  output logic       stall_denied,
  // released result
  output logic       out_valid,
  output block_t     out_data,
  output label_t     out_label,
  output label_t     out_owner,
  output logic [3:0] out_id,
  output logic       out_violation,
  // every pipeline register, for the debug peripheral
  output data_slot_t dbg_slots [NR*SUB_STAGES],
  output logic [$clog2(NR*SUB_STAGES+1)-1:0] in_flight
);

  localparam int unsigned NS = NR * SUB_STAGES;

  data_slot_t d_in  [NR+1];  // d_in[r] enters round r (0-based); d_in[NR] is the last output
  key_slot_t  k_in  [NR+1];
  block_t     rk    [NR];
  label_t     rk_tag[NR];
  label_t     tags  [NS];
  data_slot_t rslots[NR][SUB_STAGES];

  // entry: initial AddRoundKey and tag join
  always_comb begin
    d_in[0]       = '0;
    d_in[0].valid = in_valid;
    d_in[0].mode  = in_mode;
    d_in[0].owner = in_valid ? in_owner : LBL_EMPTY;
    d_in[0].tag   = in_valid ? label_join(in_owner, in_key_tag) : LBL_EMPTY;
    d_in[0].id    = in_id;
    d_in[0].state = in_data ^ in_key;
    k_in[0].tag   = in_valid ? in_key_tag : LBL_EMPTY;
    k_in[0].rk    = in_key;
  end

  for (genvar r = 0; r < NR; r++) begin : g_round
    aes_key_stage #(.ROUND(r + 1)) u_key (
      .clk, .rst_n, .stall,
      .mode_in (d_in[r].mode),
      .in      (k_in[r]),
      .out     (k_in[r+1]),
      .rk      (rk[r]),
      .rk_tag  (rk_tag[r])
    );
    aes_round #(.LAST(r == NR - 1)) u_round (
      .clk, .rst_n, .stall,
      .in     (d_in[r]),
      .rk     (rk[r]),
      .rk_tag (rk_tag[r]),
      .out    (d_in[r+1]),
      .slots  (rslots[r])
    );
    for (genvar s = 0; s < SUB_STAGES; s++) begin : g_sub
      assign tags[r*SUB_STAGES + s]      = rslots[r][s].tag;
      assign dbg_slots[r*SUB_STAGES + s] = rslots[r][s];
    end
  end

  stall_ctrl #(.N(NS)) u_stall (
    .tags, .stall_req, .stall_req_label,
    .meet_conf    (),
    .stall,
    .stall_denied
  );

  logic rel_valid;
  declassifier u_declass (
    .in        (d_in[NR]),
    .out_valid (rel_valid),
    .out_data,
    .out_label,
    .out_owner,
    .out_id,
    .violation (out_violation)
  );

  assign in_ready  = !stall;
  assign out_valid = rel_valid && !stall;

  always_comb begin
    in_flight = '0;
    for (int i = 0; i < NS; i++) in_flight += $bits(in_flight)'(dbg_slots[i].valid);
  end

endmodule
