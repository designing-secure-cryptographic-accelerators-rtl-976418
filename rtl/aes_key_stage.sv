// aes_key_stage: one step (K1..K10) of the pipelined AES-128 key expansion, with a key tag.
//
// The key pipeline runs beside the data pipeline so that every block can use its own key:
// the stage has three registers, matching the three registers of aes_round. k1 latches the
// previous round key, k2 the round key of this round, k3 passes it on to the next stage.
//   encrypt: k2 = forward key-schedule step with rcon(ROUND)        -> round key ROUND
//   decrypt: k2 = inverse key-schedule step with rcon(NR+1-ROUND)   -> round key NR-ROUND
// For decryption the key entering the pipeline is the last round key (round key 10), so the
// inverse schedule walks the keys backwards; that convention is this design's choice.
// `rk`/`rk_tag` (the k2 register) feed the AddRoundKey of the matching aes_round. The key tag
// travels with the key in every register. `mode_in` is the direction of the block that enters
// in the same cycle; `stall` freezes the stage.
module aes_key_stage
  import ifc_pkg::*, aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      stall,
  input  mode_e     mode_in,
  input  key_slot_t in,
  output key_slot_t out,
  output block_t    rk,
  output label_t    rk_tag
);

  key_slot_t k1, k2, k3;
  mode_e     m1;
  key_slot_t n2;

  always_comb begin
    n2 = k1;
    n2.rk = (m1 == MODE_ENC) ? key_step_fwd(k1.rk, ROUND) : key_step_inv(k1.rk, NR + 1 - ROUND);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k1 <= '{tag: LBL_EMPTY, rk: '0};
      k2 <= '{tag: LBL_EMPTY, rk: '0};
      k3 <= '{tag: LBL_EMPTY, rk: '0};
      m1 <= MODE_ENC;
    end else if (!stall) begin
      k1 <= in;
      m1 <= mode_in;
      k2 <= n2;
      k3 <= k2;
    end
  end

  assign out    = k3;
  assign rk     = k2.rk;
  assign rk_tag = k2.tag;

endmodule
