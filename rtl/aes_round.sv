// aes_round: one AES-128 round (S1..S10) as a three-register pipeline stage with tags.
//
// Every register of the stage holds a full pipeline slot: the 128-bit state together with
// its valid bit, direction (encrypt/decrypt), data tag, owner label and request id, so the
// tag of each stage always travels with its data and a stage may hold a different user's
// block in every cycle. The work of a round is spread over the three registers:
//   encrypt:  r1 = SubBytes(in)          r2 = MixColumns(ShiftRows(r1))   r3 = r2 ^ RK
//   decrypt:  r1 = InvSubBytes(InvShiftRows(in))   r2 = r1   r3 = InvMixColumns(r2 ^ RK)
// The last round (LAST=1) skips (Inv)MixColumns. At the AddRoundKey step the data tag is
// joined with the key tag, so data that has touched a key carries the key's confidentiality.
// `stall` freezes all three registers. Latency is three cycles per round, which gives the
// 30-cycle block latency of the full pipeline; the split into three registers per round is
// this design's choice. `rk`/`rk_tag` must be the round key aligned with r2 (it comes from
// the matching aes_key_stage). `slots` exposes all three registers for the stall logic and
// the debug peripheral.
module aes_round
  import ifc_pkg::*, aes_pkg::*;
#(
  parameter bit LAST = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       stall,
  input  data_slot_t in,
  input  block_t     rk,
  input  label_t     rk_tag,
  output data_slot_t out,
  output data_slot_t slots [SUB_STAGES]
);

  data_slot_t r1, r2, r3;
  data_slot_t n1, n2, n3;

  function automatic data_slot_t empty_slot();
    data_slot_t e = '0;
    e.tag   = LBL_EMPTY;
    e.owner = LBL_EMPTY;
    return e;
  endfunction

  always_comb begin
    n1 = in;
    n1.state = (in.mode == MODE_ENC) ? sub_bytes(in.state)
                                     : inv_sub_bytes(inv_shift_rows(in.state));
    n2 = r1;
    if (r1.mode == MODE_ENC)
      n2.state = LAST ? shift_rows(r1.state) : mix_columns(shift_rows(r1.state));
    n3 = r2;
    if (r2.mode == MODE_ENC)
      n3.state = r2.state ^ rk;
    else
      n3.state = LAST ? (r2.state ^ rk) : inv_mix_columns(r2.state ^ rk);
    if (r2.valid) n3.tag = label_join(r2.tag, rk_tag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= empty_slot();
      r2 <= empty_slot();
      r3 <= empty_slot();
    end else if (!stall) begin
      r1 <= n1;
      r2 <= n2;
      r3 <= n3;
    end
  end

  assign out      = r3;
  assign slots[0] = r1;
  assign slots[1] = r2;
  assign slots[2] = r3;

endmodule
