// declassifier: release point at the end of the AES pipeline.
//
// The result leaving the last round carries the join of the user's and the key's labels.
// This block lowers it to the label it is released with, but only when the nonmalleable
// declassification rule allows it for the principal that issued the block:
//     C(tag) <= C(target) join nabla(I(owner))
// Ciphertext (encryption) is released as (public, I(tag)); recovered plaintext (decryption)
// as (C(owner), I(tag)), i.e. back to its owner's confidentiality. A user whose integrity is
// too low for the key (for example a regular user trying the master key) gets no data: the
// result is zeroed and `violation` is set. Purely combinational. The release targets for
// the two directions and the zeroing on refusal are this design's choices.
module declassifier
  import ifc_pkg::*, aes_pkg::*;
(
  input  data_slot_t in,
  output logic       out_valid,
  output block_t     out_data,
  output label_t     out_label,
  output label_t     out_owner,
  output logic [3:0] out_id,
  output logic       violation
);

  label_t target;
  logic   allowed;

  always_comb begin
    target.conf  = (in.mode == MODE_ENC) ? LVL_BOT : in.owner.conf;
    target.integ = in.tag.integ;
    allowed      = may_declassify(in.tag, target, in.owner);
  end

  assign out_valid = in.valid;
  assign out_data  = allowed ? in.state : '0;
  assign out_label = target;
  assign out_owner = in.owner;
  assign out_id    = in.id;
  assign violation = in.valid && !allowed;

endmodule
