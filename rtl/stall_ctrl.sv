// stall_ctrl: timing-safe stall decision for the shared pipeline.
//
// The confidentiality parts of the tags of all pipeline registers are combined with a meet
// (the lowest confidentiality present in the pipeline). A stall request is granted only if
// the confidentiality of the request's label is not above that meet, so a user can stall the
// pipeline only while no less confidential data is in flight and the latency of lower users'
// blocks never depends on higher users. Empty slots carry the (top, top) label and therefore
// never hold a stall back. Purely combinational: `stall` is valid in the same cycle as the
// inputs. The comparator and the meet tree follow the accelerator's stall logic; the
// treatment of empty slots is this design's choice.
module stall_ctrl
  import ifc_pkg::*;
#(
  parameter int unsigned N = 30
) (
  input  label_t tags [N],
  input  logic   stall_req,
  input  label_t stall_req_label,
  output level_t meet_conf,
  output logic   stall,
  output logic   stall_denied
);

  always_comb begin
    meet_conf = LVL_TOP;
    for (int i = 0; i < N; i++) meet_conf = conf_meet(meet_conf, tags[i].conf);
  end

  assign stall        = stall_req && (stall_req_label.conf <= meet_conf);
  assign stall_denied = stall_req && !stall;

endmodule
