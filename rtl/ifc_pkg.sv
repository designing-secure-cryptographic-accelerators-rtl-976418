// ifc_pkg: security labels and the lattice operations the accelerator checks at run time.
//
// A label is an 8-bit tag: 4 bits of confidentiality and 4 bits of integrity, as in the
// prototype described for this accelerator. Both dimensions are read here as linear orders
// of 16 levels (a design choice; the lattice shape is not fixed by the source):
//   confidentiality 0 = public (bottom) .. 15 = secret (top)
//   integrity       0 = untrusted       .. 15 = trusted
// "a flows to b" in confidentiality means c(a) <= c(b); in integrity it means i(a) >= i(b)
// (trusted data may flow to less trusted places). nabla() projects a level of one dimension
// onto the other (untrusted <-> public, trusted <-> secret), which is what the nonmalleable
// declassification and endorsement rules use. The supervisor is any principal whose
// integrity is fully trusted.
package ifc_pkg;

  typedef logic [3:0] level_t;

  typedef struct packed {
    level_t conf;   // confidentiality
    level_t integ;  // integrity
  } label_t;

  localparam level_t LVL_BOT = 4'h0;
  localparam level_t LVL_TOP = 4'hF;

  // (public, trusted): configuration registers
  localparam label_t LBL_CFG    = '{conf: LVL_BOT, integ: LVL_TOP};
  // (secret, trusted): master key
  localparam label_t LBL_MASTER = '{conf: LVL_TOP, integ: LVL_TOP};
  // label carried by an empty pipeline slot: it never restricts a stall
  localparam label_t LBL_EMPTY  = '{conf: LVL_TOP, integ: LVL_TOP};

  // confidentiality order: a may flow to b
  function automatic logic flows_c(label_t a, label_t b);
    return a.conf <= b.conf;
  endfunction

  // integrity order: a may flow to b (a at least as trusted as b)
  function automatic logic flows_i(label_t a, label_t b);
    return a.integ >= b.integ;
  endfunction

  // full label order
  function automatic logic flows(label_t a, label_t b);
    return flows_c(a, b) && flows_i(a, b);
  endfunction

  function automatic level_t conf_join(level_t a, level_t b);
    return (a > b) ? a : b;
  endfunction

  function automatic level_t conf_meet(level_t a, level_t b);
    return (a < b) ? a : b;
  endfunction

  // integrity join: the less trusted of the two
  function automatic level_t integ_join(level_t a, level_t b);
    return (a < b) ? a : b;
  endfunction

  // label of data computed from a and b
  function automatic label_t label_join(label_t a, label_t b);
    label_t r;
    r.conf  = conf_join(a.conf, b.conf);
    r.integ = integ_join(a.integ, b.integ);
    return r;
  endfunction

  // projection between dimensions; with the encodings above it is the identity on levels
  function automatic level_t nabla(level_t l);
    return l;
  endfunction

  // nonmalleable declassification of data labelled `from` to `to` by principal p:
  //   C(from) <= C(to) join nabla(I(p))   and the integrity part is unchanged
  function automatic logic may_declassify(label_t from, label_t to, label_t p);
    return (from.conf <= conf_join(to.conf, nabla(p.integ))) && (from.integ == to.integ);
  endfunction

  function automatic logic is_supervisor(label_t p);
    return p.integ == LVL_TOP;
  endfunction

endpackage
