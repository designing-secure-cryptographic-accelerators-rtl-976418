// debug_peripheral: tagged debug read access to the pipeline registers.
//
// Returns the state of any of the N pipeline registers together with its tag. Because
// intermediate AES states reveal the key, a read is answered only when debugging is enabled
// in the configuration registers and the register's tag is no more confidential than the
// reader (C(tag) flows to C(reader)); otherwise the data is zero and rd_ok = 0. Empty
// registers carry the (top, top) label and are therefore not readable by ordinary users.
// Combinational. The source only names a tagged debug peripheral; its access rule here
// is the same confidentiality check used for every other read.
module debug_peripheral
  import ifc_pkg::*, aes_pkg::*;
#(
  parameter int unsigned N = 30,
  localparam int unsigned IW = $clog2(N)
) (
  input  data_slot_t    slots [N],
  input  logic          debug_en,
  input  logic          rd_en,
  input  logic [IW-1:0] rd_idx,
  input  label_t        rd_label,
  output block_t        rd_data,
  output label_t        rd_tag,
  output logic          rd_ok
);

  data_slot_t sel;

  always_comb begin
    sel     = (32'(rd_idx) < N) ? slots[rd_idx] : '0;
    rd_ok   = rd_en && debug_en && (32'(rd_idx) < N) && flows_c(sel.tag, rd_label);
    rd_data = rd_ok ? sel.state : '0;
    rd_tag  = sel.tag;
  end

endmodule
