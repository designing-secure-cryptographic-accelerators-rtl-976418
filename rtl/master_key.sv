// master_key: the accelerator's master key register, fixed label (top, top).
//
// Only the supervisor (a principal with fully trusted integrity) may write it; a write by
// anyone else is dropped and reported through wr_ok = 0. There is no read port towards the
// host at all: the key leaves only into the AES pipeline, tagged (top, top), so only the
// supervisor can have a result made with it released. A write takes effect on the next clock
// edge. Reset value zero is this design's choice.
module master_key
  import ifc_pkg::*, aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_en,
  input  block_t wr_data,
  input  label_t wr_label,
  output logic   wr_ok,
  output block_t key,
  output label_t key_tag
);

  block_t mkey;

  assign wr_ok = wr_en && flows_i(wr_label, LBL_MASTER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mkey <= '0;
    else if (wr_ok) mkey <= wr_data;
  end

  assign key     = mkey;
  assign key_tag = LBL_MASTER;

endmodule
