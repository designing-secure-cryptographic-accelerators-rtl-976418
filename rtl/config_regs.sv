// config_regs: configuration registers labelled (public, trusted).
//
// NUM registers of W bits. Any user may read them (their confidentiality is public); only
// the supervisor may write them (a write by a less trusted user would violate their
// integrity and is dropped, wr_ok = 0). Register 0 holds the accelerator's controls:
//   bit 0  accelerator enable (requests are accepted only while set)
//   bit 1  debug peripheral enable
// The number, width, field layout and reset values (enable = 1, debug = 0) are this
// design's choices. Reads are combinational, writes take effect on the next clock edge.
module config_regs
  import ifc_pkg::*;
#(
  parameter int unsigned NUM = 4,
  parameter int unsigned W   = 32,
  localparam int unsigned AW = $clog2(NUM)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  label_t        wr_label,
  output logic          wr_ok,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic          accel_en,
  output logic          debug_en
);

  logic [W-1:0] regs [NUM];

  assign wr_ok   = wr_en && flows_i(wr_label, LBL_CFG);
  assign rd_data = regs[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM; i++) regs[i] <= '0;
      regs[0][0] <= 1'b1;
    end else if (wr_ok) begin
      regs[wr_addr] <= wr_data;
    end
  end

  assign accel_en = regs[0][0];
  assign debug_en = regs[0][1];

endmodule
