// cache_tags: two-way cache tag store, statically partitioned by integrity, with shared ports.
//
// Way 0 holds trusted tags and way 1 untrusted tags, each SETS entries of TAG_W bits. The
// write and read ports are shared by both ways; their integrity label depends on `way`
// (a dependent label): way 0 makes the ports trusted, way 1 untrusted. `port_trusted`
// reports that label at run time. With we = 1, tag_i is written into the selected way at
// `index` on the clock edge and tag_o is 0; with we = 0, tag_o is the selected way's entry at
// `index` (combinational read). This is the small example of a security-typed module that
// accompanies the accelerator; sizes (256 x 19 bits per way) follow it. Entries are addressed
// by `index`.
module cache_tags #(
  parameter int unsigned SETS  = 256,
  parameter int unsigned TAG_W = 19,
  localparam int unsigned IW   = $clog2(SETS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic             way,
  input  logic [TAG_W-1:0] tag_i,
  input  logic [IW-1:0]    index,
  output logic [TAG_W-1:0] tag_o,
  output logic             port_trusted
);

  logic [TAG_W-1:0] tag_0 [SETS];  // (public, trusted)
  logic [TAG_W-1:0] tag_1 [SETS];  // (public, untrusted)

  always_ff @(posedge clk) begin
    if (we) begin
      if (way == 1'b0) tag_0[index] <= tag_i;
      else             tag_1[index] <= tag_i;
    end
  end

  always_comb begin
    if (we)                tag_o = '0;
    else if (way == 1'b0)  tag_o = tag_0[index];
    else                   tag_o = tag_1[index];
  end

  assign port_trusted = (way == 1'b0);

endmodule
