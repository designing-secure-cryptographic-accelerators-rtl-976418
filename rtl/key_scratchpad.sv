// key_scratchpad: on-chip key memory in which every cell carries its own security tag.
//
// CELLS cells of CELL_W bits (8 x 64 bits = 512 bits by default; the 64-bit cell matches the
// host word). A 128-bit key occupies two neighbouring cells, so cells 2s and 2s+1 form key
// slot s. Every access is checked against the cell's tag before it happens, so a key written
// past its own cells (a buffer overrun) or read past them is blocked instead of reaching
// another user's key:
//   allocate : cell must be free (the supervisor may relabel any cell), and the requester
//              must be allowed to create data with the requested key label
//              (requester flows to key label in both dimensions)
//   free     : requester at least as trusted as the cell; the cell is cleared
//   write    : cell allocated and requester flows to the cell's label (confidentiality and
//              integrity), otherwise the write is dropped
//   read     : cell allocated and the cell's confidentiality flows to the requester
//   key port : delivers slot s to the pipeline with the join of its two cell tags; an
//              unallocated cell counts as (top, top), so nobody but the supervisor can
//              release a result made with it
// Host ports are combinational checks with a write on the next clock edge; `*_ok` reports
// the outcome in the same cycle. The tag per cell and the checks follow the source; the
// allocate/free rules are this design's choices.
module key_scratchpad
  import ifc_pkg::*, aes_pkg::*;
#(
  parameter int unsigned CELLS  = 8,
  parameter int unsigned CELL_W = 64,
  localparam int unsigned AW    = $clog2(CELLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // tag configuration (allocate / free)
  input  logic              cfg_en,
  input  logic              cfg_alloc,    // 1: allocate with cfg_key_label, 0: free
  input  logic [AW-1:0]     cfg_cell,
  input  label_t            cfg_key_label,
  input  label_t            cfg_req_label,
  output logic              cfg_ok,
  // host write
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_cell,
  input  logic [CELL_W-1:0] wr_data,
  input  label_t            wr_label,
  output logic              wr_ok,
  // host read
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_cell,
  input  label_t            rd_label,
  output logic [CELL_W-1:0] rd_data,
  output logic              rd_ok,
  // key port to the pipeline
  input  logic [AW-2:0]     key_slot,
  output logic [2*CELL_W-1:0] key,
  output label_t            key_tag
);

  logic [CELL_W-1:0] mem   [CELLS];
  label_t            tags  [CELLS];
  logic              alloc [CELLS];

  always_comb begin
    if (cfg_alloc)
      cfg_ok = cfg_en && (!alloc[cfg_cell] || is_supervisor(cfg_req_label))
                      && flows(cfg_req_label, cfg_key_label);
    else
      cfg_ok = cfg_en && alloc[cfg_cell] && flows_i(cfg_req_label, tags[cfg_cell]);
    wr_ok   = wr_en && alloc[wr_cell] && flows(wr_label, tags[wr_cell]);
    rd_ok   = rd_en && alloc[rd_cell] && flows_c(tags[rd_cell], rd_label);
    rd_data = rd_ok ? mem[rd_cell] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CELLS; i++) begin
        mem[i]   <= '0;
        tags[i]  <= LBL_MASTER;
        alloc[i] <= 1'b0;
      end
    end else begin
      if (cfg_ok) begin
        alloc[cfg_cell] <= cfg_alloc;
        tags[cfg_cell]  <= cfg_alloc ? cfg_key_label : LBL_MASTER;
        mem[cfg_cell]   <= '0;
      end
      if (wr_ok && !(cfg_ok && cfg_cell == wr_cell)) mem[wr_cell] <= wr_data;
    end
  end

  // key slot s = cells {2s, 2s+1}; the first cell is the high half of the key
  logic [AW-1:0] c0, c1;
  label_t        t0, t1;
  always_comb begin
    c0      = {key_slot, 1'b0};
    c1      = {key_slot, 1'b1};
    t0      = alloc[c0] ? tags[c0] : LBL_MASTER;
    t1      = alloc[c1] ? tags[c1] : LBL_MASTER;
    key     = {mem[c0], mem[c1]};
    key_tag = label_join(t0, t1);
  end

endmodule
