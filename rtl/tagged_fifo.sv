// tagged_fifo: data buffer whose entries carry security tags (input, output, extra buffer).
//
// A first-in first-out buffer of DEPTH entries; each entry holds a 128-bit block together
// with its data tag, its owner's label, request id, direction, key selector and error flag.
// Pushing stores the entry with the tags the writer gives it. Popping is checked: the reader
// must be allowed to see the head's data (C(tag) flows to the reader) and, since a pop removes
// the owner's data, must be at least as trusted as the owner. A refused pop leaves the buffer
// unchanged and reports pop_ok = 0. Internal readers (the pipeline, the buffer-to-buffer
// transfer) read with the (top, top) label and always pass. Head data, full/empty and count
// are available combinationally; push and pop act on the clock edge. The checks follow the
// source's rules for data buffers; the FIFO organisation and depths are this design's choices.
// The protocol assertion at the end is disabled during reset; lint reports rst_n as used both
// asynchronously and synchronously because of that qualifier only, not because of any flip-flop.
module tagged_fifo
  import ifc_pkg::*, aes_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  buf_entry_t push_data,
  input  logic       pop,
  input  label_t     pop_label,
  output logic       pop_ok,
  output buf_entry_t head,
  output logic       full,
  output logic       empty,
  output logic [AW:0] count
);

  buf_entry_t   mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full   = (count == (AW+1)'(DEPTH));
  assign empty  = (count == '0);
  assign head   = mem[rp];
  assign pop_ok = pop && !empty && flows_c(head.tag, pop_label) && flows_i(pop_label, head.owner);

  logic do_push;
  assign do_push = push && (!full || pop_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wp] <= push_data;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop_ok) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(pop_ok);
    end
  end

  // a push into a full buffer that is not popped in the same cycle is a protocol error
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop_ok));

endmodule
