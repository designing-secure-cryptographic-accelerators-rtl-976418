// accel_pkg: request and response formats of the accelerator's host command port.
//
// Every request carries the label of the user issuing it (supplied by the trusted host side,
// as the tag lines beside the host bus), a request id, an address field and a 128-bit data
// field. Every accepted request gets exactly one response, in order. The operation set and
// field layout are this design's own; the source names the host bus (AXI/RoCC) but gives no
// register map.
package accel_pkg;
  import ifc_pkg::*, aes_pkg::*;

  typedef enum logic [3:0] {
    OP_NOP        = 4'd0,
    OP_KEY_ALLOC  = 4'd1,  // addr[2:0] = cell, wdata[7:0] = key label
    OP_KEY_FREE   = 4'd2,  // addr[2:0] = cell
    OP_KEY_WRITE  = 4'd3,  // addr[2:0] = cell, wdata[63:0] = key bits
    OP_KEY_READ   = 4'd4,  // addr[2:0] = cell
    OP_MKEY_WRITE = 4'd5,  // wdata = master key
    OP_CFG_WRITE  = 4'd6,  // addr = register, wdata[31:0]
    OP_CFG_READ   = 4'd7,  // addr = register
    OP_ENCRYPT    = 4'd8,  // addr[2:0] = key select (0..3 slot, 4 master), wdata = block
    OP_DECRYPT    = 4'd9,  // as OP_ENCRYPT; the key is the last round key
    OP_READ_OUT   = 4'd10, // pop one result from the output buffer
    OP_DEBUG_READ = 4'd11  // addr = pipeline register index
  } op_e;

  typedef struct packed {
    op_e        op;
    label_t     label;  // label of the requesting user
    logic [3:0] id;
    logic [7:0] addr;
    block_t     wdata;
  } cmd_t;

  typedef struct packed {
    op_e        op;
    logic       ok;     // request performed (0: refused by a check, or buffer full/empty)
    logic       err;    // OP_READ_OUT: the result's release was refused
    logic [3:0] id;     // OP_READ_OUT: id of the result, else id of the request
    label_t     label;  // label of rdata
    block_t     rdata;
  } resp_t;

endpackage
