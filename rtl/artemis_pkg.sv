// artemis_pkg: types and constants shared by the Artemis NoC, its routers,
// the core interface macros and the cores of the case-study system.
//
// Flits are 8 bits wide, as in the router/core interface of the design. Every
// flit travels with one sideband bit, ctrl, that marks control packets; the
// router input buffers store it next to the flit. A header flit carries the
// target address, X in the upper nibble and Y in the lower one. Data packets
// are header, size (number of payload flits) and payload, the usual Hermes
// format; control packets are exactly two flits, header and operation code.
// The two operation codes (01 isolate the local core, 00 reconnect it) are
// the design's; the header layout and data-packet format are this
// implementation's reading of the Hermes convention.
package artemis_pkg;

  localparam int unsigned FLIT_W = 8;
  localparam int unsigned NPORTS = 5;

  typedef logic [FLIT_W-1:0] flit_data_t;

  // Router port numbering.
  typedef enum logic [2:0] {
    EAST  = 3'd0,
    WEST  = 3'd1,
    NORTH = 3'd2,
    SOUTH = 3'd3,
    LOCAL = 3'd4
  } port_e;

  // One buffer position: the flit plus its control-packet bit.
  typedef struct packed {
    logic       ctrl;
    flit_data_t data;
  } flit_t;

  // Signals a sender drives on a link; the receiver answers with one ack bit.
  typedef struct packed {
    logic       tx;
    logic       ctrl;
    flit_data_t data;
  } link_t;

  // Control-packet operation codes.
  localparam flit_data_t OP_DISABLE = 8'h01;
  localparam flit_data_t OP_ENABLE  = 8'h00;

  function automatic flit_data_t xy_addr(input int unsigned x, input int unsigned y);
    return flit_data_t'((x << 4) | y);
  endfunction

endpackage
