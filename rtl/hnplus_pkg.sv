// hnplus_pkg: constants shared by the HNPlus platform blocks.
//
// Flits are 16 bits wide. A node address flit holds the node's X coordinate
// in bits [7:4] and its Y coordinate in bits [3:0] (node "12" is x=1, y=2).
// The command codes and packet sizes are those of the platform's network
// layer: Read (0), Write (1), Start (2, host only) and Read Return (9).
// The options-word bit positions for "traffic available" and "real data"
// follow the platform's memory examples; the priority bit position is a
// choice of this design.
package hnplus_pkg;

  localparam int unsigned FLIT_W = 16;
  typedef logic [FLIT_W-1:0] flit_t;

  // Network-layer command codes (fourth flit of a command packet).
  localparam flit_t CMD_READ     = 16'd0;
  localparam flit_t CMD_WRITE    = 16'd1;
  localparam flit_t CMD_READ_RET = 16'd9;

  // Host message codes (first byte of a message to the Serial IP).
  localparam logic [7:0] HOST_READ  = 8'd0;
  localparam logic [7:0] HOST_WRITE = 8'd1;
  localparam logic [7:0] HOST_START = 8'd2;

  // Payload sizes of the fixed command packets.
  localparam flit_t PAY_READ     = 16'd3;
  localparam flit_t PAY_WRITE    = 16'd4;
  localparam flit_t PAY_READ_RET = 16'd3;

  // Target value that marks the end of a traffic list in TG memory.
  localparam flit_t END_OF_TRAFFIC = 16'hFFFF;

  // Options word (TG memory address 0).
  localparam int unsigned OPT_AVAIL    = 0;
  localparam int unsigned OPT_REALDATA = 1;
  localparam int unsigned OPT_PRIORITY = 2;

  // Words of one packet record in TG memory before its optional data:
  // target, payload size, 4 insertion-time words, 2 sequence-number words.
  localparam int unsigned REC_HDR_WORDS = 8;
  // Flits the injector adds to the memory payload size (real insertion time).
  localparam int unsigned TS_REAL_FLITS = 4;
  // Memory payload size minus this is the number of data flits.
  localparam int unsigned PAY_NON_DATA = 7;

  // Router port indices.
  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;
  localparam int unsigned NPORTS = 5;

  function automatic flit_t node_addr(input int unsigned x, input int unsigned y);
    return flit_t'((x << 4) | y);
  endfunction

endpackage
