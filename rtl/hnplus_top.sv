// hnplus_top: the HNPlus NoC emulation platform. A MESH_X x MESH_Y mesh of
// routers (3x3 by default) connects a Serial IP at node 00 with a Tester IP
// at every other node. From the host, over one RS-232 line, the user writes
// each tester's memory with a list of packet records (target, size,
// insertion time, sequence number, optional data), then sends Start: every
// tester zeroes its cycle counter at the same moment and injects its
// packets at their programmed cycles, while every tester measures the
// latency of the packets it receives. Afterwards the host reads the
// statistics (packets received, minimum, maximum and accumulated latency)
// from the last 16 words of each tester's memory.
//
// External interface: clock, reset (active high, synchronous), rxd, txd,
// plus the priority option bit of every tester (index n = x*MESH_Y + y,
// bit 0 belongs to the Serial IP and is 0), meant for a clock-selection
// unit that this design does not contain. All blocks run on the one clock.
module hnplus_top
  import hnplus_pkg::*;
#(
  parameter int unsigned MESH_X    = 3,
  parameter int unsigned MESH_Y    = 3,
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned BUF_DEPTH = 8,
  localparam int unsigned N = MESH_X * MESH_Y
) (
  input  logic         clock,
  input  logic         reset,
  input  logic         rxd,
  output logic         txd,
  output logic [N-1:0] tg_priority
);

  logic  [N-1:0] l_rx, l_credit_o, l_tx, l_credit_i;
  flit_t [N-1:0] l_din, l_dout;
  logic          start;

  noc_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .BUF_DEPTH(BUF_DEPTH)) u_noc (
    .clk(clock), .reset(reset),
    .l_rx(l_rx), .l_din(l_din), .l_credit_o(l_credit_o),
    .l_tx(l_tx), .l_dout(l_dout), .l_credit_i(l_credit_i)
  );

  // Serial IP at node 00
  serial_ip #(.MY_ADDR(16'h0000)) u_serial (
    .clock(clock), .reset(reset), .rxd(rxd), .txd(txd), .start(start),
    .clock_tx(), .tx(l_rx[0]), .data_out(l_din[0]), .credit_i(l_credit_o[0]),
    .clock_rx(clock), .rx(l_tx[0]), .data_in(l_dout[0]), .credit_o(l_credit_i[0])
  );
  assign tg_priority[0] = 1'b0;

  // Tester IPs at every other node
  for (genvar n = 1; n < N; n++) begin : g_tg
    tester_ip #(
      .MY_ADDR(node_addr(n / MESH_Y, n % MESH_Y)),
      .SERIAL_ADDR(16'h0000),
      .MEM_WORDS(MEM_WORDS)
    ) u_tg (
      .clock(clock), .reset(reset), .start(start),
      .clock_tx(), .tx(l_rx[n]), .data_out(l_din[n]), .credit_i(l_credit_o[n]),
      .clock_rx(clock), .rx(l_tx[n]), .data_in(l_dout[n]), .credit_o(l_credit_i[n]),
      .priority_o(tg_priority[n])
    );
  end

endmodule
