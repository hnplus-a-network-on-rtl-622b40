// tester_ip: a Tester IP (traffic generator, TG) of the HNPlus platform. It
// is loaded over the NoC with a list of packet records, injects them into
// the NoC at the programmed cycles once the global start arrives, and
// measures the latency of the traffic packets it receives.
//
// Inside: the 1k x 16 local memory (tg_memory), the 64-bit clock-cycles
// counter (cycle_counter), the traffic injector (transmit side), the traffic
// receptor (receive side), a bi-synchronous FIFO on the receive link and a
// two-flop synchroniser on the start wire. The synchronised start's rising
// edge becomes a one-cycle pulse that clears and starts the counter, arms
// the injector and clears the statistics.
//
// Link ports, one lane each: a flit moves when tx/rx and the matching
// credit are both high in a cycle of the sender's clock. clock_tx is the
// tester's own clock; clock_rx clocks the write side of the input FIFO.
// The platform's tester links carry two virtual lanes; this design has one
// lane per link, matching its router.
module tester_ip
  import hnplus_pkg::*;
#(
  parameter flit_t       MY_ADDR     = 16'h0011,
  parameter flit_t       SERIAL_ADDR = 16'h0000,
  parameter int unsigned MEM_WORDS   = 1024,
  parameter int unsigned FIFO_LOG2   = 3
) (
  input  logic  clock,
  input  logic  reset,
  input  logic  start,
  // TX link
  output logic  clock_tx,
  output logic  tx,
  output flit_t data_out,
  input  logic  credit_i,
  // RX link
  input  logic  clock_rx,
  input  logic  rx,
  input  flit_t data_in,
  output logic  credit_o,
  // traffic priority option, for a clock-selection unit
  output logic  priority_o
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  // start synchroniser and edge detector
  logic [2:0] start_sync;
  logic       start_pulse;
  always_ff @(posedge clock) begin
    if (reset) start_sync <= '0;
    else       start_sync <= {start_sync[1:0], start};
  end
  assign start_pulse = start_sync[1] && !start_sync[2];

  logic [63:0] now;
  cycle_counter #(.WIDTH(64)) u_counter (
    .clk(clock), .reset(reset), .start(start_pulse), .count(now)
  );

  // receive FIFO
  logic  fifo_full, fifo_empty, fifo_rd;
  flit_t fifo_dout;
  bisync_fifo #(.WIDTH(FLIT_W), .DEPTH_LOG2(FIFO_LOG2)) u_fifo (
    .wclk(clock_rx), .rclk(clock), .reset(reset),
    .wr(rx), .din(data_in), .full(fifo_full),
    .rd(fifo_rd), .dout(fifo_dout), .empty(fifo_empty)
  );
  assign credit_o = !fifo_full;

  // memory
  logic [AW-1:0] a_addr, b_addr;
  flit_t         a_dout, b_dout, b_din;
  logic          b_en, b_we;
  tg_memory #(.WORDS(MEM_WORDS), .WIDTH(FLIT_W)) u_mem (
    .clk(clock),
    .a_addr(a_addr), .a_dout(a_dout),
    .b_en(b_en), .b_we(b_we), .b_addr(b_addr), .b_din(b_din), .b_dout(b_dout)
  );

  logic  preread_req, ret_req, ret_ack;
  flit_t ret_target, ret_data;

  traffic_injector #(.MY_ADDR(MY_ADDR), .AW(AW)) u_inj (
    .clk(clock), .reset(reset), .start(start_pulse), .now(now),
    .mem_addr(a_addr), .mem_dout(a_dout),
    .preread_req(preread_req),
    .ret_req(ret_req), .ret_target(ret_target), .ret_data(ret_data), .ret_ack(ret_ack),
    .tx(tx), .data_out(data_out), .credit_i(credit_i), .priority_o(priority_o)
  );

  traffic_receptor #(.SERIAL_ADDR(SERIAL_ADDR), .AW(AW)) u_rcv (
    .clk(clock), .reset(reset), .start(start_pulse), .now(now),
    .fifo_empty(fifo_empty), .fifo_dout(fifo_dout), .fifo_rd(fifo_rd),
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_din(b_din), .mem_dout(b_dout),
    .preread_req(preread_req),
    .ret_req(ret_req), .ret_target(ret_target), .ret_data(ret_data), .ret_ack(ret_ack)
  );

  assign clock_tx = clock;

endmodule
