// tg_memory: the local memory of a Tester IP, WORDS x WIDTH bits (1024 x 16
// in the platform, the size of the two 2048x8 Block RAMs of each tester).
//
// Word 0 holds the traffic options, the packet records follow from word 1,
// and the last 16 words receive the latency statistics. Port A is read-only
// and belongs to the traffic injector; port B reads and writes and belongs
// to the traffic receptor. Both ports read synchronously: the word addressed
// in one cycle appears on the data output in the next. A dual-port memory is
// this design's choice in place of the single port with an access arbiter
// of the original platform. Contents start at zero.
module tg_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic             clk,
  // port A: injector reads
  input  logic [AW-1:0]    a_addr,
  output logic [WIDTH-1:0] a_dout,
  // port B: receptor reads and writes
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_dout
);

  logic [WIDTH-1:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    a_dout <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_din;
      b_dout <= mem[b_addr];
    end
  end

endmodule
