// cycle_counter: the clock-cycles counter of a Tester IP, the global time
// base for packet insertion times and latencies.
//
// The start pulse clears the count to zero; from the next clock on it adds
// one per clock. Reset also clears it and leaves it stopped until the first
// start. The 64-bit width matches the four 16-bit time flits of a packet.
module cycle_counter #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  output logic [WIDTH-1:0] count
);

  logic running;

  always_ff @(posedge clk) begin
    if (reset) begin
      running <= 1'b0;
      count   <= '0;
    end else if (start) begin
      running <= 1'b1;
      count   <= '0;
    end else if (running) begin
      count   <= count + 1'b1;
    end
  end

endmodule
