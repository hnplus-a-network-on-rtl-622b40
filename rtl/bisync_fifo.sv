// bisync_fifo: a bi-synchronous FIFO that carries flits from a writer in one
// clock domain to a reader in another, as used between the NoC and a Tester
// IP.
//
// Write and read pointers are binary counters one bit wider than the
// address; each side passes its pointer to the other in Gray code through
// two flip-flops. "full" and "empty" are therefore pessimistic for two
// clocks after a change on the far side, never optimistic. The head word is
// shown on dout whenever empty is low (first-word fall-through); rd pops it.
// The internals are this design's choice: the platform only requires a
// bi-synchronous FIFO at this point.
module bisync_fifo #(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned DEPTH_LOG2 = 2
) (
  input  logic             wclk,
  input  logic             rclk,
  input  logic             reset,
  // write side (wclk)
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  // read side (rclk)
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);

  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];
  ptr_t wbin, rbin, wgray, rgray;
  ptr_t rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  always_ff @(posedge wclk) begin
    if (reset) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr && !full) begin
        mem[wbin[DEPTH_LOG2-1:0]] <= din;
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // full when the write pointer is one lap ahead of the synchronised read
  // pointer: in Gray code the two top bits differ and the rest are equal.
  assign full = (wgray == {~rgray_w2[DEPTH_LOG2:DEPTH_LOG2-1], rgray_w2[DEPTH_LOG2-2:0]});

  // read domain
  always_ff @(posedge rclk) begin
    if (reset) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign empty = (rgray == wgray_r2);
  assign dout  = mem[rbin[DEPTH_LOG2-1:0]];

endmodule
