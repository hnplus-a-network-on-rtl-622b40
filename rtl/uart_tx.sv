// uart_tx: RS-232 transmitter of the Serial IP, 8 data bits, no parity, one
// stop bit, least significant bit first, idle high. A byte is taken when
// send is high and busy is low; busy then stays high for the ten bit times
// of the frame. The bit time in clocks comes from the receiver's automatic
// rate detection, so the host hears the rate it used. Framing is this
// design's choice.
module uart_tx (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] bit_time,
  input  logic        send,
  input  logic [7:0]  data,
  output logic        busy,
  output logic        txd
);

  logic [9:0]  frame;   // stop, data[7:0], start; shifted out from bit 0
  logic [3:0]  nbit;
  logic [15:0] cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy  <= 1'b0;
      frame <= '1;
      nbit  <= '0;
      cnt   <= '0;
    end else if (!busy) begin
      if (send) begin
        busy  <= 1'b1;
        frame <= {1'b1, data, 1'b0};
        nbit  <= '0;
        cnt   <= bit_time;
      end
    end else begin
      if (cnt <= 16'd1) begin
        cnt   <= bit_time;
        frame <= {1'b1, frame[9:1]};
        nbit  <= nbit + 1'b1;
        if (nbit == 4'd9) busy <= 1'b0;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  assign txd = busy ? frame[0] : 1'b1;

endmodule
