// uart_rx: RS-232 receiver of the Serial IP, 8 data bits, no parity, one
// stop bit, least significant bit first, with automatic bit-rate detection.
//
// After reset the host must first send the sync byte 0x55. Its start bit is
// the only low stretch of exactly one bit time that begins the frame, so the
// receiver counts the clocks rxd stays low, keeps that count as bit_time,
// raises locked, and lets the rest of the sync frame pass unread. From then
// on each falling edge starts a frame: the line is checked at half a bit
// time, the eight data bits are sampled one bit time apart in their middle,
// and after the stop-bit sample valid pulses for one clock with the byte on
// data. A frame whose start bit is gone at mid-bit is ignored.
// The rxd input passes two synchronising flip-flops.
//
// The platform only states that a sync signal matches the Serial IP's speed
// to the host; the framing, the 0x55 sync byte and the start-bit
// measurement are this design's choices.
module uart_rx (
  input  logic        clk,
  input  logic        reset,
  input  logic        rxd,
  output logic [15:0] bit_time,
  output logic        locked,
  output logic        valid,
  output logic [7:0]  data
);

  typedef enum logic [2:0] {U_SYNC_WAIT, U_SYNC_LOW, U_SYNC_SKIP, U_IDLE, U_START, U_DATA, U_STOP} state_e;

  state_e      state;
  logic [1:0]  rxd_sync;
  logic        rxd_q;
  logic [19:0] cnt;
  logic [2:0]  nbit;
  logic [7:0]  shreg;

  always_ff @(posedge clk) begin
    if (reset) begin
      rxd_sync <= 2'b11;
      state    <= U_SYNC_WAIT;
      bit_time <= '0;
      locked   <= 1'b0;
      valid    <= 1'b0;
      data     <= '0;
      cnt      <= '0;
      nbit     <= '0;
      shreg    <= '0;
    end else begin
      rxd_sync <= {rxd_sync[0], rxd};
      valid    <= 1'b0;
      unique case (state)
        U_SYNC_WAIT: if (!rxd_q) begin
          cnt   <= 20'd1;
          state <= U_SYNC_LOW;
        end
        U_SYNC_LOW: begin
          if (rxd_q) begin
            bit_time <= cnt[15:0];
            locked   <= 1'b1;
            // skip data bits and stop bit of the sync byte, up to the
            // middle of the stop bit
            cnt      <= 20'(cnt[15:0]) * 20'd8 + 20'(cnt[15:1]);
            state    <= U_SYNC_SKIP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        U_SYNC_SKIP: begin
          if (cnt <= 20'd1) state <= U_IDLE;
          else              cnt   <= cnt - 1'b1;
        end
        U_IDLE: if (!rxd_q) begin
          cnt   <= 20'(bit_time[15:1]);
          state <= U_START;
        end
        U_START: begin
          if (cnt <= 20'd1) begin
            if (!rxd_q) begin
              cnt   <= 20'(bit_time);
              nbit  <= '0;
              state <= U_DATA;
            end else begin
              state <= U_IDLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        U_DATA: begin
          if (cnt <= 20'd1) begin
            shreg <= {rxd_q, shreg[7:1]};
            cnt   <= 20'(bit_time);
            nbit  <= nbit + 1'b1;
            if (nbit == 3'd7) state <= U_STOP;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        U_STOP: begin
          if (cnt <= 20'd1) begin
            if (rxd_q) begin
              valid <= 1'b1;
              data  <= shreg;
            end
            state <= U_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= U_SYNC_WAIT;
      endcase
    end
  end

  assign rxd_q = rxd_sync[1];

endmodule
