// traffic_receptor: the reception state machine of a Tester IP. It takes
// every packet that reaches the tester and either executes it as a command
// from the Serial IP or measures it as a traffic packet from another tester.
//
//   R0  wait for a target flit        R5  Write: store the data words
//   R1  payload size                  R6  unknown command: drop the rest
//   R2  source address                R7  Read: read the word, hand it to
//   R3  command / first time flit         the injector as a Read Return
//   R4  address / second time flit    R8  rest of creation time, sequence no.
//                                     R9  real insertion time (4 flits)
//                                     R10 remaining data flits
//                                     R11 update and store the statistics
// A packet whose source is the Serial IP is a command (0 read, 1 write);
// any other source marks a traffic packet. For a traffic packet the latency
// is the cycle count when its last flit is taken minus the real insertion
// time the sender put in flits 10-13. The tester keeps the number of packets
// received, the minimum, maximum and accumulated latency, each 64 bits, and
// R11 writes them, most significant word first, to the last 16 memory words
// (RESULT_BASE + 0, 4, 8, 12), where a host Read command fetches them.
// The start pulse clears the statistics; the minimum then reads all ones
// until a packet arrives.
//
// Input flits come from a first-word fall-through FIFO: fifo_rd pops the
// head. One flit is taken per cycle at most. ret_data is the memory's port B
// output itself, which holds the word read in R7 until the request is taken. A write to address 8, the last
// header word of the first packet record, raises preread_req for one cycle.
//
// State names and roles follow the platform. How a command is told from a
// traffic packet, the result addresses and word order, the one-cycle
// statistics step plus 16 write cycles in R11 and the clearing by start are
// this design's choices.
module traffic_receptor
  import hnplus_pkg::*;
#(
  parameter flit_t       SERIAL_ADDR = 16'h0000,
  parameter int unsigned AW          = 10
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic [63:0]   now,
  // input FIFO
  input  logic          fifo_empty,
  input  flit_t         fifo_dout,
  output logic          fifo_rd,
  // memory port B
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output flit_t         mem_din,
  input  flit_t         mem_dout,
  // to the injector
  output logic          preread_req,
  output logic          ret_req,
  output flit_t         ret_target,
  output flit_t         ret_data,
  input  logic          ret_ack
);

  localparam logic [AW-1:0] RESULT_BASE = AW'((1 << AW) - 16);

  typedef enum logic [3:0] {R0, R1, R2, R3, R4, R5, R6, R7, R8, R9, R10, R11} state_e;

  state_e        state;
  flit_t         remaining;   // flits still to come after the size flit
  flit_t         src, f3;
  logic [AW-1:0] addr;
  logic [2:0]    sub;         // flit index inside R8 / R9
  logic [63:0]   ts_real, t_last;
  logic          r7_read;
  logic [4:0]    wcnt;

  logic [63:0]   n_rx, lat_min, lat_max, lat_acc;
  logic [63:0]   latency;
  assign latency = t_last - ts_real;

  logic take;
  assign take    = fifo_rd;     // a flit is consumed this cycle

  // which statistic word R11 writes this cycle
  logic [63:0] stat_sel;
  logic [3:0]  widx;
  assign widx = wcnt[3:0] - 4'd1;
  always_comb begin
    unique case (widx[3:2])
      2'd0:    stat_sel = n_rx;
      2'd1:    stat_sel = lat_min;
      2'd2:    stat_sel = lat_max;
      default: stat_sel = lat_acc;
    endcase
  end

  // combinational outputs
  always_comb begin
    fifo_rd  = 1'b0;
    mem_en   = 1'b0;
    mem_we   = 1'b0;
    mem_addr = addr;
    mem_din  = fifo_dout;
    ret_req  = 1'b0;
    unique case (state)
      R0, R1, R2, R3, R4, R6, R8, R9, R10: fifo_rd = !fifo_empty;
      R5: begin
        fifo_rd = !fifo_empty;
        mem_en  = !fifo_empty;
        mem_we  = !fifo_empty;
      end
      R7: begin
        mem_en  = !r7_read;
        ret_req = r7_read;
      end
      R11: begin
        if (wcnt != 5'd0) begin
          mem_en   = 1'b1;
          mem_we   = 1'b1;
          mem_addr = RESULT_BASE + AW'(widx);
          unique case (widx[1:0])
            2'd0:    mem_din = stat_sel[63:48];
            2'd1:    mem_din = stat_sel[47:32];
            2'd2:    mem_din = stat_sel[31:16];
            default: mem_din = stat_sel[15:0];
          endcase
        end
      end
      default: ;
    endcase
  end

  assign ret_target = src;
  assign ret_data   = mem_dout;

  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= R0;
      remaining   <= '0;
      src         <= '0;
      f3          <= '0;
      addr        <= '0;
      sub         <= '0;
      ts_real     <= '0;
      t_last      <= '0;
      r7_read     <= 1'b0;
      wcnt        <= '0;
      preread_req <= 1'b0;
      n_rx        <= '0;
      lat_min     <= '1;
      lat_max     <= '0;
      lat_acc     <= '0;
    end else begin
      preread_req <= 1'b0;

      if (start) begin
        n_rx    <= '0;
        lat_min <= '1;
        lat_max <= '0;
        lat_acc <= '0;
      end

      unique case (state)
        R0: if (take) state <= R1;
        R1: if (take) begin
          remaining <= fifo_dout;
          state     <= (fifo_dout == '0) ? R0 : R2;
        end
        R2: if (take) begin
          src       <= fifo_dout;
          remaining <= remaining - 1'b1;
          state     <= (remaining == 16'd1) ? R0 : R3;
        end
        R3: if (take) begin
          f3        <= fifo_dout;
          remaining <= remaining - 1'b1;
          state     <= (remaining == 16'd1) ? R0 : R4;
        end
        R4: if (take) begin
          addr      <= fifo_dout[AW-1:0];
          remaining <= remaining - 1'b1;
          sub       <= '0;
          if (src != SERIAL_ADDR) begin
            state <= (remaining == 16'd1) ? R0 : R8;
          end else if (f3 == CMD_WRITE) begin
            state <= (remaining == 16'd1) ? R0 : R5;
          end else if (f3 == CMD_READ) begin
            r7_read <= 1'b0;
            state   <= (remaining == 16'd1) ? R7 : R6;
          end else begin
            state <= (remaining == 16'd1) ? R0 : R6;
          end
        end
        R5: if (take) begin
          addr        <= addr + 1'b1;
          remaining   <= remaining - 1'b1;
          preread_req <= (addr == AW'(REC_HDR_WORDS));
          if (remaining == 16'd1) state <= R0;
        end
        R6: if (take) begin
          remaining <= remaining - 1'b1;
          if (remaining == 16'd1) state <= R0;
        end
        R7: begin
          if (!r7_read) r7_read <= 1'b1;
          else if (ret_ack) begin
            r7_read <= 1'b0;
            state   <= R0;
          end
        end
        R8: if (take) begin   // creation time [31:0] and sequence number
          remaining <= remaining - 1'b1;
          sub       <= sub + 1'b1;
          if (remaining == 16'd1) state <= R0;
          else if (sub == 3'd3) begin
            sub   <= '0;
            state <= R9;
          end
        end
        R9: if (take) begin   // real insertion time, most significant first
          remaining <= remaining - 1'b1;
          sub       <= sub + 1'b1;
          ts_real   <= {ts_real[47:0], fifo_dout};
          if (sub == 3'd3) begin
            if (remaining == 16'd1) begin
              t_last <= now;
              wcnt   <= '0;
              state  <= R11;
            end else begin
              state  <= R10;
            end
          end else if (remaining == 16'd1) begin
            state <= R0;
          end
        end
        R10: if (take) begin
          remaining <= remaining - 1'b1;
          if (remaining == 16'd1) begin
            t_last <= now;
            wcnt   <= '0;
            state  <= R11;
          end
        end
        R11: begin
          if (wcnt == 5'd0) begin
            n_rx    <= n_rx + 1'b1;
            lat_acc <= lat_acc + latency;
            if (latency < lat_min) lat_min <= latency;
            if (latency > lat_max) lat_max <= latency;
          end
          wcnt <= wcnt + 1'b1;
          if (wcnt == 5'd16) state <= R0;
        end
        default: state <= R0;
      endcase
    end
  end

  // A Read Return request is held until the injector takes it.
  a_ret_hold: assert property (@(posedge clk) disable iff (reset)
                               (ret_req && !ret_ack) |=> ret_req);

endmodule
