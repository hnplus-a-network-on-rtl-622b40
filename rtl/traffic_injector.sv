// traffic_injector: the transmission state machine of a Tester IP. It reads
// packet records from the tester's memory and injects them into the NoC at
// the cycle each record asks for, and it sends the Read Return packets that
// answer the Serial IP's read commands.
//
// Three groups of states hang off the idle state S0, as in the platform:
//   S1..S5   Return Packet: target, payload size 3, own address, command 9,
//            data word.
//   S6..S15  Pre Reading: read the options word (address 0) and the eight
//            header words of the first record (addresses 1..8) into the
//            current-packet registers, so the first packet can leave in the
//            first cycle after start. Triggered by a write to address 8 and
//            again every time a traffic run ends.
//   S16..S29 Sending Packets: S16 waits until the cycle counter reaches the
//            record's insertion time and sends the target; S17 payload size
//            (memory value + 4), S18 own address, S19-S22 programmed time,
//            S23-S24 sequence number, S25-S28 the real insertion time (the
//            counter value when the target flit left), S29 the data flits.
//            While S17..S24 send, the eight header words of the next record
//            are read into the next-packet registers ("parallel reading"),
//            so back-to-back packets leave with no idle cycle.
// A record whose target is 0xFFFF ends the run. Data flits come from memory
// when options bit 1 (real data) is set, otherwise data flit k carries 8+k.
//
// Memory port A reads synchronously, so every read is tagged with the field
// it is meant for and the tag is registered; the returned word is stored in
// the following cycle, which keeps reads correct while a flit is stalled.
// A flit moves when tx and credit_i are both high in a cycle.
//
// The state set and its order follow the platform. The options priority
// bit position, the tagged read scheme and the request priority in S0
// (return packet before pre-reading before start) are this design's
// choices.
module traffic_injector
  import hnplus_pkg::*;
#(
  parameter flit_t       MY_ADDR = 16'h0011,
  parameter int unsigned AW      = 10
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,        // one-cycle pulse, already synchronised
  input  logic [63:0]   now,          // cycle counter
  // memory port A
  output logic [AW-1:0] mem_addr,
  input  flit_t         mem_dout,
  // requests from the receptor
  input  logic          preread_req,  // a write to address 8 has completed
  input  logic          ret_req,
  input  flit_t         ret_target,
  input  flit_t         ret_data,
  output logic          ret_ack,
  // NoC output
  output logic          tx,
  output flit_t         data_out,
  input  logic          credit_i,
  output logic          priority_o
);

  typedef enum logic [4:0] {
    S0,
    S1, S2, S3, S4, S5,
    S6, S7, S8, S9, S10, S11, S12, S13, S14, S15,
    S16, S17, S18, S19, S20, S21, S22, S23, S24, S25, S26, S27, S28, S29
  } state_e;

  // field tags for memory reads
  typedef enum logic [3:0] {
    F_NONE, F_OPT, F_TGT, F_PAY, F_TS0, F_TS1, F_TS2, F_TS3, F_SEQ0, F_SEQ1, F_DATA
  } field_e;

  typedef struct packed {
    flit_t        target;
    flit_t        payload;
    logic [63:0]  ts_prog;
    logic [31:0]  seq;
  } pkt_hdr_t;

  state_e   state, state_n;
  flit_t    opts;
  pkt_hdr_t cur, nxt;
  logic [AW-1:0] cur_ptr;
  logic [63:0]   ts_real;
  flit_t    data_cnt;
  flit_t    r_target, r_data;
  logic     go, preread_pend;

  field_e   rd_field, rd_field_q;
  logic     rd_to_nxt, rd_to_nxt_q;

  logic     fire;
  assign fire = tx && credit_i;

  // number of data flits of the current packet and the next record address
  flit_t         n_data;
  logic [AW-1:0] nxt_ptr;
  always_comb begin
    n_data  = (cur.payload > flit_t'(PAY_NON_DATA)) ? cur.payload - flit_t'(PAY_NON_DATA) : '0;
    nxt_ptr = cur_ptr + AW'(REC_HDR_WORDS);
    if (opts[OPT_REALDATA]) nxt_ptr = nxt_ptr + n_data[AW-1:0];
  end

  logic cur_valid;
  assign cur_valid = opts[OPT_AVAIL] && (cur.target != END_OF_TRAFFIC);

  // ------------------------------------------------------------------
  // outputs, read address and next state
  // ------------------------------------------------------------------
  always_comb begin
    state_n   = state;
    tx        = 1'b0;
    data_out  = '0;
    mem_addr  = '0;
    rd_field  = F_NONE;
    rd_to_nxt = 1'b0;
    ret_ack   = 1'b0;

    unique case (state)
      S0: begin
        if (ret_req) begin
          ret_ack = 1'b1;
          state_n = S1;
        end else if (preread_pend) begin
          state_n = S6;
        end else if ((go || start) && cur_valid) begin
          state_n = S16;
        end
      end

      // Return Packet
      S1: begin tx = 1'b1; data_out = r_target;     if (fire) state_n = S2; end
      S2: begin tx = 1'b1; data_out = PAY_READ_RET; if (fire) state_n = S3; end
      S3: begin tx = 1'b1; data_out = MY_ADDR;      if (fire) state_n = S4; end
      S4: begin tx = 1'b1; data_out = CMD_READ_RET; if (fire) state_n = S5; end
      S5: begin tx = 1'b1; data_out = r_data;       if (fire) state_n = S0; end

      // Pre Reading: S6 addresses the options word, S7..S14 the header
      // words of the first record; each word is stored one cycle later.
      S6:  begin mem_addr = AW'(0); rd_field = F_OPT;  state_n = S7;  end
      S7:  begin mem_addr = AW'(1); rd_field = F_TGT;  state_n = S8;  end
      S8:  begin mem_addr = AW'(2); rd_field = F_PAY;  state_n = S9;  end
      S9:  begin mem_addr = AW'(3); rd_field = F_TS0;  state_n = S10; end
      S10: begin mem_addr = AW'(4); rd_field = F_TS1;  state_n = S11; end
      S11: begin mem_addr = AW'(5); rd_field = F_TS2;  state_n = S12; end
      S12: begin mem_addr = AW'(6); rd_field = F_TS3;  state_n = S13; end
      S13: begin mem_addr = AW'(7); rd_field = F_SEQ0; state_n = S14; end
      S14: begin mem_addr = AW'(8); rd_field = F_SEQ1; state_n = S15; end
      S15: begin state_n = S0; end

      // Sending Packets
      S16: begin
        if (!cur_valid) begin
          state_n = S0;
        end else if (now >= cur.ts_prog) begin
          tx = 1'b1; data_out = cur.target;
          if (fire) state_n = S17;
        end
      end
      S17: begin tx = 1'b1; data_out = cur.payload + flit_t'(TS_REAL_FLITS);
                 mem_addr = nxt_ptr;          rd_field = F_TGT;  rd_to_nxt = 1'b1; if (fire) state_n = S18; end
      S18: begin tx = 1'b1; data_out = MY_ADDR;
                 mem_addr = nxt_ptr + AW'(1); rd_field = F_PAY;  rd_to_nxt = 1'b1; if (fire) state_n = S19; end
      S19: begin tx = 1'b1; data_out = cur.ts_prog[63:48];
                 mem_addr = nxt_ptr + AW'(2); rd_field = F_TS0;  rd_to_nxt = 1'b1; if (fire) state_n = S20; end
      S20: begin tx = 1'b1; data_out = cur.ts_prog[47:32];
                 mem_addr = nxt_ptr + AW'(3); rd_field = F_TS1;  rd_to_nxt = 1'b1; if (fire) state_n = S21; end
      S21: begin tx = 1'b1; data_out = cur.ts_prog[31:16];
                 mem_addr = nxt_ptr + AW'(4); rd_field = F_TS2;  rd_to_nxt = 1'b1; if (fire) state_n = S22; end
      S22: begin tx = 1'b1; data_out = cur.ts_prog[15:0];
                 mem_addr = nxt_ptr + AW'(5); rd_field = F_TS3;  rd_to_nxt = 1'b1; if (fire) state_n = S23; end
      S23: begin tx = 1'b1; data_out = cur.seq[31:16];
                 mem_addr = nxt_ptr + AW'(6); rd_field = F_SEQ0; rd_to_nxt = 1'b1; if (fire) state_n = S24; end
      S24: begin tx = 1'b1; data_out = cur.seq[15:0];
                 mem_addr = nxt_ptr + AW'(7); rd_field = F_SEQ1; rd_to_nxt = 1'b1; if (fire) state_n = S25; end
      S25: begin tx = 1'b1; data_out = ts_real[63:48]; if (fire) state_n = S26; end
      S26: begin tx = 1'b1; data_out = ts_real[47:32]; if (fire) state_n = S27; end
      S27: begin tx = 1'b1; data_out = ts_real[31:16]; if (fire) state_n = S28; end
      S28: begin
        tx = 1'b1; data_out = ts_real[15:0];
        mem_addr = cur_ptr + AW'(REC_HDR_WORDS); rd_field = F_DATA;
        if (fire) state_n = (n_data == '0) ? S16 : S29;
      end
      S29: begin
        tx = 1'b1;
        data_out = opts[OPT_REALDATA] ? mem_dout : flit_t'(REC_HDR_WORDS) + data_cnt;
        mem_addr = cur_ptr + AW'(REC_HDR_WORDS) + data_cnt[AW-1:0] + AW'(fire);
        rd_field = F_DATA;
        if (fire && (data_cnt == n_data - 1'b1)) state_n = S16;
      end
      default: state_n = S0;
    endcase
  end

  // ------------------------------------------------------------------
  // registers
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= S0;
      opts         <= '0;
      cur          <= '0;
      nxt          <= '0;
      cur_ptr      <= AW'(1);
      ts_real      <= '0;
      data_cnt     <= '0;
      r_target     <= '0;
      r_data       <= '0;
      go           <= 1'b0;
      preread_pend <= 1'b0;
      rd_field_q   <= F_NONE;
      rd_to_nxt_q  <= 1'b0;
    end else begin
      state       <= state_n;
      rd_field_q  <= rd_field;
      rd_to_nxt_q <= rd_to_nxt;

      // store the word read in the previous cycle
      if (rd_to_nxt_q) begin
        unique case (rd_field_q)
          F_TGT:  nxt.target         <= mem_dout;
          F_PAY:  nxt.payload        <= mem_dout;
          F_TS0:  nxt.ts_prog[63:48] <= mem_dout;
          F_TS1:  nxt.ts_prog[47:32] <= mem_dout;
          F_TS2:  nxt.ts_prog[31:16] <= mem_dout;
          F_TS3:  nxt.ts_prog[15:0]  <= mem_dout;
          F_SEQ0: nxt.seq[31:16]     <= mem_dout;
          F_SEQ1: nxt.seq[15:0]      <= mem_dout;
          default: ;
        endcase
      end else begin
        unique case (rd_field_q)
          F_OPT:  opts               <= mem_dout;
          F_TGT:  cur.target         <= mem_dout;
          F_PAY:  cur.payload        <= mem_dout;
          F_TS0:  cur.ts_prog[63:48] <= mem_dout;
          F_TS1:  cur.ts_prog[47:32] <= mem_dout;
          F_TS2:  cur.ts_prog[31:16] <= mem_dout;
          F_TS3:  cur.ts_prog[15:0]  <= mem_dout;
          F_SEQ0: cur.seq[31:16]     <= mem_dout;
          F_SEQ1: cur.seq[15:0]      <= mem_dout;
          default: ;
        endcase
      end

      // requests
      if (state == S0 && !ret_req && !preread_pend) go <= 1'b0;
      else if (start && !(state inside {[S16:S29]})) go <= 1'b1;

      if (preread_req) preread_pend <= 1'b1;
      else if (state == S16 && !cur_valid) preread_pend <= 1'b1;  // run over
      else if (state == S6) preread_pend <= 1'b0;

      if (state == S6) cur_ptr <= AW'(1);

      if (state == S0 && ret_req) begin
        r_target <= ret_target;
        r_data   <= ret_data;
      end

      if (state == S16 && fire) ts_real <= now;

      if (state == S28) data_cnt <= '0;
      else if (state == S29 && fire) data_cnt <= data_cnt + 1'b1;

      // end of a packet: the next record becomes the current one
      if ((state == S28 && fire && n_data == '0) ||
          (state == S29 && fire && data_cnt == n_data - 1'b1)) begin
        cur     <= nxt;
        cur_ptr <= nxt_ptr;
      end
    end
  end

  assign priority_o = opts[OPT_PRIORITY];

  // A flit offered to the NoC stays offered, unchanged, until it is taken.
  property p_hold;
    @(posedge clk) disable iff (reset) (tx && !credit_i) |=> (tx && $stable(data_out));
  endproperty
  a_hold: assert property (p_hold);

endmodule
