// serial_ip: the bridge between the host computer (RS-232) and the NoC.
//
// Host to platform, byte messages:
//   Read   0, target, N, addr[15:8], addr[7:0]
//   Write  1, target, N, addr[15:8], addr[7:0], N x (data[15:8], data[7:0])
//   Start  2
// A Read becomes N Read packets  {target, 3, own address, 0, addr+k};
// a Write becomes N Write packets {target, 4, own address, 1, addr+k, data_k},
// each sent as soon as its data word has arrived; a Start raises the start
// wire to every tester for START_CYCLES clocks.
// Platform to host: every Read Return packet {target, 3, source, 9, data}
// arriving from the NoC is sent to the host as data[15:8], data[7:0];
// other packets are received and dropped. While those two bytes are on the
// line the NoC input grants no credit, so returns wait in the network.
// The host must begin with the sync byte 0x55 (see uart_rx).
// clock_tx simply forwards clock: it names the clock the outgoing flits
// belong to, for a receiver in another clock domain.
//
// Message and packet layouts are the platform's. The placement of the
// target byte in the low byte of the target flit, the start pulse length
// and the assumption that the host leaves at least a byte time between
// messages (a Read's N packets are sent before the next command is read)
// are this design's choices.
module serial_ip
  import hnplus_pkg::*;
#(
  parameter flit_t       MY_ADDR      = 16'h0000,
  parameter int unsigned START_CYCLES = 4
) (
  input  logic  clock,
  input  logic  reset,
  input  logic  rxd,
  output logic  txd,
  output logic  start,
  // TX link into the NoC
  output logic  clock_tx,
  output logic  tx,
  output flit_t data_out,
  input  logic  credit_i,
  // RX link from the NoC
  input  logic  clock_rx,
  input  logic  rx,
  input  flit_t data_in,
  output logic  credit_o
);

  // ------------------------------------------------------------------
  // UART
  // ------------------------------------------------------------------
  logic [15:0] bit_time;
  logic        locked, b_valid;
  logic [7:0]  b_data;
  logic        u_send, u_busy;
  logic [7:0]  u_data;

  uart_rx u_rx (.clk(clock), .reset(reset), .rxd(rxd),
                .bit_time(bit_time), .locked(locked), .valid(b_valid), .data(b_data));
  uart_tx u_tx (.clk(clock), .reset(reset), .bit_time(bit_time),
                .send(u_send), .data(u_data), .busy(u_busy), .txd(txd));

  // ------------------------------------------------------------------
  // host message parser
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {H_CMD, H_TGT, H_N, H_AHI, H_ALO, H_DHI, H_DLO, H_READS} hstate_e;
  hstate_e     hs;
  logic        is_write;
  logic [7:0]  m_target, m_n, d_hi;
  flit_t       m_addr, w_data;
  logic [7:0]  left;            // words still to send / receive
  logic [$clog2(START_CYCLES+1)-1:0] start_cnt;

  // packet sender
  typedef enum logic [2:0] {T_IDLE, T_TGT, T_PAY, T_SRC, T_CMD, T_ADDR, T_DATA} tstate_e;
  tstate_e ts;
  logic    pk_write;            // packet being sent is a Write
  logic    pk_req;              // parser asks for a packet with m_addr / w_data
  logic    pk_done;             // sender finished a packet this cycle
  logic    fire;

  assign fire = tx && credit_i;

  always_ff @(posedge clock) begin
    if (reset) begin
      hs        <= H_CMD;
      is_write  <= 1'b0;
      m_target  <= '0;
      m_n       <= '0;
      m_addr    <= '0;
      d_hi      <= '0;
      w_data    <= '0;
      left      <= '0;
      pk_req    <= 1'b0;
      start_cnt <= '0;
    end else begin
      if (start_cnt != '0) start_cnt <= start_cnt - 1'b1;
      if (pk_done) begin
        pk_req <= 1'b0;
        m_addr <= m_addr + 1'b1;
      end
      unique case (hs)
        H_CMD: if (b_valid) begin
          if (b_data == HOST_READ || b_data == HOST_WRITE) begin
            is_write <= (b_data == HOST_WRITE);
            hs       <= H_TGT;
          end else if (b_data == HOST_START) begin
            start_cnt <= START_CYCLES[$bits(start_cnt)-1:0];
          end
        end
        H_TGT: if (b_valid) begin m_target <= b_data; hs <= H_N; end
        H_N:   if (b_valid) begin m_n <= b_data; left <= b_data; hs <= H_AHI; end
        H_AHI: if (b_valid) begin m_addr[15:8] <= b_data; hs <= H_ALO; end
        H_ALO: if (b_valid) begin
          m_addr[7:0] <= b_data;
          if (m_n == '0)    hs <= H_CMD;
          else if (is_write) hs <= H_DHI;
          else begin
            pk_req <= 1'b1;
            hs     <= H_READS;
          end
        end
        H_DHI: if (b_valid) begin d_hi <= b_data; hs <= H_DLO; end
        H_DLO: if (b_valid) begin
          w_data <= {d_hi, b_data};
          pk_req <= 1'b1;
          left   <= left - 1'b1;
          hs     <= (left == 8'd1) ? H_CMD : H_DHI;
        end
        H_READS: if (pk_done) begin
          left <= left - 1'b1;
          if (left == 8'd1) hs <= H_CMD;
          else              pk_req <= 1'b1;
        end
        default: hs <= H_CMD;
      endcase
    end
  end

  assign start = (start_cnt != '0);

  // ------------------------------------------------------------------
  // packet sender (NoC TX)
  // ------------------------------------------------------------------
  always_ff @(posedge clock) begin
    if (reset) begin
      ts       <= T_IDLE;
      pk_write <= 1'b0;
    end else begin
      unique case (ts)
        T_IDLE: if (pk_req && !pk_done) begin
          pk_write <= is_write;
          ts       <= T_TGT;
        end
        T_TGT:  if (fire) ts <= T_PAY;
        T_PAY:  if (fire) ts <= T_SRC;
        T_SRC:  if (fire) ts <= T_CMD;
        T_CMD:  if (fire) ts <= T_ADDR;
        T_ADDR: if (fire) ts <= pk_write ? T_DATA : T_IDLE;
        T_DATA: if (fire) ts <= T_IDLE;
        default: ts <= T_IDLE;
      endcase
    end
  end

  assign pk_done = fire && ((ts == T_ADDR && !pk_write) || ts == T_DATA);

  always_comb begin
    tx       = (ts != T_IDLE);
    data_out = '0;
    unique case (ts)
      T_TGT:  data_out = {8'h00, m_target};
      T_PAY:  data_out = pk_write ? PAY_WRITE : PAY_READ;
      T_SRC:  data_out = MY_ADDR;
      T_CMD:  data_out = pk_write ? CMD_WRITE : CMD_READ;
      T_ADDR: data_out = m_addr;
      T_DATA: data_out = w_data;
      default: data_out = '0;
    endcase
  end

  assign clock_tx = clock;

  // ------------------------------------------------------------------
  // NoC RX: Read Return packets to the host
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {N_TGT, N_SIZE, N_BODY, N_HI, N_LO} nstate_e;
  nstate_e nstate;
  flit_t   n_left, n_idx, n_cmd, n_data;
  logic    take;

  assign credit_o = (nstate == N_TGT) || (nstate == N_SIZE) || (nstate == N_BODY);
  assign take     = rx && credit_o;

  always_ff @(posedge clock) begin
    if (reset) begin
      nstate <= N_TGT;
      n_left <= '0;
      n_idx  <= '0;
      n_cmd  <= '0;
      n_data <= '0;
    end else begin
      unique case (nstate)
        N_TGT:  if (take) nstate <= N_SIZE;
        N_SIZE: if (take) begin
          n_left <= data_in;
          n_idx  <= '0;
          n_cmd  <= '1;
          nstate <= (data_in == '0) ? N_TGT : N_BODY;
        end
        N_BODY: if (take) begin
          // body flits: 0 source, 1 command, 2 data
          if (n_idx == 16'd1) n_cmd  <= data_in;
          if (n_idx == 16'd2) n_data <= data_in;
          n_idx  <= n_idx + 1'b1;
          n_left <= n_left - 1'b1;
          if (n_left == 16'd1) begin
            nstate <= (n_cmd == CMD_READ_RET && n_idx == 16'd2) ? N_HI : N_TGT;
          end
        end
        N_HI: if (!u_busy) nstate <= N_LO;
        N_LO: if (!u_busy) nstate <= N_TGT;
        default: nstate <= N_TGT;
      endcase
    end
  end

  assign u_send = (nstate == N_HI || nstate == N_LO) && !u_busy;
  assign u_data = (nstate == N_HI) ? n_data[15:8] : n_data[7:0];

  // The link clocks equal the Serial IP clock in this platform.
  logic unused_ok;
  assign unused_ok = clock_rx ^ locked;

endmodule
