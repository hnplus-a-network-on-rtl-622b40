// tb_traffic_receptor: the receptor with a real tester memory and a model
// input FIFO. It sends Write commands (checked by reading the memory),
// a Write to address 8 (must raise preread_req), Read commands (the word
// must come out as a Read Return request and wait for its acknowledge), an
// unknown command (must be dropped without disturbing what follows) and
// traffic packets with known real insertion times. The statistics words in
// the last 16 memory locations are compared with a model computed from the
// cycle in which each packet's last flit was taken. A start pulse must
// clear the statistics.
module tb_traffic_receptor;
  import hnplus_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        reset, start, fifo_empty, fifo_rd, mem_en, mem_we, preread_req, ret_req, ret_ack;
  logic [63:0] now;
  flit_t       fifo_dout, mem_din, mem_dout, ret_target, ret_data, a_dout;
  logic [9:0]  mem_addr, a_addr;

  tg_memory #(.WORDS(1024), .WIDTH(16)) u_mem (
    .clk(clk), .a_addr(a_addr), .a_dout(a_dout),
    .b_en(mem_en), .b_we(mem_we), .b_addr(mem_addr), .b_din(mem_din), .b_dout(mem_dout));

  traffic_receptor #(.SERIAL_ADDR(16'h0000), .AW(10)) dut (.*);

  // time base
  always_ff @(posedge clk) begin
    if (reset || start) now <= 0;
    else now <= now + 1;
  end

  // model FIFO, with a tag marking the last flit of a traffic packet
  flit_t q[$];
  bit    qlast[$];
  longint t_last_seen;
  int     n_last_seen = 0;
  always @(posedge clk) begin
    if (!reset && fifo_rd && q.size() > 0) begin
      if (qlast[0]) begin t_last_seen = longint'(now); n_last_seen++; end
      void'(q.pop_front());
      void'(qlast.pop_front());
    end
  end
  always @(negedge clk) begin
    fifo_empty = (q.size() == 0);
    fifo_dout  = (q.size() > 0) ? q[0] : 16'h0;
  end

  int n_preread = 0;
  always @(posedge clk) if (!reset && preread_req) n_preread++;

  task automatic push(input flit_t f, input bit last);
    q.push_back(f);
    qlast.push_back(last);
  endtask

  task automatic wait_idle();
    int g = 0;
    while (q.size() > 0 && g < 2000) begin @(posedge clk); g++; end
    repeat (25) @(posedge clk);   // room for the 17-cycle statistics update
  endtask

  task automatic mem_read(input int a, output flit_t d);
    @(negedge clk); a_addr = 10'(a);
    @(posedge clk); #1 d = a_dout;
  endtask

  // statistics model
  longint m_n, m_min, m_max, m_acc;

  task automatic send_traffic(input flit_t src, input int ndata, input longint ts_real);
    push(16'h0012, 0);
    push(flit_t'(11 + ndata), 0);
    push(src, 0);
    for (int i = 0; i < 4; i++) push(16'h0000, 0);   // creation time
    push(16'h0000, 0); push(16'h0007, 0);            // sequence number
    push(flit_t'(ts_real >> 48), 0);
    push(flit_t'(ts_real >> 32), 0);
    push(flit_t'(ts_real >> 16), ndata == 0 ? 0 : 0);
    push(flit_t'(ts_real), ndata == 0);
    for (int k = 0; k < ndata; k++) push(flit_t'(k), k == ndata - 1);
    wait_idle();
    begin
      longint lat;
      lat = t_last_seen - ts_real;
      m_n++;
      m_acc += lat;
      if (lat < m_min) m_min = lat;
      if (lat > m_max) m_max = lat;
    end
  endtask

  task automatic check_stats(input string tag);
    longint v[4];
    v[0] = m_n; v[1] = m_min; v[2] = m_max; v[3] = m_acc;
    for (int s = 0; s < 4; s++) begin
      logic [63:0] got;
      for (int w = 0; w < 4; w++) begin
        flit_t d;
        mem_read(1008 + 4 * s + w, d);
        got = {got[47:0], d};
      end
      check(got == 64'(v[s]), $sformatf("%s statistic %0d got %h exp %h", tag, s, got, v[s]));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t d;
    flit_t wr_words[8];
    reset = 1; start = 0; ret_ack = 0; a_addr = 0;
    q.delete();
    repeat (4) @(posedge clk);
    reset <= 0;
    repeat (3) @(posedge clk);

    // Write command: 8 words at 0x20
    push(16'h0012, 0); push(16'd11, 0); push(16'h0000, 0); push(CMD_WRITE, 0); push(16'h0020, 0);
    for (int k = 0; k < 8; k++) begin wr_words[k] = flit_t'($urandom); push(wr_words[k], 0); end
    wait_idle();
    for (int k = 0; k < 8; k++) begin
      mem_read(32 + k, d);
      check(d == wr_words[k], $sformatf("write word %0d", k));
    end
    check(n_preread == 0, "no pre-read request yet");

    // single-word writes to addresses 7 and 8 (end of the first record)
    push(16'h0012, 0); push(16'd4, 0); push(16'h0000, 0); push(CMD_WRITE, 0); push(16'h0007, 0); push(16'h1234, 0);
    wait_idle();
    check(n_preread == 0, "write to 7 does not ask for pre-read");
    push(16'h0012, 0); push(16'd4, 0); push(16'h0000, 0); push(CMD_WRITE, 0); push(16'h0008, 0); push(16'h5678, 0);
    wait_idle();
    check(n_preread == 1, "write to 8 asks for pre-read");
    mem_read(8, d);
    check(d == 16'h5678, "word 8 written");

    // unknown command 5 with two extra flits, then a Read of 0x23
    push(16'h0012, 0); push(16'd5, 0); push(16'h0000, 0); push(16'd5, 0); push(16'h0020, 0); push(16'hFFFF, 0); push(16'hFFFF, 0);
    push(16'h0012, 0); push(16'd3, 0); push(16'h0000, 0); push(CMD_READ, 0); push(16'h0023, 0);
    begin
      int g = 0;
      while (!ret_req && g < 500) begin @(posedge clk); g++; end
      check(ret_req, "read return requested");
      repeat (5) @(posedge clk);
      check(ret_req && ret_data == wr_words[3] && ret_target == 16'h0000, "read return data held");
      ret_ack <= 1; @(posedge clk); ret_ack <= 0;
      @(posedge clk); #1;
      check(!ret_req, "request dropped after ack");
    end
    mem_read(32, d);
    check(d == wr_words[0], "unknown command wrote nothing");

    // traffic packets
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    m_n = 0; m_min = 64'h7FFFFFFFFFFFFFFF; m_max = 0; m_acc = 0;
    repeat (200) @(posedge clk);
    for (int p = 0; p < 12; p++) begin
      send_traffic(16'h0001 + flit_t'(p % 3), $urandom_range(0, 5), longint'(now) - $urandom_range(0, 150));
    end
    check(n_last_seen == 12, "all traffic packets taken");
    check_stats("after 12 packets");

    // start clears the statistics
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    m_n = 0; m_min = 64'h7FFFFFFFFFFFFFFF; m_max = 0; m_acc = 0;
    repeat (50) @(posedge clk);
    send_traffic(16'h0021, 3, 10);
    check_stats("after restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
