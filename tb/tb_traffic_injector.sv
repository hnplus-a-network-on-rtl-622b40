// tb_traffic_injector: the injector with a real tester memory. The test
// writes packet records into the memory, signals pre-reading, pulses start
// and decodes every flit that leaves. For each record it checks target,
// payload size + 4, source address, programmed time, sequence number, the
// real insertion time (must equal the cycle the target flit left and be no
// earlier than the programmed time) and the data flits (8, 9, 10, ... for
// synthetic data, the memory words for real data). Timing checks: with an
// always-ready NoC the first packet leaves at cycle 0 and a packet whose
// time has passed follows the previous one with no idle cycle (parallel
// reading). Also checked: a second run of the same traffic after the
// automatic re-pre-read, a run with random back-pressure, the real-data
// mode and a Read Return packet.
module tb_traffic_injector;
  import hnplus_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam flit_t ME = 16'h0012;

  logic        reset, start, preread_req, ret_req, ret_ack, tx, credit_i, priority_o;
  logic [63:0] now;
  logic [9:0]  mem_addr;
  flit_t       mem_dout, ret_target, ret_data, data_out;
  logic        b_en, b_we;
  logic [9:0]  b_addr;
  flit_t       b_din, b_dout;

  tg_memory #(.WORDS(1024), .WIDTH(16)) u_mem (
    .clk(clk), .a_addr(mem_addr), .a_dout(mem_dout),
    .b_en(b_en), .b_we(b_we), .b_addr(b_addr), .b_din(b_din), .b_dout(b_dout));

  traffic_injector #(.MY_ADDR(ME), .AW(10)) dut (.clk(clk), .reset(reset), .start(start), .now(now),
    .mem_addr(mem_addr), .mem_dout(mem_dout), .preread_req(preread_req),
    .ret_req(ret_req), .ret_target(ret_target), .ret_data(ret_data), .ret_ack(ret_ack),
    .tx(tx), .data_out(data_out), .credit_i(credit_i), .priority_o(priority_o));

  // reference time base
  logic running;
  always_ff @(posedge clk) begin
    if (reset) begin now <= 0; running <= 0; end
    else if (start) begin now <= 0; running <= 1; end
    else if (running) now <= now + 1;
  end

  // observed flits
  flit_t   obs_f[$];
  longint  obs_t[$];
  always @(posedge clk) if (!reset && tx && credit_i) begin
    obs_f.push_back(data_out);
    obs_t.push_back(longint'(now));
  end

  // packet records
  typedef struct {
    flit_t  target;
    flit_t  payload;
    longint ts;
    int     seq;
  } rec_t;
  rec_t recs[$];
  int n_gapless = 0;

  task automatic mem_write(input int a, input flit_t d);
    @(posedge clk);
    b_en <= 1; b_we <= 1; b_addr <= 10'(a); b_din <= d;
    @(posedge clk);
    b_en <= 0; b_we <= 0;
  endtask

  // write options, records and the end marker; returns nothing
  task automatic load(input flit_t opts);
    int a;
    a = 1;
    mem_write(0, opts);
    foreach (recs[i]) begin
      mem_write(a + 0, recs[i].target);
      mem_write(a + 1, recs[i].payload);
      mem_write(a + 2, flit_t'(recs[i].ts >> 48));
      mem_write(a + 3, flit_t'(recs[i].ts >> 32));
      mem_write(a + 4, flit_t'(recs[i].ts >> 16));
      mem_write(a + 5, flit_t'(recs[i].ts));
      mem_write(a + 6, flit_t'(recs[i].seq >> 16));
      mem_write(a + 7, flit_t'(recs[i].seq));
      a += 8;
      if (opts[OPT_REALDATA]) begin
        for (int k = 0; k < int'(recs[i].payload) - 7; k++) mem_write(a + k, flit_t'(32'hA000 + 16 * i + k));
        a += int'(recs[i].payload) - 7;
      end
    end
    mem_write(a, END_OF_TRAFFIC);
    @(posedge clk);
    preread_req <= 1;
    @(posedge clk);
    preread_req <= 0;
    repeat (15) @(posedge clk);
  endtask

  function automatic int total_flits();
    int n = 0;
    foreach (recs[i]) n += int'(recs[i].payload) + 6;
    return n;
  endfunction

  // compare observed flits with the records
  task automatic check_run(input bit real_data, input bit timing);
    int idx = 0;
    longint prev_last = -100;
    check(obs_f.size() == total_flits(), $sformatf("flit count %0d exp %0d", obs_f.size(), total_flits()));
    if (obs_f.size() != total_flits()) return;
    foreach (recs[i]) begin
      longint t0;
      int nd;
      t0 = obs_t[idx];
      nd = int'(recs[i].payload) - 7;
      check(obs_f[idx] == recs[i].target, $sformatf("pkt %0d target %h", i, obs_f[idx]));
      check(t0 >= recs[i].ts, $sformatf("pkt %0d left at %0d before its time %0d", i, t0, recs[i].ts));
      if (timing) begin
        longint due;
        due = (recs[i].ts > prev_last + 1) ? recs[i].ts : prev_last + 1;
        check(t0 == due, $sformatf("pkt %0d left at %0d, due %0d", i, t0, due));
        if (recs[i].ts <= prev_last && t0 == prev_last + 1) n_gapless++;
      end
      check(obs_f[idx + 1] == recs[i].payload + 4, "payload size + 4");
      check(obs_f[idx + 2] == ME, "source address");
      check({obs_f[idx + 3], obs_f[idx + 4], obs_f[idx + 5], obs_f[idx + 6]} == 64'(recs[i].ts), "programmed time");
      check({obs_f[idx + 7], obs_f[idx + 8]} == 32'(recs[i].seq), "sequence number");
      check({obs_f[idx + 9], obs_f[idx + 10], obs_f[idx + 11], obs_f[idx + 12]} == 64'(t0),
            $sformatf("pkt %0d real insertion time", i));
      for (int k = 0; k < nd; k++) begin
        flit_t expd;
        expd = real_data ? flit_t'(32'hA000 + 16 * i + k) : flit_t'(8 + k);
        check(obs_f[idx + 13 + k] == expd, $sformatf("pkt %0d data %0d got %h exp %h", i, k, obs_f[idx + 13 + k], expd));
      end
      idx += int'(recs[i].payload) + 6;
      prev_last = obs_t[idx - 1];
    end
  endtask

  task automatic run(input bit random_credit);
    int guard = 0;
    obs_f.delete(); obs_t.delete();
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (obs_f.size() < total_flits() && guard < 20000) begin
      @(posedge clk);
      credit_i <= random_credit ? ($urandom_range(0, 2) != 0) : 1'b1;
      guard++;
    end
    credit_i <= 1;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0; preread_req = 0; ret_req = 0; ret_target = 0; ret_data = 0;
    credit_i = 1; b_en = 0; b_we = 0; b_addr = 0; b_din = 0;
    repeat (4) @(posedge clk);
    reset <= 0;

    // synthetic traffic: two back-to-back packets, a late one, a long one
    recs.push_back('{16'h0002, 16'd10, 0,   1});
    recs.push_back('{16'h0002, 16'd10, 0,   2});
    recs.push_back('{16'h0021, 16'd7,  100, 3});
    recs.push_back('{16'h0001, 16'd12, 105, 4});
    recs.push_back('{16'h0002, 16'd10, 110, 5});
    load(16'h0001);
    check(!priority_o, "priority bit clear");
    run(0);
    check_run(0, 1);
    check(n_gapless >= 2, $sformatf("back-to-back packets without idle cycle: %0d", n_gapless));

    // the run ended, the first record was pre-read again: run it again
    run(0);
    check_run(0, 1);

    // random back-pressure
    run(1);
    check_run(0, 0);

    // Read Return packet
    obs_f.delete(); obs_t.delete();
    @(posedge clk);
    ret_req <= 1; ret_target <= 16'h0000; ret_data <= 16'hBEEF;
    while (!ret_ack) @(posedge clk);
    ret_req <= 0;
    repeat (10) @(posedge clk);
    check(obs_f.size() == 5, "return packet is 5 flits");
    if (obs_f.size() == 5) begin
      check(obs_f[0] == 16'h0000 && obs_f[1] == 16'd3 && obs_f[2] == ME &&
            obs_f[3] == 16'd9 && obs_f[4] == 16'hBEEF, "return packet contents");
    end

    // real data and priority option
    recs.delete();
    recs.push_back('{16'h0010, 16'd10, 5,  7});
    recs.push_back('{16'h0011, 16'd9,  6,  8});
    recs.push_back('{16'h0020, 16'd7,  7,  9});
    recs.push_back('{16'h0022, 16'd11, 60, 10});
    load(16'h0007);
    check(priority_o, "priority bit set");
    run(0);
    check_run(1, 1);
    run(1);
    check_run(1, 0);

    // traffic not available: start sends nothing
    recs.delete();
    mem_write(0, 16'h0000);
    @(posedge clk); preread_req <= 1; @(posedge clk); preread_req <= 0;
    repeat (15) @(posedge clk);
    obs_f.delete();
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    repeat (50) @(posedge clk);
    check(obs_f.size() == 0, "nothing sent without the availability flag");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
