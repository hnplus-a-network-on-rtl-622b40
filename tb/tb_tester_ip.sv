// tb_tester_ip: one Tester IP (address 12) driven over its links as the
// NoC would. The test programs it with Write packets from the Serial IP
// address (options word, three records for node 02, end marker), raises
// start, and decodes the packets it injects: contents, a real insertion
// time of 0 for the first packet (injected in its first counted cycle),
// back-to-back injection of the second. It then sends the tester two
// traffic packets, reads the 16 statistics words back with Read packets and
// checks count, minimum, maximum and sum against latencies estimated from
// the test's own clock count (within the few cycles of start
// synchronisation and input FIFO delay).
module tb_tester_ip;
  import hnplus_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam flit_t ME = 16'h0012;
  logic  reset, start, clock_tx, tx, credit_i, rx, credit_o, priority_o;
  flit_t data_out, data_in;

  tester_ip #(.MY_ADDR(ME), .SERIAL_ADDR(16'h0000), .MEM_WORDS(1024)) dut (
    .clock(clk), .reset(reset), .start(start),
    .clock_tx(clock_tx), .tx(tx), .data_out(data_out), .credit_i(credit_i),
    .clock_rx(clk), .rx(rx), .data_in(data_in), .credit_o(credit_o), .priority_o(priority_o));

  // flits to the tester
  flit_t inq[$];
  always @(posedge clk) if (!reset && rx && credit_o) void'(inq.pop_front());
  always @(negedge clk) begin
    rx      = !reset && inq.size() > 0;
    data_in = inq.size() > 0 ? inq[0] : 16'h0;
  end

  // flits from the tester
  flit_t  obs[$];
  longint obs_t[$];
  longint tb_now = 0;
  always @(posedge clk) begin
    tb_now++;
    if (!reset && tx && credit_i) begin obs.push_back(data_out); obs_t.push_back(tb_now); end
  end

  task automatic wr(input int a, input flit_t d);
    inq.push_back(ME); inq.push_back(16'd4); inq.push_back(16'h0000); inq.push_back(CMD_WRITE);
    inq.push_back(flit_t'(a)); inq.push_back(d);
  endtask

  task automatic drain();
    int g = 0;
    while (inq.size() > 0 && g < 5000) begin @(posedge clk); g++; end
    repeat (30) @(posedge clk);
  endtask

  longint ts[3] = '{0, 0, 60};
  longint t_start;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    reset = 1; start = 0; credit_i = 1;
    repeat (4) @(posedge clk);
    reset <= 0;

    // program: options, three records to node 02, end marker
    wr(0, 16'h0001);
    a = 1;
    for (int p = 0; p < 3; p++) begin
      wr(a, 16'h0002); wr(a + 1, 16'd10);
      wr(a + 2, 0); wr(a + 3, 0); wr(a + 4, 0); wr(a + 5, flit_t'(ts[p]));
      wr(a + 6, 0); wr(a + 7, flit_t'(p + 1));
      a += 8;
    end
    wr(a, END_OF_TRAFFIC);
    drain();
    check(obs.size() == 0, "nothing injected before start");

    // start
    @(posedge clk); start <= 1; t_start = tb_now;
    repeat (4) @(posedge clk); start <= 0;
    repeat (150) @(posedge clk);
    check(obs.size() == 48, $sformatf("three 16-flit packets injected, got %0d flits", obs.size()));
    if (obs.size() == 48) begin
      for (int p = 0; p < 3; p++) begin
        int b;
        longint tr;
        b = 16 * p;
        check(obs[b] == 16'h0002 && obs[b + 1] == 16'd14 && obs[b + 2] == ME, $sformatf("packet %0d header", p));
        check(obs[b + 6] == flit_t'(ts[p]) && obs[b + 8] == flit_t'(p + 1), $sformatf("packet %0d times", p));
        tr = longint'({obs[b + 9], obs[b + 10], obs[b + 11], obs[b + 12]});
        check(obs[b + 13] == 16'd8 && obs[b + 14] == 16'd9 && obs[b + 15] == 16'd10, "synthetic data 8, 9, 10");
        if (p == 0) check(tr == 0, $sformatf("first packet in the first cycle, real time %0d", tr));
        if (p == 1) check(tr == 16 && obs_t[16] == obs_t[15] + 1, "second packet back to back");
        if (p == 2) check(tr == 60, $sformatf("third packet at its time, real time %0d", tr));
      end
    end

    // two traffic packets for this tester, then read the statistics
    begin
      longint est[2];
      longint trs[2] = '{100, 140};
      for (int p = 0; p < 2; p++) begin
        inq.push_back(ME); inq.push_back(16'd14); inq.push_back(16'h0021);
        for (int k = 0; k < 6; k++) inq.push_back(16'h0000);
        inq.push_back(0); inq.push_back(0); inq.push_back(0); inq.push_back(flit_t'(trs[p]));
        inq.push_back(16'd8); inq.push_back(16'd9); inq.push_back(16'd10);
        while (inq.size() > 0) @(posedge clk);
        est[p] = (tb_now - t_start) - trs[p];
        repeat (30) @(posedge clk);
      end
      obs.delete();
      for (int w = 0; w < 16; w++) begin
        inq.push_back(ME); inq.push_back(16'd3); inq.push_back(16'h0000); inq.push_back(CMD_READ);
        inq.push_back(flit_t'(1008 + w));
      end
      drain();
      repeat (100) @(posedge clk);
      check(obs.size() == 80, $sformatf("16 read returns, %0d flits", obs.size()));
      if (obs.size() == 80) begin
        logic [63:0] st[4];
        for (int w = 0; w < 16; w++) begin
          check(obs[5 * w] == 16'h0000 && obs[5 * w + 1] == 16'd3 && obs[5 * w + 2] == ME &&
                obs[5 * w + 3] == 16'd9, "read return header");
          st[w / 4] = {st[w / 4][47:0], obs[5 * w + 4]};
        end
        check(st[0] == 2, $sformatf("packets received %0d", st[0]));
        check(st[1] <= st[2] && st[1] + st[2] == st[3], "min + max = sum for two packets");
        check(longint'(st[1]) >= est[0] - 8 && longint'(st[1]) <= est[0] + 8,
              $sformatf("latency %0d, estimated %0d", st[1], est[0]));
        check(longint'(st[2]) >= est[1] - 8 && longint'(st[2]) <= est[1] + 8,
              $sformatf("latency %0d, estimated %0d", st[2], est[1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
