// tb_hnplus_workloads: the three emulation scenarios of the platform's
// evaluation, at their full packet counts, on the default 3x3 platform,
// driven only through rxd/txd by a host model (8 clocks per bit).
//
//   1. single flow: tester 12 sends 120 synthetic 16-flit packets to 02;
//   2. path length: tester 02 sends 100 packets to 20, is read back, then
//      reprogrammed to send 100 packets to 01; the longer path must show
//      the larger accumulated and maximum latency;
//   3. hot spot: testers 01 and 21 each send 120 packets to 12 with
//      identical timestamps, so both flows fight for router 11; 240 must
//      arrive and the latencies must exceed those of scenario 1.
// Packet timestamps are spaced 20 cycles apart (40 in scenario 2); the
// evaluation does not print its spacing, so that is this bench's choice.
// Each scenario checks the received count, min <= max, and that the sum
// lies between count x min and count x max.
module tb_hnplus_workloads;
  import hnplus_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int BT = 8;
  logic reset, rxd, txd;
  logic [8:0] tg_priority;

  hnplus_top dut (.clock(clk), .reset(reset), .rxd(rxd), .txd(txd), .tg_priority(tg_priority));

  task automatic host_byte(input logic [7:0] b);
    rxd <= 1'b0; repeat (BT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (BT) @(posedge clk); end
    rxd <= 1'b1; repeat (BT + 1) @(posedge clk);
  endtask

  logic [7:0] got[$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (BT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BT) @(posedge clk); b[i] = txd; end
      repeat (BT) @(posedge clk);
      got.push_back(b);
    end
  end

  task automatic host_write(input logic [7:0] node, input int base, input flit_t words[$]);
    int i = 0;
    while (i < words.size()) begin
      int n;
      n = (words.size() - i > 255) ? 255 : words.size() - i;
      host_byte(HOST_WRITE); host_byte(node); host_byte(8'(n));
      host_byte(8'((base + i) >> 8)); host_byte(8'(base + i));
      for (int k = 0; k < n; k++) begin host_byte(words[i + k][15:8]); host_byte(words[i + k][7:0]); end
      i += n;
      repeat (20 * BT) @(posedge clk);
    end
  endtask

  // the record header (addresses 1..8) is written last, so that the write
  // to address 8 triggers the pre-read only once the whole list is present
  task automatic host_program(input logic [7:0] node, input flit_t words[$]);
    flit_t head[$], tail[$];
    for (int i = 0; i < words.size(); i++)
      if (i < 9) head.push_back(words[i]); else tail.push_back(words[i]);
    host_write(node, 9, tail);
    host_write(node, 0, head);
  endtask

  task automatic host_read_stats(input logic [7:0] node, output logic [63:0] st[4]);
    int g = 0;
    got.delete();
    host_byte(HOST_READ); host_byte(node); host_byte(8'd16); host_byte(8'h03); host_byte(8'hF0);
    while (got.size() < 32 && g < 200000) begin @(posedge clk); g++; end
    check(got.size() == 32, $sformatf("node %h: 32 result bytes, got %0d", node, got.size()));
    for (int s = 0; s < 4; s++) begin
      st[s] = '0;
      for (int b = 0; b < 8; b++) st[s] = {st[s][55:0], (got.size() > 8 * s + b) ? got[8 * s + b] : 8'h00};
    end
    $display("tester %h: n=%0d min=%0d max=%0d sum=%0d", node, st[0], st[1], st[2], st[3]);
  endtask

  // an empty list; written through address 8 so the tester pre-reads it
  task automatic host_silence(input logic [7:0] node);
    flit_t w[$];
    w = '{16'h0000, END_OF_TRAFFIC, 0, 0, 0, 0, 0, 0, 0};
    host_write(node, 0, w);
  endtask

  function automatic void make_traffic(ref flit_t w[$], input flit_t target, input int npk,
                                       input int gap);
    w.delete();
    w.push_back(16'h0001);
    for (int p = 0; p < npk; p++) begin
      longint ts;
      ts = longint'(p * gap);
      w.push_back(target); w.push_back(16'd10);
      w.push_back(flit_t'(ts >> 48)); w.push_back(flit_t'(ts >> 32));
      w.push_back(flit_t'(ts >> 16)); w.push_back(flit_t'(ts));
      w.push_back(0); w.push_back(flit_t'(p));
    end
    w.push_back(END_OF_TRAFFIC);
  endfunction

  task automatic check_stats(input logic [63:0] st[4], input longint n, input string name);
    check(st[0] == 64'(n), $sformatf("%s: %0d packets received, expected %0d", name, st[0], n));
    check(st[1] >= 16 && st[1] <= st[2], $sformatf("%s: 16 <= min <= max", name));
    check(st[3] >= 64'(n) * st[1] && st[3] <= 64'(n) * st[2], $sformatf("%s: sum within bounds", name));
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t w[$];
    logic [63:0] single[4], far[4], near[4], hot[4];
    reset = 1; rxd = 1;
    repeat (5) @(posedge clk);
    reset <= 0;
    repeat (10) @(posedge clk);
    host_byte(8'h55);

    // 1. single flow
    make_traffic(w, 16'h0002, 120, 20);
    check(w.size() + 16 <= 1024, "120-packet list fits below the results");
    host_program(8'h12, w);
    host_byte(HOST_START);
    repeat (20000) @(posedge clk);
    host_read_stats(8'h02, single);
    check_stats(single, 120, "single flow 12->02");

    // 2. path length: 02 -> 20, then 02 -> 01
    host_silence(8'h12);
    make_traffic(w, 16'h0020, 100, 40);
    host_program(8'h02, w);
    host_byte(HOST_START);
    repeat (20000) @(posedge clk);
    host_read_stats(8'h20, far);
    check_stats(far, 100, "02->20");
    make_traffic(w, 16'h0001, 100, 40);
    host_program(8'h02, w);
    host_byte(HOST_START);
    repeat (20000) @(posedge clk);
    host_read_stats(8'h01, near);
    check_stats(near, 100, "02->01");
    check(far[3] > near[3], "longer path gives larger accumulated latency");
    check(far[1] > near[1], "longer path gives larger minimum latency");

    // 3. hot spot on router 11
    host_silence(8'h02);
    make_traffic(w, 16'h0012, 120, 20);
    host_program(8'h01, w);
    host_program(8'h21, w);
    host_byte(HOST_START);
    repeat (40000) @(posedge clk);
    host_read_stats(8'h12, hot);
    check_stats(hot, 240, "hot spot 01,21->12");
    check(hot[2] > single[2], "hot spot raises the maximum latency");
    check(hot[3] / 240 > single[3] / 120, "hot spot raises the mean latency");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
