// tb_hnplus_top: the whole platform at its default size (3x3 mesh, 1k-word
// tester memories), driven only through rxd and txd by a host model at 8
// clocks per bit, as the host program drives the board.
//
// Scenario, after the 0x55 sync byte:
//   - tester 12 gets 20 synthetic packets for tester 02, 16 flits each,
//     programmed 10 cycles apart (faster than they can leave, so they go
//     back to back);
//   - testers 01 and 21 each get 12 packets for tester 12, 40 cycles
//     apart with identical times (so they wait for each time), tester 21 with real data words: both flows meet in router 11;
//   - Start; wait; then the host reads the 16 statistics words of testers
//     02, 12 and 22.
// Checked: packet counts 20, 24 and 0; minimum <= maximum; the sum lies
// between count x minimum and count x maximum; a 16-flit packet cannot
// arrive in under 16 cycles; the hot-spot maximum exceeds the single-flow
// maximum; every data flit tester 12 receives from 21 is the word written.
// Each mechanism of the design is counted and must have occurred: pre-
// reading, parallel reading (back-to-back injection), waiting for an
// insertion time, NoC back-pressure at an injector, arbitration between
// two packets in router 11, Write and Read commands, Read Return packets,
// the end-of-traffic re-pre-read, real-data injection and statistics
// updates.
module tb_hnplus_top;
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

  // ---------------------------------------------------------------
  // host model
  // ---------------------------------------------------------------
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

  // write a list of words to a tester, at most 255 per message
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
  endtask

  // traffic file: options, records, end marker
  function automatic void make_traffic(ref flit_t w[$], input flit_t opts, input flit_t target,
                                       input int npk, input int gap, input int payload,
                                       input int seq0);
    w.delete();
    w.push_back(opts);
    for (int p = 0; p < npk; p++) begin
      longint ts;
      ts = longint'(p * gap);
      w.push_back(target); w.push_back(flit_t'(payload));
      w.push_back(flit_t'(ts >> 48)); w.push_back(flit_t'(ts >> 32));
      w.push_back(flit_t'(ts >> 16)); w.push_back(flit_t'(ts));
      w.push_back(0); w.push_back(flit_t'(seq0 + p));
      if (opts[OPT_REALDATA])
        for (int k = 0; k < payload - 7; k++) w.push_back(flit_t'(16'h7000 + 16 * p + k));
    end
    w.push_back(END_OF_TRAFFIC);
  endfunction

  // ---------------------------------------------------------------
  // mechanism counters (observed inside the platform)
  // ---------------------------------------------------------------
  int n_preread = 0, n_backtoback = 0, n_wait_time = 0, n_backpressure = 0, n_arb = 0;
  int n_write_cmd = 0, n_read_cmd = 0, n_return = 0, n_rerun_preread = 0, n_realdata = 0;
  int n_stats = 0, n_data_ok = 0, n_data_bad = 0;

  // tester 12 is index 5, tester 01 is 1, tester 21 is 7
  always @(posedge clk) if (!reset) begin
    if (dut.g_tg[5].u_tg.u_inj.state == 5'd6) n_preread++;
    if (dut.g_tg[5].u_tg.u_inj.state == 5'd16 && dut.g_tg[5].u_tg.tx && dut.g_tg[5].u_tg.credit_i &&
        $past(dut.g_tg[5].u_tg.tx)) n_backtoback++;
    for (int n = 1; n < 9; n++) begin
      if (dut.l_rx[n] && !dut.l_credit_o[n]) n_backpressure++;
    end
    if (dut.g_tg[7].u_tg.u_inj.state == 5'd29 && dut.g_tg[7].u_tg.tx && dut.g_tg[7].u_tg.credit_i) n_realdata++;
  end
  // router 11 is mesh index 4: an output granted while another packet waits for it
  always @(posedge clk) if (!reset) begin
    for (int o = 0; o < 5; o++)
      if (dut.u_noc.g_x[1].g_y[1].u_router.grant_v[o] &&
          $countones(dut.u_noc.g_x[1].g_y[1].u_router.req[o]) > 1) n_arb++;
  end
  for (genvar n = 1; n < 9; n++) begin : g_mon
    always @(posedge clk) if (!reset) begin
      if (dut.g_tg[n].u_tg.u_rcv.state == 4'd5 && dut.g_tg[n].u_tg.u_rcv.fifo_rd) n_write_cmd++;
      if (dut.g_tg[n].u_tg.u_rcv.state == 4'd7 && dut.g_tg[n].u_tg.u_rcv.ret_ack) n_read_cmd++;
      if (dut.g_tg[n].u_tg.u_inj.state == 5'd5 && dut.g_tg[n].u_tg.tx && dut.g_tg[n].u_tg.credit_i) n_return++;
      if (dut.g_tg[n].u_tg.u_rcv.state == 4'd11 && dut.g_tg[n].u_tg.u_rcv.wcnt == 5'd0) n_stats++;
      if (dut.g_tg[n].u_tg.u_inj.state == 5'd16 && !dut.g_tg[n].u_tg.tx &&
          dut.g_tg[n].u_tg.u_inj.cur_valid) n_wait_time++;
    end
  end
  // a re-pre-read is a pre-read that starts right after a run
  always @(posedge clk) if (!reset)
    if (dut.g_tg[5].u_tg.u_inj.state == 5'd16 && !dut.g_tg[5].u_tg.u_inj.cur_valid) n_rerun_preread++;
  // data flits from tester 21 arriving at tester 12 (node 12 is mesh index 5)
  int rx_idx = 0, rx_len = 0;
  flit_t rx_src;
  always @(posedge clk) if (!reset) begin
    if (dut.l_tx[5] && dut.l_credit_i[5]) begin
      flit_t f;
      f = dut.l_dout[5];
      if (rx_idx == 1) rx_len = int'(f);
      if (rx_idx == 2) rx_src = f;
      if (rx_idx >= 13 && rx_src == 16'h0021) begin
        if (f[15:12] == 4'h7 && f[3:0] == 4'(rx_idx - 13)) n_data_ok++;
        else n_data_bad++;
      end
      rx_idx++;
      if (rx_idx >= 2 && rx_idx == rx_len + 2) rx_idx = 0;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t w[$];
    logic [63:0] st02[4], st12[4], st22[4];
    reset = 1; rxd = 1;
    repeat (5) @(posedge clk);
    reset <= 0;
    repeat (10) @(posedge clk);
    host_byte(8'h55);

    make_traffic(w, 16'h0001, 16'h0002, 20, 10, 10, 1);
    host_write(8'h12, 0, w);
    make_traffic(w, 16'h0001, 16'h0012, 12, 40, 10, 100);
    host_write(8'h01, 0, w);
    make_traffic(w, 16'h0003, 16'h0012, 12, 40, 10, 200);
    host_write(8'h21, 0, w);
    repeat (200) @(posedge clk);
    check(n_preread >= 1, "tester 12 pre-read its first packet while being programmed");

    host_byte(HOST_START);
    repeat (3000) @(posedge clk);

    host_read_stats(8'h02, st02);
    host_read_stats(8'h12, st12);
    host_read_stats(8'h22, st22);

    $display("tester 02: n=%0d min=%0d max=%0d sum=%0d", st02[0], st02[1], st02[2], st02[3]);
    $display("tester 12: n=%0d min=%0d max=%0d sum=%0d", st12[0], st12[1], st12[2], st12[3]);
    check(st02[0] == 20, "tester 02 received 20 packets");
    check(st12[0] == 24, "tester 12 received 24 packets");
    check(st22 == '{default: 64'h0}, "tester 22 received nothing and reads zero");
    check(st02[1] >= 16 && st02[1] <= st02[2], "tester 02 min latency plausible");
    check(st02[3] >= 20 * st02[1] && st02[3] <= 20 * st02[2], "tester 02 sum between bounds");
    check(st12[1] >= 16 && st12[1] <= st12[2], "tester 12 min latency plausible");
    check(st12[3] >= 24 * st12[1] && st12[3] <= 24 * st12[2], "tester 12 sum between bounds");
    check(st12[2] > st02[2], "hot spot raises the maximum latency");
    check(n_data_ok == 36 && n_data_bad == 0, $sformatf("real data flits %0d ok, %0d wrong", n_data_ok, n_data_bad));

    $display("mechanisms: preread=%0d back-to-back=%0d wait-for-time=%0d backpressure=%0d arbitration=%0d",
             n_preread, n_backtoback, n_wait_time, n_backpressure, n_arb);
    $display("            write=%0d read=%0d return=%0d rerun-preread=%0d realdata=%0d stats=%0d",
             n_write_cmd, n_read_cmd, n_return, n_rerun_preread, n_realdata, n_stats);
    check(n_preread >= 2, "pre-reading");
    check(n_backtoback > 0, "parallel reading, back-to-back injection");
    check(n_wait_time > 0, "waiting for an insertion time");
    check(n_backpressure > 0, "NoC back-pressure");
    check(n_arb > 0, "arbitration in router 11");
    check(n_write_cmd > 0, "write commands");
    check(n_read_cmd == 48 && n_return == 48, "read commands and returns");
    check(n_rerun_preread > 0, "end of traffic and re-pre-read");
    check(n_realdata > 0, "real-data injection");
    check(n_stats == 44, "statistics updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
