// tb_serial_ip: a host model sends the sync byte and then Write, Read and
// Start messages over rxd at 8 clocks per bit. Checked: the Write becomes
// N Write packets with consecutive addresses and the right data, the Read
// becomes N Read packets, Start raises the start wire for 4 cycles without
// sending a packet, and NoC back-pressure loses nothing. Read Return
// packets injected at the NoC input come out on txd as two bytes, high
// byte first; a packet of another kind is dropped.
module tb_serial_ip;
  import hnplus_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int BT = 8;
  logic  reset, rxd, txd, start, clock_tx, tx, credit_i, rx, credit_o;
  flit_t data_out, data_in;

  serial_ip #(.MY_ADDR(16'h0000), .START_CYCLES(4)) dut (
    .clock(clk), .reset(reset), .rxd(rxd), .txd(txd), .start(start),
    .clock_tx(clock_tx), .tx(tx), .data_out(data_out), .credit_i(credit_i),
    .clock_rx(clk), .rx(rx), .data_in(data_in), .credit_o(credit_o));

  task automatic host_byte(input logic [7:0] b);
    rxd <= 1'b0; repeat (BT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (BT) @(posedge clk); end
    rxd <= 1'b1; repeat (BT + 2) @(posedge clk);
  endtask

  // NoC output
  flit_t obs[$];
  always @(posedge clk) if (!reset && tx && credit_i) obs.push_back(data_out);
  always @(negedge clk) credit_i = ($urandom_range(0, 2) != 0);

  int start_cycles = 0;
  always @(posedge clk) if (!reset && start) start_cycles++;

  // NoC input
  flit_t inq[$];
  always @(posedge clk) if (!reset && rx && credit_o) void'(inq.pop_front());
  always @(negedge clk) begin
    rx      = !reset && inq.size() > 0;
    data_in = inq.size() > 0 ? inq[0] : 16'h0;
  end

  // host receiver: decode txd at BT clocks per bit
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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t wd[3] = '{16'h1111, 16'hA5C3, 16'h0F0F};
    reset = 1; rxd = 1;
    repeat (5) @(posedge clk);
    reset <= 0;
    repeat (10) @(posedge clk);
    host_byte(8'h55);

    // Write 3 words to node 12 from address 0x0005
    host_byte(HOST_WRITE); host_byte(8'h12); host_byte(8'd3); host_byte(8'h00); host_byte(8'h05);
    for (int k = 0; k < 3; k++) begin host_byte(wd[k][15:8]); host_byte(wd[k][7:0]); end
    repeat (50) @(posedge clk);
    check(obs.size() == 18, $sformatf("three write packets, %0d flits", obs.size()));
    if (obs.size() == 18)
      for (int k = 0; k < 3; k++)
        check(obs[6*k] == 16'h0012 && obs[6*k+1] == 16'd4 && obs[6*k+2] == 16'h0000 &&
              obs[6*k+3] == CMD_WRITE && obs[6*k+4] == flit_t'(5 + k) && obs[6*k+5] == wd[k],
              $sformatf("write packet %0d", k));
    obs.delete();

    // Read 2 words of node 21 from 0x03F0
    host_byte(HOST_READ); host_byte(8'h21); host_byte(8'd2); host_byte(8'h03); host_byte(8'hF0);
    repeat (60) @(posedge clk);
    check(obs.size() == 10, $sformatf("two read packets, %0d flits", obs.size()));
    if (obs.size() == 10)
      for (int k = 0; k < 2; k++)
        check(obs[5*k] == 16'h0021 && obs[5*k+1] == 16'd3 && obs[5*k+2] == 16'h0000 &&
              obs[5*k+3] == CMD_READ && obs[5*k+4] == flit_t'(16'h03F0 + k), $sformatf("read packet %0d", k));
    obs.delete();

    // Start
    host_byte(HOST_START);
    repeat (20) @(posedge clk);
    check(start_cycles == 4, $sformatf("start high for %0d cycles", start_cycles));
    check(obs.size() == 0, "start sends no packet");

    // read returns (and one packet of another kind) from the NoC
    inq.push_back(16'h0000); inq.push_back(16'd3); inq.push_back(16'h0021); inq.push_back(CMD_READ_RET); inq.push_back(16'hABCD);
    inq.push_back(16'h0000); inq.push_back(16'd4); inq.push_back(16'h0021); inq.push_back(16'd7); inq.push_back(16'h1); inq.push_back(16'h2);
    inq.push_back(16'h0000); inq.push_back(16'd3); inq.push_back(16'h0012); inq.push_back(CMD_READ_RET); inq.push_back(16'h0102);
    repeat (60 * BT) @(posedge clk);
    check(got.size() == 4, $sformatf("four bytes to the host, got %0d", got.size()));
    if (got.size() == 4)
      check(got[0] == 8'hAB && got[1] == 8'hCD && got[2] == 8'h01 && got[3] == 8'h02, "read return bytes");
    check(inq.size() == 0, "all NoC input taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
