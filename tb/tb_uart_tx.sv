// tb_uart_tx: sends random bytes at a bit time of 9 clocks and decodes txd
// in the middle of each bit: start bit low, eight data bits LSB first, stop
// bit high, and busy for exactly ten bit times.
module tb_uart_tx;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int BT = 9;
  logic reset, send, busy, txd;
  logic [7:0] data;
  logic [15:0] bit_time;
  uart_tx dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; send = 0; data = 0; bit_time = 16'(BT);
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk); #1;
    check(txd == 1'b1, "idle high");
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b, got;
      int busy_cycles;
      b = 8'($urandom);
      @(posedge clk);
      send <= 1; data <= b;
      @(posedge clk);
      send <= 0;
      // txd went low at this edge; sample mid bits
      repeat (BT / 2) @(posedge clk);
      #1 check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BT) @(posedge clk);
        #1 got[i] = txd;
      end
      repeat (BT) @(posedge clk);
      #1 check(txd == 1'b1, "stop bit");
      check(got == b, $sformatf("byte got %h exp %h", got, b));
      busy_cycles = 9 * BT + BT / 2;
      while (busy) begin @(posedge clk); busy_cycles++; #1; end
      check(busy_cycles >= 10 * BT - 1 && busy_cycles <= 10 * BT + 1,
            $sformatf("frame length %0d", busy_cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
