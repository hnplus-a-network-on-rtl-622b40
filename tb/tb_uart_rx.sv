// tb_uart_rx: the host sends the 0x55 sync byte at 13 clocks per bit, then
// random bytes. The receiver must measure a bit time of 13 (+-1), not
// deliver the sync byte, and deliver every following byte unchanged.
module tb_uart_rx;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int BT = 13;
  logic reset, rxd, locked, valid;
  logic [15:0] bit_time;
  logic [7:0] data;
  uart_rx dut (.*);

  logic [7:0] sent[$];
  int n_rx = 0;

  task automatic send_byte(input logic [7:0] b);
    rxd <= 1'b0; repeat (BT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (BT) @(posedge clk); end
    rxd <= 1'b1; repeat (BT + $urandom_range(0, 5)) @(posedge clk);
  endtask

  always @(posedge clk) if (!reset && valid) begin
    check(sent.size() > 0 && data == sent[0], $sformatf("byte %0d got %h", n_rx, data));
    if (sent.size() > 0) void'(sent.pop_front());
    n_rx++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; rxd = 1;
    repeat (5) @(posedge clk);
    reset <= 0;
    repeat (20) @(posedge clk);
    send_byte(8'h55);
    check(locked, "locked after sync");
    check(bit_time >= BT - 1 && bit_time <= BT + 1, $sformatf("bit time %0d", bit_time));
    check(n_rx == 0, "sync byte not delivered");
    for (int n = 0; n < 50; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      send_byte(b);
    end
    repeat (3 * BT) @(posedge clk);
    check(n_rx == 50, $sformatf("received %0d bytes", n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
