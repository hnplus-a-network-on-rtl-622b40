// tb_bisync_fifo: writer and reader on unrelated clocks (10 ns and 14 ns),
// both stalling at random. Every word read must be the next word written
// (checked against a queue), no write may be lost while full is low, and
// full must be seen at least once.
module tb_bisync_fifo;
  logic wclk = 1'b0, rclk = 1'b0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic reset, wr, rd, full, empty;
  logic [15:0] din, dout;
  bisync_fifo #(.WIDTH(16), .DEPTH_LOG2(2)) dut (.*);

  logic [15:0] q[$];
  int n_written = 0, n_read = 0, n_full = 0;
  localparam int TOTAL = 500;

  initial begin
    repeat (40000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; wr = 0; din = 0;
    repeat (4) @(posedge wclk);
    reset <= 0;
    while (n_written < TOTAL) begin
      @(posedge wclk);
      if (wr && !full) begin q.push_back(din); n_written++; end
      if (full) n_full++;
      wr  <= ($urandom_range(0, 3) != 0) && (n_written < TOTAL);
      din <= 16'($urandom);
    end
    wr <= 0;
  end

  initial begin
    rd = 0;
    @(negedge reset);
    while (n_read < TOTAL) begin
      @(posedge rclk);
      if (rd && !empty) begin
        check(q.size() > 0 && dout == q[0], $sformatf("word %0d got %h", n_read, dout));
        if (q.size() > 0) void'(q.pop_front());
        n_read++;
      end
      // read slowly at first so the FIFO fills up, then fast
      rd <= (n_read < 100) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 4) != 0);
    end
    check(n_full > 0, "full was reached");
    repeat (5) @(posedge rclk);
    check(empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
