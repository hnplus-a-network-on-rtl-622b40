// tb_cycle_counter: the counter must stay at zero until start, read 0 the
// cycle after a start pulse, then add one per clock; a second start
// restarts it from zero.
module tb_cycle_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic reset, start;
  logic [63:0] count;
  cycle_counter #(.WIDTH(64)) dut (.clk(clk), .reset(reset), .start(start), .count(count));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    repeat (10) begin
      @(posedge clk); #1;
      check(count == 0, "stopped before start");
    end
    start <= 1;
    @(posedge clk); start <= 0; #1;
    check(count == 0, "zero after start");
    for (int k = 1; k <= 200; k++) begin
      @(posedge clk); #1;
      check(count == 64'(k), $sformatf("count %0d exp %0d", count, k));
    end
    start <= 1;
    @(posedge clk); start <= 0; #1;
    check(count == 0, "restart clears");
    repeat (7) @(posedge clk); #1;
    check(count == 7, "counts after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
