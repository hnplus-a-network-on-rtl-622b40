// tb_tg_memory: writes random words through port B, then reads every
// written address back through both ports and compares with a model array.
// Also checks the one-cycle read latency and that a disabled port B keeps
// its output.
module tb_tg_memory;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [9:0]  a_addr, b_addr;
  logic [15:0] a_dout, b_dout, b_din;
  logic        b_en, b_we;

  tg_memory #(.WORDS(1024), .WIDTH(16)) dut (.*);

  logic [15:0] model [1024];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b_en = 0; b_we = 0; b_addr = 0; b_din = 0; a_addr = 0;
    for (int i = 0; i < 1024; i++) model[i] = 16'h0000;
    @(posedge clk);
    // contents start at zero
    for (int i = 0; i < 1024; i += 97) begin
      a_addr <= 10'(i);
      @(posedge clk); #1;
      check(a_dout == 16'h0000, $sformatf("initial zero at %0d", i));
    end
    // random writes
    for (int i = 0; i < 600; i++) begin
      int ad;
      logic [15:0] d;
      ad = $urandom_range(0, 1023);
      d  = 16'($urandom);
      b_en <= 1; b_we <= 1; b_addr <= 10'(ad); b_din <= d;
      model[ad] = d;
      @(posedge clk);
    end
    b_en <= 0; b_we <= 0;
    @(posedge clk);
    // read back through both ports
    for (int i = 0; i < 1024; i++) begin
      a_addr <= 10'(i); b_addr <= 10'(1023 - i); b_en <= 1;
      @(posedge clk); #1;
      check(a_dout == model[i], $sformatf("port A addr %0d got %h exp %h", i, a_dout, model[i]));
      check(b_dout == model[1023 - i], $sformatf("port B addr %0d", 1023 - i));
    end
    // port B disabled keeps its last output
    b_en <= 0; b_addr <= 10'd5;
    @(posedge clk); #1;
    check(b_dout == model[0], "port B holds when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
