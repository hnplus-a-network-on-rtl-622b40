// tb_hermes_router: a router at (1,1) with traffic on all five inputs and
// random back-pressure on all five outputs. Each packet carries its input
// port and a sequence number. Checked: every packet leaves by the port XY
// routing selects (X first, then Y), whole and without another packet's
// flits inside it (wormhole), in order per input, and none is lost. Also
// counted: inputs held off by a full buffer, and cycles in which two
// packets waited for the same output (arbitration); both must occur.
module tb_hermes_router;
  import hnplus_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic reset;
  logic  [NPORTS-1:0] rx, credit_o, tx, credit_i;
  flit_t [NPORTS-1:0] data_in, data_out;

  hermes_router #(.X(1), .Y(1), .BUF_DEPTH(4)) dut (.*);

  localparam int NPKT = 60;   // per input
  flit_t pk[NPORTS][$];       // flits still to send per input
  int    sent_pk[NPORTS];
  int    n_backpressure = 0, n_contention = 0, n_done = 0;

  function automatic int route(input flit_t t);
    if (t[7:4] > 4'd1) return P_EAST;
    if (t[7:4] < 4'd1) return P_WEST;
    if (t[3:0] > 4'd1) return P_NORTH;
    if (t[3:0] < 4'd1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  flit_t targets[7] = '{16'h0021, 16'h0001, 16'h0012, 16'h0010, 16'h0011, 16'h0022, 16'h0000};

  // build all packets up front
  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      for (int s = 0; s < NPKT; s++) begin
        flit_t t;
        int n;
        // inputs do not send back where they came from
        do t = targets[$urandom_range(0, 6)]; while (route(t) == i);
        n = 2 + $urandom_range(0, 6);
        pk[i].push_back(t);
        pk[i].push_back(flit_t'(n));
        pk[i].push_back(flit_t'((i << 12) | s));
        for (int k = 1; k < n; k++) pk[i].push_back(flit_t'(16'hC000 | (k << 8) | s));
      end
    end
  end

  // senders
  always @(posedge clk) begin
    if (!reset) begin
      for (int i = 0; i < NPORTS; i++) begin
        if (rx[i] && credit_o[i]) void'(pk[i].pop_front());
        if (rx[i] && !credit_o[i]) n_backpressure++;
      end
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      rx[i]      = !reset && pk[i].size() > 0 && ($urandom_range(0, 7) != 0);
      data_in[i] = pk[i].size() > 0 ? pk[i][0] : 16'h0;
      credit_i[i] = ($urandom_range(0, 3) != 0);
    end
  end

  // receivers: one packet at a time per output
  int    r_left[NPORTS], r_idx[NPORTS];
  flit_t r_tgt[NPORTS], r_tag[NPORTS];
  int    last_seq[NPORTS][NPORTS];
  always @(posedge clk) begin
    if (!reset) begin
      for (int o = 0; o < NPORTS; o++) begin
        if (tx[o] && credit_i[o]) begin
          flit_t f;
          f = data_out[o];
          if (r_idx[o] == 0) begin
            r_tgt[o] = f;
            check(route(f) == o, $sformatf("target %h left by port %0d", f, o));
          end else if (r_idx[o] == 1) begin
            r_left[o] = int'(f);
          end else if (r_idx[o] == 2) begin
            r_tag[o] = f;
            begin
              int src, s;
              src = int'(f[14:12]); s = int'(f[11:0]);
              check(src < NPORTS && s == last_seq[src][o] + 1 || (src < NPORTS && s > last_seq[src][o]),
                    $sformatf("order from input %0d at output %0d", src, o));
              if (src < NPORTS) last_seq[src][o] = s;
            end
          end else begin
            check(f == flit_t'(16'hC000 | ((r_idx[o] - 2) << 8) | int'(r_tag[o][11:0])),
                  $sformatf("body flit %0d at output %0d", r_idx[o], o));
          end
          r_idx[o]++;
          if (r_idx[o] >= 2 && r_idx[o] == r_left[o] + 2) begin
            r_idx[o] = 0;
            n_done++;
          end
        end
      end
    end
  end

  // arbitration events: two input heads showing headers for one free output
  // is not visible from outside, so count cycles in which an output moves
  // a flit while another input with traffic for it is held off
  always @(posedge clk) begin
    if (!reset) begin
      int want[NPORTS];
      for (int o = 0; o < NPORTS; o++) want[o] = 0;
      for (int i = 0; i < NPORTS; i++) if (rx[i] && !credit_o[i] && pk[i].size() > 0) want[route(pk[i][0])]++;
      for (int o = 0; o < NPORTS; o++) if (tx[o] && want[o] > 0) n_contention++;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NPORTS; a++) begin
      r_idx[a] = 0; r_left[a] = 0;
      for (int b = 0; b < NPORTS; b++) last_seq[a][b] = -1;
    end
    reset = 1;
    repeat (4) @(posedge clk);
    reset <= 0;
    wait (n_done == NPORTS * NPKT);
    repeat (10) @(posedge clk);
    check(n_done == NPORTS * NPKT, "all packets delivered");
    check(n_backpressure > 0, $sformatf("back-pressure events %0d", n_backpressure));
    check(n_contention > 0, $sformatf("contention events %0d", n_contention));
    $display("packets %0d back-pressure %0d contention %0d", n_done, n_backpressure, n_contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
