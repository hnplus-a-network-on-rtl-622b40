// tb_noc_mesh: the 3x3 mesh with every local port sending packets to random
// nodes (itself included) and every local port accepting with random
// back-pressure. Checked: each packet reaches the local port of its target
// node whole, with no foreign flit inside it, in order per source, and none
// is lost. The longest corner-to-corner trip must take longer than a
// one-hop trip.
module tb_noc_mesh;
  import hnplus_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 9;
  logic reset;
  logic  [N-1:0] l_rx, l_credit_o, l_tx, l_credit_i;
  flit_t [N-1:0] l_din, l_dout;

  noc_mesh #(.MESH_X(3), .MESH_Y(3), .BUF_DEPTH(4)) dut (.*);

  localparam int NPKT = 40;
  flit_t pk[N][$];
  int    n_done = 0;

  function automatic flit_t addr_of(input int n);
    return flit_t'(((n / 3) << 4) | (n % 3));
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      for (int s = 0; s < NPKT; s++) begin
        int t, n;
        t = $urandom_range(0, N - 1);
        n = 2 + $urandom_range(0, 5);
        pk[i].push_back(addr_of(t));
        pk[i].push_back(flit_t'(n));
        pk[i].push_back(flit_t'((i << 8) | s));
        for (int k = 1; k < n; k++) pk[i].push_back(flit_t'(16'hD000 | (k << 8) | s));
      end
    end
  end

  always @(posedge clk) if (!reset)
    for (int i = 0; i < N; i++) if (l_rx[i] && l_credit_o[i]) void'(pk[i].pop_front());

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      l_rx[i]       = !reset && pk[i].size() > 0 && ($urandom_range(0, 3) != 0);
      l_din[i]      = pk[i].size() > 0 ? pk[i][0] : 16'h0;
      l_credit_i[i] = ($urandom_range(0, 4) != 0);
    end
  end

  int    r_left[N], r_idx[N], last_seq[N][N];
  flit_t r_tag[N];
  always @(posedge clk) if (!reset) begin
    for (int o = 0; o < N; o++) begin
      if (l_tx[o] && l_credit_i[o]) begin
        flit_t f;
        f = l_dout[o];
        if (r_idx[o] == 0) check(f == addr_of(o), $sformatf("packet for %h delivered at node %0d", f, o));
        else if (r_idx[o] == 1) r_left[o] = int'(f);
        else if (r_idx[o] == 2) begin
          int src, s;
          r_tag[o] = f;
          src = int'(f[15:8]); s = int'(f[7:0]);
          check(src < N && s > last_seq[src][o], $sformatf("order %0d->%0d", src, o));
          if (src < N) last_seq[src][o] = s;
        end else
          check(f == flit_t'(16'hD000 | ((r_idx[o] - 2) << 8) | int'(r_tag[o][7:0])), "body flit");
        r_idx[o]++;
        if (r_idx[o] >= 2 && r_idx[o] == r_left[o] + 2) begin r_idx[o] = 0; n_done++; end
      end
    end
  end

  // latency of a single packet on an idle mesh
  task automatic lone_trip(input int from, input int to, output int cycles);
    int t0;
    pk[from].push_back(addr_of(to)); pk[from].push_back(16'd2);
    pk[from].push_back(flit_t'((from << 8) | 200)); pk[from].push_back(16'hD1C8);
    t0 = 0;
    while (r_idx[to] == 0) begin @(posedge clk); t0++; end
    cycles = t0;
    while (r_idx[to] != 0) @(posedge clk);
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int near, far;
    for (int a = 0; a < N; a++) begin
      r_idx[a] = 0; r_left[a] = 0;
      for (int b = 0; b < N; b++) last_seq[a][b] = -1;
    end
    reset = 1;
    repeat (4) @(posedge clk);
    reset <= 0;
    wait (n_done == N * NPKT);
    repeat (10) @(posedge clk);
    check(n_done == N * NPKT, "all packets delivered");
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) last_seq[a][b] = -1;
    lone_trip(1, 2, near);
    lone_trip(0, 8, far);
    check(far > near, $sformatf("corner-to-corner %0d cycles, one hop %0d", far, near));
    $display("delivered %0d, one hop %0d cycles, four hops %0d cycles", n_done, near, far);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
