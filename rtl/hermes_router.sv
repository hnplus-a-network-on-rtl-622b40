// hermes_router: a five-port mesh router in the style of the Hermes NoC:
// East, West, North, South and Local ports, an input buffer per port, XY
// routing and wormhole switching.
//
// A packet is a target-address flit, a payload-size flit N and N further
// flits. When a target flit reaches the head of an input buffer the router
// picks the output by XY routing (first along X to the target column, then
// along Y; North is y+1) and asks that output's round-robin arbiter for it.
// Once granted, the input owns the output until its N+2 flits have passed,
// then releases it. Flits move when the source has one and the next hop's
// credit is high, so a blocked packet stalls in place along its path.
//
// Timing: a header that wins arbitration in a cycle is forwarded in the
// next cycle; after that one flit per cycle per connection. Inputs go
// through a buffer of BUF_DEPTH flits; credit_o is "buffer not full".
//
// The platform uses the Hermes-GLP router as it is; this is the simplest
// router with the same link packet and routing. It has no virtual lanes,
// no bi-synchronous link FIFOs and no priority-based clock selection;
// buffer depth and arbitration order are this design's choices.
module hermes_router
  import hnplus_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic                clk,
  input  logic                reset,
  input  logic  [NPORTS-1:0]  rx,
  input  flit_t [NPORTS-1:0]  data_in,
  output logic  [NPORTS-1:0]  credit_o,
  output logic  [NPORTS-1:0]  tx,
  output flit_t [NPORTS-1:0]  data_out,
  input  logic  [NPORTS-1:0]  credit_i
);

  typedef logic [2:0] pidx_t;

  // input buffers
  logic  [NPORTS-1:0] f_full, f_empty, f_rd;
  flit_t [NPORTS-1:0] f_dout;

  for (genvar i = 0; i < NPORTS; i++) begin : g_buf
    router_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk(clk), .reset(reset),
      .wr(rx[i]), .din(data_in[i]), .full(f_full[i]),
      .rd(f_rd[i]), .dout(f_dout[i]), .empty(f_empty[i])
    );
    assign credit_o[i] = !f_full[i];
  end

  // per-input connection state
  logic  [NPORTS-1:0] in_busy;      // connected to an output
  pidx_t [NPORTS-1:0] in_out;       // which output
  typedef enum logic [1:0] {PH_HDR, PH_SIZE, PH_BODY} phase_e;
  phase_e [NPORTS-1:0] in_ph;       // which flit of the packet is next
  flit_t [NPORTS-1:0] in_left;      // flits left after the size flit
  // per-output state
  logic  [NPORTS-1:0] out_busy;
  pidx_t [NPORTS-1:0] out_in;       // which input owns it
  pidx_t [NPORTS-1:0] rr;           // round-robin pointer

  // XY routing of the header at each input
  localparam int XI = int'(X);
  localparam int YI = int'(Y);
  function automatic pidx_t xy_route(input logic [7:0] target);
    int tx_, ty_;
    tx_ = int'(target[7:4]);
    ty_ = int'(target[3:0]);
    if (tx_ > XI)      return P_EAST;
    else if (tx_ < XI) return P_WEST;
    else if (ty_ > YI) return P_NORTH;
    else if (ty_ < YI) return P_SOUTH;
    else               return P_LOCAL;
  endfunction

  // requests: input i wants output o
  logic [NPORTS-1:0][NPORTS-1:0] req;   // [out][in]
  always_comb begin
    req = '0;
    for (int i = 0; i < NPORTS; i++) begin
      if (!in_busy[i] && !f_empty[i]) req[xy_route(f_dout[i][7:0])][i] = 1'b1;
    end
  end

  // round-robin grant per free output
  logic  [NPORTS-1:0] grant_v;
  pidx_t [NPORTS-1:0] grant_in;
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      grant_v[o]  = 1'b0;
      grant_in[o] = '0;
      if (!out_busy[o]) begin
        // the input after the last winner has the highest priority
        for (int k = NPORTS; k >= 1; k--) begin
          if (req[o][(int'(rr[o]) + k) % NPORTS]) begin
            grant_v[o]  = 1'b1;
            grant_in[o] = pidx_t'((int'(rr[o]) + k) % NPORTS);
          end
        end
      end
    end
  end

  // datapath: each busy output forwards its input's head flit
  always_comb begin
    f_rd = '0;
    for (int o = 0; o < NPORTS; o++) begin
      tx[o]       = out_busy[o] && !f_empty[out_in[o]];
      data_out[o] = f_dout[out_in[o]];
      if (tx[o] && credit_i[o]) f_rd[out_in[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      in_busy  <= '0;
      in_out   <= '0;
      in_ph    <= {NPORTS{PH_HDR}};
      in_left  <= '0;
      out_busy <= '0;
      out_in   <= '0;
      rr       <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (grant_v[o]) begin
          out_busy[o]           <= 1'b1;
          out_in[o]             <= grant_in[o];
          rr[o]                 <= grant_in[o];
          in_busy[grant_in[o]]  <= 1'b1;
          in_out[grant_in[o]]   <= pidx_t'(o);
          in_ph[grant_in[o]]    <= PH_HDR;
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (in_busy[i] && f_rd[i]) begin
          unique case (in_ph[i])
            PH_HDR:  in_ph[i] <= PH_SIZE;
            PH_SIZE: begin
              in_ph[i]   <= PH_BODY;
              in_left[i] <= f_dout[i];
              if (f_dout[i] == '0) begin
                in_busy[i]          <= 1'b0;
                out_busy[in_out[i]] <= 1'b0;
              end
            end
            default: begin
              in_left[i] <= in_left[i] - 1'b1;
              if (in_left[i] == flit_t'(1)) begin
                in_busy[i]          <= 1'b0;
                out_busy[in_out[i]] <= 1'b0;
              end
            end
          endcase
        end
      end
    end
  end

endmodule
