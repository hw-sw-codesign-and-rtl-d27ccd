// noc_mesh: MESH_X x MESH_Y 2D mesh of routers (5x5 in the baseline).
//
// Router (x,y) sits at column x, row y; its E port links to the W port of
// (x+1,y) and its N port to the S port of (x,y+1). Every link is a 32-bit
// flit channel with a valid strobe in one direction and a dedicated credit
// channel in the other. Links are plain wires: a flit leaves a router's
// output register and is written into the neighbour's VC FIFO at the next
// tick, so a link takes one network cycle unless the routers add delay
// registers. Ports on the mesh edge are tied idle. The local ports of all
// routers are brought out, indexed by node number n = y*MESH_X + x: the
// injection side uses the VC full flags, the ejection side takes a credit
// back for every flit it receives.
module noc_mesh #(
  parameter int MESH_X      = 5,
  parameter int MESH_Y      = 5,
  parameter int NVC         = 2,
  parameter int DEPTH       = 8,
  parameter int DELAY       = 0,
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  noc_pkg::link_t   inj       [MESH_X*MESH_Y],
  output logic [NVC-1:0]   inj_full  [MESH_X*MESH_Y],
  output noc_pkg::link_t   ej        [MESH_X*MESH_Y],
  input  noc_pkg::credit_t ej_credit [MESH_X*MESH_Y]
);
  import noc_pkg::*;
  localparam int NN = MESH_X * MESH_Y;

  link_t   rin  [NN][NPORTS];
  link_t   rout [NN][NPORTS];
  credit_t cin  [NN][NPORTS];
  credit_t cout [NN][NPORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      router #(.X(x), .Y(y), .NVC(NVC), .DEPTH(DEPTH), .DELAY(DELAY),
               .ROUND_ROBIN(ROUND_ROBIN)) u_router (
        .clk, .rst_n, .en,
        .in(rin[N]), .credit_out(cout[N]), .out(rout[N]), .credit_in(cin[N]),
        .local_vc_full(inj_full[N])
      );

      // local port
      assign rin[N][P_L] = inj[N];
      assign ej[N]       = rout[N][P_L];
      assign cin[N][P_L] = ej_credit[N];

      // east / west
      if (x < MESH_X - 1) begin : g_e
        assign rin[N][P_E] = rout[N+1][P_W];
        assign cin[N][P_E] = cout[N+1][P_W];
      end else begin : g_e_edge
        assign rin[N][P_E] = '0;
        assign cin[N][P_E] = '0;
      end
      if (x > 0) begin : g_w
        assign rin[N][P_W] = rout[N-1][P_E];
        assign cin[N][P_W] = cout[N-1][P_E];
      end else begin : g_w_edge
        assign rin[N][P_W] = '0;
        assign cin[N][P_W] = '0;
      end
      // north / south
      if (y < MESH_Y - 1) begin : g_n
        assign rin[N][P_N] = rout[N+MESH_X][P_S];
        assign cin[N][P_N] = cout[N+MESH_X][P_S];
      end else begin : g_n_edge
        assign rin[N][P_N] = '0;
        assign cin[N][P_N] = '0;
      end
      if (y > 0) begin : g_s
        assign rin[N][P_S] = rout[N-MESH_X][P_N];
        assign cin[N][P_S] = cout[N-MESH_X][P_N];
      end else begin : g_s_edge
        assign rin[N][P_S] = '0;
        assign cin[N][P_S] = '0;
      end
    end
  end

  // A flit must never be sent off the edge of the mesh.
  for (genvar n = 0; n < NN; n++) begin : g_chk
    if (n % MESH_X == MESH_X - 1) begin : g_ce
      assert property (@(posedge clk) disable iff (!rst_n) !rout[n][P_E].valid);
    end
    if (n % MESH_X == 0) begin : g_cw
      assert property (@(posedge clk) disable iff (!rst_n) !rout[n][P_W].valid);
    end
    if (n / MESH_X == MESH_Y - 1) begin : g_cn
      assert property (@(posedge clk) disable iff (!rst_n) !rout[n][P_N].valid);
    end
    if (n / MESH_X == 0) begin : g_cs
      assert property (@(posedge clk) disable iff (!rst_n) !rout[n][P_S].valid);
    end
  end
endmodule
