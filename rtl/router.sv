// router: five-port, single-stage virtual-channel router.
//
// Ports N, S, E, W and L (local). Each input port has an input unit with
// NVC VC FIFOs of DEPTH flits; each output port has an output unit with
// credit counters, VC state and optional delay registers. Route
// computation (done one hop ahead, see nrc), VC allocation, switch
// allocation and crossbar traversal all happen in the same network cycle:
// a flit at the front of a FIFO leaves in the cycle it gets both grants and
// is held in the output register for the next cycle, when it crosses the
// link into the neighbour's FIFO. A hop therefore costs two cycles plus
// DELAY. Flow control is credit based on every port; the local input is fed
// from outside using the exported full flags of its VCs instead.
//
// NVC is 1 or 2 because the flit carries a one-bit VC identifier. Ports
// that point out of the mesh are simply left unconnected (tied idle); X-Y
// routing never selects them, so synthesis removes their logic.
// All state changes when 'en' (the emulation clock tick) is high.
module router #(
  parameter int X           = 0,
  parameter int Y           = 0,
  parameter int NVC         = 2,
  parameter int DEPTH       = 8,
  parameter int DELAY       = 0,
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  noc_pkg::link_t   in         [noc_pkg::NPORTS],
  output noc_pkg::credit_t credit_out [noc_pkg::NPORTS],
  output noc_pkg::link_t   out        [noc_pkg::NPORTS],
  input  noc_pkg::credit_t credit_in  [noc_pkg::NPORTS],
  output logic [NVC-1:0]   local_vc_full
);
  import noc_pkg::*;
  localparam int NP = NPORTS;

  if (NVC < 1 || NVC > 2) begin : g_bad_nvc
    $error("router: NVC must be 1 or 2 (one VCID bit in the flit)");
  end

  logic [NVC-1:0] va_req [NP], active [NP], out_vc [NP], has_flit [NP], vc_full [NP];
  port_e          req_port [NP][NVC];
  logic [NVC-1:0] va_gnt [NP], va_vc [NP], deq [NP], sa_req [NP];
  logic [NP-1:0]  take, take_id;
  logic [NVC-1:0] credit_ok [NP], vc_free [NP];
  logic [NP-1:0]  xsel [NP];
  flit_t          xin  [NP];
  link_t          xout [NP];

  for (genvar p = 0; p < NP; p++) begin : g_in
    input_unit #(.X(X), .Y(Y), .NVC(NVC), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n, .en,
      .in        (in[p]),
      .credit_out(credit_out[p]),
      .vc_full   (vc_full[p]),
      .va_req    (va_req[p]),
      .req_port  (req_port[p]),
      .active    (active[p]),
      .out_vc    (out_vc[p]),
      .has_flit  (has_flit[p]),
      .va_gnt    (va_gnt[p]),
      .va_vc     (va_vc[p]),
      .deq       (deq[p]),
      .out_flit  (xin[p])
    );
  end
  assign local_vc_full = vc_full[P_L];

  vc_alloc #(.NP(NP), .NVC(NVC), .ROUND_ROBIN(ROUND_ROBIN)) u_va (
    .clk, .rst_n, .en,
    .req(va_req), .req_port, .vc_free,
    .gnt(va_gnt), .gnt_vc(va_vc), .take, .take_id
  );

  // A VC may compete for the switch if it holds an output VC, or is being
  // granted one now, and that output VC has a credit left.
  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NVC; v++)
        if (active[p][v])
          sa_req[p][v] = has_flit[p][v] && credit_ok[req_port[p][v]][out_vc[p][v]];
        else
          sa_req[p][v] = va_gnt[p][v] && credit_ok[req_port[p][v]][va_vc[p][v]];
  end

  sw_alloc #(.NP(NP), .NVC(NVC), .ROUND_ROBIN(ROUND_ROBIN)) u_sa (
    .clk, .rst_n, .en, .req(sa_req), .req_port, .deq, .sel(xsel)
  );

  crossbar #(.N(NP)) u_xbar (.in_flit(xin), .sel(xsel), .out(xout));

  for (genvar p = 0; p < NP; p++) begin : g_out
    output_unit #(.NVC(NVC), .DEPTH(DEPTH), .DELAY(DELAY)) u_out (
      .clk, .rst_n, .en,
      .xbar_in   (xout[p]),
      .credit_in (credit_in[p]),
      .vc_take   (take[p]),
      .vc_take_id(take_id[p]),
      .credit_ok (credit_ok[p]),
      .vc_free   (vc_free[p]),
      .out       (out[p])
    );
  end
endmodule
