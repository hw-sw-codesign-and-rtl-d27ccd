// vc_alloc: virtual-channel allocator of a router.
//
// Every idle input VC whose front flit is a head asks for an output VC at
// the port in its route. There is one arbiter per output port, choosing
// among all NP*NVC input VCs that want that port; the winner is given the
// lowest-numbered free VC of the port. A port with no free VC grants
// nothing. So each output port hands out at most one VC per cycle. The
// arbiters are round robin or fixed priority (ROUND_ROBIN). Grants are
// combinational, so allocation, switch allocation and crossbar traversal
// fit in one router cycle; an arbiter's pointer moves when it grants.
module vc_alloc #(
  parameter int NP          = noc_pkg::NPORTS,
  parameter int NVC         = 2,
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [NVC-1:0]     req      [NP],   // [input port][vc]
  input  noc_pkg::port_e     req_port [NP][NVC],
  input  logic [NVC-1:0]     vc_free  [NP],   // [output port][vc]
  output logic [NVC-1:0]     gnt      [NP],   // [input port][vc]
  output logic [NVC-1:0]     gnt_vc   [NP],   // granted output VC id
  output logic [NP-1:0]      take,            // [output port] a VC is handed out
  output logic [NP-1:0]      take_id          // [output port] which one
);
  localparam int NR = NP * NVC;

  logic [NR-1:0] areq [NP];
  logic [NR-1:0] agnt [NP];
  logic [NP-1:0] any_free;
  logic [NP-1:0] free_id;

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      any_free[o] = |vc_free[o];
      free_id[o]  = 1'b0;
      for (int v = NVC - 1; v >= 0; v--) if (vc_free[o][v]) free_id[o] = 1'(v);
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NVC; v++)
          areq[o][i*NVC+v] = req[i][v] && int'(req_port[i][v]) == o && any_free[o];
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_arb
    rr_arbiter #(.N(NR), .ROUND_ROBIN(ROUND_ROBIN)) u_arb (
      .clk, .rst_n, .en,
      .req(areq[o]), .advance(|agnt[o]), .gnt(agnt[o])
    );
  end

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      gnt[i]    = '0;
      gnt_vc[i] = '0;
    end
    for (int o = 0; o < NP; o++) begin
      take[o]    = |agnt[o];
      take_id[o] = free_id[o];
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NVC; v++)
          if (agnt[o][i*NVC+v]) begin
            gnt[i][v]    = 1'b1;
            gnt_vc[i][v] = free_id[o];
          end
    end
  end
endmodule
