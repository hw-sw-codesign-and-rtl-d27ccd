// sw_alloc: switch allocator of a router (separable, input first).
//
// Stage one: each input port picks one of its VCs that is ready to send
// (it holds, or is being granted, an output VC with a credit left). Stage
// two: each output port picks one of the input ports whose chosen VC wants
// it. The result is a one-hot crossbar select per output port and a one-hot
// dequeue per input port, so every input and every output moves at most one
// flit per cycle. Arbiters are round robin or fixed priority; a first-stage
// arbiter only moves its pointer when its choice also won the second stage.
// Purely combinational apart from the arbiter pointers.
module sw_alloc #(
  parameter int NP          = noc_pkg::NPORTS,
  parameter int NVC         = 2,
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [NVC-1:0]  req      [NP],     // [input port][vc] ready to send
  input  noc_pkg::port_e  req_port [NP][NVC],
  output logic [NVC-1:0]  deq      [NP],     // [input port] winning VC, one-hot
  output logic [NP-1:0]   sel      [NP]      // [output port][input port]
);
  logic [NVC-1:0] vgnt [NP];
  logic [NP-1:0]  oreq [NP];
  logic [NP-1:0]  won;

  for (genvar i = 0; i < NP; i++) begin : g_in
    rr_arbiter #(.N(NVC), .ROUND_ROBIN(ROUND_ROBIN)) u_arb (
      .clk, .rst_n, .en, .req(req[i]), .advance(won[i]), .gnt(vgnt[i])
    );
  end

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++) begin
        oreq[o][i] = 1'b0;
        for (int v = 0; v < NVC; v++)
          if (vgnt[i][v] && int'(req_port[i][v]) == o) oreq[o][i] = 1'b1;
      end
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    rr_arbiter #(.N(NP), .ROUND_ROBIN(ROUND_ROBIN)) u_arb (
      .clk, .rst_n, .en, .req(oreq[o]), .advance(|sel[o]), .gnt(sel[o])
    );
  end

  always_comb begin
    won = '0;
    for (int o = 0; o < NP; o++) won |= sel[o];
    for (int i = 0; i < NP; i++) deq[i] = won[i] ? vgnt[i] : '0;
  end
endmodule
