// crossbar: the router's NPORTS x NPORTS flit switch.
//
// Each output port takes the flit of the input port named by its one-hot
// select from the switch allocator; an output with no select bit set is
// idle (valid low). Several outputs can be connected at once, one input each.
// Purely combinational; the flit is registered in the output unit.
module crossbar #(
  parameter int N = noc_pkg::NPORTS
) (
  input  noc_pkg::flit_t     in_flit [N],
  input  logic [N-1:0]       sel     [N],   // sel[o][i]: input i drives output o
  output noc_pkg::link_t     out     [N]
);
  always_comb begin
    for (int o = 0; o < N; o++) begin
      out[o] = '0;
      for (int i = 0; i < N; i++)
        if (sel[o][i]) begin
          out[o].valid = 1'b1;
          out[o].flit  = in_flit[i];
        end
    end
  end
endmodule
