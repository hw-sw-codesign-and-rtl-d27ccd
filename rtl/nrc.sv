// nrc: next-hop route computation for X-Y dimension-ordered routing.
//
// The head flit arriving at a router already carries, in its CNOP field,
// the output port it must take here (the traffic generator fills it in for
// the source router). This unit looks one hop ahead: given the port the
// packet leaves by and its destination, it works out the neighbour the
// packet will reach and the port that neighbour must use, so the router can
// rewrite CNOP before the flit leaves. Routing itself is X first, then Y,
// then local ejection. The unit is purely combinational. A packet leaving
// by the local port keeps P_L.
module nrc #(
  parameter int X = 0,   // coordinates of the router holding this unit
  parameter int Y = 0
) (
  input  noc_pkg::port_e              out_port,  // port taken at this router
  input  logic [noc_pkg::COORD_W-1:0] dst_x,
  input  logic [noc_pkg::COORD_W-1:0] dst_y,
  output noc_pkg::port_e              next_port  // port to take at the next router
);
  import noc_pkg::*;
  localparam logic [COORD_W-1:0] CX = COORD_W'(X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(Y);

  logic [COORD_W-1:0] nx, ny;

  always_comb begin
    nx = CX;
    ny = CY;
    unique case (out_port)
      P_N:     ny = CY + 1'b1;
      P_S:     ny = CY - 1'b1;
      P_E:     nx = CX + 1'b1;
      P_W:     nx = CX - 1'b1;
      default: ;
    endcase
    next_port = (out_port == P_L) ? P_L : xy_route(nx, ny, dst_x, dst_y);
  end
endmodule
