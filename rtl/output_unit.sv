// output_unit: one router output port.
//
// Keeps, for every VC of the downstream input port, a credit counter (free
// buffer slots downstream, reset to DEPTH) and a busy flag (VC allocated to
// a packet). A flit sent through the crossbar takes one credit of its VC and
// a credit arriving on the reverse link gives one back; the switch
// allocator only sends on a VC whose counter is above zero. The busy flag
// is set when the VC allocator hands the VC out and cleared when the
// packet's tail flit leaves. The crossbar output is registered here (the
// end of the single router stage) and then passes through the programmable
// delay registers before reaching the link. State changes on 'en' ticks.
module output_unit #(
  parameter int NVC    = 2,
  parameter int DEPTH  = 8,
  parameter int DELAY  = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  noc_pkg::link_t   xbar_in,
  input  noc_pkg::credit_t credit_in,
  input  logic             vc_take,     // VC allocator hands out a VC here
  input  logic             vc_take_id,
  output logic [NVC-1:0]   credit_ok,   // counter above zero
  output logic [NVC-1:0]   vc_free,
  output noc_pkg::link_t   out
);
  import noc_pkg::*;
  localparam int CW = $clog2(DEPTH + 1);

  logic [CW-1:0] credits [NVC];
  logic [NVC-1:0] busy;
  link_t out_q;

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic take_c, give_c;
    assign take_c       = xbar_in.valid && xbar_in.flit.vcid == 1'(v);
    assign give_c       = credit_in.valid && credit_in.vc == 1'(v);
    assign credit_ok[v] = credits[v] != '0;
    assign vc_free[v]   = !busy[v];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        credits[v] <= CW'(DEPTH);
        busy[v]    <= 1'b0;
      end else if (en) begin
        credits[v] <= credits[v] - CW'(take_c) + CW'(give_c);
        if (vc_take && vc_take_id == 1'(v)) busy[v] <= 1'b1;
        if (take_c && is_tail(xbar_in.flit)) busy[v] <= 1'b0;
      end
    end

    assert property (@(posedge clk) disable iff (!rst_n) en && take_c |-> credits[v] != '0);
    assert property (@(posedge clk) disable iff (!rst_n) en && give_c |-> credits[v] != CW'(DEPTH) || take_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out_q <= '0;
    else if (en) out_q <= xbar_in;
  end

  delay_unit #(.STAGES(DELAY)) u_delay (.clk, .rst_n, .en, .in(out_q), .out);
endmodule
