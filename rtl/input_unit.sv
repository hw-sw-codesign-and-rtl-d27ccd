// input_unit: one router input port.
//
// Incoming flits are written into the VC FIFO named by their VCID bit. For
// each VC the unit keeps the state of the packet in flight: whether it
// holds an output VC ("active"), the output port R it was routed to and the
// output VC O it was given. A head flit at the front of an idle VC asks the
// VC allocator for an output VC at the port in its CNOP field; once it has
// one, every flit of the packet asks the switch allocator for R. When a flit
// leaves, its VCID is rewritten to the output VC and, for a head flit, CNOP
// is rewritten with the port the next router must use, which the next-hop
// route computation (nrc) works out one hop ahead. The tail flit releases
// the VC state.
//
// Each dequeued flit sends one credit, registered, back to the upstream
// router (credit-based flow control). The per-VC full flags are exported so
// that the local port can be fed without credits, from a status register.
// All state changes on emulation clock ticks ('en').
module input_unit #(
  parameter int X     = 0,
  parameter int Y     = 0,
  parameter int NVC   = 2,
  parameter int DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  noc_pkg::link_t      in,
  output noc_pkg::credit_t    credit_out,
  output logic [NVC-1:0]      vc_full,
  // to the allocators
  output logic [NVC-1:0]      va_req,      // idle VC with a head flit waiting
  output noc_pkg::port_e      req_port [NVC], // output port wanted by each VC
  output logic [NVC-1:0]      active,      // VC holds an output VC
  output logic [NVC-1:0]      out_vc,      // output VC held (valid when active)
  output logic [NVC-1:0]      has_flit,
  // from the allocators
  input  logic [NVC-1:0]      va_gnt,
  input  logic [NVC-1:0]      va_vc,       // output VC granted to each VC
  input  logic [NVC-1:0]      deq,         // one-hot: VC that won the switch
  output noc_pkg::flit_t      out_flit     // rewritten flit of the winning VC
);
  import noc_pkg::*;

  flit_t head  [NVC];
  port_e nport [NVC];
  port_e r_q   [NVC];
  logic [NVC-1:0] empty;

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    vc_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .en,
      .wr     (in.valid && in.flit.vcid == 1'(v)),
      .wr_flit(in.flit),
      .rd     (deq[v]),
      .rd_flit(head[v]),
      .empty  (empty[v]),
      .full   (vc_full[v]),
      .count  ()
    );

    nrc #(.X(X), .Y(Y)) u_nrc (
      .out_port (head[v].cnop),
      .dst_x    (head[v].dst_x),
      .dst_y    (head[v].dst_y),
      .next_port(nport[v])
    );

    assign has_flit[v] = !empty[v];
    assign va_req[v]   = !empty[v] && !active[v] && is_head(head[v]);
    assign req_port[v] = active[v] ? r_q[v] : head[v].cnop;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active[v] <= 1'b0;
        out_vc[v] <= 1'b0;
        r_q[v]    <= P_N;
      end else if (en) begin
        if (va_gnt[v]) begin
          active[v] <= 1'b1;
          out_vc[v] <= va_vc[v];
          r_q[v]    <= head[v].cnop;
        end
        if (deq[v] && is_tail(head[v])) active[v] <= 1'b0;
      end
    end
  end

  // Flit leaving through the crossbar, with VCID and CNOP rewritten.
  always_comb begin
    out_flit = head[0];
    for (int v = 0; v < NVC; v++) begin
      if (deq[v]) begin
        out_flit      = head[v];
        out_flit.vcid = active[v] ? out_vc[v] : va_vc[v];
        if (is_head(head[v])) out_flit.cnop = nport[v];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else if (en) begin
      credit_out.valid <= |deq;
      credit_out.vc    <= 1'b0;
      for (int v = 0; v < NVC; v++) if (deq[v]) credit_out.vc <= 1'(v);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(deq));
  assert property (@(posedge clk) disable iff (!rst_n) (deq & ~(active | va_gnt)) == '0);
endmodule
