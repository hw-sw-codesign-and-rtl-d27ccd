// delay_unit: programmable delay registers on a router output.
//
// A chain of STAGES registers that holds back a valid flit before it
// reaches the physical link, so that a deeper router pipeline or a slower
// link can be emulated without changing the router. STAGES is fixed when
// the network is built. The baseline network uses none: routers
// instantiate this unit with STAGES = 0, where the flit passes straight
// through. The module's own default of one stage is only a standalone
// default. Every stage moves only on an emulation
// clock tick ('en'), so the added latency is exactly STAGES network cycles
// and the throughput stays one flit per cycle.
module delay_unit #(
  parameter int STAGES = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  noc_pkg::link_t in,
  output noc_pkg::link_t out
);
  generate
    if (STAGES == 0) begin : g_none
      assign out = in;
    end else begin : g_regs
      noc_pkg::link_t pipe [STAGES];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < STAGES; i++) pipe[i] <= '0;
        end else if (en) begin
          pipe[0] <= in;
          for (int i = 1; i < STAGES; i++) pipe[i] <= pipe[i-1];
        end
      end
      assign out = pipe[STAGES-1];
    end
  endgenerate
endmodule
