// vc_fifo: one virtual-channel flit buffer of an input unit.
//
// A synchronous first-in first-out queue of DEPTH flits (8 in the baseline
// network). The head flit is visible combinationally on rd_flit while
// 'empty' is low; a read and a write may happen in the same enabled cycle.
// All state changes only in cycles where 'en' (the emulation clock tick) is
// high. Writing when full is a protocol error: credit flow control upstream
// guarantees it never happens, and an assertion checks it.
module vc_fifo #(
  parameter int DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          wr,
  input  noc_pkg::flit_t wr_flit,
  input  logic          rd,
  output noc_pkg::flit_t rd_flit,
  output logic          empty,
  output logic          full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);
  noc_pkg::flit_t mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_flit = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (en && wr) mem[wp] <= wr_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (en) begin
      if (wr) wp <= inc(wp);
      if (rd) rp <= inc(rp);
      count <= count + CW'(wr) - CW'(rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) en && wr |-> !full || rd);
  assert property (@(posedge clk) disable iff (!rst_n) en && rd |-> !empty);
endmodule
