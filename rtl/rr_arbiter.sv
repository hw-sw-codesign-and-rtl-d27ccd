// rr_arbiter: N-way arbiter used by the VC and switch allocators.
//
// With ROUND_ROBIN = 1 the requester after the last winner has the highest
// priority; with ROUND_ROBIN = 0 it is a fixed-priority arbiter where index 0
// wins. The router's allocators can be built with either scheme. The grant
// is combinational from req; the rotating pointer moves only when 'advance'
// is high in a clock-enabled cycle, so an offered grant that was not used
// does not lose its turn.
module rr_arbiter #(
  parameter int N           = 4,
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;   // index with highest priority

  always_comb begin
    gnt = '0;
    for (int k = 0; k < N; k++)
      if (req[ROUND_ROBIN ? (int'(ptr) + k) % N : k] && gnt == '0)
        gnt[ROUND_ROBIN ? (int'(ptr) + k) % N : k] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (en && advance && ROUND_ROBIN) begin
      for (int k = 0; k < N; k++)
        if (gnt[k]) ptr <= IW'((k + 1) % N);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
