// emu_clock_gen: hardware end of the software-controlled emulation clock.
//
// The processor drives the network clock by writing 1 and then 0 into a
// one-bit clock register, once per emulation cycle, after it has finished
// all of that cycle's traffic generation and reception. Rather than use the
// register bit as a real clock, this block keeps the register and turns
// each 0-to-1 write into a one-cycle enable pulse ('tick') on the fast
// system clock; every flip-flop of the network advances only when 'tick' is
// high. The network therefore sees exactly one cycle per rising edge of the
// emulation clock, however long the software takes. The pulse is
// registered: it is high in the system cycle after the write.
module emu_clock_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic wr,        // write to the clock register
  input  logic wdata,     // value written (bit 0)
  output logic emu_clk,   // current register value, readable by software
  output logic tick       // network clock enable, one system cycle long
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      emu_clk <= 1'b0;
      tick    <= 1'b0;
    end else begin
      tick <= wr && wdata && !emu_clk;
      if (wr) emu_clk <= wdata;
    end
  end
endmodule
