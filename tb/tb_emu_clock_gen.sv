// tb_emu_clock_gen: random writes to the clock register. A tick must come
// exactly one system cycle after each write that takes the register from
// 0 to 1, and at no other time; the register must read back what was
// written.
module tb_emu_clock_gen;
  logic clk = 0, rst_n = 0, wr = 0, wdata = 0, emu_clk, tick;
  int checks = 0, failures = 0, ticks = 0;
  logic model = 0, exp_tick = 0;

  emu_clock_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr = $urandom % 3 == 0;
      wdata = $urandom % 2;
      @(posedge clk);
      exp_tick = wr && wdata && !model;
      if (wr) model = wdata;
      #1;
      checks += 2;
      if (emu_clk != model) begin failures++; $display("FAIL register"); end
      if (tick != exp_tick) begin failures++; $display("FAIL tick at %0d", i); end
      if (tick) ticks++;
    end
    checks++;
    if (ticks < 50) failures++;
    $display("ticks seen: %0d", ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
