// tb_vc_fifo: random push/pop traffic against a queue reference model.
// Checks the head flit, empty, full and count after every enabled cycle,
// and that nothing changes in cycles without the enable.
module tb_vc_fifo;
  import noc_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, en = 0, wr = 0, rd = 0;
  flit_t wr_flit, rd_flit;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t model [$];

  vc_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      wr = ($urandom % 2) && (model.size() < DEPTH || (rd && model.size() > 0));
      rd = ($urandom % 2) && model.size() > 0;
      if (model.size() == DEPTH && !rd) wr = 0;
      wr_flit = flit_t'($urandom);
      @(posedge clk);
      if (en) begin
        if (rd) void'(model.pop_front());
        if (wr) model.push_back(wr_flit);
      end
      #1;
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(rd_flit == model[0], "head flit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
