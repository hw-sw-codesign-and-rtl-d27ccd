// tb_shbram_fifo: a 16-word FIFO (reduced from 8192) driven from both sides
// at random against a queue model: data order, one-cycle read latency,
// full/empty/level, never both sides served in one cycle, and that on a
// conflict the side that was not served last wins.
module tb_shbram_fifo;
  localparam int WORDS = 16;
  logic clk = 0, rst_n = 0;
  logic wr_req = 0, rd_req = 0, wr_ack, rd_ack, rd_valid, full, empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [$clog2(WORDS+1)-1:0] level;
  int checks = 0, failures = 0, conflicts = 0, fulls = 0;
  logic [31:0] q [$];
  logic [31:0] expect_d;
  logic last_wr = 0;
  logic a_wr, a_rd;

  shbram_fifo #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases: fill-heavy then drain-heavy
      wr_req = ($urandom % 100) < ((t / 500) % 2 ? 30 : 80);
      rd_req = ($urandom % 100) < ((t / 500) % 2 ? 80 : 30);
      wr_data = $urandom;
      #1;
      check(full == (q.size() == WORDS) && empty == (q.size() == 0) && level == q.size(), "status");
      check(!(wr_ack && rd_ack), "exclusive access");
      check(wr_ack == (wr_req && !full && !(rd_req && !empty && rd_ack)), "write ack rule");
      if (wr_req && !full && rd_req && !empty) begin
        conflicts++;
        check(wr_ack == !last_wr, "side not served last wins");
      end
      if (full) fulls++;
      a_wr = wr_ack; a_rd = rd_ack;
      @(posedge clk);
      #1;
      if (a_rd) begin expect_d = q.pop_front(); check(rd_valid && rd_data == expect_d, "read data"); end
      else check(!rd_valid, "no stray read data");
      if (a_wr) q.push_back(wr_data);
      if (a_wr) last_wr = 1;
      if (a_rd) last_wr = 0;
    end
    check(conflicts > 10 && fulls > 0, "conflicts and full reached");
    $display("conflicts=%0d full-cycles=%0d", conflicts, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
