// tb_delay_unit: a random flit stream through a 3-stage delay line with an
// irregular enable. Each output must equal the input presented three
// enabled cycles earlier, and the output must not move without enable.
module tb_delay_unit;
  import noc_pkg::*;
  localparam int STAGES = 3;
  logic clk = 0, rst_n = 0, en = 0;
  link_t in, out;
  int checks = 0, failures = 0;
  link_t hist [$];

  delay_unit #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    for (int i = 0; i < STAGES; i++) hist.push_back('0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = $urandom % 3 != 0;
      in.valid = $urandom % 2;
      in.flit  = flit_t'($urandom);
      @(posedge clk);
      if (en) begin
        hist.push_back(in);
        void'(hist.pop_front());
      end
      #1;
      checks++;
      if (out != hist[0]) begin
        failures++;
        $display("FAIL cycle %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
