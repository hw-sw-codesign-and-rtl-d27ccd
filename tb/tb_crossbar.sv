// tb_crossbar: random permutations (and idle outputs) through the switch;
// every output must carry exactly the selected input's flit.
module tb_crossbar;
  import noc_pkg::*;
  localparam int N = NPORTS;
  flit_t in_flit [N];
  logic [N-1:0] sel [N];
  link_t out [N];
  int checks = 0, failures = 0;

  crossbar #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int perm [N];
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) in_flit[i] = flit_t'($urandom);
      for (int o = 0; o < N; o++) sel[o] = ($urandom % 4 == 0) ? '0 : N'(1) << perm[o];
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (sel[o] == '0) begin
          if (out[o].valid) begin failures++; $display("FAIL idle output %0d valid", o); end
        end else if (!out[o].valid || out[o].flit != in_flit[perm[o]]) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
