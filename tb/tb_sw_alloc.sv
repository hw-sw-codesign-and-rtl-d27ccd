// tb_sw_alloc: random ready vectors against the rules of the separable
// switch allocator: every dequeue and crossbar select is one-hot, they
// agree with each other and with the requests, some flit moves whenever any
// VC is ready, and an output never drives two inputs. A directed part
// checks that two inputs competing for one output take turns.
module tb_sw_alloc;
  import noc_pkg::*;
  localparam int NP = NPORTS, NVC = 2;
  logic clk = 0, rst_n = 0, en = 1;
  logic [NVC-1:0] req [NP];
  port_e req_port [NP][NVC];
  logic [NVC-1:0] deq [NP];
  logic [NP-1:0] sel [NP];
  int checks = 0, failures = 0;

  sw_alloc #(.NP(NP), .NVC(NVC)) dut (.*);
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
    int last;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int moved, any;
      @(negedge clk);
      any = 0;
      for (int i = 0; i < NP; i++) begin
        req[i] = NVC'($urandom);
        if (req[i] != 0) any = 1;
        for (int v = 0; v < NVC; v++) req_port[i][v] = port_e'($urandom % NP);
      end
      #1;
      moved = 0;
      for (int i = 0; i < NP; i++) begin
        check($onehot0(deq[i]), "deq one-hot");
        check((deq[i] & ~req[i]) == 0, "deq without request");
        for (int v = 0; v < NVC; v++)
          if (deq[i][v]) begin
            moved++;
            check(sel[req_port[i][v]][i], "select matches dequeue");
          end
      end
      for (int o = 0; o < NP; o++) begin
        check($onehot0(sel[o]), "select one-hot");
        for (int i = 0; i < NP; i++)
          if (sel[o][i]) check(deq[i] != 0, "select without dequeue");
      end
      check(any == 0 || moved > 0, "nothing moved");
    end
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      req[i] = '0;
      for (int v = 0; v < NVC; v++) req_port[i][v] = P_S;
    end
    req[0][1] = 1; req[2][0] = 1;
    last = -1;
    for (int t = 0; t < 10; t++) begin
      int w;
      #1;
      w = sel[P_S][0] ? 0 : (sel[P_S][2] ? 2 : -1);
      check(w != -1 && w != last, "round robin alternation");
      last = w;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
