// tb_vc_alloc: random request patterns against the rules of the VC
// allocator, worked out here: a grant only goes to a requester, at most one
// grant per output port, the granted VC is the lowest free VC of the port,
// a port with requesters and a free VC always grants, and 'take' matches
// the grants. A directed part checks that two requesters that keep asking
// for the same port are served in turn (round robin), while a copy built
// with fixed priority always serves the lower-numbered one.
module tb_vc_alloc;
  import noc_pkg::*;
  localparam int NP = NPORTS, NVC = 2;
  logic clk = 0, rst_n = 0, en = 1;
  logic [NVC-1:0] req [NP];
  port_e req_port [NP][NVC];
  logic [NVC-1:0] vc_free [NP];
  logic [NVC-1:0] gnt [NP], gnt_vc [NP];
  logic [NP-1:0] take, take_id;
  int checks = 0, failures = 0;

  vc_alloc #(.NP(NP), .NVC(NVC)) dut (.*);

  // the same allocator built with fixed-priority arbiters
  logic [NVC-1:0] gnt_fp [NP], gnt_vc_fp [NP];
  logic [NP-1:0] take_fp, take_id_fp;
  vc_alloc #(.NP(NP), .NVC(NVC), .ROUND_ROBIN(1'b0)) dut_fp (
    .clk, .rst_n, .en, .req, .req_port, .vc_free,
    .gnt(gnt_fp), .gnt_vc(gnt_vc_fp), .take(take_fp), .take_id(take_id_fp));
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
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        req[i] = NVC'($urandom);
        vc_free[i] = NVC'($urandom);
        for (int v = 0; v < NVC; v++) req_port[i][v] = port_e'($urandom % NP);
      end
      #1;
      for (int o = 0; o < NP; o++) begin
        int n_req, n_gnt;
        logic [NVC-1:0] lowest;
        n_req = 0; n_gnt = 0;
        lowest = vc_free[o][0] ? 1'b0 : 1'b1;
        for (int i = 0; i < NP; i++)
          for (int v = 0; v < NVC; v++) begin
            if (req[i][v] && req_port[i][v] == o) n_req++;
            if (gnt[i][v] && req_port[i][v] == o) begin
              n_gnt++;
              check(req[i][v], "grant without request");
              check(vc_free[o] != 0, "grant with no free VC");
              check(gnt_vc[i][v] == lowest, "not the lowest free VC");
            end
          end
        check(n_gnt <= 1, "two grants at one port");
        check(n_gnt == ((n_req > 0 && vc_free[o] != 0) ? 1 : 0), "work conserving");
        check(take[o] == (n_gnt == 1), "take");
        if (take[o]) check(take_id[o] == lowest, "take_id");
      end
    end
    // round robin: inputs 1 and 3 (VC 0) both keep asking for port E
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      req[i] = '0; vc_free[i] = '1;
      for (int v = 0; v < NVC; v++) req_port[i][v] = P_E;
    end
    req[1][0] = 1; req[3][0] = 1;
    last = -1;
    for (int t = 0; t < 10; t++) begin
      int w;
      #1;
      w = gnt[1][0] ? 1 : (gnt[3][0] ? 3 : -1);
      check(w != -1 && w != last, "round robin alternation");
      check(gnt_fp[1][0] && !gnt_fp[3][0], "fixed priority: lowest index always wins");
      last = w;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
