// tb_input_unit: one input port of router (1,1). A 3-flit packet on VC 0 to
// node (3,1) must ask for port E, get output VC 1, leave with VCID = 1 and
// CNOP rewritten to the next router's port (E again), body/tail following
// on the stored route; each departure returns one credit the tick after.
// A single-flit packet on VC 1 to (1,0) asks for S and leaves with CNOP = L.
// Eight flits fill a VC and raise its full flag.
module tb_input_unit;
  import noc_pkg::*;
  localparam int NVC = 2, DEPTH = 8;
  logic clk = 0, rst_n = 0, en = 0;
  link_t in;
  credit_t credit_out;
  logic [NVC-1:0] vc_full, va_req, active, out_vc, has_flit, va_gnt, va_vc, deq;
  port_e req_port [NVC];
  flit_t out_flit;
  int checks = 0, failures = 0;

  input_unit #(.X(1), .Y(1), .NVC(NVC), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic tick();
    @(negedge clk); en = 1;
    @(posedge clk); #1; en = 0;
    in = '0; va_gnt = '0; va_vc = '0; deq = '0;
  endtask
  function automatic flit_t head(logic vc, port_e p, int dx, int dy, flit_type_e t);
    flit_t f;
    f = '0; f.ftype = t; f.vcid = vc; f.cnop = p;
    f.src_x = 0; f.src_y = 1; f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy); f.pkt_id = 12'h5a5;
    return f;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f;
    in = '0; va_gnt = '0; va_vc = '0; deq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    in.valid = 1; in.flit = head(0, P_E, 3, 1, FT_HEAD);
    tick();
    check(va_req == 2'b01 && req_port[0] == P_E, "head asks for E");
    in.valid = 1; in.flit = '0; in.flit.ftype = FT_BODY; in.flit.vcid = 0; in.flit.pkt_id = 1;
    // grant VC 1 and the switch in the same cycle
    #1; va_gnt = 2'b01; va_vc = 2'b01; deq = 2'b01;
    #1;
    check(out_flit.vcid == 1'b1 && out_flit.cnop == P_E && out_flit.ftype == FT_HEAD, "head rewritten");
    tick();
    check(credit_out.valid && credit_out.vc == 0, "credit for head");
    check(active[0] && out_vc[0] == 1'b1 && req_port[0] == P_E && va_req == 0, "VC state held");
    in.valid = 1; in.flit = '0; in.flit.ftype = FT_TAIL; in.flit.vcid = 0; in.flit.pkt_id = 2;
    deq = 2'b01; #1;
    check(out_flit.vcid == 1'b1 && out_flit.ftype == FT_BODY && out_flit.pkt_id == 1, "body follows");
    tick();
    deq = 2'b01; #1;
    check(out_flit.ftype == FT_TAIL && out_flit.vcid == 1'b1, "tail follows");
    tick();
    check(!active[0] && !has_flit[0], "tail released VC");
    check(credit_out.valid, "credit for tail");
    // single flit on VC1 to (1,0): leaves by S, CNOP at (1,0) is L
    in.valid = 1; in.flit = head(1, P_S, 1, 0, FT_SINGLE);
    tick();
    check(!credit_out.valid, "no credit without departure");
    check(va_req == 2'b10 && req_port[1] == P_S, "single asks for S");
    va_gnt = 2'b10; va_vc = 2'b00; deq = 2'b10; #1;
    check(out_flit.cnop == P_L && out_flit.vcid == 1'b0, "single rewritten to L, VC0");
    tick();
    check(!active[1] && credit_out.valid && credit_out.vc == 1, "single done");
    // fill VC 0
    for (int i = 0; i < DEPTH; i++) begin
      check(!vc_full[0], "not yet full");
      in.valid = 1; in.flit = head(0, P_N, 1, 3, FT_HEAD);
      tick();
    end
    check(vc_full == 2'b01, "VC0 full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
