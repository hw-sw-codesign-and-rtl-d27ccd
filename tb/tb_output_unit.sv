// tb_output_unit: credit counting and VC state of one output port, with
// two delay registers after the output register.
//  - eight flits on VC 0 with no credits back exhaust VC 0 only;
//  - a returned credit re-enables it;
//  - 'busy' follows VC hand-out and the tail flit;
//  - a flit reaches the link output 1 + DELAY ticks after it is switched.
module tb_output_unit;
  import noc_pkg::*;
  localparam int NVC = 2, DEPTH = 8, DELAY = 2;
  logic clk = 0, rst_n = 0, en = 0;
  link_t xbar_in, out;
  credit_t credit_in;
  logic vc_take = 0, vc_take_id = 0;
  logic [NVC-1:0] credit_ok, vc_free;
  int checks = 0, failures = 0;

  output_unit #(.NVC(NVC), .DEPTH(DEPTH), .DELAY(DELAY)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  task automatic tick();
    @(negedge clk); en = 1;
    @(posedge clk); #1; en = 0;
    xbar_in = '0; credit_in = '0; vc_take = 0;
  endtask

  function automatic link_t mk(flit_type_e t, logic vc, int tag);
    link_t l;
    l = '0;
    l.valid = 1; l.flit.ftype = t; l.flit.vcid = vc; l.flit.pkt_id = PID_W'(tag);
    return l;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xbar_in = '0; credit_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(credit_ok == 2'b11 && vc_free == 2'b11, "reset state");
    // hand out VC 0 and send a packet of DEPTH flits on it
    vc_take = 1; vc_take_id = 0;
    xbar_in = mk(FT_HEAD, 0, 100);
    tick();
    check(vc_free == 2'b10, "VC0 busy after hand-out");
    for (int i = 1; i < DEPTH; i++) begin
      check(credit_ok[0], "credit left");
      xbar_in = mk(i == DEPTH - 1 ? FT_TAIL : FT_BODY, 0, 100 + i);
      // the flit switched in this tick must show after 1 + DELAY ticks
      tick();
    end
    check(credit_ok == 2'b10, "VC0 out of credits, VC1 untouched");
    check(vc_free == 2'b11, "tail released VC0");
    // latency: the last flit was switched DEPTH-1 ticks in; watch for it
    for (int k = 1; k <= DELAY; k++) begin
      check(!(out.valid && out.flit.pkt_id == PID_W'(100 + DEPTH - 1)), "too early");
      tick();
    end
    check(out.valid && out.flit.pkt_id == PID_W'(100 + DEPTH - 1), "arrives after 1+DELAY ticks");
    // return one credit
    credit_in.valid = 1; credit_in.vc = 0;
    tick();
    check(credit_ok == 2'b11, "credit returned");
    // simultaneous send and credit on VC1 keeps count
    for (int i = 0; i < 20; i++) begin
      xbar_in = mk(FT_BODY, 1, i);
      credit_in.valid = (i > 0); credit_in.vc = 1;
      tick();
      check(credit_ok[1], "VC1 steady with credit per flit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
