// tb_hw_reg_bank: the register bank with 3 nodes (reduced from 25) and a
// network stand-in driven by the testbench. Checks every register of the
// address map: clock writes produce exactly one tick per 0-to-1 edge;
// input data and valid reach the injection ports and the valid bits clear
// after a tick; input status shows the full flags; output status flags
// only head flits; output data shows the ejected flit; each ejected flit
// is credited back; read data arrives one cycle after the read strobe.
module tb_hw_reg_bank;
  import noc_pkg::*;
  localparam int NN = 3, NVC = 2;
  logic clk = 0, rst_n = 0;
  logic bus_wr = 0, bus_rd = 0, bus_rvalid, tick;
  logic [11:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  link_t inj [NN], ej [NN];
  logic [NVC-1:0] inj_full [NN];
  credit_t ej_credit [NN];
  int checks = 0, failures = 0, ticks = 0;

  hw_reg_bank #(.NN(NN), .NVC(NVC)) dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) if (tick) ticks++;

  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic wr(int region, int index, logic [31:0] d);
    @(negedge clk); bus_wr = 1; bus_addr = {4'(region), 8'(index)}; bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic rd(int region, int index, output logic [31:0] d);
    @(negedge clk); bus_rd = 1; bus_addr = {4'(region), 8'(index)};
    @(negedge clk); bus_rd = 0;
    check(bus_rvalid, "read valid one cycle later");
    d = bus_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    flit_t f;
    for (int n = 0; n < NN; n++) begin ej[n] = '0; inj_full[n] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clock register
    wr(0, 0, 1); @(negedge clk); check(ticks == 1, "tick on 0->1");
    rd(0, 0, d); check(d == 1, "clock reads 1");
    wr(0, 0, 1); check(ticks == 1, "no tick on 1->1");
    wr(0, 0, 0); check(ticks == 1, "no tick on 1->0");
    wr(0, 0, 1); @(negedge clk); check(ticks == 2, "tick on second 0->1");
    wr(0, 0, 0);
    // input data and valid
    for (int n = 0; n < NN; n++) wr(4, n, 32'h1000_0000 + n);
    for (int n = 0; n < NN; n++) begin rd(4, n, d); check(d == 32'h1000_0000 + n, "input data readback"); end
    wr(1, 0, 32'b101);
    check(inj[0].valid && !inj[1].valid && inj[2].valid, "valid bits to injection ports");
    check(inj[2].flit == flit_t'(32'h1000_0002), "injection flit");
    rd(1, 0, d); check(d == 32'b101, "valid readback");
    wr(0, 0, 1); wr(0, 0, 0);
    check(!inj[0].valid && !inj[2].valid, "valid cleared by tick");
    // input status
    inj_full[0] = 2'b10; inj_full[2] = 2'b01;
    rd(2, 0, d); check(d == 32'b01_00_10, "input status bits");
    // output status / data / credits
    f = '0; f.ftype = FT_HEAD; f.vcid = 1; f.src_x = 2; f.pkt_id = 12'h123;
    ej[1].valid = 1; ej[1].flit = f;
    ej[2].valid = 1; ej[2].flit = '0; ej[2].flit.ftype = FT_BODY;
    #1;
    check(ej_credit[1].valid && ej_credit[1].vc == 1 && ej_credit[2].valid && !ej_credit[0].valid, "credits");
    rd(3, 0, d); check(d == 32'b010, "output status flags head only");
    rd(5, 1, d); check(d == 32'(f), "output data");
    rd(7, 0, d); check(d == 0, "unmapped region reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
