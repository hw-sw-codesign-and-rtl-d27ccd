// hw_reg_bank: register interface between the processor bus and the network.
//
// Six kinds of 32-bit registers, reached by word address on a simple
// single-cycle register port (write strobe with data; read strobe with the
// data returned one cycle later, flagged by bus_rvalid):
//   addr[11:8]  index            register
//   0           0                CLOCK        bit 0 = emulation clock (R/W)
//   1           w                INPUT VALID  bit b = node 32w+b has a flit (R/W)
//   2           w                INPUT STATUS bit b = VC (32w+b)%NVC of node
//                                             (32w+b)/NVC local input full (RO)
//   3           w                OUTPUT STATUS bit b = node 32w+b ejected a
//                                             head flit this cycle (RO)
//   4           n                INPUT DATA   flit to inject at node n (R/W)
//   5           n                OUTPUT DATA  flit ejected at node n (RO)
// On a rising emulation clock edge the network takes every input data
// register whose valid bit is set into that node's local input VC named by
// the flit's VCID, and the valid bits clear themselves, so software sets
// them again for each flit. Software must not set a valid bit for a VC it
// read as full. Output data and status show the flit each router's local
// output register holds during the current emulation cycle, so software
// reads them between two clock edges; each ejected flit returns a credit
// to its router at the next edge (the ejection side never blocks): the
// credit outputs are the ejected flit's valid bit and VCID, passed through.
// The address map and the auto-clear are this design's choices.
module hw_reg_bank #(
  parameter int NN     = 25,
  parameter int NVC    = 2,
  parameter int ADDR_W = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor side
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [ADDR_W-1:0]  bus_addr,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               bus_rvalid,
  // network side
  output logic               tick,
  output noc_pkg::link_t     inj       [NN],
  input  logic [NVC-1:0]     inj_full  [NN],
  input  noc_pkg::link_t     ej        [NN],
  output noc_pkg::credit_t   ej_credit [NN]
);
  import noc_pkg::*;
  localparam int NVW = (NN + 31) / 32;          // words of valid / out status
  localparam int NSW = (NN * NVC + 31) / 32;    // words of input status
  localparam int NIW = (NN > 1) ? $clog2(NN) : 1; // node index width

  logic [3:0] region;
  logic [7:0] index;
  assign region = bus_addr[11:8];
  assign index  = bus_addr[7:0];
  // node number for the per-node registers; only used once index < NN
  logic [NIW-1:0] node;
  assign node = index[NIW-1:0];

  logic            emu_clk;
  logic [NVW*32-1:0] in_valid;
  flit_t           in_data [NN];
  logic [NSW*32-1:0] in_status;
  logic [NVW*32-1:0] out_status;

  emu_clock_gen u_clk (
    .clk, .rst_n,
    .wr   (bus_wr && region == 4'd0 && index == 8'd0),
    .wdata(bus_wdata[0]),
    .emu_clk,
    .tick
  );

  always_comb begin
    in_status  = '0;
    out_status = '0;
    for (int n = 0; n < NN; n++) begin
      for (int v = 0; v < NVC; v++) in_status[n*NVC+v] = inj_full[n][v];
      out_status[n] = ej[n].valid && is_head(ej[n].flit);
      inj[n].valid  = in_valid[n];
      inj[n].flit   = in_data[n];
      ej_credit[n].valid = ej[n].valid;
      ej_credit[n].vc    = ej[n].flit.vcid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid <= '0;
      for (int n = 0; n < NN; n++) in_data[n] <= '0;
    end else begin
      if (tick) in_valid <= '0;
      if (bus_wr && region == 4'd1 && int'(index) < NVW)
        in_valid[index*32 +: 32] <= bus_wdata;
      if (bus_wr && region == 4'd4 && int'(index) < NN)
        in_data[node] <= flit_t'(bus_wdata);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_rd;
      if (bus_rd) begin
        bus_rdata <= '0;
        unique case (region)
          4'd0: bus_rdata <= {31'b0, emu_clk};
          4'd1: if (int'(index) < NVW) bus_rdata <= in_valid[index*32 +: 32];
          4'd2: if (int'(index) < NSW) bus_rdata <= in_status[index*32 +: 32];
          4'd3: if (int'(index) < NVW) bus_rdata <= out_status[index*32 +: 32];
          4'd4: if (int'(index) < NN)  bus_rdata <= in_data[node];
          4'd5: if (int'(index) < NN)  bus_rdata <= ej[node].flit;
          default: ;
        endcase
      end
    end
  end

  // Software must not inject into a full local VC.
  for (genvar n = 0; n < NN; n++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     tick && inj[n].valid |-> !inj_full[n][inj[n].flit.vcid]);
  end
endmodule
