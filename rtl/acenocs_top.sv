// acenocs_top: hardware framework of the FPGA NoC emulator.
//
// The network under test (a MESH_X x MESH_Y mesh of virtual-channel
// routers) sits behind a register bank on the processor bus. Traffic
// generation, source queues, traffic reception and latency statistics run
// as software on a soft processor, which in every emulation cycle reads the
// local-port full flags, writes one flit per node into the input data
// registers, reads the ejected flits and finally pulses the emulation clock
// register; the network advances by exactly one cycle per pulse.
// The shared BRAM FIFO used when two processors execute a trace (one reads
// the trace file, the other injects it) stands beside the network with its
// two processor ports brought out.
// Processor, bus fabric, UART and flash controller are vendor parts and are
// not part of this RTL; the register port and the FIFO ports are where they
// attach.
module acenocs_top #(
  parameter int MESH_X      = 5,
  parameter int MESH_Y      = 5,
  parameter int NVC         = 2,
  parameter int DEPTH       = 8,
  parameter int DELAY       = 0,
  parameter bit ROUND_ROBIN = 1'b1,
  parameter int SHB_WORDS   = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor register port
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [11:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  // shared BRAM FIFO: trace reader side
  input  logic        shb_wr_req,
  input  logic [31:0] shb_wr_data,
  output logic        shb_wr_ack,
  // shared BRAM FIFO: trace executor side
  input  logic        shb_rd_req,
  output logic        shb_rd_ack,
  output logic [31:0] shb_rd_data,
  output logic        shb_rd_valid,
  output logic        shb_full,
  output logic        shb_empty,
  output logic [$clog2(SHB_WORDS+1)-1:0] shb_level
);
  import noc_pkg::*;
  localparam int NN = MESH_X * MESH_Y;

  logic           tick;
  link_t          inj      [NN];
  logic [NVC-1:0] inj_full [NN];
  link_t          ej       [NN];
  credit_t        ej_cr    [NN];

  hw_reg_bank #(.NN(NN), .NVC(NVC), .ADDR_W(12)) u_regs (
    .clk, .rst_n,
    .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .tick, .inj, .inj_full, .ej, .ej_credit(ej_cr)
  );

  noc_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .NVC(NVC), .DEPTH(DEPTH),
             .DELAY(DELAY), .ROUND_ROBIN(ROUND_ROBIN)) u_mesh (
    .clk, .rst_n, .en(tick),
    .inj, .inj_full, .ej, .ej_credit(ej_cr)
  );

  shbram_fifo #(.WORDS(SHB_WORDS)) u_shb (
    .clk, .rst_n,
    .wr_req(shb_wr_req), .wr_data(shb_wr_data), .wr_ack(shb_wr_ack),
    .rd_req(shb_rd_req), .rd_ack(shb_rd_ack), .rd_data(shb_rd_data),
    .rd_valid(shb_rd_valid), .full(shb_full), .empty(shb_empty), .level(shb_level)
  );
endmodule
