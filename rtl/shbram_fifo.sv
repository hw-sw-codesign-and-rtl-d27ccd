// shbram_fifo: shared block-RAM FIFO between the two processors of the
// trace-driven traffic generator.
//
// One processor (the trace reader) writes trace records, the other (the
// trace executor) reads them in the same order. The store is one
// single-port RAM of WORDS 32-bit words (32 KB in the emulator), so only one
// side may touch it in any cycle: when both ask at once the side that was
// not served last wins and the other sees no acknowledge and retries. A
// write is acknowledged in the cycle it is accepted (wr_ack) if the FIFO is
// not full; a read is acknowledged likewise if it is not empty, and its
// data arrives one cycle later with rd_valid, as from a block RAM. The
// fill level is readable by both sides. The arbitration rule is this
// design's choice; the document only requires exclusive access.
module shbram_fifo #(
  parameter int WORDS = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  // writer (trace reader processor)
  input  logic        wr_req,
  input  logic [31:0] wr_data,
  output logic        wr_ack,
  // reader (trace executor processor)
  input  logic        rd_req,
  output logic        rd_ack,
  output logic [31:0] rd_data,
  output logic        rd_valid,
  // status
  output logic        full,
  output logic        empty,
  output logic [$clog2(WORDS+1)-1:0] level
);
  localparam int AW = $clog2(WORDS);
  localparam int LW = $clog2(WORDS + 1);

  logic [31:0]   ram [WORDS];
  logic [AW-1:0] wp, rp, addr;
  logic          last_was_wr;
  logic          want_wr, want_rd;

  assign full    = level == LW'(WORDS);
  assign empty   = level == '0;
  assign want_wr = wr_req && !full;
  assign want_rd = rd_req && !empty;

  always_comb begin
    wr_ack = 1'b0;
    rd_ack = 1'b0;
    if (want_wr && want_rd) begin
      if (last_was_wr) rd_ack = 1'b1;
      else             wr_ack = 1'b1;
    end else begin
      wr_ack = want_wr;
      rd_ack = want_rd;
    end
    addr = wr_ack ? wp : rp;
  end

  // single port RAM, read-first
  always_ff @(posedge clk) begin
    if (wr_ack) ram[addr] <= wr_data;
    rd_data <= ram[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
      last_was_wr <= 1'b0;
      rd_valid    <= 1'b0;
    end else begin
      rd_valid <= rd_ack;
      if (wr_ack) begin wp <= wp + 1'b1; level <= level + 1'b1; last_was_wr <= 1'b1; end
      if (rd_ack) begin rp <= rp + 1'b1; level <= level - 1'b1; last_was_wr <= 1'b0; end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_ack && rd_ack));
endmodule
