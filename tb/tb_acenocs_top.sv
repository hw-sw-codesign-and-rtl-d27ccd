// tb_acenocs_top: end-to-end run of the emulator hardware at its default
// size (5x5 mesh, 2 VCs of 8 flits, 32-bit flits), with the testbench in
// the role of the processor software.
//
// Every emulation cycle follows the fixed event order of the emulator:
//   A  the network has just advanced one cycle on the clock register's
//      rising edge;
//   B  write 0 to the clock register, read the local-port full flags;
//   C  each traffic generator decides (xorshift random number against the
//      packet injection rate) whether to build a packet into its source
//      queue; one flit from the front of each queue is written to its input
//      data register unless that VC is full, and the valid bits are set;
//   D  read the output status register and, for each flagged node, the
//      output data register;
//   E  traffic receptors check the destination and compute the latency
//      from a per-source table indexed by packet id with a valid bit;
//   F  write 1 to the clock register.
// The run goes through phases, one per traffic pattern the emulator
// offers (bit complement with 5-flit packets as in the baseline, matrix
// transpose, uniform random, bit reversal, shuffle, rotation, hotspot),
// with various packet lengths and injection rates; the hotspot phase drives
// the network into saturation so that source-queue throttling and full
// local VCs occur. Checks: a lone single-flit packet from node (0,0) to
// (4,4) arrives after exactly 2*(hops+1) = 18 cycles; every packet reaches
// its destination exactly once; no packet id is reused while in flight;
// and each mechanism (VC and switch allocation conflicts, credit stalls,
// full local VCs, throttling, use of both VCs, every pattern) happens.
// The shared BRAM FIFO is exercised by passing trace-like records through
// it in order.
module tb_acenocs_top;
  import noc_pkg::*;
  localparam int MX = 5, MY = 5, NN = MX * MY, NVC = 2;
  // Flits allowed across all source queues before generators throttle.
  // The emulator's software allows 6500-10250; a smaller budget makes the
  // saturated phase reach it in a short run.
  localparam int MAX_OUTSTANDING = 2000;

  logic clk = 0, rst_n = 0;
  logic bus_wr = 0, bus_rd = 0, bus_rvalid;
  logic [11:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic shb_wr_req = 0, shb_rd_req = 0, shb_wr_ack, shb_rd_ack, shb_rd_valid, shb_full, shb_empty;
  logic [31:0] shb_wr_data = 0, shb_rd_data;
  logic [13:0] shb_level;

  acenocs_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- register port ----------------
  task automatic bwr(int region, int index, logic [31:0] d);
    @(negedge clk); bus_wr = 1; bus_addr = {4'(region), 8'(index)}; bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic brd(int region, int index, output logic [31:0] d);
    @(negedge clk); bus_rd = 1; bus_addr = {4'(region), 8'(index)};
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask

  // ---------------- software model state ----------------
  typedef enum int {BITCOMP, TRANSPOSE, UNIFORM, BITREV, SHUFFLE, ROTATE, HOTSPOT} pattern_e;
  flit_t   srcq [NN][$];              // source queues
  int      outstanding = 0;           // flits across all queues
  int      lat_time  [NN][4096];      // injection cycle per (source, packet id)
  bit      lat_valid [NN][4096];
  int      next_pid  [NN];
  int      pkt_count [NN];            // packets built, for VC choice
  int      cycle = 0;
  int      injected = 0, received = 0, wrong = 0;
  longint  lat_sum = 0;
  int      last_latency = 0;
  logic [31:0] rng = 32'h2545F491;
  // mechanism counters
  int n_full = 0, n_throttle = 0, n_va_conf = 0, n_sa_conf = 0, n_stall = 0, n_vc1 = 0, n_vc0 = 0;
  int n_pattern [7];

  function automatic logic [31:0] xorshift();
    rng ^= rng << 13; rng ^= rng >> 17; rng ^= rng << 5;
    return rng;
  endfunction

  function automatic int rev3(int v, int k);   // reverse ceil(log2 k) bits
    int b, r;
    b = $clog2(k); r = 0;
    for (int i = 0; i < b; i++) if (v & (1 << i)) r |= 1 << (b - 1 - i);
    return r % k;
  endfunction
  function automatic int rotl(int v, int k);
    int b;
    b = $clog2(k);
    return (((v << 1) | (v >> (b - 1))) & ((1 << b) - 1)) % k;
  endfunction
  function automatic int rotr(int v, int k);
    int b;
    b = $clog2(k);
    return (((v >> 1) | ((v & 1) << (b - 1))) & ((1 << b) - 1)) % k;
  endfunction

  function automatic int dest(pattern_e p, int s, int hot_pct, int hot_node);
    int x, y;
    x = s % MX; y = s / MX;
    case (p)
      BITCOMP:   return (MY - 1 - y) * MX + (MX - 1 - x);
      TRANSPOSE: return x * MX + y;
      BITREV:    return rev3(y, MY) * MX + rev3(x, MX);
      SHUFFLE:   return rotl(y, MY) * MX + rotl(x, MX);
      ROTATE:    return rotr(y, MY) * MX + rotr(x, MX);
      HOTSPOT:   return (xorshift() % 100 < hot_pct) ? hot_node : xorshift() % NN;
      default:   return xorshift() % NN;
    endcase
  endfunction

  task automatic build_packet(int s, int d, int len);
    flit_t f;
    int pid;
    logic vc;
    pid = next_pid[s];
    check(!lat_valid[s][pid], "packet id reused while in flight");
    next_pid[s] = (pid + 1) % 4096;
    vc = 1'(pkt_count[s]++);
    if (vc) n_vc1++; else n_vc0++;
    lat_valid[s][pid] = 1;
    lat_time[s][pid]  = cycle;
    for (int i = 0; i < len; i++) begin
      f = '0;
      if (i == 0) begin
        f.ftype = len == 1 ? FT_SINGLE : FT_HEAD;
        f.src_x = COORD_W'(s % MX); f.src_y = COORD_W'(s / MX);
        f.dst_x = COORD_W'(d % MX); f.dst_y = COORD_W'(d / MX);
        f.cnop  = xy_route(f.src_x, f.src_y, f.dst_x, f.dst_y);
        f.pkt_id = PID_W'(pid);
      end else f.ftype = i == len - 1 ? FT_TAIL : FT_BODY;
      f.vcid = vc;
      srcq[s].push_back(f);
    end
    outstanding += len;
    injected++;
  endtask

  // one emulation cycle; gen = 1 lets the traffic generators run
  task automatic emu_cycle(bit gen, pattern_e p, int rate_pct, int len, int hot_pct, int budget,
                           ref int built);
    logic [31:0] st0, st1, ost, d;
    logic [63:0] full;
    logic [31:0] valid;
    // B
    bwr(0, 0, 0);
    brd(2, 0, st0); brd(2, 1, st1);
    full = {st1, st0};
    // C
    valid = 0;
    for (int s = 0; s < NN; s++) begin
      int dd;
      if (gen && built < budget && xorshift() % 10000 < rate_pct * 100 / len) begin
        dd = dest(p, s, hot_pct, 12);
        if (dd != s) begin
          if (outstanding + len > MAX_OUTSTANDING) n_throttle++;
          else begin build_packet(s, dd, len); built++; end
        end
      end
      if (srcq[s].size() > 0) begin
        if (full[s*NVC + srcq[s][0].vcid]) n_full++;
        else begin
          bwr(4, s, 32'(srcq[s].pop_front()));
          outstanding--;
          valid[s] = 1;
        end
      end
    end
    if (valid != 0) bwr(1, 0, valid);
    // D, E
    brd(3, 0, ost);
    for (int n = 0; n < NN; n++)
      if (ost[n]) begin
        flit_t f;
        int s;
        brd(5, n, d);
        f = flit_t'(d);
        s = f.src_y * MX + f.src_x;
        received++;
        if (f.dst_x != n % MX || f.dst_y != n / MX) wrong++;
        if (s < NN && lat_valid[s][f.pkt_id]) begin
          lat_valid[s][f.pkt_id] = 0;
          last_latency = cycle - lat_time[s][f.pkt_id];
          lat_sum += last_latency;
        end else wrong++;
      end
    // F
    bwr(0, 0, 1);
    cycle++;
  endtask

  // network-internal events, observed in every router
  for (genvar y = 0; y < MY; y++) begin : g_mon_y
    for (genvar x = 0; x < MX; x++) begin : g_mon_x
      always @(posedge clk) if (dut.tick) begin
        int vreq, vgnt, sreq, sgnt;
        vreq = 0; vgnt = 0; sreq = 0; sgnt = 0;
        for (int p = 0; p < NPORTS; p++)
          for (int v = 0; v < NVC; v++) begin
            vreq += int'(dut.u_mesh.g_y[y].g_x[x].u_router.va_req[p][v]);
            vgnt += int'(dut.u_mesh.g_y[y].g_x[x].u_router.va_gnt[p][v]);
            sreq += int'(dut.u_mesh.g_y[y].g_x[x].u_router.sa_req[p][v]);
            sgnt += int'(dut.u_mesh.g_y[y].g_x[x].u_router.deq[p][v]);
            if (dut.u_mesh.g_y[y].g_x[x].u_router.active[p][v] &&
                dut.u_mesh.g_y[y].g_x[x].u_router.has_flit[p][v] &&
                !dut.u_mesh.g_y[y].g_x[x].u_router.credit_ok
                   [dut.u_mesh.g_y[y].g_x[x].u_router.req_port[p][v]]
                   [dut.u_mesh.g_y[y].g_x[x].u_router.out_vc[p][v]]) n_stall++;
          end
        if (vreq > vgnt && vgnt > 0) n_va_conf++;
        if (sreq > sgnt && sgnt > 0) n_sa_conf++;
      end
    end
  end

  task automatic run_phase(string name, pattern_e p, int rate_pct, int len, int npkts, int hot_pct);
    int built, c0, r0;
    longint l0;
    real thr;
    built = 0; c0 = cycle; r0 = received; l0 = lat_sum;
    while (built < npkts) emu_cycle(1, p, rate_pct, len, hot_pct, npkts, built);
    while (received < injected && cycle - c0 < 20000) emu_cycle(0, p, 0, len, 0, 0, built);
    n_pattern[p]++;
    thr = real'((received - r0) * len) / real'(cycle - c0);
    $display("%-12s rate %3d%% len %0d: %0d packets, %0d cycles, avg latency %0d cycles, throughput %0.2f flits/cycle",
             name, rate_pct, len, received - r0, cycle - c0,
             int'((lat_sum - l0) / longint'(received - r0)), thr);
  endtask

  initial begin
    int built;
    logic [31:0] d;
    for (int s = 0; s < NN; s++) begin
      next_pid[s] = 0; pkt_count[s] = 0;
      for (int i = 0; i < 4096; i++) lat_valid[s][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // lone single-flit packet (0,0) -> (4,4): 8 hops, 9 routers
    built = 0;
    build_packet(0, NN - 1, 1);
    while (received == 0 && cycle < 100) emu_cycle(0, BITCOMP, 0, 1, 0, 0, built);
    check(last_latency == 2 * (8 + 1), "lone packet latency 18 cycles");
    $display("lone packet latency %0d cycles", last_latency);

    run_phase("bit-compl",  BITCOMP,   20, 5, 300, 0);
    run_phase("transpose",  TRANSPOSE, 20, 5, 200, 0);
    run_phase("uniform",    UNIFORM,   30, 3, 300, 0);
    run_phase("bit-reverse", BITREV,   20, 4, 200, 0);
    run_phase("shuffle",    SHUFFLE,   20, 2, 200, 0);
    run_phase("rotation",   ROTATE,    20, 1, 200, 0);
    run_phase("hotspot",    HOTSPOT,  100, 5, 1500, 60);

    check(received == injected, "every packet received");
    check(wrong == 0, "no packet at a wrong node or unknown");
    $display("injected %0d received %0d", injected, received);
    $display("events: va-conflict %0d sa-conflict %0d credit-stall %0d local-full %0d throttle %0d vc0 %0d vc1 %0d",
             n_va_conf, n_sa_conf, n_stall, n_full, n_throttle, n_vc0, n_vc1);
    check(n_va_conf > 0, "VC allocation conflict happened");
    check(n_sa_conf > 0, "switch allocation conflict happened");
    check(n_stall > 0, "credit stall happened");
    check(n_full > 0, "local VC full happened");
    check(n_throttle > 0, "source queue throttling happened");
    check(n_vc0 > 0 && n_vc1 > 0, "both VCs used");
    for (int p = 0; p < 7; p++) check(n_pattern[p] > 0, "pattern run");

    // shared BRAM FIFO: records written by one side come out in order
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); shb_wr_req = 1; shb_wr_data = 32'hA000_0000 + i;
      @(posedge clk); #1;
      while (!shb_wr_ack) begin @(posedge clk); #1; end
    end
    @(negedge clk); shb_wr_req = 0;
    check(shb_level == 40, "trace FIFO level");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); shb_rd_req = 1;
      @(posedge clk); #1; shb_rd_req = 0;
      check(shb_rd_valid && shb_rd_data == 32'hA000_0000 + i, "trace FIFO order");
    end
    check(shb_empty, "trace FIFO empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
