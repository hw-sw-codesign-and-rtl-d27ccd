// tb_noc_mesh: a 4x3 mesh (reduced from 5x5 to keep the run short and to
// use a non-square shape) with every local port driven.
//
// First a lone single-flit packet from (0,0) to (3,2) must eject exactly
// 2*(hops+1) ticks after it is written into the source router, two ticks
// per router and link. Then every node sends packets of 1..5 flits to
// random destinations on both VCs, writing only into VCs whose full flag is
// low. Every packet must arrive at its destination node, whole, in order,
// on one VC, with CNOP = L; nothing may be lost or duplicated.
// A second, 3x1 mesh built with one delay register per router output
// checks that each delay stage adds one tick per router: a lone packet
// across 2 hops must eject after 3*(hops+1) ticks.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int MX = 4, MY = 3, NN = MX * MY, NVC = 2;
  localparam int NPKT = 1500;

  logic clk = 0, rst_n = 0, en = 0;
  link_t   inj [NN], ej [NN];
  logic [NVC-1:0] inj_full [NN];
  credit_t ej_credit [NN];
  int checks = 0, failures = 0, full_seen = 0;

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY), .NVC(NVC)) dut (.*);

  // 3x1 mesh with DELAY = 1
  link_t   inj_d [3], ej_d [3];
  logic [NVC-1:0] full_d [3];
  credit_t cred_d [3];
  noc_mesh #(.MESH_X(3), .MESH_Y(1), .NVC(NVC), .DELAY(1)) dut_d (
    .clk, .rst_n, .en, .inj(inj_d), .inj_full(full_d), .ej(ej_d), .ej_credit(cred_d));
  always_comb
    for (int n = 0; n < 3; n++) begin
      cred_d[n].valid = ej_d[n].valid;
      cred_d[n].vc    = ej_d[n].flit.vcid;
    end
  always #5 clk = ~clk;

  always_comb
    for (int n = 0; n < NN; n++) begin
      ej_credit[n].valid = ej[n].valid;
      ej_credit[n].vc    = ej[n].flit.vcid;
    end

  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t txq [NN][NVC][$];
  int exp_dst [int];
  int exp_len [int];
  int cur_key [NN][NVC], cur_idx [NN][NVC];
  int made = 0, delivered = 0;

  task automatic make_packet(int s, int v);
    int d, len;
    flit_t f;
    d = $urandom % NN;
    len = 1 + $urandom % 5;
    exp_dst[made] = d; exp_len[made] = len;
    for (int i = 0; i < len; i++) begin
      f = '0;
      if (i == 0) begin
        f.ftype = len == 1 ? FT_SINGLE : FT_HEAD;
        f.src_x = COORD_W'(s % MX); f.src_y = COORD_W'(s / MX);
        f.dst_x = COORD_W'(d % MX); f.dst_y = COORD_W'(d / MX);
        f.cnop  = xy_route(f.src_x, f.src_y, f.dst_x, f.dst_y);
        f.pkt_id = PID_W'(made);
      end else begin
        f.ftype = i == len - 1 ? FT_TAIL : FT_BODY;
        f[28:0] = 29'(made * 16 + i);
      end
      f.vcid = 1'(v);
      txq[s][v].push_back(f);
    end
    made++;
  endtask

  task automatic sink(int n, flit_t f);
    int v, key;
    v = f.vcid;
    if (is_head(f)) begin
      key = f.pkt_id;
      check(cur_key[n][v] < 0, "packets interleaved on one VC");
      check(exp_dst.exists(key) && exp_dst[key] == n, "delivered to destination");
      check(f.cnop == P_L && f.dst_x == n % MX && f.dst_y == n / MX, "head fields");
      cur_key[n][v] = key; cur_idx[n][v] = 1;
    end else begin
      key = cur_key[n][v];
      check(key >= 0 && int'(f[28:0]) == key * 16 + cur_idx[n][v], "flit order");
      cur_idx[n][v]++;
    end
    if (is_tail(f) && key >= 0) begin
      check(exp_len.exists(key) && exp_len[key] == cur_idx[n][v], "packet length");
      exp_dst.delete(key); cur_key[n][v] = -1; delivered++;
    end
  endtask

  initial begin
    for (int n = 0; n < NN; n++) begin
      inj[n] = '0;
      for (int v = 0; v < NVC; v++) cur_key[n][v] = -1;
    end
    for (int n = 0; n < 3; n++) inj_d[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // lone packet latency: (0,0) -> (3,2), 5 hops, 6 routers
    begin
      flit_t f;
      int t;
      f = '0; f.ftype = FT_SINGLE; f.dst_x = 3; f.dst_y = 2; f.cnop = P_E; f.pkt_id = 12'habc;
      @(negedge clk); en = 1; inj[0].valid = 1; inj[0].flit = f;
      @(posedge clk); #1; inj[0] = '0;
      t = 1;
      while (!ej[NN-1].valid && t < 100) begin @(posedge clk); #1; t++; end
      check(t == 2 * (5 + 1), "lone packet latency 2*(hops+1)");
      $display("lone packet latency %0d ticks", t);
      @(posedge clk); #1;
    end

    // the same in the 3x1 mesh with one delay stage: (0,0) -> (2,0)
    begin
      flit_t f;
      int t;
      f = '0; f.ftype = FT_SINGLE; f.dst_x = 2; f.dst_y = 0; f.cnop = P_E; f.pkt_id = 12'h123;
      @(negedge clk); en = 1; inj_d[0].valid = 1; inj_d[0].flit = f;
      @(posedge clk); #1; inj_d[0] = '0;
      t = 1;
      while (!ej_d[2].valid && t < 100) begin @(posedge clk); #1; t++; end
      check(t == 3 * (2 + 1), "lone packet latency 3*(hops+1) with one delay stage");
      check(ej_d[2].flit.pkt_id == 12'h123 && ej_d[2].flit.cnop == P_L, "delayed packet fields");
      $display("lone packet latency with DELAY=1: %0d ticks", t);
      @(posedge clk); #1;
    end

    for (int cyc = 0; cyc < 200000; cyc++) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      for (int n = 0; n < NN; n++) begin
        int v0;
        for (int v = 0; v < NVC; v++)
          if (txq[n][v].size() == 0 && made < NPKT && $urandom % 4 == 0) make_packet(n, v);
        inj[n] = '0;
        v0 = $urandom % NVC;
        for (int k = 0; k < NVC; k++) begin
          int v;
          v = (v0 + k) % NVC;
          if (inj_full[n][v]) full_seen++;
          if (!inj[n].valid && txq[n][v].size() > 0 && !inj_full[n][v]) begin
            inj[n].valid = 1; inj[n].flit = txq[n][v][0];
          end
        end
      end
      @(posedge clk);
      #1;
      if (en)
        for (int n = 0; n < NN; n++) begin
          if (inj[n].valid) void'(txq[n][inj[n].flit.vcid].pop_front());
          if (ej[n].valid) sink(n, ej[n].flit);
        end
      if (made == NPKT && exp_dst.size() == 0) break;
    end
    check(delivered == NPKT && exp_dst.size() == 0, "all packets delivered");
    check(full_seen > 0, "local VC full seen");
    $display("delivered %0d packets, full-flag observations %0d", delivered, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
