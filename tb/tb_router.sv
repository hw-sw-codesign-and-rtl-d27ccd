// tb_router: router (2,2) of a 5x5 mesh with all five ports driven.
//
// The testbench plays the four neighbours and the local node. On every
// input port it sends packets of 1..6 flits, on both VCs, obeying the
// credits the router returns and never mixing two packets on one VC; the
// destinations are those X-Y routing can bring through that port. On every
// output it acts as the downstream input port: it keeps DEPTH slots per VC
// and returns credits after a random hold, so credit stalls happen. It
// checks that each packet leaves by the X-Y port, whole and in order on a
// single output VC, with VCID and CNOP rewritten, that no output VC is used
// beyond its credits, and that a lone flit crosses the router in exactly
// two ticks (FIFO write, then output register). Enable gaps are inserted.
module tb_router;
  import noc_pkg::*;
  localparam int NP = NPORTS, NVC = 2, DEPTH = 8, RX = 2, RY = 2;
  localparam int NPKT = 120;   // packets per input port

  logic clk = 0, rst_n = 0, en = 0;
  link_t   in [NP], out [NP];
  credit_t credit_out [NP], credit_in [NP];
  logic [NVC-1:0] local_vc_full;
  int checks = 0, failures = 0;
  int stalls = 0, sent_flits = 0, recv_flits = 0, recv_pkts = 0;

  router #(.X(RX), .Y(RY), .NVC(NVC), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- upstream senders ----------------
  flit_t txq [NP][NVC][$];        // flits still to send per input VC
  int    up_cred [NP][NVC];
  int    pkts_made [NP];
  // expected packets: key = {in port, seq}
  port_e exp_port [int];
  int    exp_len  [int];

  function automatic bit legal_dest(int p, int dx, int dy);
    // where a packet entering by port p can be headed under X-Y routing
    case (p)
      P_W: return dx >= RX;                  // travelling east
      P_E: return dx <= RX;                  // travelling west
      P_S: return dx == RX && dy >= RY;      // travelling north
      P_N: return dx == RX && dy <= RY;      // travelling south
      default: return 1;
    endcase
  endfunction

  task automatic make_packet(int p, int v);
    int dx, dy, len, key;
    flit_t f;
    do begin dx = $urandom % 5; dy = $urandom % 5; end while (!legal_dest(p, dx, dy));
    len = 1 + $urandom % 6;
    key = p * 200 + pkts_made[p];
    pkts_made[p]++;
    exp_port[key] = xy_route(RX, RY, COORD_W'(dx), COORD_W'(dy));
    exp_len[key]  = len;
    for (int i = 0; i < len; i++) begin
      f = '0;
      if (i == 0) begin
        f.ftype = (len == 1) ? FT_SINGLE : FT_HEAD;
        f.cnop  = exp_port[key];
        f.src_x = 0; f.src_y = 0;
        f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy);
        f.pkt_id = PID_W'(key);
      end else begin
        f.ftype = (i == len - 1) ? FT_TAIL : FT_BODY;
        f[28:0] = 29'(key * 16 + i);
      end
      f.vcid = 1'(v);
      txq[p][v].push_back(f);
    end
  endtask

  // ---------------- downstream sinks ----------------
  int  dn_used [NP][NVC];          // occupied downstream slots
  int  hold_q [NP][$];             // pending credit release times (ticks)
  logic hold_vc [NP][$];
  int  cur_key [NP][NVC];          // packet in progress per output VC
  int  cur_idx [NP][NVC];
  int  tick_no = 0;

  task automatic sink(int o, flit_t f);
    int v, key;
    v = f.vcid;
    recv_flits++;
    dn_used[o][v]++;
    check(dn_used[o][v] <= DEPTH, "credit overrun");
    hold_q[o].push_back(tick_no + ($urandom % 3 == 0 ? 12 : $urandom % 3));
    hold_vc[o].push_back(1'(v));
    if (is_head(f)) begin
      key = f.pkt_id;
      check(cur_key[o][v] < 0, "head inside a packet on one VC");
      check(exp_port.exists(key) && exp_port[key] == o, "left by the X-Y port");
      check(f.cnop == (o == P_L ? P_L : nrc_ref(o, f.dst_x, f.dst_y)), "CNOP rewritten");
      cur_key[o][v] = key; cur_idx[o][v] = 1;
      if (is_tail(f)) begin
        check(exp_len[key] == 1, "single flit packet length");
        recv_pkts++; exp_port.delete(key); cur_key[o][v] = -1;
      end
    end else begin
      key = cur_key[o][v];
      check(key >= 0 && int'(f[28:0]) == key * 16 + cur_idx[o][v], "body/tail order and VC");
      cur_idx[o][v]++;
      if (is_tail(f)) begin
        check(key >= 0 && exp_len[key] == cur_idx[o][v], "packet length");
        recv_pkts++; exp_port.delete(key); cur_key[o][v] = -1;
      end
    end
  endtask

  function automatic port_e nrc_ref(int o, logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    int nx, ny;
    nx = RX + (o == P_E) - (o == P_W);
    ny = RY + (o == P_N) - (o == P_S);
    return xy_route(COORD_W'(nx), COORD_W'(ny), dx, dy);
  endfunction

  // ---------------- main loop ----------------
  initial begin
    int done;
    for (int p = 0; p < NP; p++) begin
      in[p] = '0; credit_in[p] = '0; pkts_made[p] = 0;
      for (int v = 0; v < NVC; v++) begin
        up_cred[p][v] = DEPTH; dn_used[p][v] = 0; cur_key[p][v] = -1;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // latency of a lone single-flit packet from L to E
    begin
      flit_t f;
      f = '0; f.ftype = FT_SINGLE; f.cnop = P_E; f.dst_x = 4; f.dst_y = 2; f.pkt_id = 12'hfff;
      @(negedge clk); en = 1; in[P_L].valid = 1; in[P_L].flit = f;
      @(posedge clk); #1; in[P_L] = '0;
      check(!out[P_E].valid, "not out after one tick");
      @(posedge clk); #1;
      check(out[P_E].valid && out[P_E].flit.pkt_id == 12'hfff, "out after two ticks");
      check(credit_out[P_L].valid, "credit back to local");
      @(negedge clk); en = 0;
      credit_in[P_E].valid = 1; credit_in[P_E].vc = out[P_E].flit.vcid;
      @(negedge clk); en = 1;
      @(posedge clk); #1; credit_in[P_E] = '0;
    end

    for (int cyc = 0; cyc < 60000; cyc++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      // new packets
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NVC; v++)
          if (txq[p][v].size() == 0 && pkts_made[p] < NPKT && $urandom % 3 == 0) make_packet(p, v);
      // drive inputs
      for (int p = 0; p < NP; p++) begin
        int v0;
        in[p] = '0;
        v0 = $urandom % NVC;
        for (int k = 0; k < NVC; k++) begin
          int v;
          v = (v0 + k) % NVC;
          if (!in[p].valid && txq[p][v].size() > 0 && up_cred[p][v] > 0) begin
            in[p].valid = 1; in[p].flit = txq[p][v][0];
          end
        end
      end
      // credits to the router's outputs
      for (int o = 0; o < NP; o++) begin
        credit_in[o] = '0;
        if (hold_q[o].size() > 0 && hold_q[o][0] <= tick_no) begin
          credit_in[o].valid = 1; credit_in[o].vc = hold_vc[o][0];
        end
      end
      @(posedge clk);
      #1;
      if (en) begin
        tick_no++;
        for (int p = 0; p < NP; p++) begin
          if (in[p].valid) begin
            void'(txq[p][in[p].flit.vcid].pop_front());
            up_cred[p][in[p].flit.vcid]--;
            sent_flits++;
          end
          if (credit_out[p].valid) up_cred[p][credit_out[p].vc]++;
          if (credit_in[p].valid) begin
            dn_used[p][credit_in[p].vc]--;
            void'(hold_q[p].pop_front()); void'(hold_vc[p].pop_front());
          end
          if (out[p].valid) sink(p, out[p].flit);
        end
        // a VC with a waiting flit whose output VC has no credit left
        for (int p = 0; p < NP; p++)
          for (int v = 0; v < NVC; v++)
            if (dut.active[p][v] && dut.has_flit[p][v] &&
                !dut.credit_ok[dut.req_port[p][v]][dut.out_vc[p][v]]) stalls++;
      end
      done = 1;
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NVC; v++)
          if (pkts_made[p] < NPKT || txq[p][v].size() > 0) done = 0;
      if (done && exp_port.size() == 0) break;
    end
    check(exp_port.size() == 0, "all packets delivered");
    check(stalls > 0, "credit stall exercised");
    check(sent_flits == recv_flits, "flit conservation");
    $display("packets=%0d flits=%0d credit-stall cycles=%0d", recv_pkts, recv_flits, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
