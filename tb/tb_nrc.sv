// tb_nrc: exhaustive check of the look-ahead X-Y route computation at three
// router positions, against a reference written here: step to the
// neighbour in the direction taken, then route X first, then Y.
module tb_nrc;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  localparam int NPOS = 3;
  localparam int PX [NPOS] = '{0, 2, 4};
  localparam int PY [NPOS] = '{0, 1, 4};

  port_e op [NPOS];
  logic [COORD_W-1:0] dx, dy;
  port_e np [NPOS];

  for (genvar i = 0; i < NPOS; i++) begin : g
    nrc #(.X(PX[i]), .Y(PY[i])) dut (.out_port(op[i]), .dst_x(dx), .dst_y(dy), .next_port(np[i]));
  end

  function automatic port_e ref_next(int cx, int cy, port_e p, int tx, int ty);
    int nx, ny;
    nx = cx; ny = cy;
    if (p == P_L) return P_L;
    case (p)
      P_N: ny++;
      P_S: ny--;
      P_E: nx++;
      default: nx--;
    endcase
    if (tx != nx) return (tx > nx) ? P_E : P_W;
    if (ty != ny) return (ty > ny) ? P_N : P_S;
    return P_L;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 5; p++)
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) begin
          for (int i = 0; i < NPOS; i++) op[i] = port_e'(p);
          dx = COORD_W'(x); dy = COORD_W'(y);
          #1;
          for (int i = 0; i < NPOS; i++) begin
            int nx, ny;
            // only legal hops: the neighbour must be inside a 5x5 mesh
            nx = PX[i] + (p == P_E) - (p == P_W);
            ny = PY[i] + (p == P_N) - (p == P_S);
            if (nx < 0 || nx > 4 || ny < 0 || ny > 4) continue;
            checks++;
            if (np[i] != ref_next(PX[i], PY[i], port_e'(p), x, y)) begin
              failures++;
              $display("FAIL pos(%0d,%0d) port %0d dest(%0d,%0d): got %0d", PX[i], PY[i], p, x, y, np[i]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
