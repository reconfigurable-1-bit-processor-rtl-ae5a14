// tb_long_wire_net: geometry of the long wires, for distance 6 / step 1 on
// 7x7 and distance 5 / step 2 on 6x8. One random element drives one of its
// long wires at a time. A wire is named by its channel (boundary between
// rows, or between columns) and its start position: local wire j of an
// element at position p starts at (p/STEP - j)*STEP and spans DIST+1
// positions. Every element side must see the value exactly where it names
// the same physical wire, and no-data elsewhere; every receiver must lie
// within the wire's span. Two drivers on one wire raise 'conflict', two
// drivers on different wires do not.
module tb_long_wire_net;
  import ba_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit done0 = 0, done1 = 0;
  initial begin
    wait (done0 && done1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int R = g ? 6 : 7;
    localparam int C = g ? 8 : 7;
    localparam int D = g ? 5 : 6;
    localparam int S = g ? 2 : 1;
    localparam int L = (D + 1) / S;
    dr_t               y       [R][C];
    logic [3:0][L-1:0] long_en [R][C];
    dr_t [3:0][L-1:0]  long_in [R][C];
    logic              conflict;

    long_wire_net #(.ROWS(R), .COLS(C), .DIST(D), .STEP(S)) dut (.y, .long_en, .long_in, .conflict);

    // channel id: horizontal channels 0..R, vertical R+1+(0..C)
    function automatic int chan(input int r, input int c, input int d);
      case (d)
        DIR_N:   return r;
        DIR_S:   return r + 1;
        DIR_W:   return R + 1 + c;
        default: return R + 1 + c + 1;
      endcase
    endfunction
    function automatic int pos(input int r, input int c, input int d);
      return (d == DIR_N || d == DIR_S) ? c : r;
    endfunction
    function automatic int wstart(input int r, input int c, input int d, input int j);
      return (pos(r, c, d) / S - j) * S;
    endfunction

    initial begin
      #1;
      for (int t = 0; t < 200; t++) begin
        int r0, c0, d0, j0, r1, c1, d1, j1;
        logic v;
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            y[r][c]       = dr_drive(1'($urandom));
            long_en[r][c] = '0;
          end
        r0 = $urandom_range(0, R - 1); c0 = $urandom_range(0, C - 1);
        d0 = $urandom_range(0, 3);     j0 = $urandom_range(0, L - 1);
        v  = 1'($urandom);
        y[r0][c0] = dr_drive(v);
        long_en[r0][c0][d0][j0] = 1'b1;
        #1;
        check(!conflict, "no conflict with one driver");
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            for (int d = 0; d < 4; d++)
              for (int j = 0; j < L; j++) begin
                logic same;
                same = chan(r, c, d) == chan(r0, c0, d0) && wstart(r, c, d, j) == wstart(r0, c0, d0, j0);
                if (same) begin
                  check(long_in[r][c][d][j] == dr_drive(v), $sformatf("cfg%0d (%0d,%0d) side %0d wire %0d missed value", g, r, c, d, j));
                  check(pos(r, c, d) >= wstart(r0, c0, d0, j0) && pos(r, c, d) <= wstart(r0, c0, d0, j0) + D,
                        "receiver within wire span");
                end else begin
                  check(long_in[r][c][d][j] == DR_Z, $sformatf("cfg%0d (%0d,%0d) side %0d wire %0d not idle", g, r, c, d, j));
                end
              end
        // a second driver: same wire seen from another element, or another wire
        r1 = r0; c1 = c0; d1 = d0; j1 = j0;
        if (d0 == DIR_N && r0 > 0) begin r1 = r0 - 1; d1 = DIR_S; end
        else if (d0 == DIR_S && r0 < R - 1) begin r1 = r0 + 1; d1 = DIR_N; end
        else j1 = (j0 + 1) % L;
        long_en[r1][c1][d1][j1] = 1'b1;
        y[r1][c1] = dr_drive(v);
        #1;
        check(conflict == (chan(r1, c1, d1) == chan(r0, c0, d0) &&
                           wstart(r1, c1, d1, j1) == wstart(r0, c0, d0, j0)) || L == 1,
              $sformatf("cfg%0d conflict flag %b", g, conflict));
      end
      if (g == 0) done0 = 1; else done1 = 1;
    end
  end
endmodule
