// tb_pe: processor element, operation by operation.
// Each test loads a configuration through the serial chain, sends several
// random bit-serial words (LSB first) on the short wires (A from north,
// B from east, C from south, or A on a long wire from the west), collects
// every valid output bit and compares the rebuilt words with results the
// testbench computes with ordinary integer arithmetic. It also checks the
// latency of the first result bit: 1 clock for single-phase operations
// and multiply, n+1 for right shift and compare (result in the latter
// half), k+1 for DELAY, and that the output decoder enables the
// configured long wire.
module tb_pe;
  import ba_pkg::*;
  localparam int L = 7;
  localparam int SEL_A_N = 0, SEL_B_E = 8, SEL_C_S = 16;
  localparam int SEL_A_W3 = 3 * 8 + 1 + 3;

  logic clk = 0, rst_n = 0, cfg_shift = 0, cfg_hold = 0, cfg_si = 0, cfg_so;
  dr_t [3:0]         short_in;
  dr_t [3:0][L-1:0]  long_in;
  dr_t               y;
  logic [3:0][L-1:0] long_en;
  st_e               state;
  int checks = 0, failures = 0;
  int cyc = 0;

  pe #(.DIST(6), .STEP(1)) dut (.clk, .rst_n, .cfg_shift, .cfg_hold, .cfg_si, .cfg_so,
    .short_in, .long_in, .y, .long_en, .state);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
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

  task automatic configure(input cfg_t c);
    logic [CFG_W-1:0] w;
    w = c;
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk);
      cfg_shift = 1;
      cfg_si    = w[b];
    end
    @(negedge clk);
    cfg_shift = 0;
  endtask

  function automatic cfg_t mk(input op_e op, input int n, input int wl, input int k,
                              input int sa = SEL_A_N, input int osel = 0);
    cfg_t c;
    c = '0;
    c.op      = op;
    c.in_a    = SEL_W'(sa);
    c.in_b    = SEL_W'(SEL_B_E);
    c.in_c    = SEL_W'(SEL_C_S);
    c.out_sel = OSEL_W'(osel);
    c.dlen    = LEN_W'(n - 1);
    c.wlen    = LEN_W'(wl);
    c.konst   = K_W'(k);
    return c;
  endfunction

  function automatic logic [63:0] sx(input logic [63:0] v, input int n);
    return (v[n-1]) ? (v | ~((64'd1 << n) - 1)) : (v & ((64'd1 << n) - 1));
  endfunction

  function automatic logic [63:0] ref_op(input op_e op, input int n, input int k,
                                         input logic [31:0] a, b, c);
    logic [63:0] m, r;
    m = (64'd1 << n) - 1;
    case (op)
      OP_PASS, OP_DELAY: r = a;
      OP_ADD:   r = a + b;
      OP_SUB:   r = a - b;
      OP_AND:   r = a & b;
      OP_OR:    r = a | b;
      OP_XOR:   r = a ^ b;
      OP_NOT:   r = ~a;
      OP_ADD3:  r = a + b + c;
      OP_MUX:   r = (c & a) | (~c & b);
      OP_ADDK:  r = a + sx(64'(k), 16);
      OP_SHL:   r = a << k;
      OP_SHR:   r = $signed(sx(a, n)) >>> k;
      OP_CMPGT: r = ($signed(sx(a, n)) > $signed(sx(b, n))) ? m : 0;
      OP_MUL:   begin r = (a & m) * (b & m); m = (64'd1 << (2 * n)) - 1; end
      default:  r = 0;
    endcase
    return r & m;
  endfunction

  // send nw words of n bits, gap idle cycles after each; check results
  task automatic run(input op_e op, input int n, input int wl, input int k, input int gap,
                     input int nw, input int lat, input int sa = SEL_A_N);
    logic [31:0] A[$], B[$], C[$];
    logic        obits[$];
    int          first_in, first_out, nout;
    logic [31:0] msk;
    msk = (n == 32) ? '1 : ((32'd1 << n) - 1);
    configure(mk(op, n, wl, k, sa));
    for (int w = 0; w < nw; w++) begin
      A.push_back($urandom & msk);
      B.push_back((w == 1) ? A[w] : ($urandom & msk));   // one equal pair
      C.push_back((op == OP_MUX && w % 2) ? msk : ($urandom & msk));
    end
    if (op == OP_MUX) C[0] = 0;
    first_in = -1; first_out = -1;
    nout = (op == OP_MUL) ? 2 * n : n;
    fork
      begin
        for (int w = 0; w < nw; w++) begin
          for (int i = 0; i < n; i++) begin
            @(negedge clk);
            if (first_in < 0) first_in = cyc;
            if (sa == SEL_A_N) short_in[DIR_N] = dr_drive(A[w][i]);
            else long_in[DIR_W][3] = dr_drive(A[w][i]);
            short_in[DIR_E] = dr_drive(B[w][i]);
            short_in[DIR_S] = dr_drive(C[w][i]);
          end
          for (int g = 0; g < gap; g++) begin
            @(negedge clk);
            short_in = '{default: DR_Z};
            long_in  = '{default: DR_Z};
          end
        end
        @(negedge clk);
        short_in = '{default: DR_Z};
        long_in  = '{default: DR_Z};
      end
      begin
        repeat (nw * (n + gap) + 3 * n + 20) begin
          @(negedge clk);
          #1;
          if (dr_valid(y)) begin
            if (first_out < 0) first_out = cyc;
            obits.push_back(y.m);
          end
        end
      end
    join
    check(obits.size() == nw * nout,
          $sformatf("%s: %0d output bits, expected %0d", op.name(), obits.size(), nw * nout));
    check(first_out - first_in == lat,
          $sformatf("%s: latency %0d, expected %0d", op.name(), first_out - first_in, lat));
    for (int w = 0; w < nw && (w + 1) * nout <= obits.size(); w++) begin
      logic [63:0] got, exp;
      got = '0;
      for (int i = 0; i < nout; i++) got[i] = obits[w * nout + i];
      exp = ref_op(op, n, k, A[w], B[w], C[w]);
      check(got == exp, $sformatf("%s n=%0d word %0d: a=%h b=%h c=%h got %h exp %h",
                                  op.name(), n, w, A[w], B[w], C[w], got, exp));
    end
  endtask

  initial begin
    short_in = '{default: DR_Z};
    long_in  = '{default: DR_Z};
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!dr_valid(y) && state == ST_STOP_SP, "idle after reset");
    run(OP_PASS,  8, 0, 0, 0, 4, 1);
    run(OP_PASS,  8, 0, 0, 0, 2, 1, SEL_A_W3);
    run(OP_ADD,   8, 0, 0, 0, 5, 1);
    run(OP_ADD,  32, 0, 0, 0, 3, 1);
    run(OP_SUB,  12, 3, 0, 3, 5, 1);
    run(OP_AND,   5, 0, 0, 0, 4, 1);
    run(OP_OR,    5, 0, 0, 0, 4, 1);
    run(OP_XOR,   5, 0, 0, 0, 4, 1);
    run(OP_NOT,   5, 0, 0, 0, 4, 1);
    run(OP_ADD3, 10, 0, 0, 0, 5, 1);
    run(OP_MUX,   8, 0, 0, 0, 4, 1);
    run(OP_ADDK, 20, 0, 16'hFF85, 0, 4, 1);
    run(OP_ADDK, 12, 0, 16'h0123, 0, 4, 1);
    run(OP_SHL,  10, 0, 3, 0, 4, 1);
    run(OP_SHR,  12, 0, 2, 12, 4, 13);
    run(OP_SHR,  16, 0, 5, 16, 3, 17);
    run(OP_CMPGT, 8, 0, 0, 8, 6, 9);
    run(OP_MUL,   8, 0, 0, 8, 4, 1);
    run(OP_MUL,  16, 0, 0, 16, 4, 1);
    run(OP_MUL,  15, 0, 0, 15, 3, 1);
    run(OP_DELAY, 8, 0, 5, 3, 3, 6);
    // output decoder: code 1 + S*7 + 2 drives south long wire 2 only
    configure(mk(OP_PASS, 8, 0, 0, SEL_A_N, 1 + DIR_S * L + 2));
    begin
      logic [3:0][L-1:0] e;
      e = '0;
      e[DIR_S][2] = 1'b1;
      check(long_en == e, "long-wire enable decode");
    end
    configure(mk(OP_NOP, 8, 0, 0));
    check(long_en == '0, "no long wire for code 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
