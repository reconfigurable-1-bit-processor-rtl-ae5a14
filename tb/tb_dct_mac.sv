// tb_dct_mac: a four-tap multiply-accumulate, the inner step of a 1D-DCT
// row, run on the whole array at its default size (7x7, distance 6,
// step 1).
//
// A DCT output is a sum of products of samples and cosine coefficients.
// This testbench maps
//     y = x0*c0 + x1*c1 + x2*c2 + x3*c3      (7-bit unsigned operands,
//                                              16-bit products and sum)
// onto 19 elements and streams 6 sets of operands through it:
//   (0,1..4)  north IOEs out: x0, c0, x1, c1
//   (6,1..4)  south IOEs out: x2, c2, x3, c3
//   (1,1..4), (5,1..4)  DELAY elements, k = 7..0, one per source
//   (2,1), (2,3), (4,1), (4,3)  MUL: sample by short wire, coefficient
//             by long wire from the DELAY one column to the right
//   (2,2), (4,2)  ADD of the two products beside them (short wires)
//   (3,2)     ADD of the two partial sums above and below -> long wire
//   (3,6)     east IOE in, 16-bit results read by the east controller
// The host writes the eight operands of a set in eight consecutive
// clocks. Operand i therefore enters the array i clocks after operand 0,
// and DELAY k = 7 - i (latency 8 - i) aligns all eight before the
// multipliers. An 8-bit word times an 8-bit word takes 16 clocks per
// product in one PE (low half, then high half), so the source IOEs wait
// 8 clocks between words, and the adders take 16-bit words back to back.
//
// Checked: every sum against integer arithmetic; one result every 16
// clocks (2n clocks for n-bit operands) once the pipeline is full; that
// all four multipliers ran their latter half; that long wires carried
// data; and that no long wire had two drivers. The operand width and the
// number of taps are this testbench's choice; the full 8-point DCT needs
// more elements than the default array has.
module tb_dct_mac;
  import ba_pkg::*;
  localparam int R = 7, C = 7, NW = 6, NBITS = R * C * CFG_W;
  localparam int NWORDS = (NBITS + 15) / 16;

  logic clk = 0, rst_n = 0;
  logic h_req = 0;
  logic [1:0] h_side = 0, h_cmd = 0;
  logic [2:0] h_idx = 0;
  logic [15:0] h_wdata = 0, h_rdata;
  logic h_rvalid, h_byte, h_busy, long_conflict, cfg_tail;
  logic ioe_nempty [R][C];
  int checks = 0, failures = 0;

  ba_array dut (.clk, .rst_n, .h_req, .h_side, .h_cmd, .h_idx, .h_wdata, .h_rdata,
    .h_rvalid, .h_byte, .h_busy, .ioe_nempty, .long_conflict, .cfg_tail);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
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

  // ---------------- mapping ----------------
  localparam logic [4:0] I_N_SHORT = 5'(DIR_N * 8), I_S_SHORT = 5'(DIR_S * 8);
  localparam logic [4:0] I_W_SHORT = 5'(DIR_W * 8), I_E_SHORT = 5'(DIR_E * 8);

  function automatic cfg_t cell_cfg(input int r, input int c);
    cfg_t x;
    x = '0;
    x.dlen = 7;
    if ((r == 0 || r == R - 1) && c >= 1 && c <= 4) begin
      x.op = OP_IO_OUT;
      x.wlen = 8;
    end else if ((r == 1 || r == 5) && c >= 1 && c <= 4) begin
      // source index: north 0..3, south 4..7, in write order
      x.op = OP_DELAY;
      x.konst = 16'(7 - ((r == 1) ? c - 1 : c + 3));
      x.in_a = (r == 1) ? I_N_SHORT : I_S_SHORT;
      // coefficients go out on the long wire starting one column left
      if (c == 2 || c == 4) x.out_sel = (r == 1) ? 5'(1 + DIR_S * 7 + 1) : 5'(1 + DIR_N * 7 + 1);
    end else if ((r == 2 || r == 4) && (c == 1 || c == 3)) begin
      x.op = OP_MUL;
      x.in_a = (r == 2) ? I_N_SHORT : I_S_SHORT;
      x.in_b = (r == 2) ? 5'(DIR_N * 8 + 1) : 5'(DIR_S * 8 + 1);
    end else if ((r == 2 || r == 4) && c == 2) begin
      x.op = OP_ADD;
      x.dlen = 15;
      x.in_a = I_W_SHORT;
      x.in_b = I_E_SHORT;
    end else if (r == 3 && c == 2) begin
      x.op = OP_ADD;
      x.dlen = 15;
      x.in_a = I_N_SHORT;
      x.in_b = I_S_SHORT;
      x.out_sel = 5'(1 + DIR_N * 7 + 0);   // wire of row 2|3 starting at column 2
    end else if (r == 3 && c == C - 1) begin
      x.op = OP_IO_IN;
      x.dlen = 15;
      x.in_a = 5'(DIR_N * 8 + 1 + 4);     // same wire, seen from column 6
    end
    return x;
  endfunction

  // called at a falling edge; issues one command and returns at the next
  task automatic host(input int side, input hcmd_e cmd, input int idx, input logic [15:0] d);
    while (h_busy) @(negedge clk);
    h_req = 1; h_side = 2'(side); h_cmd = cmd; h_idx = 3'(idx); h_wdata = d;
    @(negedge clk);
    h_req = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_long, n_run_sp[4], n_conflict, cyc;
  int starts[$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        if (dut.long_en[r][c] != '0 && dr_valid(dut.y[r][c])) n_long++;
    if (dut.state[2][1] == ST_RUN_SP) n_run_sp[0]++;
    if (dut.state[2][3] == ST_RUN_SP) n_run_sp[1]++;
    if (dut.state[4][1] == ST_RUN_SP) n_run_sp[2]++;
    if (dut.state[4][3] == ST_RUN_SP) n_run_sp[3]++;
    // first bit of each word of the final adder
    if ((dut.state[3][2] == ST_STOP_SP ||
         (dut.state[3][2] == ST_RUN_N && dut.g_row[3].g_col[2].g_pe.u_pe.cnt == '0)) &&
        dr_valid(dut.y[2][2]) && dr_valid(dut.y[4][2]))
      starts.push_back(cyc);
    if (long_conflict) n_conflict++;
  end

  // ---------------- stimulus and results ----------------
  logic [6:0]  X[NW][4], K[NW][4];
  logic [15:0] exp_y[NW], got[$];

  always @(posedge clk) if (h_rvalid) got.push_back(h_rdata);

  initial begin
    logic [NWORDS*16-1:0] stream;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // configuration: last element's word first, padded at the front
    stream = '0;
    for (int e = 0; e < R * C; e++)
      stream[e*CFG_W +: CFG_W] = cell_cfg(e / C, e % C);
    for (int w = NWORDS - 1; w >= 0; w--) host(0, HC_CFG, 0, stream[w*16 +: 16]);
    @(negedge clk);
    while (h_busy) @(negedge clk);
    check(dut.g_row[3].g_col[2].g_pe.u_pe.cfg == cell_cfg(3, 2), "configuration of (3,2) loaded");
    host(1, HC_SETW, 0, 16'h000F);  // east: 16-bit results

    for (int n = 0; n < NW; n++) begin
      exp_y[n] = '0;
      for (int t = 0; t < 4; t++) begin
        X[n][t] = 7'($urandom);
        K[n][t] = 7'($urandom);
        if (n == 0) begin X[n][t] = 7'h7F; K[n][t] = 7'h7F; end  // largest sum
        exp_y[n] += 16'(X[n][t]) * 16'(K[n][t]);
      end
    end
    // sets back to back, eight clocks each; the sources drain one word per
    // 16 clocks, so at most four words wait in any source FIFO
    for (int n = 0; n < NW; n++) begin
      host(0, HC_WRITE, 1, {9'h0, X[n][0]});
      host(0, HC_WRITE, 2, {9'h0, K[n][0]});
      host(0, HC_WRITE, 3, {9'h0, X[n][1]});
      host(0, HC_WRITE, 4, {9'h0, K[n][1]});
      host(2, HC_WRITE, 1, {9'h0, X[n][2]});
      host(2, HC_WRITE, 2, {9'h0, K[n][2]});
      host(2, HC_WRITE, 3, {9'h0, X[n][3]});
      host(2, HC_WRITE, 4, {9'h0, K[n][3]});
    end
    repeat (16 * NW + 60) @(negedge clk);
    // the strobe follows the command by a clock: let nempty settle each time
    while (ioe_nempty[3][C-1]) begin
      host(1, HC_READ, 2, 0);
      @(negedge clk);
    end
    repeat (4) @(negedge clk);

    check(got.size() == NW, $sformatf("%0d results, expected %0d", got.size(), NW));
    for (int n = 0; n < NW && n < got.size(); n++)
      check(got[n] == exp_y[n], $sformatf("set %0d: sum %h expected %h", n, got[n], exp_y[n]));
    check(starts.size() == NW, $sformatf("%0d sums started, expected %0d", starts.size(), NW));
    for (int n = 1; n < starts.size(); n++)
      check(starts[n] - starts[n-1] == 16,
            $sformatf("sums %0d and %0d are %0d clocks apart, expected 16", n - 1, n,
                      starts[n] - starts[n-1]));
    $display("mechanisms: long=%0d run_special=%0d/%0d/%0d/%0d conflicts=%0d",
             n_long, n_run_sp[0], n_run_sp[1], n_run_sp[2], n_run_sp[3], n_conflict);
    for (int m = 0; m < 4; m++)
      check(n_run_sp[m] == 8 * NW, $sformatf("multiplier %0d latter half: %0d clocks", m, n_run_sp[m]));
    check(n_long > 0, "long wires used");
    check(n_conflict == 0, "no long-wire conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
