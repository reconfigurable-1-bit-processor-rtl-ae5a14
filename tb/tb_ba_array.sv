// tb_ba_array: end-to-end run of the whole array at its default size
// (7x7 elements, distance 6, step 1).
//
// The host loads a mapping of the data-flow graph
//     y = (a > b) ? a - b : a + b      (8-bit signed words)
// plus an 8x8 -> 16-bit multiply p = a * b on the same inputs, streams 12
// word pairs in through two north IOEs and reads the results back through
// the south and east controllers. Mapping (row, column):
//   (0,1) IOE out a          -> short -> (1,1) DELAY k=1 -> long wire, row 1|2
//   (0,2) IOE out b (1 cycle later) -> short -> (1,2) PASS -> long wire, row 1|2
//   (2,1) CMPGT a,b -> mask in the latter half -> long wire, column 1|2
//   (2,2) SUB a,b (waits 8 cycles between words) -> short -> (3,2) DELAY k=7
//   (2,3) ADD a,b -> short -> (3,3) DELAY k=7 -> long wire, column 2|3
//   (4,2) MUX: A = a-b (short), B = a+b (long), C = mask (long) -> long wire
//   (6,2) IOE in, read by the south controller, sign-extended from 8 bits
//   (2,5) MUL a,b (16-bit product) -> short -> (2,6) IOE in, east controller
// The delays implement the alignment the graph needs: the DELAY on a makes
// up for b being written one cycle later, and the k=7 DELAYs align the sum
// and difference with the compare result, which appears in the latter half.
//
// Every result is compared with integer arithmetic in the testbench. It
// also counts, and requires at least once each: long-wire transfers,
// short-wire transfers, run-special (latter half) cycles, stop-normal
// waits, restarts from stop-special, DELAY operation, both MUX choices,
// negative results widened by sign extension, FIFO pointer wrap-around,
// and that no long wire ever had two drivers.
module tb_ba_array;
  import ba_pkg::*;
  localparam int R = 7, C = 7, NW = 12, NBITS = R * C * CFG_W;
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
  function automatic cfg_t cell_cfg(input int r, input int c);
    cfg_t x;
    x = '0;
    x.dlen = 7;
    case ({r[3:0], c[3:0]})
      8'h01, 8'h02: begin x.op = OP_IO_OUT; x.wlen = 8; end
      8'h11: begin x.op = OP_DELAY; x.konst = 1; x.in_a = 0; x.out_sel = 1 + DIR_S*7 + 0; end
      8'h12: begin x.op = OP_PASS;  x.in_a = 0; x.out_sel = 1 + DIR_S*7 + 2; end
      8'h21: begin x.op = OP_CMPGT; x.in_a = 1; x.in_b = 2; x.out_sel = 1 + DIR_E*7 + 0; end
      8'h22: begin x.op = OP_SUB;   x.in_a = 2; x.in_b = 3; x.wlen = 8; end
      8'h23: begin x.op = OP_ADD;   x.in_a = 3; x.in_b = 4; end
      8'h25: begin x.op = OP_MUL;   x.in_a = 5; x.in_b = 6; end
      8'h32: begin x.op = OP_DELAY; x.konst = 7; x.in_a = 0; end
      8'h33: begin x.op = OP_DELAY; x.konst = 7; x.in_a = 0; x.out_sel = 1 + DIR_W*7 + 0; end
      8'h42: begin x.op = OP_MUX; x.in_a = 0; x.in_b = DIR_E*8 + 1 + 1; x.in_c = DIR_W*8 + 1 + 2;
                   x.out_sel = 1 + DIR_W*7 + 0; x.wlen = 8; end
      8'h62: begin x.op = OP_IO_IN; x.in_a = DIR_W*8 + 1 + 2; end
      8'h26: begin x.op = OP_IO_IN; x.in_a = DIR_W*8; x.dlen = 15; end
      default: x = '0;
    endcase
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
  int n_long, n_short, n_run_sp, n_stop_n, n_restart, n_delay, n_sel_sub, n_sel_add;
  int n_neg, n_cfg, n_conflict, n_writes;
  st_e prev_add_state;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        if (dut.long_en[r][c] != '0 && dr_valid(dut.y[r][c])) n_long++;
    if (dr_valid(dut.short_in[2][6][DIR_W]) || dr_valid(dut.short_in[1][1][DIR_N])) n_short++;
    if (dut.state[2][1] == ST_RUN_SP) n_run_sp++;
    if (dut.state[2][2] == ST_STOP_N) n_stop_n++;
    if (prev_add_state == ST_STOP_SP && dut.state[2][3] == ST_RUN_N) n_restart++;
    prev_add_state = dut.state[2][3];
    if (dr_valid(dut.y[1][1]) || dr_valid(dut.y[3][2])) n_delay++;
    if (long_conflict) n_conflict++;
  end

  // ---------------- stimulus and results ----------------
  logic [7:0]  A[NW], B[NW];
  logic [15:0] exp_mux[$], exp_mul[$], got_mux[$], got_mul[$];
  int          pend_side[$];

  always @(posedge clk) if (h_rvalid) begin
    int s;
    s = pend_side.pop_front();
    if (s == 2) got_mux.push_back(h_rdata);
    else        got_mul.push_back(h_rdata);
  end

  initial begin
    logic [NWORDS*16-1:0] stream;
    int wi, busy_wait;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // configuration: last element's word first, padded at the front
    stream = '0;
    for (int e = 0; e < R * C; e++)
      stream[e*CFG_W +: CFG_W] = cell_cfg(e / C, e % C);
    for (int w = NWORDS - 1; w >= 0; w--) begin
      host(0, HC_CFG, 0, stream[w*16 +: 16]);
      n_cfg++;
    end
    @(negedge clk);
    while (h_busy) @(negedge clk);
    check(dut.g_row[4].g_col[2].g_pe.u_pe.cfg == cell_cfg(4, 2), "configuration of (4,2) loaded");
    check(dut.g_row[0].g_col[1].g_ioe.u_ioe.cfg == cell_cfg(0, 1), "configuration of (0,1) loaded");
    host(2, HC_SETW, 0, 16'h0027);  // south: 8-bit results, sign-extend
    host(1, HC_SETW, 0, 16'h000F);  // east: 16-bit results
    check(h_byte == 0, "east controller: 16-bit results");
    h_side = 2;
    #1 check(h_byte == 1, "south controller: byte-sized results");

    for (int i = 0; i < NW; i++) begin
      logic signed [7:0] sa, sb;
      logic [7:0] y8;
      A[i] = 8'($urandom);
      B[i] = 8'($urandom);
      if (i == 3) B[i] = A[i];
      sa = A[i]; sb = B[i];
      y8 = (sa > sb) ? 8'(sa - sb) : 8'(sa + sb);
      if (sa > sb) n_sel_sub++; else n_sel_add++;
      if (y8[7]) n_neg++;
      exp_mux.push_back({{8{y8[7]}}, y8});
      exp_mul.push_back(16'(A[i]) * 16'(B[i]));
    end
    // preload three word pairs, then one pair per 16-cycle word period
    wi = 0;
    for (; wi < 3; wi++) begin
      host(0, HC_WRITE, 1, {8'hA5, A[wi]});
      host(0, HC_WRITE, 2, {8'h5A, B[wi]});
      n_writes += 2;
    end
    for (int it = 0; it < NW + 6; it++) begin
      if (wi < NW) begin
        host(0, HC_WRITE, 1, {8'h00, A[wi]});
        host(0, HC_WRITE, 2, {8'h00, B[wi]});
        n_writes += 2;
        wi++;
      end
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        if (ioe_nempty[6][2]) begin
          pend_side.push_back(2);
          host(2, HC_READ, 2, 0);
        end else if (ioe_nempty[2][6]) begin
          pend_side.push_back(1);
          host(1, HC_READ, 1, 0);
        end else @(negedge clk);
        @(negedge clk);
      end
    end
    repeat (5) @(negedge clk);

    check(got_mux.size() == NW, $sformatf("%0d select results, expected %0d", got_mux.size(), NW));
    check(got_mul.size() == NW, $sformatf("%0d products, expected %0d", got_mul.size(), NW));
    for (int i = 0; i < NW && i < got_mux.size(); i++)
      check(got_mux[i] == exp_mux[i], $sformatf("word %0d a=%h b=%h: result %h expected %h",
                                                i, A[i], B[i], got_mux[i], exp_mux[i]));
    for (int i = 0; i < NW && i < got_mul.size(); i++)
      check(got_mul[i] == exp_mul[i], $sformatf("word %0d a=%h b=%h: product %h expected %h",
                                                i, A[i], B[i], got_mul[i], exp_mul[i]));
    $display("mechanisms: long=%0d short=%0d run_special=%0d stop_normal=%0d restart=%0d delay=%0d",
             n_long, n_short, n_run_sp, n_stop_n, n_restart, n_delay);
    $display("            mux_sub=%0d mux_add=%0d negative=%0d cfg_words=%0d fifo_writes=%0d conflicts=%0d",
             n_sel_sub, n_sel_add, n_neg, n_cfg, n_writes, n_conflict);
    check(n_long > 0, "long wires used");
    check(n_short > 0, "short wires used");
    check(n_run_sp > 0, "latter-half (run-special) processing");
    check(n_stop_n > 0, "stop-normal wait");
    check(n_restart > 0, "restart from stop-special");
    check(n_delay > 0, "delay operation");
    check(n_sel_sub > 0 && n_sel_add > 0, "both selector choices");
    check(n_neg > 0, "sign extension of a negative result");
    check(n_cfg == NWORDS, "configuration chain loaded");
    check(n_writes / 2 > 8, "FIFO pointers wrapped");
    check(n_conflict == 0, "no long-wire conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
