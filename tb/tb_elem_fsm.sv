// tb_elem_fsm: directed scenarios against hand-derived cycle patterns.
//  1. single-phase, 4-bit words, wait 2: active 4 cycles (cnt 0..3), then
//     2 cycles in stop-normal, repeating; first bit in the start cycle.
//  2. two-phase, 3-bit words, no wait: 3 first-half + 3 latter-half bits
//     (run-special), back to back.
//  3. input stream ends: the element drops to stop-special, stays idle,
//     and restarts with cnt 0 when data returns.
//  4. hold forces stop-special.
module tb_elem_fsm;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, hold = 0, start = 0, two_phase = 0;
  logic [LEN_W-1:0] dlen = '0, wlen = '0, cnt;
  st_e  state;
  logic active, phase2, last;
  int checks = 0, failures = 0;

  elem_fsm dut (.clk, .rst_n, .hold, .start, .two_phase, .dlen, .wlen,
                .state, .cnt, .active, .phase2, .last);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare outputs in the current cycle (called after inputs settle)
  task automatic expect_cyc(input logic act, input logic ph2, input int c, input st_e st);
    #1;
    checks++;
    if (active !== act || phase2 !== ph2 || (act && int'(cnt) != c) || state !== st ||
        last !== (act && int'(cnt) == int'(dlen))) begin
      failures++;
      $display("t=%0t exp act=%b ph2=%b cnt=%0d st=%s got act=%b ph2=%b cnt=%0d st=%s last=%b",
               $time, act, ph2, c, st.name(), active, phase2, cnt, state.name(), last);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // ---- 1 ----
    dlen = 3; wlen = 2; two_phase = 0;
    expect_cyc(0, 0, 0, ST_STOP_SP);
    @(negedge clk);
    expect_cyc(0, 0, 0, ST_STOP_SP);
    start = 1;
    for (int w = 0; w < 3; w++) begin
      for (int b = 0; b < 4; b++) begin
        expect_cyc(1, 0, b, (w == 0 && b == 0) ? ST_STOP_SP : ST_RUN_N);
        @(negedge clk);
      end
      for (int g = 0; g < 2; g++) begin
        expect_cyc(0, 0, 0, ST_STOP_N);
        @(negedge clk);
      end
    end
    // ---- 2 ----
    hold = 1; @(negedge clk); hold = 0;
    dlen = 2; wlen = 0; two_phase = 1;
    for (int w = 0; w < 3; w++)
      for (int b = 0; b < 6; b++) begin
        expect_cyc(1, b >= 3, b % 3, (w == 0 && b == 0) ? ST_STOP_SP : (b >= 3 ? ST_RUN_SP : ST_RUN_N));
        @(negedge clk);
      end
    // ---- 3 ----
    two_phase = 0; start = 0;
    for (int g = 0; g < 4; g++) begin
      expect_cyc(0, 0, 0, g == 0 ? ST_RUN_N : ST_STOP_SP);
      @(negedge clk);
    end
    start = 1;
    for (int b = 0; b < 3; b++) begin
      expect_cyc(1, 0, b, b == 0 ? ST_STOP_SP : ST_RUN_N);
      @(negedge clk);
    end
    // ---- 4 ----
    hold = 1;
    @(negedge clk);
    expect_cyc(1, 0, 0, ST_STOP_SP);  // hold keeps it at word start; start still high
    hold = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
