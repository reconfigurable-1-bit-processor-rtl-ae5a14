// tb_adder_pipeline: the bit-serial pipeline ((a + b) + c) + d of three
// adder stages, 4-bit words, on the full-size array (7x7, distance 6,
// step 1). Operands enter through four north IOEs, one cycle apart
// because the host writes them one per cycle, which is exactly the
// staggering the pipeline needs: stage 1 adds a and b, stage 2 adds its
// result to c one cycle later, stage 3 adds d. A PASS element in front of
// stage 1 realigns a with b.
//   (0,1..4) IOE out a, b, c, d -> short wires down into row 1
//   (1,1) PASS a -> (1,2) ADD b -> (1,3) ADD c -> (1,4) ADD d   (short wires east)
//   (1,4) -> long wire in the column channel 4|5 -> (6,5) IOE in -> south controller
// Checks: every 4-bit sum, read back and zero-extended; after the first
// result, a new 4-bit result every 4 clocks with no idle cycle; and the
// pipeline latency of 4 clocks from the first bit of a to the first
// result bit.
module tb_adder_pipeline;
  import ba_pkg::*;
  localparam int R = 7, C = 7, NW = 6, N = 4;
  localparam int NWORDS = (R * C * CFG_W + 15) / 16;

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

  function automatic cfg_t cell_cfg(input int r, input int c);
    cfg_t x;
    x = '0;
    x.dlen = N - 1;
    if (r == 0 && c >= 1 && c <= 4) x.op = OP_IO_OUT;
    else if (r == 1 && c == 1) x.op = OP_PASS;
    else if (r == 1 && c >= 2 && c <= 4) begin
      x.op   = OP_ADD;
      x.in_a = DIR_W * 8;          // running sum from the west
      x.in_b = DIR_N * 8;          // new operand from the IOE above
      if (c == 4) x.out_sel = 1 + DIR_E * 7 + 0;
    end else if (r == 6 && c == 5) begin
      x.op   = OP_IO_IN;
      x.in_a = DIR_W * 8 + 1 + 5;
    end
    return x;
  endfunction

  task automatic host(input int side, input hcmd_e cmd, input int idx, input logic [15:0] d);
    while (h_busy) @(negedge clk);
    h_req = 1; h_side = 2'(side); h_cmd = cmd; h_idx = 3'(idx); h_wdata = d;
    @(negedge clk);
    h_req = 0;
  endtask

  int t_first_a = -1, t_first_y = -1, run_len = 0, max_run = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && t_first_a < 0 && dr_valid(dut.y[0][1])) t_first_a = cyc;
    if (rst_n && dr_valid(dut.y[1][4])) begin
      if (t_first_y < 0) t_first_y = cyc;
      run_len++;
      if (run_len > max_run) max_run = run_len;
    end else run_len = 0;
  end

  logic [3:0] ops [NW][4];
  logic [15:0] got[$];
  always @(posedge clk) if (h_rvalid) got.push_back(h_rdata);

  initial begin
    logic [NWORDS*16-1:0] stream;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    stream = '0;
    for (int e = 0; e < R * C; e++) stream[e*CFG_W +: CFG_W] = cell_cfg(e / C, e % C);
    for (int w = NWORDS - 1; w >= 0; w--) host(0, HC_CFG, 0, stream[w*16 +: 16]);
    while (h_busy) @(negedge clk);
    host(2, HC_SETW, 0, 16'h0003);   // 4-bit results, zero-extended
    for (int i = 0; i < NW; i++)
      for (int k = 0; k < 4; k++) ops[i][k] = 4'($urandom);
    for (int i = 0; i < NW; i++)
      for (int k = 0; k < 4; k++) host(0, HC_WRITE, k + 1, {12'hFED, ops[i][k]});
    repeat (40) @(negedge clk);
    h_side = 2;
    #1 check(h_byte, "byte-sized results flagged");
    for (int i = 0; i < NW; i++) begin
      host(2, HC_READ, 5, 0);
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(got.size() == NW, $sformatf("%0d results, expected %0d", got.size(), NW));
    for (int i = 0; i < NW && i < got.size(); i++) begin
      logic [3:0] s;
      s = ops[i][0] + ops[i][1] + ops[i][2] + ops[i][3];
      check(got[i] == {12'h000, s}, $sformatf("word %0d: %h+%h+%h+%h got %h exp %h",
            i, ops[i][0], ops[i][1], ops[i][2], ops[i][3], got[i], s));
    end
    check(max_run == NW * N, $sformatf("%0d result bits back to back, expected %0d (one word per %0d clocks)",
                                       max_run, NW * N, N));
    check(t_first_y - t_first_a == 4, $sformatf("pipeline latency %0d clocks, expected 4", t_first_y - t_first_a));
    check(!long_conflict, "no long-wire conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
