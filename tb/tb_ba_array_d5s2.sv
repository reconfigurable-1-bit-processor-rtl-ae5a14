// tb_ba_array_d5s2: end-to-end run of the array built with other wiring
// parameters: a 5x8 grid, distance 5, step 2.
//
// With step 2 a new long wire starts at every second position and each
// spans 6 positions, so an element sees ceil(6/2) = 3 long wires per side
// (select codes side*4 + 0..3, output codes 1 + side*3 + j), and the two
// elements of a position pair see the same wires. The mapping computes
//     y = a + b                          (8-bit words, sign-extended)
// over long wires only:
//   (0,1) IOE out a -> short -> (1,1) DELAY k=1 -> wire of row 1|2 starting
//         at column 0, local number 0 at column 1 and 2 at column 5
//   (0,2) IOE out b (written a clock later) -> short -> (1,2) PASS ->
//         wire of row 1|2 starting at column 2, local number 1 at column 5
//   (2,5) ADD -> wire of column 4|5 starting at row 2
//   (4,5) IOE in (local number 1 of that wire), south controller
// Checked: the configuration width that follows from the parameters, every
// sum, both source streams back to back (wait length 0), and that no long
// wire had two drivers. The sizes are this testbench's choice; distance 5
// with step 2 is one of the symmetric settings the original architecture
// discusses.
module tb_ba_array_d5s2;
  import ba_pkg::*;
  localparam int R = 5, C = 8, DIST = 5, STEP = 2, NW = 6, NBITS = R * C * CFG_W;
  localparam int NWORDS = (NBITS + 15) / 16;
  localparam int L = 3;

  logic clk = 0, rst_n = 0;
  logic h_req = 0;
  logic [1:0] h_side = 0, h_cmd = 0;
  logic [2:0] h_idx = 0;
  logic [15:0] h_wdata = 0, h_rdata;
  logic h_rvalid, h_byte, h_busy, long_conflict, cfg_tail;
  logic ioe_nempty [R][C];
  int checks = 0, failures = 0;

  ba_array #(.ROWS(R), .COLS(C), .DIST(DIST), .STEP(STEP)) dut (
    .clk, .rst_n, .h_req, .h_side, .h_cmd, .h_idx, .h_wdata, .h_rdata,
    .h_rvalid, .h_byte, .h_busy, .ioe_nempty, .long_conflict, .cfg_tail);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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
      8'h01, 8'h02: x.op = OP_IO_OUT;
      8'h11: begin x.op = OP_DELAY; x.konst = 1; x.in_a = 0; x.out_sel = 5'(1 + DIR_S*L + 0); end
      8'h12: begin x.op = OP_PASS;  x.in_a = 0; x.out_sel = 5'(1 + DIR_S*L + 0); end
      8'h25: begin x.op = OP_ADD; x.in_a = 5'(DIR_N*(L+1) + 1 + 2); x.in_b = 5'(DIR_N*(L+1) + 1 + 1);
                   x.out_sel = 5'(1 + DIR_W*L + 0); end
      8'h45: begin x.op = OP_IO_IN; x.in_a = 5'(DIR_W*(L+1) + 1 + 1); end
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

  int n_long, n_conflict, n_add_bits;
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        if (dut.long_en[r][c] != '0 && dr_valid(dut.y[r][c])) n_long++;
    if (dr_valid(dut.y[2][5])) n_add_bits++;
    if (long_conflict) n_conflict++;
  end

  logic [7:0]  A[NW], B[NW];
  logic [15:0] exp_y[NW], got[$];
  always @(posedge clk) if (h_rvalid) got.push_back(h_rdata);

  initial begin
    logic [NWORDS*16-1:0] stream;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check($bits(dut.long_en[0][0]) == 4 * L, "three long wires per side");
    stream = '0;
    for (int e = 0; e < R * C; e++)
      stream[e*CFG_W +: CFG_W] = cell_cfg(e / C, e % C);
    for (int w = NWORDS - 1; w >= 0; w--) host(0, HC_CFG, 0, stream[w*16 +: 16]);
    @(negedge clk);
    while (h_busy) @(negedge clk);
    check(dut.g_row[2].g_col[5].g_pe.u_pe.cfg == cell_cfg(2, 5), "configuration of (2,5) loaded");
    host(2, HC_SETW, 0, 16'h0027);  // south: 8-bit results, sign-extend

    for (int n = 0; n < NW; n++) begin
      logic [7:0] s;
      A[n] = 8'($urandom);
      B[n] = 8'($urandom);
      s = A[n] + B[n];
      exp_y[n] = {{8{s[7]}}, s};
    end
    // all pairs back to back; each source sends one word per 8 clocks
    for (int n = 0; n < NW; n++) begin
      host(0, HC_WRITE, 1, {8'h0, A[n]});
      host(0, HC_WRITE, 2, {8'h0, B[n]});
    end
    repeat (8 * NW + 40) @(negedge clk);
    while (ioe_nempty[R-1][5]) begin
      host(2, HC_READ, 5, 0);
      @(negedge clk);
    end
    repeat (4) @(negedge clk);

    check(got.size() == NW, $sformatf("%0d results, expected %0d", got.size(), NW));
    for (int n = 0; n < NW && n < got.size(); n++)
      check(got[n] == exp_y[n], $sformatf("pair %0d a=%h b=%h: sum %h expected %h",
                                          n, A[n], B[n], got[n], exp_y[n]));
    $display("mechanisms: long=%0d add_bits=%0d conflicts=%0d", n_long, n_add_bits, n_conflict);
    check(n_add_bits == 8 * NW, $sformatf("adder output %0d bits, expected %0d", n_add_bits, 8 * NW));
    check(n_long > 0, "long wires used");
    check(n_conflict == 0, "no long-wire conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
