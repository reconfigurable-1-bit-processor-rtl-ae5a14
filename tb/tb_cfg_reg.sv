// tb_cfg_reg: two registers in a chain. Shifts two random 54-bit words in,
// MSB first, and checks that each register holds its word (first word in
// the far register), that the fields decode as packed, that the register
// holds while shift is low and that reset gives OP_NOP.
module tb_cfg_reg;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0, si = 0;
  logic mid, so;
  cfg_t cfg0, cfg1;
  int checks = 0, failures = 0;

  cfg_reg u0 (.clk, .rst_n, .shift, .si, .so(mid), .cfg(cfg0));
  cfg_reg u1 (.clk, .rst_n, .shift, .si(mid), .so, .cfg(cfg1));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CFG_W-1:0] w0, w1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(cfg0.op == OP_NOP && cfg1 == '0, "reset value");
    for (int t = 0; t < 10; t++) begin
      w0 = {$urandom, $urandom};
      w1 = {$urandom, $urandom};
      // far register's word first
      for (int b = CFG_W - 1; b >= 0; b--) begin
        @(negedge clk); shift = 1; si = w1[b];
      end
      for (int b = CFG_W - 1; b >= 0; b--) begin
        @(negedge clk); shift = 1; si = w0[b];
      end
      @(negedge clk); shift = 0; si = 1;
      check(cfg0 == cfg_t'(w0), "near register word");
      check(cfg1 == cfg_t'(w1), "far register word");
      check(cfg1.konst == w1[15:0] && cfg1.op == op_e'(w1[CFG_W-1 -: 8]) &&
            cfg1.dlen == w1[25:21] && cfg1.in_a == w1[45:41], "field positions");
      check(so == w1[CFG_W-1], "chain output");
      repeat (5) @(negedge clk);
      check(cfg0 == cfg_t'(w0) && cfg1 == cfg_t'(w1), "hold without shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
