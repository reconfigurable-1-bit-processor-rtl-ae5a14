// tb_controller: host commands against a modelled IOE bus (N_IOE = 5).
// Checks the strobe/rw/data timing of writes and reads, that read data is
// widened from the set width with sign or zero extension, the byte flag,
// and that a configuration command shifts its 16 bits out MSB first with
// cfg_shift and h_busy high for exactly 16 cycles, ignoring commands
// meanwhile, and that the elements stay held after the shifting until a
// command other than configuration closes the session.
module tb_controller;
  import ba_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic h_req = 0;
  hcmd_e h_cmd = HC_WRITE;
  logic [2:0] h_idx = 0;
  logic [15:0] h_wdata = 0, h_rdata, bus_wdata, bus_rdata;
  logic h_rvalid, h_byte, h_busy, rw, cfg_shift, cfg_hold, cfg_so;
  logic [N-1:0] strobe;
  logic [15:0] ioe_word [N];
  int checks = 0, failures = 0;

  controller #(.N_IOE(N)) dut (.clk, .rst_n, .h_req, .h_cmd, .h_idx, .h_wdata, .h_rdata,
    .h_rvalid, .h_byte, .h_busy, .strobe, .rw, .bus_wdata, .bus_rdata, .cfg_shift, .cfg_hold, .cfg_so);

  always #5 clk = ~clk;

  // IOE model: a strobed IOE with rw = 0 drives its word
  always_comb begin
    bus_rdata = '0;
    for (int i = 0; i < N; i++) if (strobe[i] && !rw) bus_rdata |= ioe_word[i];
  end

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

  task automatic cmd(input hcmd_e c, input int idx, input logic [15:0] d);
    @(negedge clk);
    h_req = 1; h_cmd = c; h_idx = 3'(idx); h_wdata = d;
    @(negedge clk);
    h_req = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(h_byte == 0 && !h_busy, "reset: 16-bit width, idle");
    // writes
    for (int t = 0; t < 10; t++) begin
      int idx;
      logic [15:0] d;
      idx = $urandom_range(0, N - 1);
      d   = 16'($urandom);
      cmd(HC_WRITE, idx, d);
      check(strobe == N'(1 << idx) && rw && bus_wdata == d, $sformatf("write strobe %b", strobe));
      @(negedge clk);
      check(strobe == '0, "single strobe");
    end
    // reads with widening
    for (int t = 0; t < 30; t++) begin
      int idx, w;
      logic s;
      logic [15:0] exp;
      idx = $urandom_range(0, N - 1);
      w   = (t < 5) ? 15 : $urandom_range(0, 15);
      s   = (t < 5) ? 1'b1 : 1'($urandom);
      for (int i = 0; i < N; i++) ioe_word[i] = 16'($urandom);
      cmd(HC_SETW, 0, {10'b0, s, 5'(w)});
      check(h_byte == (w <= 7), "byte flag");
      cmd(HC_READ, idx, 0);
      check(strobe == N'(1 << idx) && !rw, "read strobe");
      exp = ioe_word[idx];
      for (int b = w + 1; b < 16; b++) exp[b] = s ? ioe_word[idx][w] : 1'b0;
      @(negedge clk);
      check(h_rvalid && h_rdata == exp,
            $sformatf("read w=%0d s=%b raw %h got %h exp %h", w, s, ioe_word[idx], h_rdata, exp));
      @(negedge clk);
      check(!h_rvalid, "single rvalid");
    end
    // configuration shifting
    begin
      logic [15:0] d, got;
      int busy_cycles;
      d = 16'($urandom);
      @(negedge clk);
      h_req = 1; h_cmd = HC_CFG; h_wdata = d;
      @(negedge clk);
      h_cmd = HC_WRITE; h_idx = 0;   // ignored while busy
      busy_cycles = 0;
      while (h_busy) begin
        check(cfg_shift, "shift while busy");
        got[15 - busy_cycles] = cfg_so;
        check(strobe == '0, "no bus command while busy");
        busy_cycles++;
        @(negedge clk);
      end
      h_req = 0;
      check(cfg_hold && !cfg_shift, "session still held after shifting");
      repeat (3) @(negedge clk);
      check(cfg_hold, "held until another command");
      cmd(HC_SETW, 0, 16'h000F);
      check(!cfg_hold, "session closed by a non-configuration command");
      check(busy_cycles == 16 && got == d, $sformatf("cfg: %0d cycles, bits %h exp %h", busy_cycles, got, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
