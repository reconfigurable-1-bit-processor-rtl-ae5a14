// tb_ioe: I/O element in both directions.
//  OUT: the controller side writes 16-bit words (strobe, rw = 1); the IOE
//  must send the low dlen+1 bits of each, LSB first, in order, with the
//  configured idle gap, and report empty when done. 15 words in batches
//  make the 3-bit pointers wrap.
//  IN: serial words arrive on the west short wire; after each batch the
//  controller side reads them back (strobe, rw = 0) and the low bits must
//  match, in order; 12 words wrap the pointers again.
module tb_ioe;
  import ba_pkg::*;
  localparam int L = 7;
  logic clk = 0, rst_n = 0, cfg_shift = 0, cfg_hold = 0, cfg_si = 0, cfg_so;
  dr_t [3:0]         short_in;
  dr_t [3:0][L-1:0]  long_in;
  dr_t               y;
  logic [3:0][L-1:0] long_en;
  st_e               state;
  logic strobe = 0, rw = 0, nempty;
  logic [15:0] din = 0, dout;
  int checks = 0, failures = 0;

  ioe #(.DIST(6), .STEP(1)) dut (.clk, .rst_n, .cfg_shift, .cfg_hold, .cfg_si, .cfg_so,
    .short_in, .long_in, .y, .long_en, .state, .strobe, .rw, .din, .dout, .nempty);

  always #5 clk = ~clk;

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

  task automatic configure(input op_e op, input int n, input int wl, input int sel);
    cfg_t c;
    logic [CFG_W-1:0] w;
    c = '0; c.op = op; c.dlen = LEN_W'(n - 1); c.wlen = LEN_W'(wl); c.in_a = SEL_W'(sel);
    w = c;
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk); cfg_shift = 1; cfg_si = w[b];
    end
    @(negedge clk); cfg_shift = 0;
  endtask

  logic [15:0] sent[$];
  logic        obits[$];
  int          idle_run, min_gap;
  bit          mon_on = 0;

  // serial output monitor
  always @(negedge clk) if (mon_on) begin
    #1;
    if (dr_valid(y)) begin
      if (obits.size() > 0 && idle_run < min_gap && idle_run > 0) min_gap = idle_run;
      obits.push_back(y.m);
      idle_run = 0;
    end else idle_run++;
  end

  initial begin
    short_in = '{default: DR_Z};
    long_in  = '{default: DR_Z};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- OUT ----------------
    configure(OP_IO_OUT, 10, 2, 0);
    check(!dr_valid(y) && !nempty, "idle and empty after configuration");
    min_gap = 1000; idle_run = 0; mon_on = 1;
    for (int batch = 0; batch < 3; batch++) begin
      for (int i = 0; i < 5; i++) begin
        @(negedge clk);
        strobe = 1; rw = 1; din = 16'($urandom);
        sent.push_back(din);
      end
      @(negedge clk); strobe = 0;
      check(nempty, "non-empty after writes");
      repeat (70) @(negedge clk);
      check(!nempty, "empty after sending");
    end
    mon_on = 0;
    check(obits.size() == 150, $sformatf("OUT bit count %0d", obits.size()));
    check(min_gap == 2, $sformatf("idle gap between words %0d, expected 2", min_gap));
    for (int w = 0; w < 15 && (w + 1) * 10 <= obits.size(); w++) begin
      logic [9:0] got;
      for (int i = 0; i < 10; i++) got[i] = obits[w*10+i];
      check(got == sent[w][9:0], $sformatf("OUT word %0d got %h exp %h", w, got, sent[w][9:0]));
    end
    // ---------------- IN ----------------
    configure(OP_IO_IN, 12, 0, DIR_W * 8);
    sent.delete();
    for (int batch = 0; batch < 3; batch++) begin
      for (int i = 0; i < 4; i++) begin
        logic [15:0] v;
        v = 16'($urandom);
        sent.push_back(v);
        for (int b = 0; b < 12; b++) begin
          @(negedge clk); short_in[DIR_W] = dr_drive(v[b]);
        end
        @(negedge clk); short_in[DIR_W] = DR_Z;
      end
      @(negedge clk);
      check(nempty, "words collected");
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        strobe = 1; rw = 0;
        #1;
        check(dout[11:0] == sent[batch*4+i][11:0],
              $sformatf("IN word %0d got %h exp %h", batch*4+i, dout[11:0], sent[batch*4+i][11:0]));
      end
      @(negedge clk); strobe = 0;
      #1;
      check(!nempty && dout == '0, "empty after reads, bus released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
