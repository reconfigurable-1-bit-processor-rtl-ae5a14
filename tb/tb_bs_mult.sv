// tb_bs_mult: checks the multiplier column step.
// (1) For random partial-product and carry vectors, the product bit is the
// parity of all inputs and no weight is lost: popcount(p)+popcount(c) ==
// r + 2*popcount(c_next). (2) Full 16x16 products: the testbench feeds the
// 32 columns of a*b (p[j] = a[i-j] & b[j]) with the returned carries and
// compares the collected bits with a*b computed by the simulator.
module tb_bs_mult;
  localparam int N = 16;
  logic [N-1:0] p, c, c_next;
  logic r;
  int checks = 0, failures = 0;

  bs_mult #(.N(N)) dut (.p, .c, .r, .c_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      p = N'($urandom);
      c = N'($urandom);
      #1;
      checks++;
      if (r != ^{p, c} || $countones(p) + $countones(c) != int'(r) + 2 * $countones(c_next)) begin
        failures++;
        $display("column mismatch p=%h c=%h r=%b c_next=%h", p, c, r, c_next);
      end
    end
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0] a, b;
      logic [2*N-1:0] prod;
      a = N'($urandom);
      b = N'($urandom);
      if (t == 0) begin a = '1; b = '1; end
      c = '0;
      for (int i = 0; i < 2 * N; i++) begin
        for (int j = 0; j < N; j++) p[j] = (i - j >= 0 && i - j < N) ? (a[i-j] & b[j]) : 1'b0;
        #1;
        prod[i] = r;
        c = c_next;
      end
      checks++;
      if (prod != (2*N)'(a) * (2*N)'(b)) begin
        failures++;
        $display("product mismatch %h*%h got %h", a, b, prod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
