// tb_in_mux: drives random two-line values on all 32 sources and checks
// that every select code returns its source (code side*8 + 0 = short wire,
// side*8 + 1 + j = long wire j) and that every source is reachable.
module tb_in_mux;
  import ba_pkg::*;
  localparam int L = 7;
  dr_t [3:0]        short_in;
  dr_t [3:0][L-1:0] long_in;
  logic [SEL_W-1:0] sel;
  dr_t              y;
  int checks = 0, failures = 0;

  in_mux #(.L(L)) dut (.short_in, .long_in, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int d = 0; d < 4; d++) begin
        short_in[d] = 2'($urandom);
        for (int j = 0; j < L; j++) long_in[d][j] = 2'($urandom);
      end
      for (int d = 0; d < 4; d++)
        for (int k = 0; k <= L; k++) begin
          dr_t exp;
          exp = (k == 0) ? short_in[d] : long_in[d][k-1];
          sel = SEL_W'(d * 8 + k);
          #1;
          checks++;
          if (y !== exp) begin
            failures++;
            $display("sel %0d: got %b exp %b", sel, y, exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
