// tb_out_dec: for all 32 codes checks the long-wire enables: code 0 and
// codes above 28 enable nothing, code 1 + side*7 + j enables exactly long
// wire j of that side.
module tb_out_dec;
  import ba_pkg::*;
  localparam int L = 7;
  logic [OSEL_W-1:0] sel;
  logic [3:0][L-1:0] en;
  int checks = 0, failures = 0;

  out_dec #(.L(L)) dut (.sel, .en);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 32; code++) begin
      logic [4*L-1:0] exp;
      exp = '0;
      if (code >= 1 && code <= 4 * L) exp[code-1] = 1'b1;
      sel = OSEL_W'(code);
      #1;
      checks++;
      if (en !== exp) begin
        failures++;
        $display("code %0d: got %h exp %h", code, en, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
