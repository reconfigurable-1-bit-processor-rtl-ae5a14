// out_dec: output decoder of a processor or I/O element.
//
// The output register always drives the element's four short wires; it
// reaches a long wire only through a tristate driver enabled here. Code 0
// enables no long wire; code 1 + side*L + j enables long wire j of side
// (N, E, S, W). For distance 6, step 1 that is a 5-bit code decoding to 28
// enables. Purely combinational. The 28-output decoder and 5-bit field are
// from the original architecture; the code assignment is this design's own.
module out_dec
  import ba_pkg::*;
#(
  parameter int L = 7
) (
  input  logic [OSEL_W-1:0]   sel,
  output logic [3:0][L-1:0]   en
);
  always_comb begin
    en = '0;
    for (int d = 0; d < 4; d++)
      for (int j = 0; j < L; j++)
        if (int'(sel) == 1 + d*L + j) en[d][j] = 1'b1;
  end

  initial assert (4*L + 1 <= 2**OSEL_W) else $error("out_dec: %0d wires need a wider code", 4*L);
endmodule
