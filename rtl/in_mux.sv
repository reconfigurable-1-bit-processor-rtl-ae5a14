// in_mux: input selector of a processor or I/O element.
//
// Each side (N, E, S, W) of an element offers one incoming short wire and
// L long wires, 4*(L+1) sources in all (32 for distance 6, step 1). The
// select code is side*(L+1) + k, where k = 0 is the short wire and
// k = 1..L is long wire k-1 of that side. A code beyond the last source
// selects nothing and yields the no-data value. Purely combinational.
// The 32-to-1 selector and its 5-bit code are from the original architecture; the code
// assignment is this design's own.
module in_mux
  import ba_pkg::*;
#(
  parameter int L = 7
) (
  input  dr_t [3:0]         short_in,
  input  dr_t [3:0][L-1:0]  long_in,
  input  logic [SEL_W-1:0]  sel,
  output dr_t               y
);
  localparam int NSRC = 4 * (L + 1);

  dr_t [NSRC-1:0] src;

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      src[d*(L+1)] = short_in[d];
      for (int k = 0; k < L; k++) src[d*(L+1)+k+1] = long_in[d][k];
    end
    y = (int'(sel) < NSRC) ? src[sel] : DR_Z;
  end

  initial assert (NSRC <= 2**SEL_W) else $error("in_mux: %0d sources need a wider select", NSRC);
endmodule
