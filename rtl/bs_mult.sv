// bs_mult: one column step of the bit-serial multiplier inside a PE.
//
// A product A*B is produced one column per clock, LSB first. For column i
// the PE presents the column's partial products p[j] = a[i-j] & b[j] and
// the carries c[j] left over from column i-1 (all zero for column 0). A
// chain of N full adders, one per multiplier bit j, adds p[j], c[j] and the
// running sum of the adders before it. The last sum is product bit r_i
// (the XOR of all partial products and carries of the column); each
// adder's carry becomes c[j] for column i+1. Because
//   sum(p) + sum(c) = r + 2 * sum(c_next),
// the carries never lose weight and 2N columns give the full 2N-bit
// product. Purely combinational; the PE keeps c in a data register.
// The column structure follows the original architecture; the adder-chain arrangement
// is this design's own reading.
module bs_mult #(
  parameter int N = 16
) (
  input  logic [N-1:0] p,       // partial products of the column
  input  logic [N-1:0] c,       // carries into the column
  output logic         r,       // product bit of the column
  output logic [N-1:0] c_next   // carries into the next column
);
  logic [N:0] s;

  assign s[0] = 1'b0;
  for (genvar j = 0; j < N; j++) begin : g_fa
    assign s[j+1]    = p[j] ^ c[j] ^ s[j];
    assign c_next[j] = (p[j] & c[j]) | (p[j] & s[j]) | (c[j] & s[j]);
  end

  assign r = s[N];
endmodule
