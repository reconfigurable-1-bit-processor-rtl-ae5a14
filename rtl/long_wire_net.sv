// long_wire_net: the shared, bidirectional long wires.
//
// A channel of long wires runs along each boundary between rows (ROWS+1
// horizontal channels, the outer two touching one row only) and between
// columns (COLS+1 vertical channels). Within a channel a wire spans
// DIST+1 consecutive element positions and a new wire starts every STEP
// positions; wires that would start before position 0 are kept, clipped
// to the array, so every element sees exactly L = (DIST+1)/STEP wires on
// each side (the symmetric case, required here: (DIST+1) % STEP == 0).
// Wire w of a channel starts at position (w - (L-1))*STEP; an element at
// position p sees, as its local wire j, wire p/STEP - j + L-1 of the
// channel on that side (N: channel r, S: r+1, W: channel c, E: c+1).
//
// Each element may drive one of its local wires (long_en); everyone
// sharing the wire receives the value. The tristate bus is modelled as
// the OR of the enabled drivers' two lines, so an undriven wire reads as
// no-data. 'conflict' flags a wire with two enabled drivers that both
// carry data, which a valid configuration never does. Combinational.
// Distance, step, the wire count formula and the symmetric-only rule are
// the original architecture's; wire numbering and the clipping at edges are this
// design's own.
module long_wire_net
  import ba_pkg::*;
#(
  parameter int ROWS = 7,
  parameter int COLS = 7,
  parameter int DIST = 6,
  parameter int STEP = 1,
  localparam int L   = lmax(DIST, STEP),
  localparam int NWH = (COLS - 1) / STEP + L,  // wires per horizontal channel
  localparam int NWV = (ROWS - 1) / STEP + L   // wires per vertical channel
) (
  input  dr_t              y        [ROWS][COLS],
  input  logic [3:0][L-1:0] long_en [ROWS][COLS],
  output dr_t [3:0][L-1:0] long_in  [ROWS][COLS],
  output logic             conflict
);
  logic [1:0] hw  [ROWS+1][NWH];   // {m, i} per wire
  logic [1:0] vw  [COLS+1][NWV];
  logic       hbusy [ROWS+1][NWH];
  logic       vbusy [COLS+1][NWV];

  always_comb begin
    conflict = 1'b0;
    for (int h = 0; h <= ROWS; h++)
      for (int w = 0; w < NWH; w++) begin
        hw[h][w]    = '0;
        hbusy[h][w] = 1'b0;
      end
    for (int v = 0; v <= COLS; v++)
      for (int w = 0; w < NWV; w++) begin
        vw[v][w]    = '0;
        vbusy[v][w] = 1'b0;
      end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int j = 0; j < L; j++) begin
          int wh, wv;
          logic dv;
          wh = c / STEP - j + L - 1;
          wv = r / STEP - j + L - 1;
          dv = dr_valid(y[r][c]);
          if (long_en[r][c][DIR_N][j]) begin
            conflict     |= hbusy[r][wh] & dv;
            hbusy[r][wh] |= dv;
            hw[r][wh]    |= y[r][c];
          end
          if (long_en[r][c][DIR_S][j]) begin
            conflict       |= hbusy[r+1][wh] & dv;
            hbusy[r+1][wh] |= dv;
            hw[r+1][wh]    |= y[r][c];
          end
          if (long_en[r][c][DIR_W][j]) begin
            conflict     |= vbusy[c][wv] & dv;
            vbusy[c][wv] |= dv;
            vw[c][wv]    |= y[r][c];
          end
          if (long_en[r][c][DIR_E][j]) begin
            conflict       |= vbusy[c+1][wv] & dv;
            vbusy[c+1][wv] |= dv;
            vw[c+1][wv]    |= y[r][c];
          end
        end
  end

  always_comb
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int j = 0; j < L; j++) begin
          long_in[r][c][DIR_N][j] = dr_t'(hw[r][c / STEP - j + L - 1]);
          long_in[r][c][DIR_S][j] = dr_t'(hw[r+1][c / STEP - j + L - 1]);
          long_in[r][c][DIR_W][j] = dr_t'(vw[c][r / STEP - j + L - 1]);
          long_in[r][c][DIR_E][j] = dr_t'(vw[c+1][r / STEP - j + L - 1]);
        end

  initial assert ((DIST + 1) % STEP == 0)
    else $error("long_wire_net: (DIST+1) must be a multiple of STEP");
endmodule
