// cfg_reg: configuration register of one element.
//
// Holds the element's configuration word (ba_pkg::cfg_t: operation, three
// input selects, output select, data length, wait length, constant). The
// registers of all elements form one serial chain: while shift is high,
// the word moves one bit per clock from si towards the MSB and the old MSB
// leaves on so, which feeds the next element. After reset the word is all
// zero, i.e. OP_NOP: the element stays stopped and drives no data.
// The fields are the original architecture's; loading them through a serial chain is
// this design's choice (the original architecture only says configuration data comes
// from the host through the controllers).
module cfg_reg
  import ba_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic si,
  output logic so,
  output cfg_t cfg
);
  logic [CFG_W-1:0] q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[CFG_W-2:0], si};

  assign so  = q[CFG_W-1];
  assign cfg = cfg_t'(q);
endmodule
