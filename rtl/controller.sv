// controller: host-side controller of one edge of the array.
//
// Connects the host to the IOEs of its edge over one shared 16-bit bus
// (per-IOE strobe, common rw and write data, read data ORed from the
// IOEs), converts result widths, and feeds the configuration chain.
//
// Host port: a command is accepted in a cycle with h_req high and h_busy
// low.
//   HC_WRITE  h_wdata goes to IOE h_idx: strobe with rw = 1 in the next
//             cycle.
//   HC_READ   strobe with rw = 0 in the next cycle; the IOE word, widened
//             from the set width to 16 bits, is on h_rdata with h_rvalid
//             one cycle after that.
//   HC_SETW   h_wdata[4:0] = result width in bits minus one, h_wdata[5] =
//             sign-extend (1) or zero-extend (0).
//   HC_CFG    h_wdata is shifted into the configuration chain, MSB first,
//             one bit per cycle for 16 cycles, with cfg_shift high;
//             h_busy is high meanwhile. The first HC_CFG opens a
//             configuration session: cfg_hold stays high, keeping every
//             element stopped between the 16-bit pieces, until this
//             controller accepts a command other than HC_CFG.
// h_byte flags a width of at most 8 bits: the host may then take only the
// low byte, already widened to 8 bits.
//
// The original architecture gives the controller's duties (host communication,
// configuration, control of the elements, widening of results to 16 or 8
// bits and the strobe/RW bus) but leaves its design open because the
// external interface was not specified. The command set, the
// cycle timing and the serial configuration feed are this design's own.
module controller
  import ba_pkg::*;
#(
  parameter int N_IOE = 7,
  localparam int IDX_W = (N_IOE > 1) ? $clog2(N_IOE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             h_req,
  input  hcmd_e            h_cmd,
  input  logic [IDX_W-1:0] h_idx,
  input  logic [K_W-1:0]   h_wdata,
  output logic [K_W-1:0]   h_rdata,
  output logic             h_rvalid,
  output logic             h_byte,
  output logic             h_busy,
  // shared IOE bus
  output logic [N_IOE-1:0] strobe,
  output logic             rw,
  output logic [K_W-1:0]   bus_wdata,
  input  logic [K_W-1:0]   bus_rdata,
  // configuration chain
  output logic             cfg_shift,
  output logic             cfg_hold,
  output logic             cfg_so
);
  logic [LEN_W-1:0] width;
  logic             sext;
  logic [K_W-1:0]   cfg_sr;
  logic [4:0]       cfg_left;
  logic             rd_pend;
  logic             accept;
  logic             cfg_session;

  assign accept    = h_req && !h_busy;
  assign h_busy    = (cfg_left != '0);
  assign cfg_shift = h_busy;
  assign cfg_hold  = cfg_session || h_busy;
  assign cfg_so    = cfg_sr[K_W-1];
  assign h_byte    = (width <= LEN_W'(7));

  // widen a word of width+1 bits to 16 bits
  function automatic logic [K_W-1:0] widen(input logic [K_W-1:0] d,
                                           input logic [LEN_W-1:0] w, input logic s);
    logic [K_W-1:0] o;
    for (int b = 0; b < K_W; b++)
      o[b] = (b <= int'(w)) ? d[b] : (s & d[w[3:0]]);
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      strobe    <= '0;
      rw        <= 1'b0;
      bus_wdata <= '0;
      rd_pend   <= 1'b0;
      h_rdata   <= '0;
      h_rvalid  <= 1'b0;
      width     <= LEN_W'(K_W - 1);
      sext      <= 1'b1;
      cfg_sr    <= '0;
      cfg_left  <= '0;
      cfg_session <= 1'b0;
    end else begin
      strobe   <= '0;
      rd_pend  <= 1'b0;
      h_rvalid <= rd_pend;
      if (rd_pend) h_rdata <= widen(bus_rdata, (width > LEN_W'(K_W-1)) ? LEN_W'(K_W-1) : width, sext);
      if (h_busy) begin
        cfg_sr   <= {cfg_sr[K_W-2:0], 1'b0};
        cfg_left <= cfg_left - 1'b1;
      end
      if (accept) begin
        cfg_session <= (h_cmd == HC_CFG);
        unique case (h_cmd)
          HC_WRITE: begin
            strobe[h_idx] <= 1'b1;
            rw            <= 1'b1;
            bus_wdata     <= h_wdata;
          end
          HC_READ: begin
            strobe[h_idx] <= 1'b1;
            rw            <= 1'b0;
            rd_pend       <= 1'b1;
          end
          HC_SETW: begin
            width <= h_wdata[LEN_W-1:0];
            sext  <= h_wdata[LEN_W];
          end
          HC_CFG: begin
            cfg_sr   <= h_wdata;
            cfg_left <= 5'd16;
          end
        endcase
      end
    end

  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
    accept && h_cmd inside {HC_WRITE, HC_READ} |-> int'(h_idx) < N_IOE);
endmodule
