// ba_array: reconfigurable array of 1-bit processor elements.
//
// A ROWS x COLS grid of elements: PEs inside, IOEs on the whole border
// (a 7x7 grid holds 5x5 PEs and 24 IOEs). Elements exchange bit-serial,
// two-line (data / no-data) signals over the short wire network (to the
// four neighbours) and the long wire network (shared wires between rows
// and columns, shaped by DIST and STEP). The PEs never talk to a
// controller directly: four controllers, one per edge, each reach the
// IOEs of their edge over a shared 16-bit bus. The north edge holds row 0
// including both corners, the south edge the last row, the west and east
// edges the remaining IOEs of column 0 and the last column, each numbered
// from the top or the left starting at 0.
//
// Configuration: the north controller's HC_CFG command shifts bits into
// one chain through every element's 54-bit configuration register, in
// row-major order starting at element (0,0); the bit shifted in first
// ends in the last element, (ROWS-1, COLS-1), whose register MSB leaves
// on cfg_tail. From the first HC_CFG until the north controller accepts
// another kind of command, every element is held stopped (and IOE FIFOs
// empty), so partly loaded configurations never run.
//
// Host port: h_side selects the controller (0 N, 1 E, 2 S, 3 W); the
// command, index and data are that controller's (see controller.sv).
// Read data returns on h_rdata/h_rvalid. ioe_nempty[r][c] shows which IOE
// FIFOs hold data; long_conflict flags two drivers on one long wire.
//
// The grid, element kinds, wire networks and IOE-only path to the
// controllers follow the original architecture, whose chip is 7x7 with distance 6 and
// step 1. One controller per edge, the host command set and the serial
// configuration chain are this design's own choices.
module ba_array
  import ba_pkg::*;
#(
  parameter int ROWS = 7,
  parameter int COLS = 7,
  parameter int DIST = 6,
  parameter int STEP = 1,
  localparam int L     = lmax(DIST, STEP),
  localparam int NSIDE = (COLS > ROWS - 2) ? COLS : ROWS - 2,
  localparam int IDX_W = (NSIDE > 1) ? $clog2(NSIDE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             h_req,
  input  logic [1:0]       h_side,
  input  logic [1:0]       h_cmd,
  input  logic [IDX_W-1:0] h_idx,
  input  logic [K_W-1:0]   h_wdata,
  output logic [K_W-1:0]   h_rdata,
  output logic             h_rvalid,
  output logic             h_byte,
  output logic             h_busy,
  output logic             ioe_nempty [ROWS][COLS],
  output logic             long_conflict,
  output logic             cfg_tail
);
  // ---------------- element grid ----------------
  dr_t               y        [ROWS][COLS];
  logic [3:0][L-1:0] long_en  [ROWS][COLS];
  dr_t [3:0][L-1:0]  long_in  [ROWS][COLS];
  dr_t [3:0]         short_in [ROWS][COLS];
  st_e               state    [ROWS][COLS];
  logic              chain    [ROWS*COLS+1];
  logic              cfg_shift, cfg_hold;
  logic              c_cfg_hold [4];

  // per-edge controller wiring
  logic [NSIDE-1:0]  strobe    [4];
  logic              rw        [4];
  logic [K_W-1:0]    bus_wdata [4];
  logic [K_W-1:0]    bus_rdata [4];
  logic [K_W-1:0]    dout      [ROWS][COLS];
  logic [K_W-1:0]    c_rdata   [4];
  logic              c_rvalid  [4];
  logic              c_byte    [4];
  logic              c_busy    [4];
  logic              c_cfg_shift [4];
  logic              c_cfg_so    [4];

  function automatic int side_of(input int r, input int c);
    if (r == 0)        return 0;
    if (r == ROWS - 1) return 2;
    if (c == COLS - 1) return 1;
    return 3;
  endfunction

  function automatic int idx_of(input int r, input int c);
    return (r == 0 || r == ROWS - 1) ? c : r - 1;
  endfunction

  function automatic logic is_ioe(input int r, input int c);
    return r == 0 || r == ROWS - 1 || c == 0 || c == COLS - 1;
  endfunction

  assign chain[0]  = c_cfg_so[0];
  assign cfg_shift = c_cfg_shift[0];
  assign cfg_hold  = c_cfg_hold[0];
  assign cfg_tail  = chain[ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      if (is_ioe(r, c)) begin : g_ioe
        ioe #(.DIST(DIST), .STEP(STEP)) u_ioe (
          .clk, .rst_n, .cfg_shift, .cfg_hold,
          .cfg_si(chain[r*COLS+c]), .cfg_so(chain[r*COLS+c+1]),
          .short_in(short_in[r][c]), .long_in(long_in[r][c]),
          .y(y[r][c]), .long_en(long_en[r][c]), .state(state[r][c]),
          .strobe(strobe[side_of(r, c)][idx_of(r, c)]),
          .rw(rw[side_of(r, c)]), .din(bus_wdata[side_of(r, c)]),
          .dout(dout[r][c]), .nempty(ioe_nempty[r][c])
        );
      end else begin : g_pe
        pe #(.DIST(DIST), .STEP(STEP)) u_pe (
          .clk, .rst_n, .cfg_shift, .cfg_hold,
          .cfg_si(chain[r*COLS+c]), .cfg_so(chain[r*COLS+c+1]),
          .short_in(short_in[r][c]), .long_in(long_in[r][c]),
          .y(y[r][c]), .long_en(long_en[r][c]), .state(state[r][c])
        );
        assign dout[r][c]       = '0;
        assign ioe_nempty[r][c] = 1'b0;
      end
    end
  end

  // ---------------- wire networks ----------------
  // Short wires: fixed, unidirectional, between neighbours. Every PE has
  // one to and one from each neighbour; an IOE only to and from its
  // adjacent PE (none between two IOEs, so none at the corners). A short
  // wire carries the sender's output register; a missing one reads
  // no-data.
  function automatic logic has_short(input int r, input int c, input int nr, input int nc);
    if (nr < 0 || nr >= ROWS || nc < 0 || nc >= COLS) return 1'b0;
    return !(is_ioe(r, c) && is_ioe(nr, nc));
  endfunction

  always_comb
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        short_in[r][c][DIR_N] = has_short(r, c, r - 1, c) ? y[r-1][c] : DR_Z;
        short_in[r][c][DIR_E] = has_short(r, c, r, c + 1) ? y[r][c+1] : DR_Z;
        short_in[r][c][DIR_S] = has_short(r, c, r + 1, c) ? y[r+1][c] : DR_Z;
        short_in[r][c][DIR_W] = has_short(r, c, r, c - 1) ? y[r][c-1] : DR_Z;
      end

  long_wire_net #(.ROWS(ROWS), .COLS(COLS), .DIST(DIST), .STEP(STEP)) u_long (
    .y, .long_en, .long_in, .conflict(long_conflict)
  );

  // ---------------- controllers ----------------
  // shared read bus of each edge: OR of the IOE outputs (only a strobed
  // IOE drives a non-zero word)
  always_comb begin
    for (int s = 0; s < 4; s++) bus_rdata[s] = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (is_ioe(r, c)) bus_rdata[side_of(r, c)] |= dout[r][c];
  end

  for (genvar s = 0; s < 4; s++) begin : g_ctl
    localparam int N_IOE = (s == 0 || s == 2) ? COLS : ROWS - 2;
    localparam int CW    = (N_IOE > 1) ? $clog2(N_IOE) : 1;
    logic [N_IOE-1:0] stb;

    controller #(.N_IOE(N_IOE)) u_ctl (
      .clk, .rst_n,
      .h_req(h_req && h_side == 2'(s)), .h_cmd(hcmd_e'(h_cmd)), .h_idx(h_idx[CW-1:0]),
      .h_wdata, .h_rdata(c_rdata[s]), .h_rvalid(c_rvalid[s]), .h_byte(c_byte[s]),
      .h_busy(c_busy[s]),
      .strobe(stb), .rw(rw[s]), .bus_wdata(bus_wdata[s]), .bus_rdata(bus_rdata[s]),
      .cfg_shift(c_cfg_shift[s]), .cfg_hold(c_cfg_hold[s]), .cfg_so(c_cfg_so[s])
    );
    assign strobe[s] = NSIDE'(stb);
  end

  always_comb begin
    h_rdata  = '0;
    h_rvalid = 1'b0;
    for (int s = 0; s < 4; s++)
      if (c_rvalid[s]) begin
        h_rdata  |= c_rdata[s];
        h_rvalid  = 1'b1;
      end
    h_byte = c_byte[h_side];
    h_busy = c_busy[h_side];
  end
endmodule
