// ioe: I/O element on the edge of the array.
//
// The only path between the PEs and a controller. It has the same
// configuration word, state machine and output register as a PE but one
// input selector and two operations:
//   OP_IO_OUT  words written by the controller leave serially, LSB first,
//              towards the PEs (dlen+1 bits per word);
//   OP_IO_IN   serial words from the PEs are collected for the controller.
// Both sides meet in an 8-entry x 16-bit register file used as a FIFO with
// 3-bit head (write) and tail (read) pointers. A word written by the
// controller, or completed from the serial input, goes to the entry at the
// head pointer, which then advances; the entry at the tail pointer is read
// by the controller, or sent bit by bit to the PEs, and the tail advances
// after the word. Serial input overwrites only bit 'cnt' of the head entry
// (read-modify-write), so bits above the word length keep older contents;
// the controller widens results from the configured width.
//
// While the configuration is shifted or held (cfg_shift, cfg_hold) the
// element is stopped and its FIFO emptied.
//
// Controller port: while strobe is high for one clock, rw = 1 stores din
// at the head; rw = 0 presents the tail entry on dout (combinationally,
// zero otherwise, so dout of several IOEs can be ORed onto one shared bus)
// and advances the tail at the clock edge. nempty flags a non-empty FIFO.
// With equal pointers meaning empty, at most 7 words can be held; the
// controller must not write into a full FIFO.
//
// From the original architecture: one selector, two ALU operations, eight 16-bit
// registers with two 3-bit pointers, the strobe/RW protocol and the bit
// serial read-modify-write. This design's own: the full/empty rule,
// the opcodes and that an OUT word starts whenever the FIFO holds data.
module ioe
  import ba_pkg::*;
#(
  parameter int DIST = 6,
  parameter int STEP = 1,
  localparam int L   = lmax(DIST, STEP)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_shift,
  input  logic              cfg_hold,
  input  logic              cfg_si,
  output logic              cfg_so,
  input  dr_t [3:0]         short_in,
  input  dr_t [3:0][L-1:0]  long_in,
  output dr_t               y,
  output logic [3:0][L-1:0] long_en,
  output st_e               state,
  // controller bus
  input  logic              strobe,
  input  logic              rw,
  input  logic [K_W-1:0]    din,
  output logic [K_W-1:0]    dout,
  output logic              nempty
);
  cfg_t cfg;
  dr_t  a_d;
  logic start, active, phase2, last;
  logic [LEN_W-1:0] cnt;
  logic [K_W-1:0] fifo [8];
  logic [2:0] head, tail;
  logic host_wr, host_rd, pe_out, pe_in;
  logic [K_W-1:0] tail_word, head_word;

  cfg_reg u_cfg (.clk, .rst_n, .shift(cfg_shift), .si(cfg_si), .so(cfg_so), .cfg);
  in_mux #(.L(L)) u_mux (.short_in, .long_in, .sel(cfg.in_a), .y(a_d));
  out_dec #(.L(L)) u_dec (.sel(cfg.out_sel), .en(long_en));

  assign nempty    = (head != tail);
  assign tail_word = fifo[tail];
  assign head_word = fifo[head];
  assign pe_out    = (cfg.op == OP_IO_OUT);
  assign pe_in     = (cfg.op == OP_IO_IN);
  assign start     = (pe_out && nempty) || (pe_in && dr_valid(a_d));

  elem_fsm u_fsm (
    .clk, .rst_n, .hold(cfg_shift || cfg_hold), .start, .two_phase(1'b0),
    .dlen(cfg.dlen), .wlen(cfg.wlen), .state, .cnt, .active, .phase2, .last
  );

  assign host_wr = strobe && rw;
  assign host_rd = strobe && !rw;
  assign dout    = host_rd ? tail_word : '0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      y    <= DR_Z;
    end else if (cfg_shift || cfg_hold) begin
      // (re)configuration empties the FIFO
      head <= '0;
      tail <= '0;
      y    <= DR_Z;
    end else begin
      y <= DR_Z;
      if (host_wr) begin
        fifo[head] <= din;
        head       <= head + 1'b1;
      end else if (pe_in && active) begin
        fifo[head] <= head_word & ~(K_W'(1) << cnt) | (K_W'(a_d.m) << cnt);
        if (last) head <= head + 1'b1;
      end
      if (host_rd) begin
        tail <= tail + 1'b1;
      end else if (pe_out && active) begin
        y <= dr_drive(tail_word[cnt[3:0]]);
        if (last) tail <= tail + 1'b1;
      end
    end

  // the controller writes only to an IOE sending towards the PEs, and
  // reads only from one collecting from the PEs
  a_no_wr_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(host_wr && pe_in && active));
  a_no_rd_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(host_rd && pe_out && active));
endmodule
