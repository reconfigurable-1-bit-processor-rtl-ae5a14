// ba_pkg: types and constants shared by the 1-bit processor array.
//
// Data signal: every element-to-element wire is a pair of lines, the
// master line and the inverse line. Different levels carry a bit (the
// master level is the value); equal levels mean "high impedance", i.e. no
// data. This lets a stopped element, or an undriven shared long wire, be
// told apart from a driven 0 or 1 without real tristate nets: a shared
// wire is the OR of all gated drivers, and with no driver it reads (0,0).
//
// Configuration word (one per element), in field order from MSB to LSB:
// operation (8), input A/B/C selects (5 each), output select (5),
// data length (5), wait length (5), constant (16) = 54 bits.
// Field widths follow the original architecture's parameter table for distance 6,
// step 1. Opcode values and the data-length encoding (field = bits - 1)
// are this design's own choices.
package ba_pkg;

  // dual-rail data signal
  typedef struct packed {
    logic m;   // master line
    logic i;   // inverse line
  } dr_t;

  localparam dr_t DR_Z = '{m: 1'b0, i: 1'b0};

  function automatic dr_t dr_drive(input logic b);
    return '{m: b, i: ~b};
  endfunction

  function automatic logic dr_valid(input dr_t d);
    return d.m ^ d.i;
  endfunction

  // side numbering of an element
  localparam int DIR_N = 0;
  localparam int DIR_E = 1;
  localparam int DIR_S = 2;
  localparam int DIR_W = 3;

  // configuration field widths
  localparam int OP_W   = 8;
  localparam int SEL_W  = 5;   // input selector code: 32 sources
  localparam int OSEL_W = 5;   // output decoder code: none + 28 long wires
  localparam int LEN_W  = 5;   // data length and wait length
  localparam int K_W    = 16;  // constant / data register width

  // long wires seen on one side of an element: ceil((distance+1)/step)
  function automatic int lmax(input int dst, input int stp);
    return (dst + stp) / stp;
  endfunction

  typedef enum logic [OP_W-1:0] {
    OP_NOP   = 8'h00,  // element stays stopped
    OP_PASS  = 8'h01,  // out = A (routing / one-cycle delay)
    OP_ADD   = 8'h02,  // out = A + B
    OP_SUB   = 8'h03,  // out = A - B
    OP_AND   = 8'h04,
    OP_OR    = 8'h05,
    OP_XOR   = 8'h06,
    OP_NOT   = 8'h07,  // out = ~A
    OP_ADD3  = 8'h08,  // out = A + B + C
    OP_MUX   = 8'h09,  // out = C ? A : B, bit by bit
    OP_ADDK  = 8'h0A,  // out = A + constant (sign-extended)
    OP_SHL   = 8'h0B,  // out = A << k, k = constant[4:0]
    OP_SHR   = 8'h0C,  // out = A >>> k (arithmetic), two-phase
    OP_MUL   = 8'h0D,  // out = A * B (unsigned, 2n-bit), two-phase
    OP_CMPGT = 8'h0E,  // out = all ones if A > B (signed) else 0, two-phase
    OP_DELAY = 8'h0F,  // out = A delayed by k+1 cycles, k = constant[3:0]
    // I/O element operations
    OP_IO_OUT = 8'h10, // FIFO (from controller) -> serial out to PEs
    OP_IO_IN  = 8'h11  // serial in from PEs -> FIFO (to controller)
  } op_e;

  typedef struct packed {
    op_e                op;
    logic [SEL_W-1:0]   in_a;
    logic [SEL_W-1:0]   in_b;
    logic [SEL_W-1:0]   in_c;
    logic [OSEL_W-1:0]  out_sel;
    logic [LEN_W-1:0]   dlen;   // word length in bits minus one
    logic [LEN_W-1:0]   wlen;   // idle cycles between words
    logic [K_W-1:0]     konst;
  } cfg_t;

  localparam int CFG_W = $bits(cfg_t);

  // element FSM state: {run, special}
  typedef enum logic [1:0] {
    ST_STOP_N  = 2'b00,
    ST_STOP_SP = 2'b01,
    ST_RUN_N   = 2'b10,
    ST_RUN_SP  = 2'b11
  } st_e;

  // operations whose processing has a first and a latter half
  function automatic logic op_two_phase(input op_e op);
    return op inside {OP_SHR, OP_MUL, OP_CMPGT};
  endfunction

  // input usage: bit 0 = A, 1 = B, 2 = C
  function automatic logic [2:0] op_inputs(input op_e op);
    case (op)
      OP_PASS, OP_NOT, OP_ADDK, OP_SHL, OP_SHR, OP_DELAY, OP_IO_IN: return 3'b001;
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_MUL, OP_CMPGT:      return 3'b011;
      OP_ADD3, OP_MUX:                                              return 3'b111;
      default:                                                      return 3'b000;
    endcase
  endfunction

  // host command to a controller
  typedef enum logic [1:0] {
    HC_WRITE = 2'd0,  // write a 16-bit word into an IOE FIFO
    HC_READ  = 2'd1,  // read a word from an IOE FIFO, widened
    HC_SETW  = 2'd2,  // set result width (wdata[4:0], bits-1) for widening
    HC_CFG   = 2'd3   // shift 16 configuration bits into the chain
  } hcmd_e;

endpackage
