// pe: 1-bit processor element.
//
// Three input selectors (in_mux) pick operands A, B, C from the short and
// long wires on the element's four sides. A bit-serial ALU processes one
// bit per clock, LSB first, framed by elem_fsm: a word is dlen+1 bits and
// starts when every input the operation uses carries data. The result bit
// goes into the output register (one clock latency), which drives the four
// outgoing short wires directly and one long wire through the driver
// selected by out_dec. In any stopped state the output register holds the
// no-data value.
//
// Three 16-bit data registers (ra, rb, rc) back the ALU: ra holds the
// configured constant, rb is the shift register, rc holds carries. For a
// multiply, ra and rb collect the two operands, rc holds the column
// carries for bs_mult, and all three are cleared when it completes.
// Two-phase operations (MUL, SHR, CMPGT) output nothing in the first half
// (SHR, CMPGT) or the low product bits (MUL), and the rest in the latter
// half. Operand size is limited to 16 bits for MUL and SHR.
//
// Interface: cfg_shift/cfg_si/cfg_so form the configuration chain; while
// cfg_shift or cfg_hold is high the element is held stopped and ra is
// reloaded from the constant field. Timing: a result bit appears on y one clock after
// its operand bits are on the selected inputs.
//
// From the original architecture: three inputs, one output, ALU, output register with
// short-wire and tristate long-wire drive, three 16-bit data registers,
// 5-bit counter, run/special states, bit-serial 16x16 multiplier. This
// design's own: the operation set and opcodes, LSB-first order, unsigned
// multiply, signed compare, the DELAY operation's dedicated valid line
// (kept in rc), and modelling tristate drivers as gated enables.
module pe
  import ba_pkg::*;
#(
  parameter int DIST = 6,
  parameter int STEP = 1,
  localparam int L   = lmax(DIST, STEP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_shift,
  input  logic             cfg_hold,
  input  logic             cfg_si,
  output logic             cfg_so,
  input  dr_t [3:0]        short_in,
  input  dr_t [3:0][L-1:0] long_in,
  output dr_t              y,
  output logic [3:0][L-1:0] long_en,
  output st_e              state
);
  cfg_t cfg;
  dr_t  a_d, b_d, c_d;
  logic a, b, c;
  logic start, active, phase2, last;
  logic [LEN_W-1:0] cnt;
  logic [K_W-1:0] ra, rb, rc;

  cfg_reg u_cfg (.clk, .rst_n, .shift(cfg_shift), .si(cfg_si), .so(cfg_so), .cfg);

  in_mux #(.L(L)) u_mux_a (.short_in, .long_in, .sel(cfg.in_a), .y(a_d));
  in_mux #(.L(L)) u_mux_b (.short_in, .long_in, .sel(cfg.in_b), .y(b_d));
  in_mux #(.L(L)) u_mux_c (.short_in, .long_in, .sel(cfg.in_c), .y(c_d));

  out_dec #(.L(L)) u_dec (.sel(cfg.out_sel), .en(long_en));

  assign a = a_d.m;
  assign b = b_d.m;
  assign c = c_d.m;

  always_comb begin
    logic [2:0] use_in;
    use_in = op_inputs(cfg.op);
    start  = (use_in != 3'b000) && (cfg.op != OP_DELAY)
          && (!use_in[0] || dr_valid(a_d))
          && (!use_in[1] || dr_valid(b_d))
          && (!use_in[2] || dr_valid(c_d));
  end

  elem_fsm u_fsm (
    .clk, .rst_n, .hold(cfg_shift || cfg_hold), .start,
    .two_phase(op_two_phase(cfg.op)), .dlen(cfg.dlen), .wlen(cfg.wlen),
    .state, .cnt, .active, .phase2, .last
  );

  // ---------------- bit-serial ALU ----------------
  logic           first;       // first bit of a word (first half)
  logic           cy;          // carry into this bit
  logic [K_W-1:0] bit_i;       // one-hot of the current bit position
  logic [K_W-1:0] a_cur, b_cur;
  logic [K_W-1:0] mp, mc, mc_next;
  logic           mr;
  logic [5:0]     col;         // multiplier column
  logic           res, res_ok;
  logic [K_W-1:0] ra_d, rb_d, rc_d;
  logic [2:0]     sum3;
  logic [4:0]     k;

  assign first = active && !phase2 && (cnt == '0);
  assign cy    = first ? 1'b0 : rc[0];
  assign bit_i = (cnt < LEN_W'(K_W)) ? (K_W'(1) << cnt) : '0;
  assign a_cur = (first ? '0 : ra) | (a ? bit_i : '0);
  assign b_cur = (first ? '0 : rb) | (b ? bit_i : '0);
  assign k     = cfg.konst[4:0];

  // partial products and carries of the current multiplier column
  always_comb begin
    col = phase2 ? 6'(cfg.dlen) + 6'd1 + 6'(cnt) : 6'(cnt);
    for (int j = 0; j < K_W; j++) begin
      int ai;
      ai = int'(col) - j;
      if (ai >= 0 && ai < K_W) mp[j] = phase2 ? (ra[ai] & rb[j]) : (a_cur[ai] & b_cur[j]);
      else                     mp[j] = 1'b0;
    end
    mc = first ? '0 : rc;
  end

  bs_mult #(.N(K_W)) u_mult (.p(mp), .c(mc), .r(mr), .c_next(mc_next));

  always_comb begin
    int idx;
    res    = 1'b0;
    res_ok = active;
    ra_d   = ra;
    rb_d   = rb;
    rc_d   = rc;
    sum3   = '0;
    idx    = 0;
    unique case (cfg.op)
      OP_PASS: res = a;
      OP_ADD: begin
        sum3    = {2'b0, a} + {2'b0, b} + {2'b0, cy};
        res     = sum3[0];
        rc_d[0] = sum3[1];
      end
      OP_SUB: begin
        sum3    = {2'b0, a} + {2'b0, ~b} + {2'b0, first | rc[0]};
        res     = sum3[0];
        rc_d[0] = sum3[1];
      end
      OP_AND: res = a & b;
      OP_OR:  res = a | b;
      OP_XOR: res = a ^ b;
      OP_NOT: res = ~a;
      OP_ADD3: begin
        sum3      = {2'b0, a} + {2'b0, b} + {2'b0, c} + (first ? 3'd0 : {1'b0, rc[1:0]});
        res       = sum3[0];
        rc_d[1:0] = sum3[2:1];
      end
      OP_MUX: res = c ? a : b;
      OP_ADDK: begin
        sum3    = {2'b0, a} + {2'b0, (cnt < LEN_W'(K_W)) ? ra[cnt[3:0]] : ra[K_W-1]} + {2'b0, cy};
        res     = sum3[0];
        rc_d[0] = sum3[1];
      end
      OP_SHL: begin
        idx = int'(cnt) - int'(k);
        if (idx < 0)         res = 1'b0;
        else if (k == '0)    res = a;
        else if (idx < K_W)  res = rb[idx];
        rb_d = (first ? '0 : rb) | (a ? bit_i : '0);
      end
      OP_SHR: begin
        if (!phase2) begin
          res_ok = 1'b0;
          rb_d   = (first ? '0 : rb) | (a ? bit_i : '0);
        end else begin
          idx = int'(cnt) + int'(k);
          if (idx > int'(cfg.dlen)) idx = int'(cfg.dlen);
          res = (idx < K_W) ? rb[idx] : rb[K_W-1];
        end
      end
      OP_CMPGT: begin
        if (!phase2) begin
          res_ok = 1'b0;
          if (cnt == cfg.dlen) rc_d[0] = (~a & b) | (~(a ^ b) & cy);  // sign bit
          else                 rc_d[0] = (a & ~b) | (~(a ^ b) & cy);
        end else begin
          res = rc[0];
        end
      end
      OP_MUL: begin
        res  = mr;
        rc_d = mc_next;
        if (!phase2) begin
          ra_d = a_cur;
          rb_d = b_cur;
        end else if (last) begin
          ra_d = '0;
          rb_d = '0;
          rc_d = '0;
        end
      end
      default: res_ok = 1'b0;
    endcase
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ra <= '0;
      rb <= '0;
      rc <= '0;
      y  <= DR_Z;
    end else if (cfg_shift || cfg_hold) begin
      // constant field as it will be after this clock
      ra <= cfg_shift ? {cfg.konst[K_W-2:0], cfg_si} : cfg.konst;
      rb <= '0;
      rc <= '0;
      y  <= DR_Z;
    end else if (cfg.op == OP_DELAY) begin
      // rb/rc form a 16-stage line of data bits and their valid flags
      rb <= {rb[K_W-2:0], a};
      rc <= {rc[K_W-2:0], dr_valid(a_d)};
      if (cfg.konst[3:0] == '0) y <= a_d;
      else y <= rc[cfg.konst[3:0]-1] ? dr_drive(rb[cfg.konst[3:0]-1]) : DR_Z;
    end else begin
      if (active) begin
        ra <= ra_d;
        rb <= rb_d;
        rc <= rc_d;
      end
      y <= (active && res_ok) ? dr_drive(res) : DR_Z;
    end
endmodule
