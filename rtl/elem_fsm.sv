// elem_fsm: state machine and counter that frame bit-serial words.
//
// States are {run, special}: stop-special (after reset, or when a stream
// ends), stop-normal (idle gap between words), run-normal (first half of
// an operation, input bits arrive) and run-special (latter half of a
// two-phase operation such as multiply, right shift or compare).
//
// A word starts in stop-special, or in run-normal with the counter at 0,
// and only if 'start' is high (the inputs the operation needs carry data);
// otherwise the element drops to (or stays in) stop-special. The first
// data bit is processed in the same cycle that 'start' is seen, so no bit
// is lost. A word has dlen+1 bits; the counter counts 0..dlen, then
// returns to 0 as the state changes. Two-phase operations then spend
// another dlen+1 cycles in run-special. Afterwards the element waits wlen
// cycles in stop-normal (skipped when wlen = 0, so words can follow back
// to back) and returns to run-normal. 'hold' (configuration loading)
// forces stop-special.
//
// Outputs: active = a bit is processed this cycle, phase2 = it belongs to
// the latter half, cnt = bit index within the current half, first/last =
// first/last bit of a half. The two state bits and the 5-bit counter are
// the original architecture's; the exact transition rules and the length encodings
// (dlen = bits - 1, wlen = idle cycles) are this design's reading.
module elem_fsm
  import ba_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hold,
  input  logic             start,
  input  logic             two_phase,
  input  logic [LEN_W-1:0] dlen,
  input  logic [LEN_W-1:0] wlen,
  output st_e              state,
  output logic [LEN_W-1:0] cnt,
  output logic             active,
  output logic             phase2,
  output logic             last
);
  st_e              st_d;
  logic [LEN_W-1:0] cnt_d;
  logic             word_start;

  assign word_start = (state == ST_STOP_SP) || (state == ST_RUN_N && cnt == '0);
  assign phase2     = (state == ST_RUN_SP);
  assign active     = phase2 || (state == ST_RUN_N && !word_start) || (word_start && start);
  assign last       = active && (cnt == dlen);

  always_comb begin
    st_d  = state;
    cnt_d = cnt;
    if (word_start && !start) begin
      st_d  = ST_STOP_SP;
      cnt_d = '0;
    end else if (active) begin
      if (cnt == dlen) begin
        cnt_d = '0;
        if (!phase2 && two_phase) st_d = ST_RUN_SP;
        else if (wlen != '0)      st_d = ST_STOP_N;
        else                      st_d = ST_RUN_N;
      end else begin
        cnt_d = cnt + 1'b1;
        st_d  = phase2 ? ST_RUN_SP : ST_RUN_N;
      end
    end else if (state == ST_STOP_N) begin
      if (cnt == wlen - 1'b1) begin
        cnt_d = '0;
        st_d  = ST_RUN_N;
      end else begin
        cnt_d = cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= ST_STOP_SP;
      cnt   <= '0;
    end else if (hold) begin
      state <= ST_STOP_SP;
      cnt   <= '0;
    end else begin
      state <= st_d;
      cnt   <= cnt_d;
    end
endmodule
