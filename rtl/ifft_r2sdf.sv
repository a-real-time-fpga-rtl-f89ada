// ifft_r2sdf: 2^LOG2N-point inverse FFT (2048 points by default) built from
// LOG2N r2sdf_stage's with delays N/2, N/4, ... 1. It takes one sample per
// clock in natural order and delivers the transform, scaled by 1/N, one
// sample per clock in bit-reversed order; output sample n of a symbol is
// bin bitrev(n). Latency: N-1+LOG2N advances.
// Flow control. The pipeline only moves (advances) when fed, so it works in
// windows of N advances aligned to the input symbols. At a window start it
// takes a new symbol if `in_valid` is high and a credit is left, and the
// upstream must then deliver that symbol without a break (`in_ready` stays
// high for it). Credits count symbols taken and not yet released by the CP
// stage (`credit_ret`); with two CP banks and a latency just over one window,
// three symbols can be outstanding without ever blocking an output sample.
// When the CP stage has nothing left to read but samples are still inside,
// the pipeline runs a window of zeros to flush them out. Output samples are flagged by the per-sample real bit, so
// flush zeros never appear at the output.
// Only the size comes from the document; architecture, scaling and flow
// control are this design's.
module ifft_r2sdf
  import wimax_pkg::*;
#(
  parameter int LOG2N   = 11,
  parameter int CREDITS = 3,
  parameter int FLUSH_WAIT = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  credit_ret,
  output logic  out_valid,
  output cplx_t out_data,
  output logic  flush_window   // high while a zero (flush) window runs
);
  localparam int N = 1 << LOG2N;

  typedef enum logic [1:0] {IDLE, REAL, FLUSH} win_e;

  win_e             mode;
  logic [LOG2N-1:0] t;
  logic             adv, adv_q, take, start_flush;
  logic [$clog2(FLUSH_WAIT+1)-1:0] idle_cnt;
  logic             flushable;
  logic [LOG2N-1:0] out_cnt;
  logic [3:0]       held;   // symbols fully delivered and not yet released
  logic [LOG2N+1:0] inflight;
  logic [3:0]       credits;
  cplx_t            sx [LOG2N+1];
  logic             sr [LOG2N+1];

  // Take a sample at a window start (credit permitting) or inside an open
  // real window. A flush is wanted only when the downstream would otherwise
  // run dry: samples are inside, but every symbol already delivered has been
  // released by the CP stage. It starts after FLUSH_WAIT
  // such clocks at a window start, and in_ready drops a few clocks before
  // that, so a symbol that the upstream committed to (it sees in_ready up to
  // 3 clocks before its first sample arrives) is never shut out.
  assign take     = in_valid && (((t == '0) && (credits != 0)) || (mode == REAL && t != '0));
  assign flushable = (inflight != 0) && (held == '0);
  assign in_ready = (credits != 0) && !(mode == FLUSH && t != '0)
                    && !((t == '0) && (int'(idle_cnt) >= FLUSH_WAIT - 4));
  assign start_flush = (t == '0) && !take && flushable && (int'(idle_cnt) == FLUSH_WAIT);
  assign adv      = take || (mode == FLUSH && t != '0) || start_flush;

  assign sx[0] = take ? in_data : '0;
  assign sr[0] = take;

  for (genvar k = 0; k < LOG2N; k++) begin : g_stage
    r2sdf_stage #(.D(N >> (k + 1)), .OFFSET(k)) u_st (
      .clk, .rst, .en(adv),
      .x_in(sx[k]), .x_real(sr[k]),
      .y_out(sx[k+1]), .y_real(sr[k+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mode     <= IDLE;
      t        <= '0;
      adv_q    <= 1'b0;
      inflight <= '0;
      credits  <= 4'(CREDITS);
      idle_cnt <= '0;
      out_cnt  <= '0;
      held     <= '0;
    end else begin
      if (out_valid) out_cnt <= out_cnt + 1'b1;
      held <= held + 4'(out_valid && out_cnt == '1) - 4'(credit_ret);
      adv_q <= adv;
      if (adv) t <= t + 1'b1;
      if (t == '0) begin
        if (take)             mode <= REAL;
        else if (start_flush) mode <= FLUSH;
        else                  mode <= IDLE;
        idle_cnt <= (take || start_flush || !flushable) ? '0 : idle_cnt + 1'b1;
      end else begin
        idle_cnt <= '0;
      end
      inflight <= inflight + (LOG2N+2)'(take) - (LOG2N+2)'(adv_q && sr[LOG2N]);
      credits  <= credits - 4'(t == '0 && take) + 4'(credit_ret);
    end
  end

  assign out_valid    = adv_q && sr[LOG2N];
  assign out_data     = sx[LOG2N];
  assign flush_window = (mode == FLUSH) && (t != '0);

  a_no_gap: assert property (@(posedge clk) disable iff (rst)
      (mode == REAL && t != '0) |-> in_valid)
    else $error("input symbol interrupted");
endmodule
