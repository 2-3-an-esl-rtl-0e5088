// r22_emdc_fft: vertically expanded radix-2^2 multi-path delay commutator
// FFT (R2^2EMDC), an N-point pipelined FFT that takes 2T samples per cycle.
//
// The radix-2^2 decimation-in-frequency algorithm is mapped onto log2(N)
// butterfly columns of T butterflies each. Columns alternate between plain
// radix-2 butterflies (BF I) and butterflies with a trivial -j multiplier on
// their lower input (BF II); non-trivial twiddle factors are applied only
// after BF II columns, on both outputs (2T complex multipliers per such column,
// none after the last). Between columns the partner samples are brought
// together either by a fixed lane permutation (while the index bit is a lane
// bit) or by a delay commutator (once it is a beat bit). For T = 1 this is the
// classic R2^2MDC; raising T trades multipliers and adders for throughput and
// fewer delay registers:
//   complex multipliers  T*(2*ceil(log4 N) - 2)
//   complex adders       2*T*log2 N
//   delay registers      N - 2T   (complex words, plus 2T output registers)
//   throughput           2T/N transforms per cycle
//
// Interface (one beat = one cycle with in_valid high):
//   in lane l, beat c of a frame:  x[l*N/(2T) + c]
//   out lane q, beat c:            X[out_bin[q]], by default out_bin[q] =
//                                  bitrev_log2N((q/2)*N/T + 2c + q%2)
// Frames follow each other without gaps in the beat count; the whole pipeline
// stalls while in_valid is low. Latency is exactly one frame: results of frame
// f are output while frame f+1 is input, so the last frame is flushed by
// feeding one more frame (for instance zeros). Outputs are unscaled: the data
// width grows by log2(N)+1 guard bits at the input so that no stage overflows.
// With NATURAL_OUT = 1 a ping-pong buffer (r22_reorder) follows and the
// outputs come in natural order instead (lane q, beat c: X[q*N/(2T) + c]),
// one frame later. It is off by default, so the default core has exactly the
// register count of the architecture.
// The architecture, its counts and the twiddle placement follow the radix-2^2
// MDC scheme; the lane order, widths, rounding, output register and the stall
// handshake are this implementation's choices.
module r22_emdc_fft
  import r22_pkg::*;
#(
  parameter int unsigned N  = r22_pkg::DEF_N,
  parameter int unsigned T  = r22_pkg::DEF_T,
  parameter int unsigned W  = r22_pkg::DEF_W,
  parameter int unsigned TW = r22_pkg::DEF_TW,
  parameter bit          NATURAL_OUT = 1'b0,
  localparam int unsigned M  = $clog2(N),
  localparam int unsigned P  = 2 * T,
  localparam int unsigned LB = $clog2(P),
  localparam int unsigned TB = M - LB,
  localparam int unsigned CW = (TB > 0) ? TB : 1,
  localparam int unsigned OW = W + M + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re   [P],
  input  logic signed [W-1:0]  in_im   [P],
  output logic                 out_valid,
  output logic                 out_last,
  output logic signed [OW-1:0] out_re  [P],
  output logic signed [OW-1:0] out_im  [P],
  output logic [M-1:0]         out_bin [P]
);
  // column s pairs on index bit M-1-s
  logic signed [OW-1:0] ext_re [P], ext_im [P];     // sign-extended input
  logic [CW-1:0] out_beat;
  // pipeline output register, in the order the last column produces it
  logic                 c_valid, c_last;
  logic signed [OW-1:0] c_re [P], c_im [P];
  logic [M-1:0]         c_bin [P];
  logic [CW-1:0] stage_beat [M];

  // ------------------------------------------------------------------ control
  r22_ctrl #(.N(N), .T(T)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .en(in_valid),
    .stage_beat(stage_beat), .out_beat(out_beat),
    .out_valid(c_valid), .out_last(c_last)
  );

  // ----------------------------------------------------- input into column 0
  for (genvar l = 0; l < int'(P); l++) begin : g_ext
    assign ext_re[l] = OW'(in_re[l]);
    assign ext_im[l] = OW'(in_im[l]);
  end

  // ------------------------------------------------------------------ columns
  for (genvar s = 0; s < int'(M); s++) begin : g_stage
    localparam int unsigned K      = M - 1 - s;
    localparam bit          IS_BF2 = (s % 2) == 1;
    localparam bit          HAS_TW = IS_BF2 && (K >= 1);

    logic signed [OW-1:0] xi_re [P], xi_im [P];  // column input
    logic signed [OW-1:0] bo_re [P], bo_im [P];  // butterfly outputs
    logic signed [OW-1:0] xo_re [P], xo_im [P];  // after the twiddles

    // interconnect from the previous column (or the input)
    if (s == 0) begin : g_in
      r22_perm #(.P(P), .W(OW), .FROM_J(-1), .TO_J(LB - 1)) u_perm (
        .in_re(ext_re), .in_im(ext_im), .out_re(xi_re), .out_im(xi_im)
      );
    end else if (K >= TB) begin : g_perm
      r22_perm #(.P(P), .W(OW), .FROM_J(K + 1 - TB), .TO_J(K - TB)) u_perm (
        .in_re(g_stage[s-1].xo_re), .in_im(g_stage[s-1].xo_im),
        .out_re(xi_re), .out_im(xi_im)
      );
    end else begin : g_comm
      for (genvar g = 0; g < int'(T); g++) begin : g_dc
        r22_delay_commutator #(.W(OW), .D(1 << K)) u_dc (
          .clk(clk), .en(in_valid), .sel(stage_beat[s-1][K]),
          .a_re(g_stage[s-1].xo_re[2*g]),   .a_im(g_stage[s-1].xo_im[2*g]),
          .b_re(g_stage[s-1].xo_re[2*g+1]), .b_im(g_stage[s-1].xo_im[2*g+1]),
          .o0_re(xi_re[2*g]),   .o0_im(xi_im[2*g]),
          .o1_re(xi_re[2*g+1]), .o1_im(xi_im[2*g+1])
        );
      end
    end

    // butterflies
    for (genvar g = 0; g < int'(T); g++) begin : g_bf
      if (IS_BF2) begin : g_b2
        logic        negj;
        int unsigned pos_lo;
        // -j on the lower input when the index bit above this column's is 1
        always_comb begin
          pos_lo = stage_pos(2 * g + 1, int'(stage_beat[s]), K, TB);
          negj   = pos_lo[K+1];
        end
        r22_bfii #(.W(OW)) u_bf (
          .neg_j(negj),
          .a_re(xi_re[2*g]),    .a_im(xi_im[2*g]),
          .b_re(xi_re[2*g+1]),  .b_im(xi_im[2*g+1]),
          .sum_re(bo_re[2*g]),  .sum_im(bo_im[2*g]),
          .dif_re(bo_re[2*g+1]), .dif_im(bo_im[2*g+1])
        );
      end else begin : g_b1
        r22_bf #(.W(OW)) u_bf (
          .a_re(xi_re[2*g]),    .a_im(xi_im[2*g]),
          .b_re(xi_re[2*g+1]),  .b_im(xi_im[2*g+1]),
          .sum_re(bo_re[2*g]),  .sum_im(bo_im[2*g]),
          .dif_re(bo_re[2*g+1]), .dif_im(bo_im[2*g+1])
        );
      end
    end

    // twiddle multipliers: W_N^e, e = ((b[K+1] + 2*b[K]) * b[K-1:0]) << (M-K-2)
    for (genvar q = 0; q < int'(P); q++) begin : g_tw
      if (HAS_TW) begin : g_mul
        logic [M-1:0]         addr;
        logic signed [TW-1:0] w_re, w_im;
        int unsigned          pos, dig, r;
        always_comb begin
          pos  = stage_pos(q, int'(stage_beat[s]), K, TB);
          dig  = ((pos >> (K + 1)) & 1) + 2 * ((pos >> K) & 1);
          r    = pos & ((1 << K) - 1);
          addr = M'((dig * r) << (M - K - 2));
        end
        r22_twiddle_rom #(.N(N), .TW(TW)) u_rom (
          .addr(addr), .w_re(w_re), .w_im(w_im)
        );
        r22_cmult #(.W(OW), .TW(TW)) u_mul (
          .a_re(bo_re[q]), .a_im(bo_im[q]), .w_re(w_re), .w_im(w_im),
          .p_re(xo_re[q]), .p_im(xo_im[q])
        );
      end else begin : g_thru
        assign xo_re[q] = bo_re[q];
        assign xo_im[q] = bo_im[q];
      end
    end

  end

  // ------------------------------------------------------------------- output
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int q = 0; q < int'(P); q++) begin
        c_re[q] <= g_stage[M-1].xo_re[q];
        c_im[q] <= g_stage[M-1].xo_im[q];
      end
    end
  end

  always_comb begin
    for (int q = 0; q < int'(P); q++)
      c_bin[q] = M'(bitrev(stage_pos(q, int'(out_beat), 0, TB), M));
  end

  // optional natural-order output buffer
  if (NATURAL_OUT) begin : g_natural
    r22_reorder #(.N(N), .T(T), .W(OW)) u_reorder (
      .clk(clk), .rst_n(rst_n), .in_valid(c_valid),
      .in_re(c_re), .in_im(c_im), .in_bin(c_bin),
      .out_valid(out_valid), .out_last(out_last),
      .out_re(out_re), .out_im(out_im), .out_bin(out_bin)
    );
  end else begin : g_bitrev
    assign out_valid = c_valid;
    assign out_last  = c_last;
    assign out_re    = c_re;
    assign out_im    = c_im;
    assign out_bin   = c_bin;
  end
endmodule
