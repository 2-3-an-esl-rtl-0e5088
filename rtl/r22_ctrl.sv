// r22_ctrl: timing control of the R2^2EMDC FFT pipeline.
//
// A frame is N/(2T) beats of 2T samples. The controller counts input beats
// modulo N/(2T) (frames start at beat 0 after reset) and derives from it the
// local beat of every butterfly column: a column that pairs on index bit k
// sits behind the delay commutators with delays 2^(tb-1) ... 2^k, so its local
// beat is beat - (2^tb - 2^k) (tb = log2(N/(2T)); columns still working on
// lane bits see no delay). The local beats drive the commutator switches, the
// -j selects and the twiddle addresses. After the output register the pipeline
// latency is exactly one frame, so output frame f leaves while input frame f+1
// enters. out_valid marks, for one cycle, each beat written to the output
// register; out_beat is that beat's position in its frame.
// Everything advances only when `en` (an input beat) is high. Synchronous
// active-low reset. The stall-on-enable handshake is this design's choice.
module r22_ctrl #(
  parameter int unsigned N = 16,
  parameter int unsigned T = 2,
  localparam int unsigned M  = $clog2(N),
  localparam int unsigned TB = M - $clog2(2 * T),
  localparam int unsigned CW = (TB > 0) ? TB : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [CW-1:0] stage_beat [M],
  output logic [CW-1:0] out_beat,
  output logic          out_valid,
  output logic          out_last
);
  localparam logic [CW-1:0] LAST = CW'((1 << TB) - 1);

  logic          filled;  // a whole frame has entered since reset
  logic [CW-1:0] beat;    // input beat within the frame

  for (genvar s = 0; s < int'(M); s++) begin : g_stage
    localparam int unsigned K   = M - 1 - s;
    localparam int unsigned OFS = (K < TB) ? ((1 << TB) - (1 << K)) : 0;
    assign stage_beat[s] = beat - CW'(OFS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat      <= '0;
      filled    <= 1'b0;
      out_beat  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en && (filled || beat == LAST);
      if (en) begin
        beat     <= (beat == LAST) ? '0 : beat + 1'b1;
        out_beat <= stage_beat[M-1];
        if (beat == LAST) filled <= 1'b1;
      end
    end
  end

  assign out_last = out_valid && (out_beat == LAST);

  // handshake rules: a result appears only in the cycle after an accepted
  // beat, and never before a whole frame has entered
  a_valid_after_beat : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(en));
  a_valid_after_fill : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(filled || beat == LAST));
endmodule
