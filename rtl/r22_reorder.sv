// r22_reorder: optional output buffer that turns the pipeline's bit-reversed
// output order into natural order.
//
// The FFT core delivers, in beat c of a frame, bins bitrev(...) on its 2T
// lanes (see r22_pkg). This buffer writes each beat's 2T bins into one of two
// N-word banks at their bin addresses and, while the next frame is written
// into the other bank, reads the finished bank in the same order the core
// takes its input: lane q, beat c carries X[q*N/(2T) + c]. It is a plain
// ping-pong (double) buffer of 2N complex words with 2T write and 2T read
// ports, written as an array.
// Handshake as in the core: everything advances only in cycles with
// in_valid high (one beat). Latency is one more frame: frame f is read out
// while frame f+1 is written, and out_valid marks the registered output beats.
// Synchronous active-low reset of the control; the banks are not reset.
// Which order the outputs take is a generator option of the architecture;
// the buffer structure is this design's own.
module r22_reorder
  import r22_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned T  = 2,
  parameter int unsigned W  = 21,
  localparam int unsigned M  = $clog2(N),
  localparam int unsigned P  = 2 * T,
  localparam int unsigned TB = M - $clog2(P),
  localparam int unsigned NB = 1 << TB,
  localparam int unsigned CW = (TB > 0) ? TB : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re   [P],
  input  logic signed [W-1:0] in_im   [P],
  input  logic [M-1:0]        in_bin  [P],
  output logic                out_valid,
  output logic                out_last,
  output logic signed [W-1:0] out_re  [P],
  output logic signed [W-1:0] out_im  [P],
  output logic [M-1:0]        out_bin [P]
);
  localparam logic [CW-1:0] LAST = CW'(NB - 1);

  logic signed [W-1:0] bank_re [2][N];
  logic signed [W-1:0] bank_im [2][N];
  logic          wsel;     // bank being written
  logic [CW-1:0] beat;     // beat within the frame being written / read
  logic          full;     // the other bank holds a complete frame
  logic [CW-1:0] out_beat;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int q = 0; q < int'(P); q++) begin
        bank_re[wsel][in_bin[q]] <= in_re[q];
        bank_im[wsel][in_bin[q]] <= in_im[q];
        out_re[q] <= bank_re[!wsel][q * NB + int'(beat)];
        out_im[q] <= bank_im[!wsel][q * NB + int'(beat)];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel      <= 1'b0;
      beat      <= '0;
      full      <= 1'b0;
      out_beat  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && full;
      if (in_valid) begin
        out_beat <= beat;
        if (beat == LAST) begin
          beat <= '0;
          wsel <= !wsel;
          full <= 1'b1;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  assign out_last = out_valid && (out_beat == LAST);

  always_comb begin
    for (int q = 0; q < int'(P); q++) out_bin[q] = M'(q * NB + int'(out_beat));
  end
endmodule
