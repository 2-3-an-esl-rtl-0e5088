// r22_twiddle_rom: table of the twiddle factors W_N^e = exp(-j*2*pi*e/N).
//
// The table is a constant array computed at elaboration from cos and sin, so
// it needs no data file; it synthesizes to a ROM (logic) of N entries.
// Values are signed fixed point Q1.(TW-1), rounded to nearest; +1.0 is
// saturated to the largest positive code. Output `w_re` = cos(2*pi*e/N),
// `w_im` = -sin(2*pi*e/N). Combinational read. The twiddle width is this
// design's own choice.
module r22_twiddle_rom #(
  parameter int unsigned N  = 16,
  parameter int unsigned TW = 16,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [AW-1:0]        addr,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);
  typedef logic signed [TW-1:0] coef_t;
  typedef coef_t table_t [N];

  localparam real PI = 3.14159265358979323846;

  function automatic coef_t quant(real v);
    real    s;
    longint q;
    s = v * real'(longint'(1) << (TW - 1));
    q = longint'(s);  // a real-to-integer cast rounds to nearest
    if (q > (longint'(1) << (TW - 1)) - 1) q = (longint'(1) << (TW - 1)) - 1;
    if (q < -(longint'(1) << (TW - 1)))    q = -(longint'(1) << (TW - 1));
    return coef_t'(q);
  endfunction

  function automatic table_t make_re();
    table_t t;
    for (int e = 0; e < int'(N); e++) t[e] = quant($cos(2.0 * PI * e / N));
    return t;
  endfunction

  function automatic table_t make_im();
    table_t t;
    for (int e = 0; e < int'(N); e++) t[e] = quant(-$sin(2.0 * PI * e / N));
    return t;
  endfunction

  localparam table_t TAB_RE = make_re();
  localparam table_t TAB_IM = make_im();

  always_comb begin
    w_re = TAB_RE[addr];
    w_im = TAB_IM[addr];
  end
endmodule
