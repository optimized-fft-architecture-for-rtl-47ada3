// Twiddle-factor multiplier between two radix-2^2 stage pairs.
//
// Multiplies the sample at position `pos` of a block of NK samples (counted
// per stream) by W_NK^e = exp(-j*2*pi*e/NK) with e = n3*(k1 + 2*k2), where
// pos = k1*NK/2 + k2*NK/4 + n3. This is the non-trivial factor left over
// after a BF2I/BF2II pair has applied the trivial -j.
//
// The NK coefficients sit in a ROM whose contents are computed at
// elaboration (cos/sin rounded to TW_W bits, 1.0 = 2**(TW_W-2)). When
// several streams are interleaved the caller simply drops the stream bits
// from `pos`, so a coefficient stays for M_R consecutive samples.
//
// Timing: two register stages, both advanced by `en`. Stage 1 registers the
// input and reads the ROM, stage 2 registers the rounded product
// (round half up, arithmetic shift by TW_W-2). The product of the sample
// taken at one enabled edge is on y after the next enabled edge, so in the
// pipeline the multiplier adds two samples of delay. y keeps the width DW
// of x.
//
// The position-to-coefficient rule follows the radix-2^2 decomposition; the
// ROM, coefficient width, rounding and pipelining are this design's choices.
module twiddle_mult #(
  parameter int unsigned DW   = 28,
  parameter int unsigned NK   = 2048,
  parameter int unsigned TW_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [$clog2(NK)-1:0]   pos,
  input  logic signed [DW-1:0]    x_re,
  input  logic signed [DW-1:0]    x_im,
  output logic signed [DW-1:0]    y_re,
  output logic signed [DW-1:0]    y_im
);
  import mimo_fft_pkg::*;

  localparam int unsigned FRAC = TW_W - 2;
  localparam int unsigned PW   = DW + TW_W + 1;

  typedef logic signed [TW_W-1:0] coef_t;
  typedef coef_t coef_tab_t [NK];

  function automatic coef_t quant(real v);
    return coef_t'($rtoi($floor(v * (2.0 ** FRAC) + 0.5)));
  endfunction

  function automatic coef_tab_t make_re();
    coef_tab_t t;
    for (int unsigned q = 0; q < NK; q++)
      t[q] = quant($cos(2.0 * 3.14159265358979323846 * real'(twiddle_exp(q, NK)) / real'(NK)));
    return t;
  endfunction

  function automatic coef_tab_t make_im();
    coef_tab_t t;
    for (int unsigned q = 0; q < NK; q++)
      t[q] = quant(-$sin(2.0 * 3.14159265358979323846 * real'(twiddle_exp(q, NK)) / real'(NK)));
    return t;
  endfunction

  localparam coef_tab_t ROM_RE = make_re();
  localparam coef_tab_t ROM_IM = make_im();

  coef_t                w_re, w_im;
  logic signed [DW-1:0] xr_re, xr_im;
  logic signed [PW-1:0] p_re, p_im;

  always_ff @(posedge clk) begin
    if (en) begin
      w_re <= ROM_RE[pos];
      w_im <= ROM_IM[pos];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xr_re <= '0;
      xr_im <= '0;
      y_re  <= '0;
      y_im  <= '0;
    end else if (en) begin
      xr_re <= x_re;
      xr_im <= x_im;
      y_re  <= DW'(p_re >>> FRAC);
      y_im  <= DW'(p_im >>> FRAC);
    end
  end

  always_comb begin
    p_re = PW'(xr_re) * PW'(w_re) - PW'(xr_im) * PW'(w_im) + PW'(1 << (FRAC - 1));
    p_im = PW'(xr_re) * PW'(w_im) + PW'(xr_im) * PW'(w_re) + PW'(1 << (FRAC - 1));
  end

endmodule
