// BF2II: second butterfly of a radix-2^2 single-path delay feedback stage.
//
// Same add/subtract and feedback scheme as BF2I over blocks of 2*DEPTH
// samples, but the input is first multiplied by -j when both `sel` (second
// half of the block) and `rot` are high. `rot` marks the half of the larger
// 4*DEPTH block that came out of the preceding BF2I as differences; there
// the radix-2^2 decomposition needs the trivial factor W4 = -j, which is a
// swap of real and imaginary parts with one sign change and costs no
// multiplier.
//
// Interface and timing as BF2I: `en` advances by one sample, output is
// registered, the stage delays its stream by DEPTH + 1 samples.
//
// The structure is the standard radix-2^2 BF2II; the registered output and
// RAM FIFO are this design's choices.
module bf2ii #(
  parameter int unsigned DW    = 28,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 sel,
  input  logic                 rot,
  input  logic signed [DW-1:0] x_re,
  input  logic signed [DW-1:0] x_im,
  output logic signed [DW-1:0] y_re,
  output logic signed [DW-1:0] y_im
);

  logic signed [DW-1:0] f_re, f_im, fb_re, fb_im, s_re, s_im, b_re, b_im;

  sdf_delay #(.DW(2 * DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .en,
    .din ({fb_re, fb_im}),
    .dout({f_re, f_im})
  );

  always_comb begin
    // -j * (re + j im) = im - j re
    if (sel && rot) begin
      b_re = x_im;
      b_im = -x_re;
    end else begin
      b_re = x_re;
      b_im = x_im;
    end
    if (sel) begin
      fb_re = f_re - b_re;
      fb_im = f_im - b_im;
      s_re  = f_re + b_re;
      s_im  = f_im + b_im;
    end else begin
      fb_re = x_re;
      fb_im = x_im;
      s_re  = f_re;
      s_im  = f_im;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else if (en) begin
      y_re <= s_re;
      y_im <= s_im;
    end
  end

endmodule
