// BF2I: first butterfly of a radix-2^2 single-path delay feedback stage.
//
// Works on blocks of 2*DEPTH samples. While `sel` is low (first half of a
// block) the input is pushed into the feedback FIFO and the FIFO output
// (differences left from the previous block) is passed on. While `sel` is
// high the FIFO output a and the input b form a+b, which is passed on, and
// a-b, which is pushed back into the FIFO to leave during the next half.
// The stage thus delays its stream by DEPTH samples plus one output
// register.
//
// Interface: `en` advances FIFO and output register by one sample; `sel` is
// the block-phase bit of the sample on x (driven from the pipeline counter
// by the caller). Sums and differences keep the width DW: the caller sizes
// DW so the growth of the whole transform fits.
//
// The butterfly structure is the standard radix-2^2 BF2I; the registered
// output and the RAM-based FIFO are this design's choices.
module bf2i #(
  parameter int unsigned DW    = 28,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 sel,
  input  logic signed [DW-1:0] x_re,
  input  logic signed [DW-1:0] x_im,
  output logic signed [DW-1:0] y_re,
  output logic signed [DW-1:0] y_im
);

  logic signed [DW-1:0] f_re, f_im, fb_re, fb_im, s_re, s_im;

  sdf_delay #(.DW(2 * DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .en,
    .din ({fb_re, fb_im}),
    .dout({f_re, f_im})
  );

  always_comb begin
    if (sel) begin
      fb_re = f_re - x_re;
      fb_im = f_im - x_im;
      s_re  = f_re + x_re;
      s_im  = f_im + x_im;
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
