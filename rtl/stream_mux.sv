// Samplewise multiplexer in front of the shared FFT pipeline.
//
// Accepts one sample of each of the M_R receive streams at once and sends
// them one per cycle, stream 0 first (a, b, c, d), as the interleaved
// stream x'(n). The pipeline therefore runs at M_R times the per-stream
// sample rate and needs no input buffer of a whole OFDM symbol, only this
// register bank of M_R samples.
//
// Interface: a group is taken when in_valid and in_ready are both high.
// in_ready is high while the mux is idle and during the last cycle of a
// group, so back-to-back groups give a gap-free x'(n). A group offered
// while in_ready is low must be held (in_valid kept high) until taken; an
// assertion checks this rule. The first sample of a group appears on out_* one cycle after
// it was taken; out_stream tells which stream each sample belongs to.
//
// The sample order follows the architecture; the handshake is this
// design's choice.
module stream_mux #(
  parameter int unsigned M_R  = 4,
  parameter int unsigned IN_W = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic signed [IN_W-1:0]          in_re [M_R],
  input  logic signed [IN_W-1:0]          in_im [M_R],
  output logic                            out_valid,
  output logic signed [IN_W-1:0]          out_re,
  output logic signed [IN_W-1:0]          out_im,
  output logic [$clog2(M_R)-1:0]          out_stream
);

  localparam int unsigned SB = $clog2(M_R);

  logic signed [IN_W-1:0] hold_re [M_R];
  logic signed [IN_W-1:0] hold_im [M_R];
  logic [SB-1:0]          cnt;
  logic                   busy;
  logic                   last;

  assign last     = (cnt == SB'(M_R - 1));
  assign in_ready = !busy || last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (in_valid && in_ready) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      busy <= !last;
      cnt  <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(M_R); i++) begin
        hold_re[i] <= '0;
        hold_im[i] <= '0;
      end
    end else if (in_valid && in_ready) begin
      hold_re <= in_re;
      hold_im <= in_im;
    end
  end

  assign out_valid  = busy;
  assign out_re     = hold_re[cnt];
  assign out_im     = hold_im[cnt];
  assign out_stream = cnt;

  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n) in_valid && !in_ready |=> in_valid)
    else $error("stream_mux: input group withdrawn before it was taken");

endmodule
