// Multi-stream FFT for an M_R-antenna MIMO OFDM receiver.
//
// Instead of one FFT per antenna, or one fast FFT fed block by block from
// symbol buffers, the M_R antenna streams are interleaved sample by sample
// (stream_mux) into a single radix-2^2 SDF pipeline whose feedback FIFOs
// are M_R times longer (r22sdf_core), and the results are split back into
// M_R parallel streams (stream_demux). Arithmetic is that of one FFT;
// memory is M_R*(N_FFT-1) words, the same as M_R separate pipelines, and no
// input buffering is needed.
//
// Interface: one sample of every stream enters with in_valid/in_ready (at
// most one group every M_R clocks, so the clock is M_R times the per-stream
// sample rate). One bin of every stream leaves as a one-cycle out_valid
// pulse with out_bin = k; bins come in bit-reversed order. Latency from the
// first sample of a symbol to its first output is about M_R*N_FFT clocks.
//
// N_FFT = 2048 and M_R = 4 are the reference configuration; widths,
// handshakes, output order and pipelining are this design's choices.
module mimo_fft_top
  import mimo_fft_pkg::*;
#(
  parameter int unsigned N_FFT = DEF_N_FFT,
  parameter int unsigned M_R   = DEF_M_R,
  parameter int unsigned IN_W  = DEF_IN_W,
  parameter int unsigned TW_W  = DEF_TW_W,
  localparam int unsigned L    = $clog2(N_FFT),
  localparam int unsigned DW   = IN_W + L + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_re  [M_R],
  input  logic signed [IN_W-1:0] in_im  [M_R],
  output logic                   out_valid,
  output logic signed [DW-1:0]   out_re [M_R],
  output logic signed [DW-1:0]   out_im [M_R],
  output logic [L-1:0]           out_bin
);

  localparam int unsigned SB = $clog2(M_R);

  logic                   x_valid;
  logic signed [IN_W-1:0] x_re, x_im;
  logic [SB-1:0]          x_stream;
  logic                   y_valid;
  logic signed [DW-1:0]   y_re, y_im;
  logic [SB-1:0]          y_stream;
  logic [L-1:0]           y_bin;

  stream_mux #(.M_R(M_R), .IN_W(IN_W)) u_mux (
    .clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im,
    .out_valid(x_valid), .out_re(x_re), .out_im(x_im), .out_stream(x_stream)
  );

  r22sdf_core #(.N_FFT(N_FFT), .M_R(M_R), .IN_W(IN_W), .TW_W(TW_W)) u_fft (
    .clk, .rst_n, .in_valid(x_valid), .in_re(x_re), .in_im(x_im),
    .out_valid(y_valid), .out_re(y_re), .out_im(y_im), .out_stream(y_stream), .out_bin(y_bin)
  );

  stream_demux #(.M_R(M_R), .DW(DW), .BIN_W(L)) u_demux (
    .clk, .rst_n, .in_valid(y_valid), .in_re(y_re), .in_im(y_im),
    .in_stream(y_stream), .in_bin(y_bin),
    .out_valid, .out_re, .out_im, .out_bin
  );

  // The core tracks the stream slot of each sample with its own counter;
  // it must agree with the stream the multiplexer is sending.
  a_stream_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      x_valid |-> x_stream == u_fft.cnt[SB-1:0])
    else $error("mimo_fft_top: multiplexer and FFT pipeline disagree on the stream slot");

endmodule
