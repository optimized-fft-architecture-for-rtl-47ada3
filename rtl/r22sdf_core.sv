// Radix-2^2 single-path delay feedback (R2^2SDF) FFT pipeline shared by
// M_R interleaved streams.
//
// Input x'(n) carries M_R independent signals interleaved sample by sample:
// slot n*M_R + m holds sample n of stream m. The pipeline has log2(N_FFT)
// butterfly stages, alternately BF2I and BF2II, each with a feedback FIFO.
// In a single-stream pipeline stage s would delay by N_FFT/2^s; here every
// FIFO is M_R times longer (4096, 2048, ... 4 for 2048 points and four
// streams), so each butterfly only ever combines samples of the same
// stream and the streams never mix. After every BF2II except one in the
// last stage a complex multiplier applies the non-trivial twiddle factor;
// since its table is indexed by the sample number without the stream bits,
// a factor is held for M_R consecutive samples. For an odd number of
// stages (2048 points: 11) the last stage is a lone BF2I (radix 2).
//
// Control: one counter of accepted input samples. Each stage sees it minus
// the latency in front of it, and takes its half-block bit (and, for
// BF2II, the -j bit above it) from there; the stream bits are the lowest
// log2(M_R) bits and are never used as control.
//
// Timing: `in_valid` is the clock enable of the whole pipeline; a gap in
// the input stalls every stage without losing data, and the last frame
// leaves the pipeline as the next frame enters. Latency is
// M_R*(N_FFT-1) + log2(N_FFT) + 2*(number of multipliers) accepted samples.
// Output is in bit-reversed bin order; out_bin gives the natural index k,
// out_stream the stream.
//
// Widths are this design's choice: the data are sign-extended to
// IN_W + log2(N_FFT) + 1 bits at the input and kept at that width, which
// holds the full growth of the transform, so no stage scales or saturates.
module r22sdf_core
  import mimo_fft_pkg::*;
#(
  parameter int unsigned N_FFT = DEF_N_FFT,
  parameter int unsigned M_R   = DEF_M_R,
  parameter int unsigned IN_W  = DEF_IN_W,
  parameter int unsigned TW_W  = DEF_TW_W,
  localparam int unsigned L    = $clog2(N_FFT),
  localparam int unsigned SB   = $clog2(M_R),
  localparam int unsigned DW   = IN_W + L + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im,
  output logic [SB-1:0]          out_stream,
  output logic [L-1:0]           out_bin
);

  localparam int unsigned GW       = L + SB;   // counter spans one frame of all streams
  localparam int unsigned MULT_LAT = 2;

  function automatic int unsigned stage_depth(int unsigned s);
    return M_R * (1 << (L - s));
  endfunction

  function automatic bit has_mult(int unsigned s);
    return (s % 2 == 0) && (s < L);
  endfunction

  // Accepted samples between the pipeline input and the input of stage s.
  function automatic int unsigned stage_offset(int unsigned s);
    int unsigned o = 0;
    for (int unsigned j = 1; j < s; j++) begin
      o += stage_depth(j) + 1;
      if (has_mult(j)) o += MULT_LAT;
    end
    return o;
  endfunction

  localparam int unsigned TOTAL_LAT = stage_offset(L + 1);
  localparam int unsigned FW        = $clog2(TOTAL_LAT + 1);

  logic [GW-1:0]        cnt;
  logic [FW-1:0]        fill;
  logic signed [DW-1:0] d_re [L+1];
  logic signed [DW-1:0] d_im [L+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (in_valid) begin
      cnt <= cnt + 1'b1;
      if (fill != FW'(TOTAL_LAT)) fill <= fill + 1'b1;
    end
  end

  assign d_re[0] = DW'(in_re);
  assign d_im[0] = DW'(in_im);

  for (genvar s = 1; s <= L; s++) begin : g_stage
    localparam int unsigned D   = stage_depth(s);
    localparam int unsigned OFF = stage_offset(s);
    localparam int unsigned CB  = SB + L - s;   // half-block bit of this stage
    logic [GW-1:0]        idx;
    logic signed [DW-1:0] b_re, b_im;

    assign idx = cnt - GW'(OFF);

    if (s % 2 == 1) begin : g_bf2i
      bf2i #(.DW(DW), .DEPTH(D)) u_bf (
        .clk, .rst_n, .en(in_valid), .sel(idx[CB]),
        .x_re(d_re[s-1]), .x_im(d_im[s-1]), .y_re(b_re), .y_im(b_im)
      );
    end else begin : g_bf2ii
      bf2ii #(.DW(DW), .DEPTH(D)) u_bf (
        .clk, .rst_n, .en(in_valid), .sel(idx[CB]), .rot(idx[CB+1]),
        .x_re(d_re[s-1]), .x_im(d_im[s-1]), .y_re(b_re), .y_im(b_im)
      );
    end

    if (has_mult(s)) begin : g_mult
      // block of 4*D/M_R samples per stream, the last BF2I/BF2II pair's span
      localparam int unsigned NK = 4 * D / M_R;
      localparam int unsigned PB = $clog2(NK);
      logic [GW-1:0] midx;
      logic [PB-1:0] tpos;
      assign midx = cnt - GW'(OFF + D + 1);
      assign tpos = PB'(midx >> SB);   // stream bits dropped: one factor per M_R samples
      twiddle_mult #(.DW(DW), .NK(NK), .TW_W(TW_W)) u_tw (
        .clk, .rst_n, .en(in_valid), .pos(tpos),
        .x_re(b_re), .x_im(b_im), .y_re(d_re[s]), .y_im(d_im[s])
      );
    end else begin : g_nomult
      assign d_re[s] = b_re;
      assign d_im[s] = b_im;
    end
  end

  // Output bookkeeping: after an accepted sample the last stage holds
  // position cnt - TOTAL_LAT of the output frame.
  logic [GW-1:0] opos_next;
  logic [GW-1:0] opos;
  assign opos_next = cnt - GW'(TOTAL_LAT - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      opos      <= '0;
    end else begin
      out_valid <= in_valid && (32'(fill) + 1 >= TOTAL_LAT);
      if (in_valid) opos <= opos_next;
    end
  end

  assign out_re     = d_re[L];
  assign out_im     = d_im[L];
  assign out_stream = opos[SB-1:0];
  assign out_bin    = L'(bit_reverse(32'(opos[GW-1:SB]), L));

  initial begin
    assert (M_R >= 2 && (1 << SB) == M_R) else $fatal(1, "M_R must be a power of two >= 2");
    assert ((1 << L) == N_FFT && L >= 2) else $fatal(1, "N_FFT must be a power of two >= 4");
  end

endmodule
