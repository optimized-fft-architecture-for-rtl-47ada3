// End-to-end test of the multi-stream FFT at its reference size
// (2048 points, four streams, all parameters at their defaults).
//
// Three symbols per stream are sent through the multiplexer: symbol 0 is
// full-scale random data, symbol 1 a different tone in every stream plus
// noise (a mix-up between streams would move the peak), symbols 2 and 3 zeros
// that push symbol 1 out. Every output bin of symbols 0 and 1 of every
// stream is compared with a direct DFT computed here in floating point.
// Symbol 0 is sent with random gaps (the pipeline stalls before any output
// is valid), symbol 1 back to back (its results must then leave at one bin
// per M_R clocks), symbols 2 and 3 with gaps again (stalls while valid results are
// leaving). Counted mechanisms: groups multiplexed, bins demultiplexed,
// stalls with and without valid output, overlap of an entering and a
// leaving symbol, -j applied in the first BF2II and non-unit factors used
// by the first twiddle multiplier. The test also checks that the first
// multiplier's table position only moves once per group of M_R streams.
module tb_mimo_fft_top;
  import mimo_fft_pkg::*;

  localparam int N   = DEF_N_FFT;
  localparam int M   = DEF_M_R;
  localparam int IW  = DEF_IN_W;
  localparam int L   = $clog2(N);
  localparam int DW  = IW + L + 1;
  localparam int NSYM  = 4;   // symbols sent (the last two flush)
  localparam int NCHK  = 2;   // symbols checked
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [IW-1:0] in_re [M], in_im [M];
  logic out_valid;
  logic signed [DW-1:0] out_re [M], out_im [M];
  logic [L-1:0] out_bin;

  mimo_fft_top dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int x_re [NSYM][M][N];
  int x_im [NSYM][M][N];
  real cs [N], sn [N];
  real tol [NCHK][M];
  int n_groups = 0, n_bins = 0, n_stall_idle = 0, n_stall_busy = 0, n_overlap = 0;
  int n_rot_bins = 0, n_tw_bins = 0;
  int cycle = 0;
  int last_out_cycle = -1;
  int rate_err = 0;
  int tw_hold_err = 0;
  real max_err = 0.0;
  logic [L-1:0] last_tpos = '0;
  logic tpos_seen = 1'b0;

  initial begin
    for (int k = 0; k < N; k++) begin
      cs[k] = $cos(2.0 * PI * k / N);
      sn[k] = $sin(2.0 * PI * k / N);
    end
    for (int s = 0; s < NSYM; s++)
      for (int m = 0; m < M; m++)
        for (int n = 0; n < N; n++) begin
          if (s == 0) begin
            x_re[s][m][n] = int'($urandom_range(65535)) - 32768;
            x_im[s][m][n] = int'($urandom_range(65535)) - 32768;
          end else if (s == 1) begin
            automatic int b = 37 * (m + 1) + 5 * m * m;
            x_re[s][m][n] = $rtoi(20000.0 * cs[(b * n) % N]) + int'($urandom_range(2000)) - 1000;
            x_im[s][m][n] = $rtoi(20000.0 * sn[(b * n) % N]) + int'($urandom_range(2000)) - 1000;
          end else begin
            x_re[s][m][n] = 0;
            x_im[s][m][n] = 0;
          end
        end
    for (int s = 0; s < NCHK; s++)
      for (int m = 0; m < M; m++) begin
        automatic real a = 0.0;
        for (int n = 0; n < N; n++) a += $sqrt(real'(x_re[s][m][n]) ** 2 + real'(x_im[s][m][n]) ** 2);
        tol[s][m] = 1.0e-4 * a + 16.0;
      end
  end

  // stimulus: driven on the falling edge, taken by the mux on the rising edge
  initial begin
    for (int m = 0; m < M; m++) begin in_re[m] = '0; in_im[m] = '0; end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSYM; s++)
      for (int n = 0; n < N; n++) begin
        if (s != 1 && $urandom_range(15) == 0) begin
          in_valid = 1'b0;
          repeat (1 + $urandom_range(6)) @(negedge clk);
        end
        in_valid = 1'b1;
        for (int m = 0; m < M; m++) begin
          in_re[m] = IW'(x_re[s][m][n]);
          in_im[m] = IW'(x_im[s][m][n]);
        end
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        in_valid = 1'b0;
        n_groups++;
      end
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // direct DFT of one bin
  task automatic dft(input int s, input int m, input int k, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int n = 0; n < N; n++) begin
      int e = (n * k) % N;
      re += x_re[s][m][n] * cs[e] + x_im[s][m][n] * sn[e];
      im += x_im[s][m][n] * cs[e] - x_re[s][m][n] * sn[e];
    end
  endtask

  // mechanism monitors
  always @(posedge clk) begin
    cycle++;
    if (rst_n && !dut.u_mux.busy && !in_valid && n_groups > 0 && n_groups < NSYM * N) begin
      if (dut.u_fft.fill == $bits(dut.u_fft.fill)'(dut.u_fft.TOTAL_LAT)) n_stall_busy++;
      else n_stall_idle++;
    end
    if (dut.u_fft.in_valid && dut.u_fft.out_valid) n_overlap++;
    if (dut.u_fft.in_valid && dut.u_fft.g_stage[2].g_bf2ii.u_bf.sel && dut.u_fft.g_stage[2].g_bf2ii.u_bf.rot)
      n_rot_bins++;
    if (dut.u_fft.in_valid && dut.u_fft.g_stage[2].g_mult.u_tw.w_re != (1 << (DEF_TW_W - 2))) n_tw_bins++;
    // the first multiplier's table position may only change at stream slot 0
    if (rst_n && dut.u_fft.in_valid) begin
      if (tpos_seen && dut.u_fft.g_stage[2].g_mult.midx[1:0] != 2'd0 &&
          dut.u_fft.g_stage[2].g_mult.tpos != last_tpos) tw_hold_err++;
      last_tpos = dut.u_fft.g_stage[2].g_mult.tpos;
      tpos_seen = 1'b1;
    end
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && n_bins < NCHK * N) begin
      int s, j, k;
      real rr, ri;
      s = n_bins / N;
      j = n_bins % N;
      k = int'(bit_reverse(j, L));
      checks++;
      if (out_bin != L'(k)) begin
        failures++;
        $display("bin index %0d expected %0d at output %0d", out_bin, k, n_bins);
      end
      for (int m = 0; m < M; m++) begin
        dft(s, m, k, rr, ri);
        if (absr(real'(out_re[m]) - rr) > max_err) max_err = absr(real'(out_re[m]) - rr);
        if (absr(real'(out_im[m]) - ri) > max_err) max_err = absr(real'(out_im[m]) - ri);
        checks++;
        if (absr(real'(out_re[m]) - rr) > tol[s][m] || absr(real'(out_im[m]) - ri) > tol[s][m]) begin
          failures++;
          if (failures < 10)
            $display("symbol %0d stream %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                     s, m, k, out_re[m], out_im[m], rr, ri);
        end
      end
      // symbol 1 enters without gaps, so symbol 0 must leave at one bin per M clocks
      if (s == 0 && j > 0 && cycle - last_out_cycle != M) rate_err++;
      last_out_cycle = cycle;
      n_bins++;
      if (n_bins == NCHK * N) begin
        checks++;
        checks++;
        if (tw_hold_err != 0) begin
          failures++;
          $display("twiddle position changed inside a group of %0d streams %0d times", M, tw_hold_err);
        end
        if (rate_err != 0) begin
          failures++;
          $display("output rate: %0d bins of symbol 0 not %0d clocks apart", rate_err, M);
        end
        finish_test();
      end
    end
  end

  task automatic mech(input string name, input int cnt);
    checks++;
    $display("mechanism %-34s %0d", name, cnt);
    if (cnt == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  task automatic finish_test();
    $display("largest deviation from the floating-point DFT: %0.1f LSB", max_err);
    mech("groups multiplexed", n_groups);
    mech("bins demultiplexed", n_bins);
    mech("stall before valid output", n_stall_idle);
    mech("stall while results leave", n_stall_busy);
    mech("symbol in while symbol out", n_overlap);
    mech("-j applied in the first BF2II", n_rot_bins);
    mech("non-unit twiddle used by W1", n_tw_bins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d of %0d bins seen", n_bins, NCHK * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
