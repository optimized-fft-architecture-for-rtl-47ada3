// Test harness for one configuration of r22sdf_core.
//
// Sends NSYM symbols of random data for M interleaved streams, with random
// gaps in in_valid, then zeros to flush. Every output of the first NSYM
// symbols is compared with a direct DFT of the stream it claims to belong
// to (out_stream) and its bin (out_bin), and the position in the output
// order is checked against the bit-reversed order. Reports its counts on
// its ports and raises `done` when finished.
module r22sdf_core_check #(
  parameter int N    = 32,
  parameter int M    = 4,
  parameter int NSYM = 3
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  import mimo_fft_pkg::*;

  localparam int IW = 16;
  localparam int L  = $clog2(N);
  localparam int DW = IW + L + 1;
  localparam int SB = $clog2(M);
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic signed [DW-1:0] out_re, out_im;
  logic [SB-1:0] out_stream;
  logic [L-1:0] out_bin;

  r22sdf_core #(.N_FFT(N), .M_R(M)) dut (.*);

  always #1 clk = ~clk;

  int x_re [NSYM+2][M][N];
  int x_im [NSYM+2][M][N];
  int nout = 0;

  initial begin
    done = 1'b0; checks = 0; failures = 0; stalls = 0;
    for (int s = 0; s < NSYM + 2; s++)
      for (int m = 0; m < M; m++)
        for (int n = 0; n < N; n++) begin
          x_re[s][m][n] = (s < NSYM) ? int'($urandom_range(65535)) - 32768 : 0;
          x_im[s][m][n] = (s < NSYM) ? int'($urandom_range(65535)) - 32768 : 0;
        end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSYM + 2; s++)
      for (int n = 0; n < N; n++)
        for (int m = 0; m < M; m++) begin
          if ($urandom_range(7) == 0) begin
            in_valid = 1'b0;
            stalls++;
            repeat (1 + $urandom_range(3)) @(negedge clk);
          end
          in_valid = 1'b1;
          in_re = IW'(x_re[s][m][n]);
          in_im = IW'(x_im[s][m][n]);
          @(negedge clk);
        end
    in_valid = 1'b0;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && nout < NSYM * N * M) begin
      int s, p, m, k;
      real rr, ri, sum_abs;
      s = nout / (N * M);
      p = nout % (N * M);
      m = p % M;
      k = int'(bit_reverse(p / M, L));
      checks += 3;
      if (out_stream != SB'(m)) begin
        failures++;
        $display("N=%0d M=%0d output %0d: stream %0d expected %0d", N, M, nout, out_stream, m);
      end
      if (out_bin != L'(k)) begin
        failures++;
        $display("N=%0d M=%0d output %0d: bin %0d expected %0d", N, M, nout, out_bin, k);
      end
      rr = 0.0; ri = 0.0; sum_abs = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, sn;
        c  = $cos(2.0 * PI * real'((n * k) % N) / N);
        sn = $sin(2.0 * PI * real'((n * k) % N) / N);
        rr += x_re[s][m][n] * c + x_im[s][m][n] * sn;
        ri += x_im[s][m][n] * c - x_re[s][m][n] * sn;
        sum_abs += absr(real'(x_re[s][m][n])) + absr(real'(x_im[s][m][n]));
      end
      if (absr(real'(out_re) - rr) > 1.0e-4 * sum_abs + 8.0 ||
          absr(real'(out_im) - ri) > 1.0e-4 * sum_abs + 8.0) begin
        failures++;
        if (failures < 8)
          $display("N=%0d M=%0d symbol %0d stream %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                   N, M, s, m, k, out_re, out_im, rr, ri);
      end
      nout++;
      if (nout == NSYM * N * M) done = 1'b1;
    end
  end

endmodule
