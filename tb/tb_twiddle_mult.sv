// Test of the twiddle multiplier for a 32-sample block. Random samples and
// block positions enter with random enable gaps. The product of a sample is
// on the output after the enabled edge following the one that took it,
// and must equal x * exp(-j*2*pi*e/32) computed here in floating point,
// with e = n3*(k1 + 2*k2) for position k1*16 + k2*8 + n3, to within the
// rounding of 16-bit coefficients (3 LSB for 16-bit inputs).
module tb_twiddle_mult;
  localparam int DW = 24;
  localparam int NK = 32;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [$clog2(NK)-1:0] pos = '0;
  logic signed [DW-1:0] x_re = '0, x_im = '0, y_re, y_im;
  real er [$], ei [$];
  int checks = 0, failures = 0, nonunit = 0;

  twiddle_mult #(.DW(DW), .NK(NK), .TW_W(16)) dut (.clk, .rst_n, .en, .pos, .x_re, .x_im, .y_re, .y_im);

  always #1 clk = ~clk;

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      int q, e;
      real c, s;
      while ($urandom_range(3) == 0) begin
        en = 1'b0;
        @(negedge clk);
      end
      en   = 1'b1;
      q    = int'($urandom_range(NK - 1));
      pos  = q[$clog2(NK)-1:0];
      x_re = DW'(int'($urandom_range(65535)) - 32768);
      x_im = DW'(int'($urandom_range(65535)) - 32768);
      e = (q % (NK / 4)) * ((q / (NK / 2)) % 2 + 2 * ((q / (NK / 4)) % 2));
      if (e != 0) nonunit++;
      c = $cos(2.0 * PI * e / NK);
      s = -$sin(2.0 * PI * e / NK);
      er.push_back(real'(x_re) * c - real'(x_im) * s);
      ei.push_back(real'(x_re) * s + real'(x_im) * c);
      @(negedge clk);
      en = 1'b0;
      // the product of a sample is registered by the next enabled edge
      if (i >= 1) begin
        checks++;
        if (absr(real'(y_re) - er[i - 1]) > 3.0 || absr(real'(y_im) - ei[i - 1]) > 3.0) begin
          failures++;
          if (failures < 8) $display("sample %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", i - 1, y_re, y_im, er[i - 1], ei[i - 1]);
        end
      end
    end
    checks++;
    if (nonunit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
