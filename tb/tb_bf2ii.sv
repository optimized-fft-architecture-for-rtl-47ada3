// Test of the BF2II butterfly with a 4-word feedback FIFO. Random complex
// samples enter with random enable gaps; the block-phase bit and its -j bit come
// from a sample counter as in the pipeline. After every enabled cycle the
// registered output must be the butterfly result for position i-DEPTH
// (i = index of the sample just taken), worked out here from the recorded
// inputs: x[p] + b and x[p-DEPTH] - b for the two halves of a block, with
// b the later sample multiplied by -j in the quarter that needs it.
module tb_bf2ii;
  localparam int DW = 18;
  localparam int D  = 4;
  localparam int CB = $clog2(D);
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] idx = '0;
  logic signed [DW-1:0] x_re = '0, x_im = '0, y_re, y_im;
  int xr [$], xi [$];
  int checks = 0, failures = 0;

  bf2ii #(.DW(DW), .DEPTH(D)) dut (.clk, .rst_n, .en, .sel(idx[CB]), .rot(idx[CB+1]), .x_re, .x_im, .y_re, .y_im);

  always #1 clk = ~clk;

  // later sample of a pair, with the -j factor where this butterfly applies it
  function automatic void later(input int q, output int br, output int bi);
    if (((q >> (CB + 1)) & 1) == 1) begin
      br = xi[q];
      bi = -xr[q];
    end else begin
      br = xr[q];
      bi = xi[q];
    end
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      while ($urandom_range(3) == 0) begin
        en = 1'b0;
        @(negedge clk);
      end
      en   = 1'b1;
      x_re = DW'(int'($urandom_range(8191)) - 4096);
      x_im = DW'(int'($urandom_range(8191)) - 4096);
      xr.push_back(int'(x_re));
      xi.push_back(int'(x_im));
      @(negedge clk);
      en = 1'b0;
      if (i >= D) begin
        int p, er, ei, br, bi;
        p = i - D;
        if ((p / D) % 2 == 0) begin
          later(p + D, br, bi);
          er = xr[p] + br;
          ei = xi[p] + bi;
        end else begin
          later(p, br, bi);
          er = xr[p - D] - br;
          ei = xi[p - D] - bi;
        end
        checks++;
        if (int'(y_re) != er || int'(y_im) != ei) begin
          failures++;
          if (failures < 8) $display("position %0d: got (%0d,%0d) expected (%0d,%0d)", p, y_re, y_im, er, ei);
        end
      end
      idx = idx + 1'b1;
    end
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
