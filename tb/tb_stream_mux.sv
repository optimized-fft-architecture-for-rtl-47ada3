// Test of the samplewise multiplexer with four streams. Groups of four
// random samples are offered with random gaps and random waits; the serial
// output must carry them in stream order 0,1,2,3 with matching out_stream,
// each group exactly once, and back-to-back groups must leave without a
// gap (one sample per clock). The input hand-over rule (a group stays
// offered until taken) is kept by the driver and checked by the block.
module tb_stream_mux;
  localparam int M  = 4;
  localparam int IW = 12;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready;
  logic signed [IW-1:0] in_re [M], in_im [M];
  logic out_valid;
  logic signed [IW-1:0] out_re, out_im;
  logic [1:0] out_stream;
  int exp_re [$], exp_im [$];
  int checks = 0, failures = 0, nout = 0, ngroups = 0, gapless = 0, run = 0;

  stream_mux #(.M_R(M), .IN_W(IW)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    for (int m = 0; m < M; m++) begin in_re[m] = '0; in_im[m] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 150; g++) begin
      if ($urandom_range(2) == 0) begin
        in_valid = 1'b0;
        repeat ($urandom_range(6)) @(negedge clk);
      end
      in_valid = 1'b1;
      for (int m = 0; m < M; m++) begin
        in_re[m] = IW'($urandom);
        in_im[m] = IW'($urandom);
        exp_re.push_back(int'(in_re[m]));
        exp_im.push_back(int'(in_im[m]));
      end
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      ngroups++;
    end
    repeat (8) @(negedge clk);
    checks++;
    if (nout != ngroups * M) begin
      failures++;
      $display("%0d samples out, %0d expected", nout, ngroups * M);
    end
    checks++;
    if (gapless == 0) begin
      failures++;
      $display("no back-to-back groups seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_re.size() == 0 || out_stream != 2'(nout % M) ||
          int'(out_re) != exp_re[0] || int'(out_im) != exp_im[0]) begin
        failures++;
        if (failures < 8) $display("output %0d: got (%0d,%0d) stream %0d", nout, out_re, out_im, out_stream);
      end
      if (exp_re.size() != 0) begin
        void'(exp_re.pop_front());
        void'(exp_im.pop_front());
      end
      nout++;
      run++;
      if (run == 2 * M) gapless++;
    end else begin
      run = 0;
    end
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
