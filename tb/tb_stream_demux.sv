// Test of the demultiplexer with four streams. Interleaved values with
// stream indices 0..3 and a bin index per group enter with random gaps;
// every group must come out once, in parallel, with each value in the lane
// of its stream and the bin index of the group, one cycle after the value
// of the last stream was presented.
module tb_stream_demux;
  localparam int M  = 4;
  localparam int DW = 20;
  localparam int BW = 6;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic [1:0] in_stream = '0;
  logic [BW-1:0] in_bin = '0;
  logic out_valid;
  logic signed [DW-1:0] out_re [M], out_im [M];
  logic [BW-1:0] out_bin;
  int gr [M], gi [M];
  int checks = 0, failures = 0, nout = 0, pending = 0;

  stream_demux #(.M_R(M), .DW(DW), .BIN_W(BW)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 120; g++) begin
      in_bin = BW'($urandom);
      for (int m = 0; m < M; m++) begin
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
          checks++;
          if (out_valid && pending == 0) failures++;   // no spurious output
          pending = 0;
        end
        in_valid  = 1'b1;
        in_stream = 2'(m);
        in_re     = DW'($urandom);
        in_im     = DW'($urandom);
        gr[m]     = int'(in_re);
        gi[m]     = int'(in_im);
        @(negedge clk);
        if (m == M - 1) pending = 1;
        in_valid = 1'b0;
        checks++;
        if (out_valid != (pending == 1 && m == M - 1)) begin
          failures++;
          if (failures < 8) $display("group %0d lane %0d: out_valid %0b", g, m, out_valid);
        end
        if (out_valid) begin
          nout++;
          for (int k = 0; k < M; k++) begin
            checks++;
            if (int'(out_re[k]) != gr[k] || int'(out_im[k]) != gi[k] || out_bin != in_bin) begin
              failures++;
              if (failures < 8) $display("group %0d lane %0d wrong", g, k);
            end
          end
        end
        pending = 0;
      end
    end
    checks++;
    if (nout != 120) failures++;
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
