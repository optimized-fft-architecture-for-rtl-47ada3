// Test of the SDF feedback FIFO: three delay lines (depths 1, 2 and 12)
// are fed the same random words with random clock-enable gaps; after
// every enabled cycle each output must equal the word written DEPTH
// enabled cycles before, taken from a record kept here.
module tb_sdf_delay;
  localparam int DW = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [DW-1:0] din = '0, d1, d2, d12;
  logic [DW-1:0] hist [$];
  int checks = 0, failures = 0;

  sdf_delay #(.DW(DW), .DEPTH(1))  u_d1  (.clk, .rst_n, .en, .din, .dout(d1));
  sdf_delay #(.DW(DW), .DEPTH(2))  u_d2  (.clk, .rst_n, .en, .din, .dout(d2));
  sdf_delay #(.DW(DW), .DEPTH(12)) u_d12 (.clk, .rst_n, .en, .din, .dout(d12));

  always #1 clk = ~clk;

  task automatic expect_eq(input logic [DW-1:0] got, input int depth);
    // the next enabled cycle must see the word written `depth` enabled cycles before it
    int n = hist.size();
    if (n >= depth) begin
      checks++;
      if (got != hist[n - depth]) begin
        failures++;
        if (failures < 8) $display("depth %0d: got %h expected %h", depth, got, hist[n - depth]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      en  = ($urandom_range(3) != 0);
      din = DW'($urandom);
      @(posedge clk);
      if (en) hist.push_back(din);
      @(negedge clk);
      if (en) begin
        expect_eq(d1, 1);
        expect_eq(d2, 2);
        expect_eq(d12, 12);
      end
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
