// Feedback FIFO of one single-path delay feedback (SDF) butterfly stage.
//
// A delay line of DEPTH words: on every cycle with `en` high the word on
// `din` is stored and `dout` presents the word stored DEPTH enabled cycles
// earlier. Cycles with `en` low freeze the line, so the FIFO advances in
// step with the sample stream rather than with the clock.
//
// For DEPTH >= 2 the line is a RAM addressed by one circular pointer. The
// RAM read is registered (block-RAM friendly): in the cycle that writes
// slot p it reads slot p+1, which is the oldest word and is needed on the
// next enabled cycle. DEPTH = 1 is a plain register. Words are not reset;
// whatever the RAM holds at start-up leaves the line within DEPTH samples.
//
// The depths themselves (M_R times the single-stream lengths, 4096 ... 4 for
// a 2048-point, four-stream transform) follow the multi-stream architecture;
// the RAM organisation is this design's choice.
module sdf_delay #(
  parameter int unsigned DW    = 56,
  parameter int unsigned DEPTH = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  if (DEPTH == 1) begin : g_reg
    logic [DW-1:0] q;
    always_ff @(posedge clk) begin
      if (!rst_n)  q <= '0;
      else if (en) q <= din;
    end
    assign dout = q;
  end else begin : g_ram
    localparam int unsigned AW = $clog2(DEPTH);
    logic [DW-1:0] mem [DEPTH];
    logic [AW-1:0] wptr, rptr;
    logic [DW-1:0] rd_q;

    assign rptr = (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;

    always_ff @(posedge clk) begin
      if (!rst_n)  wptr <= '0;
      else if (en) wptr <= rptr;
    end

    always_ff @(posedge clk) begin
      if (en) begin
        mem[wptr] <= din;
        rd_q      <= mem[rptr];
      end
    end
    assign dout = rd_q;
  end

endmodule
