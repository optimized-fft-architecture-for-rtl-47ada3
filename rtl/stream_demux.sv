// Demultiplexer behind the shared FFT pipeline.
//
// The pipeline emits its results interleaved exactly like its input: for
// each frequency bin, one value per stream, stream 0 first. This block
// writes each value into a register bank by its stream index and, when the
// value of the last stream arrives, presents all M_R results of that bin in
// parallel (A(k) ... D(k)) for one cycle, with the bin index.
//
// Interface: in_* carry one value per cycle with its stream and bin index;
// out_valid is a one-cycle pulse, registered, one cycle after the last
// stream's value was presented. The order of the bins is whatever the
// pipeline produces (bit-reversed for the radix-2^2 core).
//
// Returning the streams in the order they were multiplexed follows the
// architecture; the register bank and the pulse interface are this
// design's choices.
module stream_demux #(
  parameter int unsigned M_R   = 4,
  parameter int unsigned DW    = 28,
  parameter int unsigned BIN_W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    in_re,
  input  logic signed [DW-1:0]    in_im,
  input  logic [$clog2(M_R)-1:0]  in_stream,
  input  logic [BIN_W-1:0]        in_bin,
  output logic                    out_valid,
  output logic signed [DW-1:0]    out_re [M_R],
  output logic signed [DW-1:0]    out_im [M_R],
  output logic [BIN_W-1:0]        out_bin
);

  localparam int unsigned SB = $clog2(M_R);

  logic signed [DW-1:0] col_re [M_R-1];
  logic signed [DW-1:0] col_im [M_R-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bin   <= '0;
      for (int i = 0; i < int'(M_R); i++) begin
        out_re[i] <= '0;
        out_im[i] <= '0;
      end
      for (int i = 0; i < int'(M_R) - 1; i++) begin
        col_re[i] <= '0;
        col_im[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_stream == SB'(M_R - 1)) begin
          out_valid <= 1'b1;
          out_bin   <= in_bin;
          for (int i = 0; i < int'(M_R) - 1; i++) begin
            out_re[i] <= col_re[i];
            out_im[i] <= col_im[i];
          end
          out_re[M_R-1] <= in_re;
          out_im[M_R-1] <= in_im;
        end else begin
          col_re[in_stream] <= in_re;
          col_im[in_stream] <= in_im;
        end
      end
    end
  end

endmodule
