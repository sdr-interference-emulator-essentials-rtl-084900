// upsampler: the first rate change of the TX chain, raises the rate by `factor`.
//
// Each accepted input sample is sent out once and followed by factor-1 zero samples (zero
// stuffing); the interpolation filter after it (FIR1, or FIR0 when FIR1 is bypassed) removes
// the images. factor 0 and 1 both pass samples unchanged. Output is registered; in_ready is
// high only when the output register can take a new sample and no zeros remain to be sent.
// The configurable upsampler follows the document; zero stuffing rather than sample repetition
// is this design's choice.
module upsampler
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] factor,
  input  logic        in_valid,
  output logic        in_ready,
  input  iq_t         in,
  output logic        out_valid,
  input  logic        out_ready,
  output iq_t         out
);

  logic [15:0] left;   // zero samples still to send for the current input
  logic adv;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && (left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left      <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else if (adv) begin
      if (left != '0) begin
        out       <= '0;
        out_valid <= 1'b1;
        left      <= left - 16'd1;
      end else if (in_valid) begin
        out       <= in;
        out_valid <= 1'b1;
        left      <= (factor > 16'd1) ? factor - 16'd1 : '0;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
