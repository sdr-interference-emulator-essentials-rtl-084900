// axis_checker: consistency monitor of the sample stream that feeds the DAC.
//
// It watches the point where the DAC interface takes samples from its input FIFO. Each time a
// sample is due (take high) while the stream is enabled, it counts a gap if no sample was
// available (valid low, an underflow that would put an idle sample on the DAC), and counts a
// sample otherwise. When pattern checking is on (ramp_chk), the test stream is expected to
// be a ramp: each sample's I part must be the previous one's plus one, and every break in the
// ramp is counted in seq_err. All counters saturate and clear on rst (asynchronous, active
// high). The checker's purpose, verifying the output data during development, follows the
// document; what it checks is this design's choice.
module axis_checker
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ena,
  input  logic        ramp_chk,
  input  logic        take,
  input  logic        valid,
  input  iq_t         data,
  output logic [31:0] samples,
  output logic [15:0] gaps,
  output logic [15:0] seq_err
);

  sample_t last_i;
  logic    have_last;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      samples   <= '0;
      gaps      <= '0;
      seq_err   <= '0;
      last_i    <= '0;
      have_last <= 1'b0;
    end else if (ena && take) begin
      if (!valid) begin
        if (gaps != '1) gaps <= gaps + 1'b1;
      end else begin
        if (samples != '1) samples <= samples + 1'b1;
        if (ramp_chk && have_last && data.i != sample_t'(last_i + 16'sd1) && seq_err != '1)
          seq_err <= seq_err + 1'b1;
        last_i    <= data.i;
        have_last <= 1'b1;
      end
    end
  end

endmodule
