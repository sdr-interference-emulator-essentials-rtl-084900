// downsampler: the last rate change of the RX chain, keeps one of every `factor` samples.
//
// A modulo-factor counter runs over the accepted input samples; the sample at count 0 is
// passed on and the others are dropped. factor 0 and 1 both pass every sample. The counter
// restarts when factor is written (factor_wr). Output is registered, one clock after the kept
// input; in_ready is low only while a kept sample waits for out_ready. The configurable
// downsampler follows the document; the counter phase and the 0/1 rule are this design's
// choices.
module downsampler
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] factor,
  input  logic        factor_wr,
  input  logic        in_valid,
  output logic        in_ready,
  input  iq_t         in,
  output logic        out_valid,
  input  logic        out_ready,
  output iq_t         out
);

  logic [15:0] cnt;

  assign in_ready = !(out_valid && !out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (factor_wr) begin
        cnt <= '0;
      end else if (in_valid && in_ready) begin
        if (cnt == '0) begin
          out       <= in;
          out_valid <= 1'b1;
        end
        cnt <= (cnt + 16'd1 >= factor) ? '0 : cnt + 16'd1;
      end
    end
  end

endmodule
