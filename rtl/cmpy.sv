// cmpy: complex multiplier of the frequency shift, out = a * b.
//
// a is the signal sample, b the oscillator sample (DDS or constant), both signed Q1.15. The
// four 16x16 products are formed in the first pipeline stage, the real part ai*bi - aq*bq and
// the imaginary part ai*bq + aq*bi in the second, where each is shifted right by 15 with
// rounding and saturated to 16 bits (so -1 * -1 gives +0.99997). Latency is two clocks; the
// pipeline accepts one sample per clock and holds as a whole while out_valid is high and
// out_ready low. The complex multiply follows the document; the format, rounding and latency
// are this design's choices.
module cmpy
  import sdr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  iq_t  a,
  input  iq_t  b,
  output logic out_valid,
  input  logic out_ready,
  output iq_t  out
);

  logic signed [31:0] p_ii, p_qq, p_iq, p_qi;
  logic v1;
  logic en;

  assign en       = !(out_valid && !out_ready);
  assign in_ready = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      p_ii <= '0; p_qq <= '0; p_iq <= '0; p_qi <= '0;
      out  <= '0;
    end else if (en) begin
      v1        <= in_valid;
      out_valid <= v1;
      p_ii <= a.i * b.i;
      p_qq <= a.q * b.q;
      p_iq <= a.i * b.q;
      p_qi <= a.q * b.i;
      out.i <= sat_round(64'(p_ii) - 64'(p_qq), 15);
      out.q <= sat_round(64'(p_iq) + 64'(p_qi), 15);
    end
  end

endmodule
