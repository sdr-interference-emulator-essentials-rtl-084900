// fir: configurable finite impulse response filter (FIR0 and FIR1 of both chains).
//
// A direct-form filter of N_TAPS taps with signed Q1.15 coefficients, applied with the same
// coefficients to the I and the Q path: y[n] = sum_k c[k] * x[n-k], shifted right by 15 with
// rounding and saturated to 16 bits. It filters at the sample rate it is fed (no rate change),
// one sample per clock at most; the result is registered, one clock after the input.
// Coefficients are changed in two steps, like a reloadable filter core: each rld_valid writes
// rld_data into the next slot of a shadow set (c[0] first), and cfg_valid copies the shadow set
// into the active set in one clock and rewinds the reload index. After reset the active set is
// a single tap of 0x7FFF at c[0] (close to a pass-through) and the rest zero. The sample history
// is kept when coefficients change. The reload/control ports follow the document; the tap count,
// coefficient format and default set are this design's choices.
module fir
  import sdr_pkg::*;
#(
  parameter int unsigned N_TAPS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rld_valid,
  input  logic [15:0] rld_data,
  input  logic        cfg_valid,
  input  logic        in_valid,
  output logic        in_ready,
  input  iq_t         in,
  output logic        out_valid,
  input  logic        out_ready,
  output iq_t         out
);

  localparam int unsigned IW = $clog2(N_TAPS);

  logic signed [15:0] coef   [N_TAPS];
  logic signed [15:0] shadow [N_TAPS];
  sample_t            hist_i [N_TAPS];
  sample_t            hist_q [N_TAPS];
  logic [IW-1:0]      rld_idx;
  logic signed [63:0] acc_i, acc_q;

  assign in_ready = !(out_valid && !out_ready);

  always_comb begin
    acc_i = 64'(coef[0]) * 64'(in.i);
    acc_q = 64'(coef[0]) * 64'(in.q);
    for (int k = 1; k < int'(N_TAPS); k++) begin
      acc_i += 64'(coef[k]) * 64'(hist_i[k-1]);
      acc_q += 64'(coef[k]) * 64'(hist_q[k-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_TAPS); k++) begin
        coef[k]   <= (k == 0) ? 16'sh7fff : 16'sh0000;
        shadow[k] <= '0;
        hist_i[k] <= '0;
        hist_q[k] <= '0;
      end
      rld_idx   <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (rld_valid) begin
        shadow[rld_idx] <= rld_data;
        rld_idx         <= (int'(rld_idx) == int'(N_TAPS) - 1) ? '0 : rld_idx + 1'b1;
      end
      if (cfg_valid) begin
        coef    <= shadow;
        rld_idx <= '0;
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        hist_i[0] <= in.i;
        hist_q[0] <= in.q;
        for (int k = 1; k < int'(N_TAPS); k++) begin
          hist_i[k] <= hist_i[k-1];
          hist_q[k] <= hist_q[k-1];
        end
        out.i     <= sat_round(acc_i, 15);
        out.q     <= sat_round(acc_q, 15);
        out_valid <= 1'b1;
      end
    end
  end

endmodule
