// cic_decim: cascaded integrator-comb decimator of the RX chain, rate 4 to 128.
//
// Separate instances filter the I and the Q path (one instance here carries both). N_STAGES
// integrators run at the input rate; every rate-th input sample the integrator output enters
// N_STAGES comb sections (differential delay 1) and one decimated sample is produced. The
// CIC gain is rate**N_STAGES; the output is shifted right by N_STAGES*ceil(log2(rate)) with
// rounding and saturated, which gives unity gain for power-of-two rates and a gain below one
// otherwise. Accumulators are 16 + N_STAGES*7 bits wide, enough for rate 128 without wrap
// error. rate is sampled at each decimation boundary; writes outside 4..128 are clamped.
// Handshake: in_ready is low only while a finished output waits for out_ready. The output is
// registered, one clock after the rate-th input. The CIC decimator and its 4-128 range follow
// the document; the stage count, scaling and handshake are this design's choices.
module cic_decim
  import sdr_pkg::*;
#(
  parameter int unsigned N_STAGES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rate,
  input  logic       in_valid,
  output logic       in_ready,
  input  iq_t        in,
  output logic       out_valid,
  input  logic       out_ready,
  output iq_t        out
);

  localparam int unsigned W = 16 + N_STAGES * 7;
  typedef logic signed [W-1:0] acc_t;

  acc_t int_i [N_STAGES], int_q [N_STAGES];
  acc_t dly_i [N_STAGES], dly_q [N_STAGES];
  acc_t nxt_i [N_STAGES], nxt_q [N_STAGES];
  acc_t cmb_i [N_STAGES+1], cmb_q [N_STAGES+1];
  logic [7:0] cnt, r_eff;
  int unsigned sh;

  always_comb begin
    if (rate < 8'd4)        r_eff = 8'd4;
    else if (rate > 8'd128) r_eff = 8'd128;
    else                    r_eff = rate;
    sh = 0;
    for (int k = 0; k < 8; k++) if ((9'd1 << k) < {1'b0, r_eff}) sh = k + 1;
    sh = sh * N_STAGES;
  end

  always_comb begin
    nxt_i[0] = int_i[0] + acc_t'(in.i);
    nxt_q[0] = int_q[0] + acc_t'(in.q);
    for (int s = 1; s < int'(N_STAGES); s++) begin
      nxt_i[s] = int_i[s] + nxt_i[s-1];
      nxt_q[s] = int_q[s] + nxt_q[s-1];
    end
    cmb_i[0] = nxt_i[N_STAGES-1];
    cmb_q[0] = nxt_q[N_STAGES-1];
    for (int s = 0; s < int'(N_STAGES); s++) begin
      cmb_i[s+1] = cmb_i[s] - dly_i[s];
      cmb_q[s+1] = cmb_q[s] - dly_q[s];
    end
  end

  assign in_ready = !(out_valid && !out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(N_STAGES); s++) begin
        int_i[s] <= '0; int_q[s] <= '0; dly_i[s] <= '0; dly_q[s] <= '0;
      end
      cnt       <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        for (int s = 0; s < int'(N_STAGES); s++) begin
          int_i[s] <= nxt_i[s];
          int_q[s] <= nxt_q[s];
        end
        if (cnt + 8'd1 >= r_eff) begin
          cnt <= '0;
          for (int s = 0; s < int'(N_STAGES); s++) begin
            dly_i[s] <= cmb_i[s];
            dly_q[s] <= cmb_q[s];
          end
          out.i     <= sat_round(64'(cmb_i[N_STAGES]), sh);
          out.q     <= sat_round(64'(cmb_q[N_STAGES]), sh);
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 8'd1;
        end
      end
    end
  end

endmodule
