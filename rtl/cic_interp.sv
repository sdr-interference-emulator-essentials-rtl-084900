// cic_interp: cascaded integrator-comb interpolator of the TX chain, rate 4 to 128.
//
// N_STAGES comb sections (differential delay 1) run at the input rate. Each input is followed
// by rate-1 zeros (zero stuffing), and N_STAGES integrators run at the output rate, one output
// per clock when the consumer is ready. The gain rate**(N_STAGES-1) is removed by a rounding
// right shift of (N_STAGES-1)*ceil(log2(rate)) and saturation, unity for power-of-two rates.
// Handshake: in_ready is high on the clock that starts a new group of rate outputs; the output
// register advances whenever it is empty or taken. Output samples appear one clock after the
// input is accepted. The CIC interpolator and its 4-128 range follow the document; the stage
// count, scaling and handshake are this design's choices.
module cic_interp
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

  acc_t dly_i [N_STAGES], dly_q [N_STAGES];
  acc_t cmb_i [N_STAGES+1], cmb_q [N_STAGES+1];
  acc_t int_i [N_STAGES], int_q [N_STAGES];
  acc_t nxt_i [N_STAGES], nxt_q [N_STAGES];
  acc_t up_i, up_q;
  logic [7:0] ph, r_eff;
  logic adv, step;
  int unsigned sh;

  always_comb begin
    if (rate < 8'd4)        r_eff = 8'd4;
    else if (rate > 8'd128) r_eff = 8'd128;
    else                    r_eff = rate;
    sh = 0;
    for (int k = 0; k < 8; k++) if ((9'd1 << k) < {1'b0, r_eff}) sh = k + 1;
    sh = sh * (N_STAGES - 1);
  end

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && (ph == '0);
  assign step     = adv && ((ph != '0) || in_valid);

  always_comb begin
    cmb_i[0] = acc_t'(in.i);
    cmb_q[0] = acc_t'(in.q);
    for (int s = 0; s < int'(N_STAGES); s++) begin
      cmb_i[s+1] = cmb_i[s] - dly_i[s];
      cmb_q[s+1] = cmb_q[s] - dly_q[s];
    end
    up_i = (ph == '0) ? cmb_i[N_STAGES] : '0;
    up_q = (ph == '0) ? cmb_q[N_STAGES] : '0;
    nxt_i[0] = int_i[0] + up_i;
    nxt_q[0] = int_q[0] + up_q;
    for (int s = 1; s < int'(N_STAGES); s++) begin
      nxt_i[s] = int_i[s] + nxt_i[s-1];
      nxt_q[s] = int_q[s] + nxt_q[s-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(N_STAGES); s++) begin
        int_i[s] <= '0; int_q[s] <= '0; dly_i[s] <= '0; dly_q[s] <= '0;
      end
      ph        <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (step) begin
        if (ph == '0) begin
          for (int s = 0; s < int'(N_STAGES); s++) begin
            dly_i[s] <= cmb_i[s];
            dly_q[s] <= cmb_q[s];
          end
        end
        for (int s = 0; s < int'(N_STAGES); s++) begin
          int_i[s] <= nxt_i[s];
          int_q[s] <= nxt_q[s];
        end
        out.i     <= sat_round(64'(nxt_i[N_STAGES-1]), sh);
        out.q     <= sat_round(64'(nxt_q[N_STAGES-1]), sh);
        out_valid <= 1'b1;
        ph        <= (ph + 8'd1 >= r_eff) ? '0 : ph + 8'd1;
      end
    end
  end

endmodule
