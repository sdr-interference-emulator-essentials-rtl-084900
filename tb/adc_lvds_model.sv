// adc_lvds_model: behavioural model of a dual-channel 16-bit ADC with a QDR LVDS output, for
// testbenches. It drives a 500 MHz data clock and, per channel, four data lanes and a frame
// lane at 1 Gbit/s: each sample takes four bit periods, lane k carries sample bits 12+k, 8+k,
// 4+k and k in that order, and the frame lane is high for the first two bit periods of a
// sample. OFS shifts the sample boundaries against the clock by whole bit periods, and SKEW
// delays the data lanes against the frame lane, so the receiver has to find both. In pattern
// mode both channels send `pattern`; otherwise channel A sends 7*n and channel B 0x8000 ^ n
// for sample number n.
module adc_lvds_model #(
  parameter int OFS  = 1,
  parameter int SKEW = 2
) (
  input  logic        pattern_mode,
  input  logic [15:0] pattern,
  output logic        DCLK_P,
  output logic        DCLK_N,
  output logic [3:0]  A_D_P,
  output logic [3:0]  A_D_N,
  output logic        A_FRAME_P,
  output logic        A_FRAME_N,
  output logic [3:0]  B_D_P,
  output logic [3:0]  B_D_N,
  output logic        B_FRAME_P,
  output logic        B_FRAME_N
);

  function automatic logic [15:0] samp_a(input int n);
    return pattern_mode ? pattern : 16'(7 * n);
  endfunction
  function automatic logic [15:0] samp_b(input int n);
    return pattern_mode ? pattern : (16'h8000 ^ 16'(n));
  endfunction

  initial begin
    DCLK_P = 0;
    forever #1 DCLK_P = ~DCLK_P;
  end
  assign DCLK_N = ~DCLK_P;

  int b = 0;
  initial begin
    A_D_P = 0; B_D_P = 0; A_FRAME_P = 0; B_FRAME_P = 0;
    #0.5;
    forever begin
      int bf, bd, sf, sd, jf, jd;
      bf = b + 64 - OFS;          // frame lane bit index
      bd = bf - SKEW;             // data lanes lag the frame lane
      sf = bf / 4; jf = bf % 4;
      sd = bd / 4; jd = bd % 4;
      A_FRAME_P = (jf < 2);
      B_FRAME_P = (jf < 2);
      for (int k = 0; k < 4; k++) begin
        A_D_P[k] = samp_a(sd)[12 + k - 4 * jd];
        B_D_P[k] = samp_b(sd)[12 + k - 4 * jd];
      end
      b++;
      #1;
    end
  end

  assign A_D_N = ~A_D_P;
  assign B_D_N = ~B_D_P;
  assign A_FRAME_N = ~A_FRAME_P;
  assign B_FRAME_N = ~B_FRAME_P;

endmodule
