// dds: direct digital synthesis of a complex sinusoid, the oscillator of the frequency shift in
// both DSP chains.
//
// A PHASE_W-bit phase accumulator advances by the programmed phase increment pinc each time
// step is high, so the output frequency is f_sample * pinc / 2**PHASE_W. The top LUT_AW bits of
// the phase address one full-wave sine table of 2**LUT_AW signed 16-bit entries,
// round(AMPL * sin(2*pi*k / 2**LUT_AW)); the cosine is read from the same table a quarter
// period ahead. The table is computed at elaboration, so no data file is needed. The output
// is combinational from the phase register: out shows the sample of the current phase, and a
// step moves to the next one on the following clock. out.i carries cos, out.q carries sin, so
// out is exp(j*phase). That the chains use a DDS for the frequency shift follows the document;
// phase width, table size and amplitude are this design's choices.
module dds
  import sdr_pkg::*;
#(
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned LUT_AW  = 10,
  parameter int          AMPL    = 32767
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] pinc,
  input  logic               step,
  output iq_t                out,
  output logic [PHASE_W-1:0] phase
);

  localparam int unsigned N = 2 ** LUT_AW;
  typedef logic signed [15:0] lut_t [N];

  function automatic lut_t make_lut();
    lut_t t;
    for (int k = 0; k < int'(N); k++) begin
      t[k] = 16'(int'($rtoi(AMPL * $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(N))
                            + ((k < int'(N) / 2) ? 0.5 : -0.5))));
    end
    return t;
  endfunction

  localparam lut_t SIN_LUT = make_lut();

  logic [LUT_AW-1:0] a_sin, a_cos;
  assign a_sin = phase[PHASE_W-1 -: LUT_AW];
  assign a_cos = a_sin + LUT_AW'(N / 4);

  assign out.i = SIN_LUT[a_cos];
  assign out.q = SIN_LUT[a_sin];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= '0;
    else if (step) phase <= phase + pinc;
  end

endmodule
