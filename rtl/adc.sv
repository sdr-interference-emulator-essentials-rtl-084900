// adc: interface to the dual 16-bit QDR LVDS ADC (ADS42LB69 timing), producing the I/Q sample
// stream of the receiver.
//
// Each ADC channel sends a 16-bit sample over four LVDS data lanes plus a frame lane. Per
// sample period every lane carries four bits, one on each edge of the 500 MHz bit clock: lane k
// sends bits 12+k, 8+k, 4+k and k, most significant first. Channel A becomes I and channel B Q.
// Capture model: each lane is sampled on both edges of clk500 (the input DDR register), two
// bits enter a 16-bit history per clk500 cycle, and an adjustable delay selects which four
// consecutive history bits form the nibble of a sample (an integer number of bit periods; a
// coarse model of the input delay blocks). Data lanes and frame lanes have separate delays,
// loaded from the controller with idly_load while idly_en_vtc is 0; values above 12 are
// clamped. Every clk250 cycle the eight data nibbles of a channel pair are assembled into
// des_a/des_b and the frame nibbles frame_a/frame_b, which the pattern checker compares with a
// test pattern; the processor sweeps the delays and the clock phase until the error count is
// zero. The differential inputs are taken from their _P leg only (a two-state stand-in for
// the LVDS input buffer); _N legs are not used.
// Output: adc_tvalid is high for one clk250 cycle per forwarded sample, with adc_tdata = {Q, I}
// and adc_tuser = {OVRB, OVRA}. Samples are forwarded while adc_data_ena is high and
// clk_invalid is low, one every adc_sample_period+1 cycles (0 forwards every sample). Latency
// from the last bit on the lane to adc_tvalid is two clk250 cycles. idly_rdy, the
// delay-controller ready flag, rises IDLY_RDY_CYCLES clocks after reset. ADC_SYNC is held
// inactive. rst250 is active high, synchronous to clk250.
// The bit map, lanes, frame, delay blocks, pattern checker and AXI-Lite controller follow the
// document; the delay model, frame pattern, the meaning of adc_sample_period and the ADC_SYNC
// level are this design's choices.
module adc
  import sdr_pkg::*;
#(
  parameter int unsigned CHCK_LEN        = 1024,
  parameter int unsigned IDLY_RDY_CYCLES = 64
) (
  input  logic        clk500,
  input  logic        clk250,
  input  logic        rst250,
  input  logic        clk_invalid,
  input  logic        adc_data_ena,
  input  logic [15:0] adc_sample_period,
  input  axil_req_t   axi_req,
  output axil_rsp_t   axi_rsp,
  input  logic [3:0]  ADC_A_D_P,
  input  logic [3:0]  ADC_A_D_N,
  input  logic        ADC_A_FRAME_P,
  input  logic        ADC_A_FRAME_N,
  input  logic [3:0]  ADC_B_D_P,
  input  logic [3:0]  ADC_B_D_N,
  input  logic        ADC_B_FRAME_P,
  input  logic        ADC_B_FRAME_N,
  input  logic        ADC_CTRL_OVRA,
  input  logic        ADC_CTRL_OVRB,
  output logic        ADC_SYNC_P,
  output logic        ADC_SYNC_N,
  output logic        adc_tvalid,
  output iq_t         adc_tdata,
  output logic [1:0]  adc_tuser
);

  localparam int unsigned NL   = 10;   // lanes: A data 0..3, A frame, B data 0..3, B frame
  localparam int unsigned HIST = 16;

  // ---- controller and checker ----
  logic        chck_rst, chck_done, idly_load, idly_en_vtc, idly_rdy;
  chck_sel_e   chck_sel;
  logic [15:0] chck_ref;
  logic [31:0] chck_error_cnt;
  idly_t       idly_value;

  adc_ctrl_axi u_ctrl (
    .clk(clk250), .rst_n(!rst250), .axi_req, .axi_rsp,
    .chck_rst, .chck_sel, .chck_ref, .chck_error_cnt, .chck_done,
    .idly_load, .idly_en_vtc, .idly_value, .idly_rdy
  );

  // ---- input buffers and DDR capture ----
  logic [NL-1:0] lane, fall_q;
  logic [HIST-1:0] hist [NL];

  assign lane = {ADC_B_FRAME_P, ADC_B_D_P, ADC_A_FRAME_P, ADC_A_D_P};

  always_ff @(negedge clk500) fall_q <= lane;

  always_ff @(posedge clk500) begin
    for (int l = 0; l < int'(NL); l++) hist[l] <= {hist[l][HIST-3:0], fall_q[l], lane[l]};
  end

  // ---- delay blocks ----
  logic [3:0] dly_data, dly_frame;
  logic [$clog2(IDLY_RDY_CYCLES+1)-1:0] rdy_cnt;

  function automatic logic [3:0] clamp_dly(input logic [8:0] v);
    return (v > 9'd12) ? 4'd12 : v[3:0];
  endfunction

  always_ff @(posedge clk250) begin
    if (rst250) begin
      dly_data  <= '0;
      dly_frame <= '0;
      rdy_cnt   <= '0;
      idly_rdy  <= 1'b0;
    end else begin
      if (int'(rdy_cnt) != int'(IDLY_RDY_CYCLES)) rdy_cnt <= rdy_cnt + 1'b1;
      idly_rdy <= (int'(rdy_cnt) == int'(IDLY_RDY_CYCLES));
      if (idly_load && !idly_en_vtc) begin
        dly_data  <= clamp_dly(idly_value.data);
        dly_frame <= clamp_dly(idly_value.frame);
      end
    end
  end

  // ---- deserialise: nibbles to words ----
  logic [3:0]  nib [NL];
  logic [15:0] word_a, word_b;
  logic [15:0] des_a, des_b;
  logic [3:0]  frame_a, frame_b;

  always_comb begin
    for (int l = 0; l < int'(NL); l++) begin
      nib[l] = hist[l][((l == 4) || (l == 9) ? dly_frame : dly_data) +: 4];
    end
    for (int k = 0; k < 4; k++) begin
      for (int j = 0; j < 4; j++) begin
        word_a[4*j + k] = nib[k][j];
        word_b[4*j + k] = nib[5 + k][j];
      end
    end
  end

  always_ff @(posedge clk250) begin
    des_a   <= word_a;
    des_b   <= word_b;
    frame_a <= nib[4];
    frame_b <= nib[9];
  end

  adc_ptrn_checker #(.CHCK_LEN(CHCK_LEN)) u_chk (
    .clk(clk250), .rst(chck_rst || rst250), .chck_sel, .chck_ref,
    .des_a, .des_b, .frame_a, .frame_b, .error_cnt(chck_error_cnt), .done(chck_done)
  );

  // ---- output stream ----
  logic [15:0] per_cnt;

  always_ff @(posedge clk250) begin
    if (rst250) begin
      per_cnt    <= '0;
      adc_tvalid <= 1'b0;
      adc_tdata  <= '0;
      adc_tuser  <= '0;
    end else begin
      adc_tvalid <= 1'b0;
      if (adc_data_ena && !clk_invalid) begin
        if (per_cnt == '0) begin
          adc_tvalid <= 1'b1;
          adc_tdata  <= '{q: des_b, i: des_a};
          adc_tuser  <= {ADC_CTRL_OVRB, ADC_CTRL_OVRA};
        end
        per_cnt <= (per_cnt >= adc_sample_period) ? '0 : per_cnt + 16'd1;
      end else begin
        per_cnt <= '0;
      end
    end
  end

  assign ADC_SYNC_P = 1'b0;
  assign ADC_SYNC_N = 1'b1;

endmodule
