// clock_system: behavioural model of the mixed-mode clock manager (MMCM) that makes the
// converter-side clocks. It is a simulation model, not synthesizable logic: on an FPGA this
// block is the vendor's clock-manager primitive, configured through its dynamic
// reconfiguration port.
//
// The model takes channel A's data clock from the ADC (500 MHz) and produces clk500 from it,
// shifted by a programmable phase, with clk250 and clk125 divided from clk500 (their rising
// edges coincide with a rising edge of clk500) and clk125_ref divided from the unshifted input. The phase is set over AXI4-Lite (register 0x00, phase in
// steps of STEP_PS, wrapping at one clk500 period); the processor sweeps it, together with the
// ADC delay settings, until the ADC pattern checker reports no errors. locked rises LOCK_CYCLES
// input clock cycles after rst is released and falls again for LOCK_CYCLES cycles after every
// phase write, as the real part does while it reconfigures. Channel B's clock is not used (both
// ADC channels share one clock in this model). The function (clock generation, dynamic phase
// shift, locked) follows the document; the step size, register and lock time are this model's
// own. The AXI side runs on axi_clk with active-low reset axi_rst_n.
module clock_system
  import sdr_pkg::*;
#(
  parameter int unsigned STEP_PS     = 50,
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic      ADC_A_DCLK_P,
  input  logic      ADC_A_DCLK_N,
  input  logic      ADC_B_DCLK_P,
  input  logic      ADC_B_DCLK_N,
  input  logic      rst,
  input  logic      axi_clk,
  input  logic      axi_rst_n,
  input  axil_req_t drp_mmcm_axi_req,
  output axil_rsp_t drp_mmcm_axi_rsp,
  output logic      clk500,
  output logic      clk250,
  output logic      clk125,
  output logic      clk125_ref,
  output logic      locked
);

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [3:0]          wr_strb;
  logic [7:0]          phase_steps;
  logic                reconf;

  axil_slave u_axil (
    .clk(axi_clk), .rst_n(axi_rst_n), .req(drp_mmcm_axi_req), .rsp(drp_mmcm_axi_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  always_ff @(posedge axi_clk or negedge axi_rst_n) begin
    if (!axi_rst_n) begin
      phase_steps <= '0;
      reconf      <= 1'b0;
    end else begin
      reconf <= 1'b0;
      if (wr_en && wr_addr == 8'h00) begin
        phase_steps <= wr_data[7:0];
        reconf      <= 1'b1;
      end
    end
  end

  assign rd_data = (rd_addr == 8'h00) ? {24'd0, phase_steps} : {31'd0, locked};

  // ---- clock outputs ----
  // The shift is applied as a delay of less than half a period: shifts of half a period or
  // more use the inverted input clock with the remaining delay.
  int unsigned shift_ps;
  logic r250 = 1'b0, r125 = 1'b0;

  initial begin
    clk500 = 1'b0;
    clk250 = 1'b0;
    clk125 = 1'b0;
    clk125_ref = 1'b0;
  end

  always_comb shift_ps = (int'(phase_steps) * int'(STEP_PS)) % 2000;

  always @(ADC_A_DCLK_P) begin
    if (shift_ps < 1000) clk500 <= #(shift_ps * 1ps) ADC_A_DCLK_P;
    else                 clk500 <= #((shift_ps - 1000) * 1ps) !ADC_A_DCLK_P;
  end

  always @(posedge clk500) clk250 <= !clk250;
  always @(posedge clk250) clk125 <= !clk125;

  always @(posedge ADC_A_DCLK_P) begin
    r250 = !r250;
    if (r250) r125 = !r125;
    clk125_ref <= r125;
  end

  // ---- lock ----
  int unsigned lock_cnt;
  logic        relock;

  always @(posedge axi_clk) if (reconf) relock = 1'b1;

  always @(posedge ADC_A_DCLK_P or posedge rst) begin
    if (rst) begin
      lock_cnt = 0;
      locked   = 1'b0;
    end else if (relock) begin
      relock   = 1'b0;
      lock_cnt = 0;
      locked   = 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt++;
    end else begin
      locked = 1'b1;
    end
  end

  initial relock = 1'b0;

endmodule
