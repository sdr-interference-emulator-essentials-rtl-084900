// sdr_pkg: types and constants shared by the SDR interference emulator FPGA blocks.
//
// Samples travel as complex 16-bit pairs (16-bit in-phase I and 16-bit quadrature Q), the
// sample format the ADC and DAC interfaces use. Control registers are reached over AXI4-Lite
// with 32-bit data; the request and response halves of that bus are bundled in two packed
// structs so that modules pass a whole bus through a single port. The register map offsets of
// the control blocks are collected here so that testbenches and software share one definition.
// The I/Q format follows the document; bus widths, offsets and field layouts are this design's
// choices.
package sdr_pkg;

  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned AXIL_AW  = 8;
  localparam int unsigned AXIL_DW  = 32;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t q;
    sample_t i;
  } iq_t;

  // AXI4-Lite, master to slave
  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [AXIL_DW-1:0] wdata;
    logic [3:0]         wstrb;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_req_t;

  // AXI4-Lite, slave to master
  typedef struct packed {
    logic               awready;
    logic               wready;
    logic [1:0]         bresp;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    logic [1:0]         rresp;
    logic               rvalid;
  } axil_rsp_t;

  // IDELAY settings for the data lanes and the frame lane of the ADC interface
  typedef struct packed {
    logic [8:0] frame;
    logic [8:0] data;
  } idly_t;

  // Pattern checker source selection
  typedef enum logic [1:0] {
    CHK_DES_A  = 2'd0,   // channel A data word against chck_ref
    CHK_DES_B  = 2'd1,   // channel B data word against chck_ref
    CHK_DES_AB = 2'd2,   // both data words against chck_ref
    CHK_FRAME  = 2'd3    // both frame nibbles against FRAME_PATTERN
  } chck_sel_e;

  // Frame lane pattern expected within one sample period (oldest bit in bit 3)
  localparam logic [3:0] FRAME_PATTERN = 4'b1100;

  // adc_ctrl_axi register map (byte offsets)
  localparam logic [AXIL_AW-1:0] ADC_REG_CHCK_CTRL  = 8'h00; // [0] chck_rst, [2:1] chck_sel
  localparam logic [AXIL_AW-1:0] ADC_REG_CHCK_REF   = 8'h04; // [15:0] reference word
  localparam logic [AXIL_AW-1:0] ADC_REG_IDLY_DATA  = 8'h08; // [8:0] data lane delay
  localparam logic [AXIL_AW-1:0] ADC_REG_IDLY_FRAME = 8'h0C; // [8:0] frame lane delay
  localparam logic [AXIL_AW-1:0] ADC_REG_IDLY_LOAD  = 8'h10; // write: pulse idly_load
  localparam logic [AXIL_AW-1:0] ADC_REG_IDLY_VTC   = 8'h14; // [0] idly_en_vtc
  localparam logic [AXIL_AW-1:0] ADC_REG_STATUS     = 8'h18; // [0] chck_done, [1] idly_rdy (ro)
  localparam logic [AXIL_AW-1:0] ADC_REG_ERR_CNT    = 8'h1C; // error bit count (ro)

  // rx_chain_ctrl_axi / tx_chain_ctrl_axi register map (byte offsets)
  localparam logic [AXIL_AW-1:0] CH_REG_DDS_PINC  = 8'h00; // DDS control: phase increment
  localparam logic [AXIL_AW-1:0] CH_REG_CIC_RATE  = 8'h04; // CIC control: rate 4..128
  localparam logic [AXIL_AW-1:0] CH_REG_FIR0_CFG  = 8'h08; // FIR0 control: write applies reload
  localparam logic [AXIL_AW-1:0] CH_REG_FIR0_RLD  = 8'h0C; // FIR0 reload: one coefficient per write
  localparam logic [AXIL_AW-1:0] CH_REG_FIR1_CFG  = 8'h10; // FIR1 control: write applies reload, [0] FIR1 enable
  localparam logic [AXIL_AW-1:0] CH_REG_FIR1_RLD  = 8'h14; // FIR1 reload
  localparam logic [AXIL_AW-1:0] CH_REG_RATE      = 8'h18; // down/upsampler factor
  localparam logic [AXIL_AW-1:0] CH_REG_DDS_EN    = 8'h1C; // [0] 1: DDS, 0: constant
  localparam logic [AXIL_AW-1:0] CH_REG_CIC_EN    = 8'h20; // [0] 1: CIC in path, 0: bypass
  localparam logic [AXIL_AW-1:0] CH_REG_CONST     = 8'h24; // constant multiplier {Q,I}
  localparam logic [AXIL_AW-1:0] CH_REG_STATUS    = 8'h28; // overflow / underflow counters (ro)

  // Arithmetic right shift by sh with round-half-up, then saturation to a 16-bit sample.
  // Used wherever a wide DSP accumulator is brought back to the sample format.
  function automatic sample_t sat_round(input logic signed [63:0] v, input int unsigned sh);
    logic signed [63:0] r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 64'sd32767)       return 16'sh7fff;
    else if (r < -64'sd32768) return 16'sh8000;
    else                      return r[15:0];
  endfunction

endpackage
