// adc_ctrl_axi: AXI4-Lite register block of the ADC interface.
//
// The processor uses it to run the pattern checker and to set the input delay blocks of the
// data lanes and of the frame lane. It drives chck_rst (held while the bit is 1), chck_sel and
// chck_ref; it loads a new delay pair with a one-clock idly_load pulse (written to the
// IDLY_LOAD register), and holds idly_en_vtc, which must be 0 for a load to take effect. It reads
// back chck_done, chck_error_cnt and the delay-controller ready flag idly_rdy. Offsets are in
// sdr_pkg (ADC_REG_*). Reset state: checker held in reset, delays 0, en_vtc 1. The set of
// signals follows the document's controller figure and its table of configurable modules; the
// register map and reset values are this design's own.
module adc_ctrl_axi
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   axi_req,
  output axil_rsp_t   axi_rsp,
  output logic        chck_rst,
  output chck_sel_e   chck_sel,
  output logic [15:0] chck_ref,
  input  logic [31:0] chck_error_cnt,
  input  logic        chck_done,
  output logic        idly_load,
  output logic        idly_en_vtc,
  output idly_t       idly_value,
  input  logic        idly_rdy
);

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [3:0]          wr_strb;

  axil_slave u_axil (
    .clk, .rst_n, .req(axi_req), .rsp(axi_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chck_rst    <= 1'b1;
      chck_sel    <= CHK_DES_A;
      chck_ref    <= '0;
      idly_load   <= 1'b0;
      idly_en_vtc <= 1'b1;
      idly_value  <= '0;
    end else begin
      idly_load <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          ADC_REG_CHCK_CTRL: begin
            chck_rst <= wr_data[0];
            chck_sel <= chck_sel_e'(wr_data[2:1]);
          end
          ADC_REG_CHCK_REF:   chck_ref         <= wr_data[15:0];
          ADC_REG_IDLY_DATA:  idly_value.data  <= wr_data[8:0];
          ADC_REG_IDLY_FRAME: idly_value.frame <= wr_data[8:0];
          ADC_REG_IDLY_LOAD:  idly_load        <= 1'b1;
          ADC_REG_IDLY_VTC:   idly_en_vtc      <= wr_data[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      ADC_REG_CHCK_CTRL:  rd_data = {29'd0, chck_sel, chck_rst};
      ADC_REG_CHCK_REF:   rd_data = {16'd0, chck_ref};
      ADC_REG_IDLY_DATA:  rd_data = {23'd0, idly_value.data};
      ADC_REG_IDLY_FRAME: rd_data = {23'd0, idly_value.frame};
      ADC_REG_IDLY_VTC:   rd_data = {31'd0, idly_en_vtc};
      ADC_REG_STATUS:     rd_data = {30'd0, idly_rdy, chck_done};
      ADC_REG_ERR_CNT:    rd_data = chck_error_cnt;
      default:            rd_data = '0;
    endcase
  end

endmodule
