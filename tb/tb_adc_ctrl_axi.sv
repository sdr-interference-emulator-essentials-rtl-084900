// tb_adc_ctrl_axi: checks reset values, the checker controls, the delay values, the one-clock
// idly_load pulse, en_vtc, and the read-back of the checker result and ready flags.
module tb_adc_ctrl_axi;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic chck_rst, idly_load, idly_en_vtc;
  chck_sel_e chck_sel;
  logic [15:0] chck_ref;
  idly_t idly_value;
  logic [31:0] chck_error_cnt = 32'd77;
  logic chck_done = 0, idly_rdy = 1;
  int checks = 0, failures = 0, n_load = 0;

  adc_ctrl_axi dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .chck_rst, .chck_sel, .chck_ref,
                    .chck_error_cnt, .chck_done, .idly_load, .idly_en_vtc, .idly_value, .idly_rdy);
  axil_master bfm (.clk, .req, .rsp);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && idly_load) n_load++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    #22 rst_n = 1;
    check(chck_rst && idly_en_vtc && !idly_load, "reset values");
    bfm.write(ADC_REG_CHCK_CTRL, 32'b110); bfm.read(ADC_REG_CHCK_CTRL, d);
    check(!chck_rst && chck_sel == CHK_FRAME && d == 32'b110, "checker control");
    bfm.write(ADC_REG_CHCK_REF, 16'hA5C3); bfm.read(ADC_REG_CHCK_REF, d);
    check(chck_ref == 16'hA5C3 && d == 16'hA5C3, "checker reference");
    bfm.write(ADC_REG_IDLY_DATA, 9'd300); bfm.write(ADC_REG_IDLY_FRAME, 9'd7);
    bfm.read(ADC_REG_IDLY_DATA, d);
    check(idly_value.data == 300 && idly_value.frame == 7 && d == 300, "delay values");
    check(n_load == 0, "no load before the load write");
    bfm.write(ADC_REG_IDLY_VTC, 0);
    check(!idly_en_vtc, "en_vtc cleared");
    bfm.write(ADC_REG_IDLY_LOAD, 1);
    check(n_load == 1, "exactly one load pulse");
    bfm.read(ADC_REG_STATUS, d);
    check(d == 32'b10, "status: ready, not done");
    chck_done = 1;
    bfm.read(ADC_REG_STATUS, d);
    check(d == 32'b11, "status: done");
    bfm.read(ADC_REG_ERR_CNT, d);
    check(d == 77, "error count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
