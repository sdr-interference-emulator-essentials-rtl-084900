// tb_chain_ctrl_axi: checks reset values, writes and reads back every register over AXI-Lite,
// and checks that reload, control and rate writes produce exactly one-clock pulses carrying
// the written value.
module tb_chain_ctrl_axi;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic [31:0] dds_pinc;
  logic dds_en, cic_en, fir0_cfg, fir0_rld_valid, fir1_cfg, fir1_rld_valid, fir1_en, rate_wr;
  iq_t const_iq;
  logic [7:0] cic_rate;
  logic [15:0] fir_rld_data, rate_factor;
  logic [31:0] status = 32'hCAFE_0123;
  int checks = 0, failures = 0;

  chain_ctrl_axi dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .dds_pinc, .dds_en, .const_iq,
                      .cic_rate, .cic_en, .fir0_cfg, .fir0_rld_valid, .fir1_cfg, .fir1_rld_valid,
                      .fir_rld_data, .fir1_en, .rate_factor, .rate_wr, .status);
  axil_master bfm (.clk, .req, .rsp);

  always #5 clk = ~clk;

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

  int n_f0c = 0, n_f0r = 0, n_f1c = 0, n_f1r = 0, n_rw = 0;
  logic [15:0] last_rld;
  always @(posedge clk) if (rst_n) begin
    if (fir0_cfg) n_f0c++;
    if (fir1_cfg) n_f1c++;
    if (fir0_rld_valid) begin n_f0r++; last_rld = fir_rld_data; end
    if (fir1_rld_valid) begin n_f1r++; last_rld = fir_rld_data; end
    if (rate_wr) n_rw++;
  end

  initial begin
    logic [31:0] d;
    #22 rst_n = 1;
    check(!dds_en && !cic_en && fir1_en && cic_rate == 4 && rate_factor == 1 &&
          const_iq.i == 16'sh7fff && const_iq.q == 0, "reset values");
    bfm.write(CH_REG_DDS_PINC, 32'h1234_5678); bfm.read(CH_REG_DDS_PINC, d);
    check(d == 32'h1234_5678 && dds_pinc == 32'h1234_5678, "DDS phase increment");
    bfm.write(CH_REG_CIC_RATE, 32); bfm.read(CH_REG_CIC_RATE, d);
    check(d == 32 && cic_rate == 32, "CIC rate");
    bfm.write(CH_REG_DDS_EN, 1); bfm.read(CH_REG_DDS_EN, d);
    check(d == 1 && dds_en, "DDS enable");
    bfm.write(CH_REG_CIC_EN, 1); bfm.read(CH_REG_CIC_EN, d);
    check(d == 1 && cic_en, "CIC enable");
    bfm.write(CH_REG_CONST, 32'h8001_4000); bfm.read(CH_REG_CONST, d);
    check(d == 32'h8001_4000 && const_iq.i == 16'sh4000 && const_iq.q == 16'sh8001, "constant");
    bfm.write(CH_REG_RATE, 9); bfm.read(CH_REG_RATE, d);
    check(d == 9 && rate_factor == 9 && n_rw == 1, "rate factor and one rate_wr pulse");
    bfm.write(CH_REG_FIR0_RLD, 16'h1111);
    check(n_f0r == 1 && last_rld == 16'h1111 && n_f1r == 0, "FIR0 reload pulse");
    bfm.write(CH_REG_FIR1_RLD, 16'h2222);
    check(n_f1r == 1 && last_rld == 16'h2222 && n_f0r == 1, "FIR1 reload pulse");
    bfm.write(CH_REG_FIR0_CFG, 0);
    check(n_f0c == 1 && n_f1c == 0, "FIR0 control pulse");
    bfm.write(CH_REG_FIR1_CFG, 0); bfm.read(CH_REG_FIR1_CFG, d);
    check(n_f1c == 1 && !fir1_en && d == 0, "FIR1 control pulse and enable bit");
    bfm.read(CH_REG_STATUS, d);
    check(d == 32'hCAFE_0123, "status read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
