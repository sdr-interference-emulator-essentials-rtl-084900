// tb_adc_ptrn_checker: for each selection mode, drives CHCK_LEN words with a known number of
// flipped bits and checks the error count, that done rises after exactly CHCK_LEN samples,
// and that later samples do not change the result.
module tb_adc_ptrn_checker;
  import sdr_pkg::*;
  localparam int LEN = 64;
  logic clk = 0, rst = 1;
  chck_sel_e chck_sel;
  logic [15:0] chck_ref = 16'h3C5A, des_a, des_b;
  logic [3:0] frame_a, frame_b;
  logic [31:0] error_cnt;
  logic done;
  int checks = 0, failures = 0;

  adc_ptrn_checker #(.CHCK_LEN(LEN)) dut (.clk, .rst, .chck_sel, .chck_ref, .des_a, .des_b,
                                          .frame_a, .frame_b, .error_cnt, .done);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      int exp_err;
      chck_sel = chck_sel_e'(m);
      exp_err = 0;
      @(negedge clk) rst = 1;
      des_a = chck_ref; des_b = chck_ref; frame_a = FRAME_PATTERN; frame_b = FRAME_PATTERN;
      @(negedge clk) rst = 0;
      for (int k = 0; k < LEN + 10; k++) begin
        logic [15:0] fa, fb;
        logic [3:0]  ga, gb;
        fa = ($urandom_range(0, 3) == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'h0;
        fb = ($urandom_range(0, 3) == 0) ? 16'h0101 : 16'h0;
        ga = ($urandom_range(0, 5) == 0) ? 4'b0010 : 4'h0;
        gb = ($urandom_range(0, 5) == 0) ? 4'b1001 : 4'h0;
        des_a = chck_ref ^ fa; des_b = chck_ref ^ fb; frame_a = FRAME_PATTERN ^ ga; frame_b = FRAME_PATTERN ^ gb;
        if (k < LEN) begin
          case (m)
            0: exp_err += $countones(fa);
            1: exp_err += $countones(fb);
            2: exp_err += $countones(fa) + $countones(fb);
            3: exp_err += $countones(ga) + $countones(gb);
          endcase
        end
        @(posedge clk); #1;
        checks++;
        if (done !== (k >= LEN - 1)) begin failures++; $display("FAIL mode %0d: done=%b after %0d samples", m, done, k + 1); end
        @(negedge clk);
      end
      checks++;
      if (error_cnt != 32'(exp_err)) begin failures++; $display("FAIL mode %0d: errors %0d exp %0d", m, error_cnt, exp_err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
