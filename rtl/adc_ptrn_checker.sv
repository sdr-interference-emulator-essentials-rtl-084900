// adc_ptrn_checker: bit-error counter used to align the ADC capture.
//
// While the ADC sends a known test pattern, the deserialised words are compared, clock by clock,
// with a reference: chck_sel chooses channel A's data word, channel B's, both, or the two frame
// nibbles (compared with FRAME_PATTERN from sdr_pkg instead of chck_ref). The number of
// differing bits is added up over CHCK_LEN consecutive samples after rst falls; then done rises
// and error_cnt holds the total until the next rst. Software sweeps the delay and clock-phase
// settings and keeps the one whose error_cnt is zero. Timing: one sample per clock; done rises
// CHCK_LEN+1 clocks after rst is released. Comparing received data with a pattern set by the
// controller, counting error bits and raising done follow the document; the selection codes,
// frame check and window length are this design's choices.
module adc_ptrn_checker
  import sdr_pkg::*;
#(
  parameter int unsigned CHCK_LEN = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  chck_sel_e   chck_sel,
  input  logic [15:0] chck_ref,
  input  logic [15:0] des_a,
  input  logic [15:0] des_b,
  input  logic [3:0]  frame_a,
  input  logic [3:0]  frame_b,
  output logic [31:0] error_cnt,
  output logic        done
);

  logic [$clog2(CHCK_LEN+1)-1:0] n;
  logic [5:0] errs;

  always_comb begin
    unique case (chck_sel)
      CHK_DES_A:  errs = 6'($countones(des_a ^ chck_ref));
      CHK_DES_B:  errs = 6'($countones(des_b ^ chck_ref));
      CHK_DES_AB: errs = 6'($countones(des_a ^ chck_ref)) + 6'($countones(des_b ^ chck_ref));
      CHK_FRAME:  errs = 6'($countones(frame_a ^ FRAME_PATTERN))
                       + 6'($countones(frame_b ^ FRAME_PATTERN));
      default:    errs = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n         <= '0;
      error_cnt <= '0;
      done      <= 1'b0;
    end else if (!done) begin
      error_cnt <= error_cnt + 32'(errs);
      n         <= n + 1'b1;
      done      <= (int'(n) == int'(CHCK_LEN) - 1);
    end
  end

endmodule
