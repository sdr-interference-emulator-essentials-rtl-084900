// dac: interface to the dual 16-bit DAC, from the I/Q sample stream to the LVDS data bus.
//
// Samples arrive on the DSP-clock stream (dac_aclk) and cross into the 500 MHz converter clock
// through an input FIFO. The DAC takes 250 MS/s per channel over one 16-bit word-interleaved
// bus: on every clk500 cycle one word leaves, I on even cycles and Q on odd ones, so one sample
// is taken from the FIFO every second cycle. DAC_FRAME is high with each I word so the DAC can
// tell the two channels apart, and DAC_DCI is a forwarded clock that toggles with every word.
// While dac_data_ena is low, or when the FIFO has no sample (an underflow), the idle sample
// given on the I and Q inputs is sent instead. dac_data_ena comes from the trigger in clk125;
// it is registered there and passed through two flip-flops into clk500. The axis checker
// watches the FIFO output (gap and ramp-break counters on the chk_* outputs; ramp checking
// on chk_ramp). Differential outputs drive _N as the complement of _P. Latency: two clk500
// cycles from the FIFO output to the pins. rst is active high, asynchronous to both domains,
// released synchronously by the caller. The output buffers, serialisation, input FIFO and
// checker follow the document; the interleaved bus format, frame use and idle sample are this
// design's choices.
module dac
  import sdr_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk500,
  input  logic        clk125,
  input  logic        rst,
  input  logic        dac_data_ena,
  input  logic        dac_aclk,
  input  logic        dac_tvalid,
  output logic        dac_tready,
  input  iq_t         dac_tdata,
  input  sample_t     I,
  input  sample_t     Q,
  input  logic        chk_ramp,
  output logic [31:0] chk_samples,
  output logic [15:0] chk_gaps,
  output logic [15:0] chk_seq_err,
  output logic [15:0] DAC_D_P,
  output logic [15:0] DAC_D_N,
  output logic        DAC_DCI_P,
  output logic        DAC_DCI_N,
  output logic        DAC_FRAME_P,
  output logic        DAC_FRAME_N
);

  // ---- enable: clk125 launch, clk500 capture ----
  logic ena125;
  logic [1:0] ena_sync;

  always_ff @(posedge clk125 or posedge rst) begin
    if (rst) ena125 <= 1'b0;
    else     ena125 <= dac_data_ena;
  end

  always_ff @(posedge clk500 or posedge rst) begin
    if (rst) ena_sync <= '0;
    else     ena_sync <= {ena_sync[0], ena125};
  end

  // ---- input FIFO ----
  logic        f_valid, f_ready;
  iq_t         f_data;
  logic [15:0] f_ovf;

  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(dac_aclk), .wr_rst_n(!rst), .wr_valid(dac_tvalid), .wr_ready(dac_tready),
    .wr_data(dac_tdata), .wr_overflow(f_ovf),
    .rd_clk(clk500), .rd_rst_n(!rst), .rd_valid(f_valid), .rd_ready(f_ready), .rd_data(f_data)
  );

  // ---- word interleaving ----
  logic    ph;         // 0: I word next, 1: Q word next
  sample_t q_hold;
  logic    dci;
  logic [15:0] d_q;
  logic    frame_q;

  assign f_ready = ena_sync[1] && !ph;

  always_ff @(posedge clk500 or posedge rst) begin
    if (rst) begin
      ph      <= 1'b0;
      q_hold  <= '0;
      d_q     <= '0;
      frame_q <= 1'b0;
      dci     <= 1'b0;
    end else begin
      ph  <= !ph;
      dci <= !dci;
      if (!ph) begin
        if (ena_sync[1] && f_valid) begin
          d_q    <= f_data.i;
          q_hold <= f_data.q;
        end else begin
          d_q    <= I;
          q_hold <= Q;
        end
        frame_q <= 1'b1;
      end else begin
        d_q     <= q_hold;
        frame_q <= 1'b0;
      end
    end
  end

  assign DAC_D_P     = d_q;
  assign DAC_D_N     = ~d_q;
  assign DAC_FRAME_P = frame_q;
  assign DAC_FRAME_N = !frame_q;
  assign DAC_DCI_P   = dci;
  assign DAC_DCI_N   = !dci;

  axis_checker u_chk (
    .clk(clk500), .rst, .ena(ena_sync[1]), .ramp_chk(chk_ramp), .take(!ph),
    .valid(f_valid), .data(f_data), .samples(chk_samples), .gaps(chk_gaps), .seq_err(chk_seq_err)
  );

endmodule
