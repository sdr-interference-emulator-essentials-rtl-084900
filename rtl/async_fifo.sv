// async_fifo: dual-clock FIFO used at every clock-domain crossing of the sample path.
//
// The RX chain enters through one (the ADC-to-DSP synchroniser), the TX chain crosses into the
// 500 MHz DSP clock and back with two more, and the DAC interface takes its samples through one.
// The memory is a plain array written in the write domain and read in the read domain. Read and
// write pointers are binary counters of log2(DEPTH)+1 bits, converted to Gray code and passed
// through two flip-flops into the opposite domain, the usual safe crossing for a multi-bit
// counter. Both ports are AXI-stream style: a word moves when valid and ready are both high.
// The read side is first-word-fall-through: rd_data shows the oldest word while rd_valid is high.
// Every clock in which a write is offered while the FIFO is full is counted in wr_overflow
// (saturating, write domain); for a source that cannot wait, such as the ADC, that is the
// number of lost samples.
// Latency from a write to rd_valid is about three read clocks. The use of FIFOs at the crossings
// follows the document; depth, pointer scheme and overflow counting are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16      // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic [15:0]      wr_overflow,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0] rptr_gray_w1, rptr_gray_w2;   // read pointer seen in the write domain
  logic [AW:0] wptr_gray_r1, wptr_gray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  logic full, empty;
  assign full  = (wptr_gray == {~rptr_gray_w2[AW:AW-1], rptr_gray_w2[AW-2:0]});
  assign empty = (rptr_gray == wptr_gray_r2);

  assign wr_ready = !full;
  assign rd_valid = !empty;
  assign rd_data  = mem[rptr_bin[AW-1:0]];

  // write domain
  always_ff @(posedge wr_clk) begin
    if (wr_valid && !full) mem[wptr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr_bin     <= '0;
      wptr_gray    <= '0;
      rptr_gray_w1 <= '0;
      rptr_gray_w2 <= '0;
      wr_overflow  <= '0;
    end else begin
      rptr_gray_w1 <= rptr_gray;
      rptr_gray_w2 <= rptr_gray_w1;
      if (wr_valid && !full) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end else if (wr_valid && full && wr_overflow != '1) begin
        wr_overflow <= wr_overflow + 1'b1;
      end
    end
  end

  // read domain
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr_bin     <= '0;
      rptr_gray    <= '0;
      wptr_gray_r1 <= '0;
      wptr_gray_r2 <= '0;
    end else begin
      wptr_gray_r1 <= wptr_gray;
      wptr_gray_r2 <= wptr_gray_r1;
      if (rd_ready && !empty) begin
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
    end
  end

endmodule
