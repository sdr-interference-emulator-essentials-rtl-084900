// packetizer: frames the RX chain's samples into DMA transfers.
//
// Every sample becomes one 32-bit stream word, {Q, I}, and tlast marks the PKT_LEN-th word of
// each packet, which is where the stream-to-memory DMA closes a buffer. A word counter counts
// accepted words modulo PKT_LEN. The stage is a single register: in_ready is low only while a
// word waits for m_ready, and words leave one clock after they arrive. Words arriving while
// the stage is full are not accepted; the chain before it then fills its input FIFO. Making
// the RX stream ready for the DMA follows the document; the word layout and packet length are
// this design's choices.
module packetizer
  import sdr_pkg::*;
#(
  parameter int unsigned PKT_LEN = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  iq_t         in,
  output logic        m_valid,
  input  logic        m_ready,
  output logic [31:0] m_data,
  output logic        m_last
);

  logic [$clog2(PKT_LEN+1)-1:0] cnt;

  assign in_ready = !(m_valid && !m_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
      m_last  <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (in_valid && in_ready) begin
        m_data  <= {in.q, in.i};
        m_valid <= 1'b1;
        m_last  <= (int'(cnt) == int'(PKT_LEN) - 1);
        cnt     <= (int'(cnt) == int'(PKT_LEN) - 1) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
