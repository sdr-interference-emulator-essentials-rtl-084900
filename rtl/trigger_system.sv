// trigger_system: starts and stops the DAC and ADC data streams together.
//
// ena_in, the enable the processor sets, is asynchronous to the converter clocks. It is
// brought into clk125 through a two-flop synchroniser, and its synchronised value drives
// dac_data_ena and adc_data_ena from one register each, so both converters see the change on
// the same clk125 edge. Latency from ena_in to the outputs is three clk125 cycles. The
// block has no reset port; its registers hold the input's value three clocks after the clock
// starts. That one
// block triggers both interfaces follows the document; the synchroniser and the common edge are
// this design's choices.
module trigger_system (
  input  logic clk125,
  input  logic ena_in,
  output logic dac_data_ena,
  output logic adc_data_ena
);

  logic [1:0] sync;

  always_ff @(posedge clk125) begin
    sync         <= {sync[0], ena_in};
    dac_data_ena <= sync[1];
    adc_data_ena <= sync[1];
  end

endmodule
