// tb_trigger_system: checks that both enables follow ena_in together, three clk125 cycles
// after it changes, and never differ from each other.
module tb_trigger_system;
  logic clk125 = 0, ena_in = 0, dac_data_ena, adc_data_ena;
  int checks = 0, failures = 0;

  trigger_system dut (.clk125, .ena_in, .dac_data_ena, .adc_data_ena);

  always #4 clk125 = ~clk125;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk125) begin
    #1;
    checks++;
    if (dac_data_ena !== adc_data_ena) begin failures++; $display("FAIL: enables differ"); end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk125);
    #1 check(!adc_data_ena, "idle low");
    for (int t = 0; t < 4; t++) begin
      @(negedge clk125);
      #1 ena_in = !ena_in;      // change between edges, asynchronously
      @(posedge clk125); #1 check(adc_data_ena != ena_in, "no change after 1 edge");
      @(posedge clk125); #1 check(adc_data_ena != ena_in, "no change after 2 edges");
      @(posedge clk125); #1 check(adc_data_ena == ena_in && dac_data_ena == ena_in, "change after 3 edges");
      repeat (4) @(posedge clk125);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
