// tb_sync_rst: checks that the reset asserts at once, with no clock running, and that it is
// released exactly STAGES clock edges after the asynchronous input falls.
module tb_sync_rst;
  logic clk = 0, arst = 0, rst_o, rstn_o;
  logic run = 0;
  int checks = 0, failures = 0;

  sync_rst #(.STAGES(2)) dut (.clk, .arst, .rst_o, .rstn_o);

  always #5 if (run) clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // assert without a clock
    #3 arst = 1;
    #1 check(rst_o === 1'b1 && rstn_o === 1'b0, "reset asserted without clock");
    run = 1;
    repeat (3) @(posedge clk);
    #1 check(rst_o, "reset held while arst high");
    arst = 0;
    @(posedge clk); #1 check(rst_o, "still in reset after 1 edge");
    @(posedge clk); #1 check(!rst_o && rstn_o, "released after 2 edges");
    repeat (5) @(posedge clk);
    #1 check(!rst_o, "stays released");
    // assert mid-cycle, asynchronously
    #2 arst = 1;
    #1 check(rst_o && !rstn_o, "asynchronous assertion between edges");
    #1 arst = 0;
    @(posedge clk); #1 check(rst_o, "release not before 2 edges");
    @(posedge clk); #1 check(!rst_o, "release after 2 edges (second time)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
