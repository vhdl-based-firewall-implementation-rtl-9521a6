// routing_mux_tb: self-checking test of the forward/drop multiplexer.
//
// For random words and both decisions, checks that an allowed word appears
// unchanged on out_data with out_valid and the green pin high and the red
// pin low, and that a blocked word gives zero data, out_valid low, the red
// pin high and the green pin low. Outputs are checked 1 ns after the inputs
// change and again at the next clock edge (zero-cycle decision).
`timescale 1ns/1ps
module routing_mux_tb;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] data;
  logic       match;
  logic [7:0] out_data;
  logic       out_valid;
  logic       led_allow;
  logic       led_block;

  routing_mux dut (
    .data      (data),
    .match     (match),
    .out_data  (out_data),
    .out_valid (out_valid),
    .led_allow (led_allow),
    .led_block (led_block)
  );

  task automatic expect_outputs(input string when);
    logic [7:0] exp_data;
    exp_data = match ? 8'h00 : data;
    checks++;
    if (out_data !== exp_data || out_valid !== !match ||
        led_allow !== !match || led_block !== match) begin
      failures++;
      $display("FAIL %s data=%02h match=%0b: out_data=%02h out_valid=%0b allow=%0b block=%0b",
               when, data, match, out_data, out_valid, led_allow, led_block);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    data  = '0;
    match = 1'b0;
    // Every word with both decisions.
    for (int v = 0; v < 256; v++) begin
      for (int m = 0; m < 2; m++) begin
        @(negedge clk);
        data  = 8'(v);
        match = m[0];
        #1 expect_outputs("after 1 ns");
        @(posedge clk);
        expect_outputs("at next edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : routing_mux_tb
