// pattern_matcher_tb: self-checking test of the signature comparator.
//
// Drives all 256 values of the default 8-bit matcher and expects `match` high
// for 1010_1010 only. The expected signature is rebuilt here bit by bit
// (odd bit positions are 1), not taken from the package. A free-running
// clock is used only as a time base: each word is applied on a falling edge
// and must be decided before the next rising edge, i.e. in zero cycles, and
// within 1 ns of being applied. A second matcher, widened to 64 bits with a
// fixed but arbitrary signature, is checked with the signature itself, every single-bit
// corruption of it and random words.
`timescale 1ns/1ps
module pattern_matcher_tb;

  localparam int unsigned    WIDE   = 64;
  localparam logic [WIDE-1:0] WIDE_SIG = 64'hDEAD_BEEF_0123_4567;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]      data;
  logic            match;
  logic [WIDE-1:0] wdata;
  logic            wmatch;

  pattern_matcher dut (
    .data  (data),
    .match (match)
  );

  pattern_matcher #(
    .WIDTH     (WIDE),
    .SIGNATURE (WIDE_SIG)
  ) dut_wide (
    .data  (wdata),
    .match (wmatch)
  );

  function automatic logic [7:0] alternating_signature();
    logic [7:0] s;
    for (int i = 0; i < 8; i++) s[i] = (i % 2 == 1);
    return s;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] sig;
    int         hits;
    sig   = alternating_signature();
    hits  = 0;
    data  = '0;
    wdata = '0;

    // Exhaustive sweep of the 8-bit matcher.
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      data = 8'(v);
      #1;
      check(match, data == sig, $sformatf("8-bit match within 1 ns, data=%02h", data));
      @(posedge clk);
      // Still the same word at the next rising edge: decided in zero cycles.
      check(match, data == sig, $sformatf("8-bit match at edge, data=%02h", data));
      if (match) hits++;
    end
    checks++;
    if (hits != 1) begin
      failures++;
      $display("FAIL exactly one of 256 words must match, saw %0d", hits);
    end

    // 64-bit matcher: exact word, each single-bit corruption, random words.
    @(negedge clk);
    wdata = WIDE_SIG;
    #1 check(wmatch, 1'b1, "64-bit exact signature");
    for (int b = 0; b < WIDE; b++) begin
      wdata = WIDE_SIG ^ (64'd1 << b);
      #1 check(wmatch, 1'b0, $sformatf("64-bit signature with bit %0d flipped", b));
    end
    for (int n = 0; n < 200; n++) begin
      wdata = {$urandom, $urandom};
      #1 check(wmatch, wdata == WIDE_SIG, "64-bit random word");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : pattern_matcher_tb
