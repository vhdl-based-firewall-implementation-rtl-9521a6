// firewall_top_tb: end-to-end test of the 8-bit firewall at its default size.
//
// The firewall is instantiated with no parameter overrides. The test first
// sets all 256 switch positions one after another, then plays a stream of
// 2000 words in which the malicious word 1010_1010 is mixed with random safe
// traffic, as a packet stream at one word per clock. For every word the
// reference model (signature parsed here from the text "10101010") decides
// block or allow, and the test checks the forwarded word, out_valid and both
// LED pins 1 ns after the word is applied and again at the next rising edge,
// so each decision is made in zero clock cycles.
//
// Mechanisms counted, each of which must happen at least once: a word
// blocked, a word forwarded, a switch from allow to block and a switch from
// block to allow.
`timescale 1ns/1ps
module firewall_top_tb;

  int checks   = 0;
  int failures = 0;

  int n_block        = 0;
  int n_allow        = 0;
  int n_allow2block  = 0;
  int n_block2allow  = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] in_data;
  logic [7:0] out_data;
  logic       out_valid;
  logic       led_allow;
  logic       led_block;

  firewall_top dut (
    .in_data   (in_data),
    .out_data  (out_data),
    .out_valid (out_valid),
    .led_allow (led_allow),
    .led_block (led_block)
  );

  // Signature written the way the rule is stated: MSB first, as text.
  function automatic logic [7:0] parse_signature(input string s);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[7-i] = (s[i] == "1");
    return v;
  endfunction

  logic [7:0] sig;
  logic       prev_blocked;
  bit         have_prev;

  task automatic check_word(input string when);
    logic blocked;
    blocked = (in_data == sig);
    checks++;
    if (out_valid !== !blocked || led_block !== blocked || led_allow !== !blocked ||
        out_data !== (blocked ? 8'h00 : in_data)) begin
      failures++;
      $display("FAIL %s in=%02h: out_data=%02h out_valid=%0b allow=%0b block=%0b",
               when, in_data, out_data, out_valid, led_allow, led_block);
    end
  endtask

  task automatic apply(input logic [7:0] w);
    logic blocked;
    @(negedge clk);
    in_data = w;
    #1 check_word("after 1 ns");
    @(posedge clk);
    check_word("at next edge");
    blocked = led_block;
    if (blocked) n_block++; else n_allow++;
    if (have_prev && !prev_blocked && blocked) n_allow2block++;
    if (have_prev && prev_blocked && !blocked) n_block2allow++;
    prev_blocked = blocked;
    have_prev    = 1'b1;
  endtask

  task automatic require(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int blocked_sweep;
    sig          = parse_signature("10101010");
    in_data      = '0;
    prev_blocked = 1'b0;
    have_prev    = 1'b0;

    // All 256 switch settings: exactly one is blocked.
    for (int v = 0; v < 256; v++) apply(8'(v));
    blocked_sweep = n_block;
    checks++;
    if (blocked_sweep != 1 || n_allow != 255) begin
      failures++;
      $display("FAIL sweep: %0d blocked and %0d allowed, expected 1 and 255",
               blocked_sweep, n_allow);
    end

    // Mixed stream: about one word in eight is the malicious one, and words
    // one bit away from it are common, to stress the comparator.
    for (int n = 0; n < 2000; n++) begin
      int unsigned r;
      r = $urandom_range(7);
      if (r == 0)      apply(sig);
      else if (r == 1) apply(sig ^ (8'd1 << $urandom_range(7)));
      else             apply(8'($urandom));
    end

    require(n_block,       "word blocked");
    require(n_allow,       "word forwarded");
    require(n_allow2block, "allow to block");
    require(n_block2allow, "block to allow");
    $display("mechanisms: blocked=%0d forwarded=%0d allow->block=%0d block->allow=%0d",
             n_block, n_allow, n_allow2block, n_block2allow);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : firewall_top_tb
