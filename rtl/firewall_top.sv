// firewall_top: 8-bit hardware packet filter.
//
// The ingress word `in_data` (eight DIP switches on the demonstration board)
// is compared with a fixed malicious signature by pattern_matcher. Its
// decision drives routing_mux, which either forwards the word on `out_data`
// with `out_valid` high and lights the green Allow LED, or drops it (zero on
// `out_data`, `out_valid` low) and lights the red Block LED.
//
// Interface: in_data[WIDTH-1:0] in; out_data[WIDTH-1:0], out_valid,
// led_allow, led_block out. LED pins are active high.
// Timing: no clock and no reset; every output is a combinational function of
// in_data, so a decision takes zero cycles, only gate delay.
//
// WIDTH = 8 and SIGNATURE = 0xAA are the design's own numbers; the forwarded
// data bus is this implementation's addition (see routing_mux).
module firewall_top
  import firewall_pkg::*;
#(
  parameter int unsigned      WIDTH     = FW_WIDTH,
  parameter logic [WIDTH-1:0] SIGNATURE = FW_SIGNATURE
) (
  input  logic [WIDTH-1:0] in_data,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  output logic             led_allow,
  output logic             led_block
);

  logic match;

  pattern_matcher #(
    .WIDTH     (WIDTH),
    .SIGNATURE (SIGNATURE)
  ) u_matcher (
    .data  (in_data),
    .match (match)
  );

  routing_mux #(
    .WIDTH (WIDTH)
  ) u_mux (
    .data      (in_data),
    .match     (match),
    .out_data  (out_data),
    .out_valid (out_valid),
    .led_allow (led_allow),
    .led_block (led_block)
  );

endmodule : firewall_top
