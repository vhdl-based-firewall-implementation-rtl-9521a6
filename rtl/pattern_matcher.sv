// pattern_matcher: compares the ingress word with a fixed malicious signature.
//
// Every bit of `data` is compared with the matching bit of SIGNATURE at the
// same time (one XNOR per bit), and the per-bit results are ANDed, so `match`
// is high exactly when all WIDTH bits agree. There is no clock and no state:
// `match` follows `data` after the gate delay only, which is the zero-cycle
// filter the design is built around.
//
// Interface: data[WIDTH-1:0] in, match out (active high).
// Timing: combinational, zero cycles.
//
// The 8-bit width and the 0xAA signature are the design's own numbers. Fixing
// the signature at elaboration time, rather than loading it at run time, also
// follows the design; the XNOR/AND form is the plain way to write the
// comparator equation.
module pattern_matcher
  import firewall_pkg::*;
#(
  parameter int unsigned          WIDTH     = FW_WIDTH,
  parameter logic [WIDTH-1:0]     SIGNATURE = FW_SIGNATURE
) (
  input  logic [WIDTH-1:0] data,
  output logic             match
);

  logic [WIDTH-1:0] bit_equal;

  always_comb begin
    bit_equal = ~(data ^ SIGNATURE);
    match     = &bit_equal;
  end

endmodule : pattern_matcher
