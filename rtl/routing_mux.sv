// routing_mux: acts on the pattern matcher's decision.
//
// When `match` is low the word is allowed: it is passed to `out_data`,
// `out_valid` is high, the green Allow LED pin is high and the red Block LED
// pin is low. When `match` is high the word is dropped: `out_data` is forced
// to zero, `out_valid` is low, the red pin is high and the green pin is low.
// Exactly one LED pin is high at any time.
//
// Interface: data[WIDTH-1:0] and match in; out_data[WIDTH-1:0], out_valid,
// led_allow, led_block out. LED pins are active high.
// Timing: combinational, zero cycles.
//
// The LED behaviour and the forward/drop choice follow the design. The
// out_data/out_valid pair, and zero as the value of a dropped word, are this
// implementation's own way of making the forward/drop visible on pins.
module routing_mux
  import firewall_pkg::*;
#(
  parameter int unsigned WIDTH = FW_WIDTH
) (
  input  logic [WIDTH-1:0] data,
  input  logic             match,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  output logic             led_allow,
  output logic             led_block
);

  decision_e decision;

  always_comb begin
    decision  = match ? DEC_BLOCK : DEC_ALLOW;
    unique case (decision)
      DEC_BLOCK: begin
        out_data  = '0;
        out_valid = 1'b0;
        led_allow = 1'b0;
        led_block = 1'b1;
      end
      default: begin  // DEC_ALLOW
        out_data  = data;
        out_valid = 1'b1;
        led_allow = 1'b1;
        led_block = 1'b0;
      end
    endcase
  end

  // The two LED pins are never on together or off together.
  always_comb begin
    assert (led_allow != led_block)
      else $error("routing_mux: Allow and Block LEDs in the same state");
  end

endmodule : routing_mux
