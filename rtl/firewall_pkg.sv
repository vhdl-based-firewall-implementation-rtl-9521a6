// firewall_pkg: constants and types shared by the firewall modules.
//
// FW_WIDTH and FW_SIGNATURE are the defaults of the design: an 8-bit ingress
// word and the malicious signature 1010_1010 (0xAA). decision_e names the two
// outcomes of inspecting one word. Nothing here has timing; the firewall is
// purely combinational.
package firewall_pkg;

  // Width of the ingress word (one DIP switch per bit on the demonstration board).
  localparam int unsigned FW_WIDTH = 8;

  // Word that is treated as malicious and dropped.
  localparam logic [FW_WIDTH-1:0] FW_SIGNATURE = 8'b1010_1010;

  // Outcome of inspecting one word.
  typedef enum logic {
    DEC_ALLOW = 1'b0,  // forward the word, green LED on
    DEC_BLOCK = 1'b1   // drop the word, red LED on
  } decision_e;

endpackage : firewall_pkg
