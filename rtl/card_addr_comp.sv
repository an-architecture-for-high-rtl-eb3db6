// card_addr_comp: card address comparator.
//
// Each card has a 3-bit address set by jumpers (switches to ground). While the
// host holds ATN active on the system address bus, the comparator checks the
// card address field of the SAB against the jumpers and, on a match, enables
// the command register to latch the command word. With ATN inactive the SAB
// carries a memory address and the comparator never enables.
// Interface: purely combinational, no clock. `enable` follows the inputs.
// The 3-bit width and the ATN qualification follow the design description;
// the position of the field on the SAB is set by card_pkg.
module card_addr_comp
  import card_pkg::*;
#(
  parameter int unsigned AW = CARD_AW
) (
  input  logic          atn,       // SAB word is a command
  input  logic [AW-1:0] sab_card,  // card address field of the SAB
  input  logic [AW-1:0] jumpers,   // this card's address
  output logic          enable     // latch enable for the command register
);
  always_comb enable = atn && (sab_card == jumpers);
endmodule
