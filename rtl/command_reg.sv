// command_reg: two-phase command register of a DSP card.
//
// Phase one: while `load` is high (the card address comparator matched a
// command word on the SAB) the register latches the command lines. Phase two:
// every rising edge of CE executes the stored command, on all cards at once;
// cards that should stay unaffected hold the idle command (all zero). A stored
// command stays until it is overwritten, so a repetitive command such as a bank
// read or write needs one transfer and then one CE per word.
// Outputs: `cmd_q` the stored lines; `exec_pulse` the stored lines for the one
// clock after CE was seen rising (edge actions: write, request, run, reset,
// forced switch, latch status); `exec_level` the stored lines for as long as CE
// is high (bus read enables). All inputs are sampled on `clk`; CE is taken as
// synchronous to it, which is this design's choice. Reset stores idle.
module command_reg
  import card_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,       // from the card address comparator
  input  logic [CMD_W-1:0] cmd_in,     // command field of the SAB
  input  logic             ce,         // execute line of the SAB
  output cmd_t             cmd_q,
  output cmd_t             exec_pulse,
  output cmd_t             exec_level
);
  logic ce_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q <= '0;
      ce_q  <= 1'b0;
    end else begin
      ce_q <= ce;
      if (load) cmd_q <= cmd_t'(cmd_in);
    end
  end

  always_comb begin
    exec_pulse = (ce && !ce_q) ? cmd_q : '0;
    exec_level = ce ? cmd_q : '0;
  end
endmodule
