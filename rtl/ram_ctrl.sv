// ram_ctrl: bank switching control logic (the synchronisation part of the RAM
// control logic).
//
// Q1 is a set-reset flip-flop. The host sets it with the bank switch request
// command (CHGREQ); its inverted output is the DSP's BIO polling input, and its
// true output is the ACK bit of the status register. When the DSP decides to
// honour the request it executes an OUT to I/O port 0; that strobe resets Q1
// (ACK falls: the request has been honoured) and toggles Q2, the flip-flop that
// selects which bank is connected to which side. The forced bank switching
// command toggles Q2 from the host side, for use while the DSP is held in reset.
// This follows the bank switching schematic. Synchronous flip-flops on `clk`
// stand in for the board's edge-triggered ones; if the set and the reset arrive
// in the same clock the set wins (a new request is not lost), and both toggle
// sources together cancel. Reset clears Q1 and Q2; these are choices of this
// design. One clock from a strobe to the new state.
module ram_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic chgreq,        // one-clock pulse: host switch request
  input  logic sw_strobe,     // one-clock pulse: DSP OUT to port 0
  input  logic force_toggle,  // one-clock pulse: host forced switch
  output logic q1,            // request pending (status ACK)
  output logic bio_n,         // to the DSP BIO pin, low while a request is pending
  output logic q2,            // bank connection state
  output logic q2_n
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      if (chgreq)         q1 <= 1'b1;
      else if (sw_strobe) q1 <= 1'b0;
      if (sw_strobe ^ force_toggle) q2 <= ~q2;
    end
  end

  always_comb begin
    bio_n = ~q1;
    q2_n  = ~q2;
  end
endmodule
