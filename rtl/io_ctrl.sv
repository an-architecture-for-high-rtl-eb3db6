// io_ctrl: I/O control logic of the DSP card.
//
// A 3-to-8 decoder of the port number on A2..A0. Its outputs 0..7 go low while
// both enables are low: OE1 is the DSP write strobe WE and OE2 the internal
// address comparator, so an OUT instruction to port n pulls output n low
// (`wr_n`). A second decoder does the same for IN instructions with the DSP
// data enable DEN (`rd_n`), which opens the input port read by the DSP. The
// write decoder follows the bank switching schematic; the read decoder is this
// design's choice.
// Besides the level outputs, `wr_pulse` marks the first clock of each write
// strobe, so that flip-flops that toggle or latch act exactly once per OUT
// instruction however many clocks the DSP holds WE low.
module io_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] a,          // A2..A0
  input  logic       oe1_n,      // WE from the DSP
  input  logic       oe2_n,      // internal address comparator
  input  logic       den_n,      // DEN from the DSP
  output logic [7:0] wr_n,
  output logic [7:0] rd_n,
  output logic [7:0] wr_pulse
);
  logic [7:0] wr_n_q;

  always_comb begin
    wr_n = 8'hFF;
    rd_n = 8'hFF;
    if (!oe1_n && !oe2_n) wr_n[a] = 1'b0;
    if (!den_n && !oe2_n) rd_n[a] = 1'b0;
    wr_pulse = ~wr_n & wr_n_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_n_q <= 8'hFF;
    else        wr_n_q <= wr_n;
  end
endmodule
