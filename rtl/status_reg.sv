// status_reg: card status register read by the host.
//
// On `latch` (the "latch card status" command) the register samples its eight
// inputs IN0..IN7; while `rd_en` is high ("card status read" with CE) it drives
// them on SDB[7:0] with the upper SDB bits at zero. Taking a snapshot first and
// reading it later follows the command list of the design; the reset value
// (zero) is this design's choice. One clock from `latch` to the new value.
module status_reg
  import card_pkg::*;
#(
  parameter int unsigned W = STAT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             latch,
  input  logic [W-1:0]     status_in,
  input  logic             rd_en,
  output logic [W-1:0]     status_q,
  output logic [SDB_W-1:0] sdb_out,
  output logic             sdb_oe
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     status_q <= '0;
    else if (latch) status_q <= status_in;
  end

  always_comb begin
    sdb_oe  = rd_en;
    sdb_out = rd_en ? SDB_W'(status_q) : '0;
  end
endmodule
