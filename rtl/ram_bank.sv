// ram_bank: one bank of the card's shared program/data RAM.
//
// A single-port static RAM of WORDS words of DW bits (2 kwords of 16 bits, as in
// the design; extendable to 4 kwords by setting WORDS). The read is
// combinational from the address, like an asynchronous SRAM chip, so that the
// DSP can fetch an instruction from it in the same cycle; the write takes
// place on the rising clock edge while `we` is high. Its contents are not
// reset, like a RAM chip.
module ram_bank #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned DW    = 16,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
