// prom: the card's PROM, holding the permanent DSP code (initialisation,
// synchronisation and handling routines).
//
// Read-only, WORDS words of DW bits, read combinationally from the address
// like a bipolar or EPROM chip. The contents are programmed outside the card;
// here they come from the hex file named by INIT_FILE (one word per line, as
// read by $readmemh). With no file the PROM reads zero. The size is this
// design's choice (the lower half of the TMS32010's 4-kword program space).
module prom #(
  parameter int unsigned WORDS     = 2048,
  parameter int unsigned DW        = 16,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] rom [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign rdata = rom[addr];
endmodule
