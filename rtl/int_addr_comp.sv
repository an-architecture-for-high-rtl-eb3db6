// int_addr_comp: internal address comparator of the DSP card.
//
// The TMS320 puts an I/O port number on A2..A0 during IN and OUT instructions,
// with the upper address lines at zero, and asserts WE for OUT, the same strobe
// it uses for table writes to program memory. This comparator tells the two
// apart: its active-low output `io_n` enables the I/O control logic only when
// A11..A3 equal IO_PAGE (zero by default). Program memory writes never go to
// that page because it lies in the PROM. The comparison against the upper
// address lines is this design's reading of the block; the schematic names it
// only. Combinational.
module int_addr_comp #(
  parameter int unsigned AW = 12,
  parameter logic [AW-4:0] IO_PAGE = '0
) (
  input  logic [AW-1:0] addr,
  output logic          io_n
);
  always_comb io_n = (addr[AW-1:3] != IO_PAGE);
endmodule
