// bank_switcher: the two groups of bank switching buffers of a DSP card.
//
// On the board these are 3-state buffers between the host side, the DSP side
// and the two RAM banks. Here they are multiplexers: with `sel` = 0, RAM1 is
// connected to the host and RAM2 to the DSP; with `sel` = 1 the connections
// are crossed. `sel` is the toggle flip-flop Q2 of the RAM control logic, so a
// bank switch exchanges all the data of the two sides at once. Which bank the
// host sees after reset is this design's choice. Purely combinational.
module bank_switcher #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 16
) (
  input  logic          sel,
  // host side
  input  logic [AW-1:0] h_addr,
  input  logic          h_we,
  input  logic [DW-1:0] h_wdata,
  output logic [DW-1:0] h_rdata,
  // DSP side
  input  logic [AW-1:0] d_addr,
  input  logic          d_we,
  input  logic [DW-1:0] d_wdata,
  output logic [DW-1:0] d_rdata,
  // RAM1
  output logic [AW-1:0] r1_addr,
  output logic          r1_we,
  output logic [DW-1:0] r1_wdata,
  input  logic [DW-1:0] r1_rdata,
  // RAM2
  output logic [AW-1:0] r2_addr,
  output logic          r2_we,
  output logic [DW-1:0] r2_wdata,
  input  logic [DW-1:0] r2_rdata
);
  always_comb begin
    if (!sel) begin
      r1_addr = h_addr;  r1_we = h_we;  r1_wdata = h_wdata;  h_rdata = r1_rdata;
      r2_addr = d_addr;  r2_we = d_we;  r2_wdata = d_wdata;  d_rdata = r2_rdata;
    end else begin
      r1_addr = d_addr;  r1_we = d_we;  r1_wdata = d_wdata;  d_rdata = r1_rdata;
      r2_addr = h_addr;  r2_we = h_we;  r2_wdata = h_wdata;  h_rdata = r2_rdata;
    end
  end
endmodule
