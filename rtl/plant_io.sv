// plant_io: I/O ports connecting the DSP card to the controlled plant.
//
// Because the TMS32010 has no wait line, the plant interface is two plain
// external buses built from standard TTL parts rather than programmable ports:
// an address bus selecting a transducer (for example a joint's converter) and a
// bidirectional data bus. An OUT to the address port latches `plant_addr`; an
// OUT to the data port latches `plant_dout` and pulls `plant_wr_n` low for the
// following clock, while the data is already stable. An IN from the data port
// holds `plant_rd_n` low and passes `plant_din` straight to the DSP data bus.
// The two-bus structure follows the design; the widths, the strobe timing and
// the reset values (zero) are this design's choices.
module plant_io #(
  parameter int unsigned PA_W = 8,
  parameter int unsigned DW   = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_addr,     // one-clock pulse, OUT to the address port
  input  logic            wr_data,     // one-clock pulse, OUT to the data port
  input  logic            rd_data,     // level, IN from the data port
  input  logic [DW-1:0]   dsp_wdata,   // DSP data bus during OUT
  output logic [DW-1:0]   dsp_rdata,   // to the DSP data bus during IN
  output logic [PA_W-1:0] plant_addr,
  output logic [DW-1:0]   plant_dout,
  output logic            plant_wr_n,
  output logic            plant_rd_n,
  input  logic [DW-1:0]   plant_din
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plant_addr <= '0;
      plant_dout <= '0;
      plant_wr_n <= 1'b1;
    end else begin
      if (wr_addr) plant_addr <= dsp_wdata[PA_W-1:0];
      if (wr_data) plant_dout <= dsp_wdata;
      plant_wr_n <= ~wr_data;
    end
  end

  always_comb begin
    plant_rd_n = ~rd_data;
    dsp_rdata  = rd_data ? plant_din : '0;
  end
endmodule
