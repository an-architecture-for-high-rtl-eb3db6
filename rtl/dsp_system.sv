// dsp_system: the lower level of the hierarchical control computer, up to
// eight DSP cards on the host's two system buses.
//
// The host (outside this module) drives the system address bus SAB, carrying
// memory addresses and commands, and the system data bus SDB. Every card sees
// both buses; a command word reaches only the card whose jumpers match its card
// field, while an execute (CE) reaches all cards at once, so a group of cards
// can be started or switched together and the others hold the idle command.
// On the board each card drives SDB through 3-state buffers; here the card
// outputs are gated by their enables and ORed into `sdb_out`, and `sdb_oe`
// tells the host that some card is driving. Two cards must never drive at once
// (an assertion checks this). Each card's TMS320 pins, jumpers and plant buses
// are brought out as arrays indexed by card; the processors themselves and the
// plant are outside. N_CARDS = 8 follows the design; the OR bus model and the
// single clock are this design's choices.
module dsp_system
  import card_pkg::*;
#(
  parameter int unsigned N_CARDS    = 8,
  parameter int unsigned BANK_WORDS = 2048,
  parameter int unsigned DSP_AW     = 12,
  parameter int unsigned DW         = 16,
  parameter int unsigned PA_W       = 8,
  parameter int unsigned TICK_DIV   = 2000
) (
  input  logic               clk,
  input  logic               rst_n,
  // system buses to the host
  input  logic [SAB_W-1:0]   sab,
  input  logic [SDB_W-1:0]   sdb_in,
  output logic [SDB_W-1:0]   sdb_out,
  output logic               sdb_oe,
  // per-card jumpers
  input  logic [CARD_AW-1:0] card_id   [N_CARDS],
  input  logic [DSP_AW-1:0]  bif_addr  [N_CARDS],
  // per-card TMS320 pins
  input  logic [DSP_AW-1:0]  tms_a     [N_CARDS],
  input  logic [DW-1:0]      tms_d_in  [N_CARDS],
  output logic [DW-1:0]      tms_d_out [N_CARDS],
  input  logic               tms_men_n [N_CARDS],
  input  logic               tms_we_n  [N_CARDS],
  input  logic               tms_den_n [N_CARDS],
  output logic               tms_bio_n [N_CARDS],
  output logic               tms_int_n [N_CARDS],
  output logic               tms_rs_n  [N_CARDS],
  // per-card plant buses
  output logic [PA_W-1:0]    plant_addr [N_CARDS],
  output logic [DW-1:0]      plant_dout [N_CARDS],
  output logic               plant_wr_n [N_CARDS],
  output logic               plant_rd_n [N_CARDS],
  input  logic [DW-1:0]      plant_din  [N_CARDS]
);
  logic [SDB_W-1:0] card_sdb [N_CARDS];
  logic [N_CARDS-1:0] card_oe;

  for (genvar i = 0; i < int'(N_CARDS); i++) begin : g_card
    dsp_card #(
      .BANK_WORDS(BANK_WORDS), .DSP_AW(DSP_AW), .DW(DW), .PA_W(PA_W), .TICK_DIV(TICK_DIV)
    ) u_card (
      .clk, .rst_n,
      .card_id(card_id[i]), .bif_addr(bif_addr[i]),
      .sab, .sdb_in, .sdb_out(card_sdb[i]), .sdb_oe(card_oe[i]),
      .tms_a(tms_a[i]), .tms_d_in(tms_d_in[i]), .tms_d_out(tms_d_out[i]),
      .tms_men_n(tms_men_n[i]), .tms_we_n(tms_we_n[i]), .tms_den_n(tms_den_n[i]),
      .tms_bio_n(tms_bio_n[i]), .tms_int_n(tms_int_n[i]), .tms_rs_n(tms_rs_n[i]),
      .plant_addr(plant_addr[i]), .plant_dout(plant_dout[i]),
      .plant_wr_n(plant_wr_n[i]), .plant_rd_n(plant_rd_n[i]), .plant_din(plant_din[i])
    );
  end

  always_comb begin
    sdb_out = '0;
    for (int i = 0; i < int'(N_CARDS); i++)
      if (card_oe[i]) sdb_out |= card_sdb[i];
    sdb_oe = |card_oe;
  end

  // SDB contention: at most one card may drive the bus.
  always_comb begin
    assert ((card_oe & (card_oe - 1'b1)) == '0)
      else $error("dsp_system: several cards drive SDB");
  end
endmodule
