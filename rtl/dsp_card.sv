// dsp_card: one DSP card of the hierarchical control computer.
//
// The card couples a TMS320 signal processor (outside this module, through its
// address, data and strobe pins) to the host's system buses and to the plant.
// Its central idea is a pair of RAM banks switched between the two computers:
// at any time one bank belongs to the host and the other to the DSP, each side
// working on its own bank at full speed. When the host has new data ready it
// sends a bank switch request; the DSP sees it on its BIO pin and, at a sampling
// instant of its choice, executes an OUT to port 0, which exchanges the banks
// and clears the request (the host sees ACK fall). The exchange is the whole
// data transfer and also the synchronisation of the two levels.
//
// Host side: a word on SAB with ATN=1 whose card field matches the jumpers is
// a command, latched in the command register; CE=1 then executes it (bank
// write/read at SAB[13:0] with SDB data, status latch/read, switch request,
// run, reset, forced switch). The card drives `sdb_out` and raises `sdb_oe`
// only for bank and status reads.
// DSP side: program memory is Y-shaped. Addresses below `bif_addr` (jumpers)
// read the PROM, addresses at or above it reach the DSP-side bank (the low
// address bits select the word), where table writes (WE with a non-I/O
// address) store data. IN/OUT instructions (A11..A3 zero) reach the I/O ports:
// port 0 switches banks, 1 presets the sampling timer, 2 and 3 are the plant
// address and data buses, 4 writes the five card flags shown in the status
// register. The sampling timer drives the DSP interrupt; the run/reset
// commands drive its reset pin, held in reset after power-up so that code can
// be downloaded first.
// All logic runs on one clock; host and DSP strobes are taken as synchronous
// to it, and the one-clock actions happen on the first clock of a strobe.
// These, the port map and the bit assignments (see card_pkg) are this
// design's choices; the blocks and their connections follow the card's block
// diagram and the bank switching schematic.
module dsp_card
  import card_pkg::*;
#(
  parameter int unsigned BANK_WORDS = 2048,
  parameter int unsigned PROM_WORDS = 2048,
  parameter int unsigned DSP_AW     = 12,
  parameter int unsigned DW         = 16,
  parameter int unsigned PA_W       = 8,
  parameter int unsigned TICK_DIV   = 2000,
  parameter int unsigned PRESET_W   = 13,
  parameter string       PROM_INIT  = ""
) (
  input  logic               clk,
  input  logic               rst_n,
  // jumpers
  input  logic [CARD_AW-1:0] card_id,
  input  logic [DSP_AW-1:0]  bif_addr,
  // system buses
  input  logic [SAB_W-1:0]   sab,
  input  logic [SDB_W-1:0]   sdb_in,
  output logic [SDB_W-1:0]   sdb_out,
  output logic               sdb_oe,
  // TMS320 pins
  input  logic [DSP_AW-1:0]  tms_a,
  input  logic [DW-1:0]      tms_d_in,
  output logic [DW-1:0]      tms_d_out,
  input  logic               tms_men_n,
  input  logic               tms_we_n,
  input  logic               tms_den_n,
  output logic               tms_bio_n,
  output logic               tms_int_n,
  output logic               tms_rs_n,
  // plant buses
  output logic [PA_W-1:0]    plant_addr,
  output logic [DW-1:0]      plant_dout,
  output logic               plant_wr_n,
  output logic               plant_rd_n,
  input  logic [DW-1:0]      plant_din
);
  localparam int unsigned BANK_AW = $clog2(BANK_WORDS);
  localparam int unsigned PROM_AW = $clog2(PROM_WORDS);

  // ---------------- host command path ----------------
  logic atn, ce, card_sel;
  cmd_t exec_pulse, exec_level;

  always_comb begin
    atn = sab[SAB_ATN];
    ce  = sab[SAB_CE] && !sab[SAB_ATN];
  end

  card_addr_comp u_cac (
    .atn(atn), .sab_card(sab[SAB_CARD_LSB +: CARD_AW]), .jumpers(card_id), .enable(card_sel)
  );

  command_reg u_cmd (
    .clk, .rst_n, .load(card_sel), .cmd_in(sab[CMD_W-1:0]), .ce,
    .cmd_q(), .exec_pulse, .exec_level
  );

  // ---------------- RAM control logic ----------------
  logic [7:0] io_rd_n, io_wr_pulse;
  logic       q1, q2;

  ram_ctrl u_rc (
    .clk, .rst_n,
    .chgreq(exec_pulse.switch_req),
    .sw_strobe(io_wr_pulse[PORT_SWITCH]),
    .force_toggle(exec_pulse.force_switch),
    .q1, .bio_n(tms_bio_n), .q2, .q2_n()
  );

  // ---------------- DSP address decode ----------------
  logic io_n, in_bank, bank_we, we_q;

  int_addr_comp #(.AW(DSP_AW)) u_iac (.addr(tms_a), .io_n(io_n));

  io_ctrl u_ioc (
    .clk, .rst_n, .a(tms_a[2:0]), .oe1_n(tms_we_n), .oe2_n(io_n), .den_n(tms_den_n),
    .wr_n(), .rd_n(io_rd_n), .wr_pulse(io_wr_pulse)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) we_q <= 1'b1;
    else        we_q <= tms_we_n;
  end

  always_comb begin
    in_bank = (tms_a >= bif_addr);
    // table write: first clock of WE, outside the I/O page, inside the bank
    bank_we = !tms_we_n && we_q && io_n && in_bank;
  end

  // ---------------- banks and bank switchers ----------------
  logic [BANK_AW-1:0] r1_addr, r2_addr;
  logic               r1_we, r2_we;
  logic [DW-1:0]      r1_wdata, r2_wdata, r1_rdata, r2_rdata;
  logic [DW-1:0]      h_rdata, d_rdata;

  bank_switcher #(.AW(BANK_AW), .DW(DW)) u_bsw (
    .sel(q2),
    .h_addr(sab[BANK_AW-1:0]), .h_we(exec_pulse.bank_write), .h_wdata(sdb_in), .h_rdata(h_rdata),
    .d_addr(tms_a[BANK_AW-1:0]), .d_we(bank_we), .d_wdata(tms_d_in), .d_rdata(d_rdata),
    .r1_addr, .r1_we, .r1_wdata, .r1_rdata,
    .r2_addr, .r2_we, .r2_wdata, .r2_rdata
  );

  ram_bank #(.WORDS(BANK_WORDS), .DW(DW)) u_ram1 (
    .clk, .we(r1_we), .addr(r1_addr), .wdata(r1_wdata), .rdata(r1_rdata)
  );
  ram_bank #(.WORDS(BANK_WORDS), .DW(DW)) u_ram2 (
    .clk, .we(r2_we), .addr(r2_addr), .wdata(r2_wdata), .rdata(r2_rdata)
  );

  logic [DW-1:0] prom_rdata;
  prom #(.WORDS(PROM_WORDS), .DW(DW), .INIT_FILE(PROM_INIT)) u_prom (
    .addr(tms_a[PROM_AW-1:0]), .rdata(prom_rdata)
  );

  // ---------------- timer, flags, run control ----------------
  sample_timer #(.TICK_DIV(TICK_DIV), .PRESET_W(PRESET_W)) u_tmr (
    .clk, .rst_n, .load(io_wr_pulse[PORT_TIMER]), .preset(tms_d_in[PRESET_W-1:0]),
    .int_n(tms_int_n), .preset_q()
  );

  logic [N_FLAGS-1:0] flags;
  logic               run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
      run   <= 1'b0;
    end else begin
      if (io_wr_pulse[PORT_FLAGS]) flags <= tms_d_in[N_FLAGS-1:0];
      if (exec_pulse.reset)      run <= 1'b0;
      else if (exec_pulse.run)   run <= 1'b1;
    end
  end
  assign tms_rs_n = run;

  // ---------------- status register ----------------
  logic [STAT_W-1:0] status_in;
  logic [SDB_W-1:0]  st_sdb;
  logic              st_oe;

  always_comb begin
    status_in                         = '0;
    status_in[ST_BANK]                = q2;
    status_in[ST_ACK]                 = q1;
    status_in[ST_RUN]                 = run;
    status_in[ST_FLAG0 +: N_FLAGS]    = flags;
  end

  status_reg u_st (
    .clk, .rst_n, .latch(exec_pulse.latch_status), .status_in,
    .rd_en(exec_level.status_read), .status_q(), .sdb_out(st_sdb), .sdb_oe(st_oe)
  );

  // ---------------- plant I/O ----------------
  logic [DW-1:0] pio_rdata;
  plant_io #(.PA_W(PA_W), .DW(DW)) u_pio (
    .clk, .rst_n,
    .wr_addr(io_wr_pulse[PORT_PLANT_ADDR]), .wr_data(io_wr_pulse[PORT_PLANT_DATA]),
    .rd_data(!io_rd_n[PORT_PLANT_DATA]), .dsp_wdata(tms_d_in), .dsp_rdata(pio_rdata),
    .plant_addr, .plant_dout, .plant_wr_n, .plant_rd_n, .plant_din
  );

  // ---------------- bus outputs ----------------
  always_comb begin
    sdb_oe  = st_oe || exec_level.bank_read;
    sdb_out = st_sdb | (exec_level.bank_read ? h_rdata : '0);
    if (!tms_men_n)      tms_d_out = in_bank ? d_rdata : prom_rdata;
    else if (!tms_den_n) tms_d_out = pio_rdata;
    else                 tms_d_out = '0;
  end

  // Only one command may drive the SDB at a time.
  always_comb begin
    assert (!(exec_level.bank_read && exec_level.status_read))
      else $error("dsp_card: bank read and status read drive SDB together");
  end
endmodule
