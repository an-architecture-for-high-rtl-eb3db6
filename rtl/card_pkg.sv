// card_pkg: shared constants and types of the DSP card.
//
// The host talks to every card over two 16-bit system buses: the system address
// bus (SAB) for addresses and commands, and the system data bus (SDB) for data.
// SAB[13:0] carries a bank word address; the two remaining bits are ATN (the
// word on SAB is a command for the card whose address it holds) and CE (execute
// the command already latched). The 14-bit address width and the use of the two
// spare bits follow the design description; which bit is which, and where the
// card address and command sit inside a command word, are this design's choice.
//
// The command register holds one line per command (Table of main commands);
// "idle" is the all-zero word. Line 1 is the bank switch request (CHGREQ), as
// in the bank switching schematic; the other line numbers are this design's
// choice. The status register bit 1 is ACK (pending request flip-flop Q1), as in
// that schematic; the other status bits are this design's choice. I/O port 0 is
// the bank switch strobe, as in the schematic; the other port numbers are chosen
// here.
package card_pkg;

  // ---- system address bus (SAB) ----
  localparam int unsigned SAB_W      = 16;
  localparam int unsigned SDB_W      = 16;
  localparam int unsigned SAB_ADDR_W = 14;   // bank word address field SAB[13:0]
  localparam int unsigned SAB_ATN    = 15;   // command / address qualifier
  localparam int unsigned SAB_CE     = 14;   // command execute
  localparam int unsigned CARD_AW    = 3;    // up to eight cards
  localparam int unsigned SAB_CARD_LSB = 8;  // card address in SAB[10:8] when ATN=1
  localparam int unsigned CMD_W      = 8;    // command in SAB[7:0] when ATN=1
  localparam int unsigned STAT_W     = 8;    // status register width (on SDB[7:0])

  // ---- command register lines (OUT0..OUT7) ----
  typedef struct packed {
    logic force_switch;  // OUT7: forced bank switching (download only)
    logic reset;         // OUT6: hold the DSP in reset (download only)
    logic run;           // OUT5: release the DSP (download only)
    logic status_read;   // OUT4: drive the status register on SDB
    logic latch_status;  // OUT3: latch the card status
    logic bank_read;     // OUT2: read host-side bank word onto SDB
    logic switch_req;    // OUT1: CHGREQ, bank switch request
    logic bank_write;    // OUT0: write SDB into host-side bank
  } cmd_t;

  localparam logic [CMD_W-1:0] CMD_IDLE         = 8'h00;
  localparam logic [CMD_W-1:0] CMD_BANK_WRITE   = 8'h01;
  localparam logic [CMD_W-1:0] CMD_SWITCH_REQ   = 8'h02;
  localparam logic [CMD_W-1:0] CMD_BANK_READ    = 8'h04;
  localparam logic [CMD_W-1:0] CMD_LATCH_STATUS = 8'h08;
  localparam logic [CMD_W-1:0] CMD_STATUS_READ  = 8'h10;
  localparam logic [CMD_W-1:0] CMD_RUN          = 8'h20;
  localparam logic [CMD_W-1:0] CMD_RESET        = 8'h40;
  localparam logic [CMD_W-1:0] CMD_FORCE_SWITCH = 8'h80;

  // ---- status register inputs (IN0..IN7) ----
  localparam int unsigned ST_BANK  = 0;  // Q2: which bank the host sees
  localparam int unsigned ST_ACK   = 1;  // Q1: switch request still pending
  localparam int unsigned ST_RUN   = 2;  // DSP released from reset
  localparam int unsigned ST_FLAG0 = 3;  // IN3..IN7: flags written by the DSP
  localparam int unsigned N_FLAGS  = 5;

  // ---- DSP I/O port map (TMS OUT/IN port numbers on A2..A0) ----
  localparam logic [2:0] PORT_SWITCH     = 3'd0;  // OUT: switch the banks
  localparam logic [2:0] PORT_TIMER      = 3'd1;  // OUT: sampling timer preset
  localparam logic [2:0] PORT_PLANT_ADDR = 3'd2;  // OUT: plant address bus latch
  localparam logic [2:0] PORT_PLANT_DATA = 3'd3;  // OUT/IN: plant data bus
  localparam logic [2:0] PORT_FLAGS      = 3'd4;  // OUT: card flags (status IN3..IN7)

  // Build a command word for the SAB: ATN=1, card address, command lines.
  function automatic logic [SAB_W-1:0] sab_command(input logic [CARD_AW-1:0] card,
                                                   input logic [CMD_W-1:0] cmd);
    logic [SAB_W-1:0] w;
    w = '0;
    w[SAB_ATN] = 1'b1;
    w[SAB_CARD_LSB +: CARD_AW] = card;
    w[CMD_W-1:0] = cmd;
    return w;
  endfunction

  // Build an execute word for the SAB: CE=1 with a bank word address.
  function automatic logic [SAB_W-1:0] sab_execute(input logic [SAB_ADDR_W-1:0] addr);
    logic [SAB_W-1:0] w;
    w = '0;
    w[SAB_CE] = 1'b1;
    w[SAB_ADDR_W-1:0] = addr;
    return w;
  endfunction

endpackage
