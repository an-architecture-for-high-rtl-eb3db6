// tb_dsp_card: directed checks of one DSP card with a small PROM image and a
// short timer base. Covers: commands for another card address ignored; one
// command transfer followed by many CE executions (block bank write and read);
// CE on a command word ignored; DSP address bits select the bank word; the Y-shaped program space moving with the
// bifurcation jumpers; table writes reaching only the DSP-side bank, never the
// PROM region or the I/O page; the full switch handshake (request, BIO low,
// ACK high, OUT to port 0, banks exchanged, ACK low); forced switching; the
// timer period; plant ports; card flags in the status register; run and reset.
module tb_dsp_card;
  import card_pkg::*;

  localparam int DIV = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0]  card_id = 3'd5;
  logic [11:0] bif_addr = 12'h040;
  logic [15:0] sab = 0, sdb_in = 0, sdb_out;
  logic        sdb_oe;
  logic [11:0] tms_a = 0;
  logic [15:0] tms_d_in = 0, tms_d_out;
  logic        tms_men_n = 1, tms_we_n = 1, tms_den_n = 1;
  logic        tms_bio_n, tms_int_n, tms_rs_n;
  logic [7:0]  plant_addr;
  logic [15:0] plant_dout, plant_din = 16'hBEEF;
  logic        plant_wr_n, plant_rd_n;

  dsp_card #(.BANK_WORDS(2048), .PROM_WORDS(64), .TICK_DIV(DIV), .PROM_INIT("tb/prom_test.hex")) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  function automatic logic [15:0] prom_word(int i);
    return 16'(i * 16'h1357 + 16'h2468);
  endfunction

  task automatic host_cmd(input int card, input logic [7:0] cmd);
    @(negedge clk); sab = sab_command(3'(card), cmd);
    @(negedge clk); sab = '0;
  endtask
  task automatic host_exec(input int addr, input logic [15:0] data);
    @(negedge clk); sab = sab_execute(14'(addr)); sdb_in = data;
    @(negedge clk); sab = '0;
  endtask
  task automatic host_read(input int addr, output logic [15:0] data, output logic oe);
    @(negedge clk); sab = sab_execute(14'(addr));
    #1; data = sdb_out; oe = sdb_oe;
    @(negedge clk); sab = '0;
  endtask
  task automatic status(output logic [7:0] st);
    logic [15:0] d; logic oe;
    host_cmd(5, CMD_LATCH_STATUS); host_exec(0, 0);
    host_cmd(5, CMD_STATUS_READ);  host_read(0, d, oe);
    host_cmd(5, CMD_IDLE);
    st = d[7:0];
  endtask

  task automatic dsp_out(input logic [2:0] port, input logic [15:0] data);
    @(negedge clk); tms_a = 12'(port); tms_d_in = data; tms_we_n = 0;
    repeat (3) @(negedge clk); tms_we_n = 1;
  endtask
  task automatic dsp_tblw(input logic [11:0] addr, input logic [15:0] data);
    @(negedge clk); tms_a = addr; tms_d_in = data; tms_we_n = 0;
    repeat (2) @(negedge clk); tms_we_n = 1;
  endtask
  task automatic dsp_tblr(input logic [11:0] addr, output logic [15:0] data);
    @(negedge clk); tms_a = addr; tms_men_n = 0;
    #1; data = tms_d_out;
    @(negedge clk); tms_men_n = 1;
  endtask
  task automatic dsp_in(input logic [2:0] port, output logic [15:0] data);
    @(negedge clk); tms_a = 12'(port); tms_den_n = 0;
    #1; data = tms_d_out;
    @(negedge clk); tms_den_n = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d; logic oe; logic [7:0] st;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(tms_rs_n, 0, "reset after power-up");
    chk(tms_bio_n, 1, "no request after power-up");
    // block write with one command transfer: 96 words
    host_cmd(5, CMD_BANK_WRITE);
    for (int i = 0; i < 96; i++) host_exec(i, 16'hA000 + 16'(i));
    host_cmd(5, CMD_IDLE);
    // command for another card is ignored
    host_cmd(2, CMD_BANK_WRITE);
    host_exec(7, 16'h1111);
    host_cmd(2, CMD_IDLE);
    // a command word with CE set must not execute
    @(negedge clk); sab = sab_command(3'd5, CMD_BANK_WRITE); sab[SAB_CE] = 1; sdb_in = 16'hDEAD;
    @(negedge clk); sab = '0;
    host_cmd(5, CMD_BANK_READ);
    for (int i = 0; i < 96; i++) begin
      host_read(i, d, oe);
      chk(d, 16'hA000 + 16'(i), "block read");
      chk(oe, 1, "card drives SDB on read");
    end
    host_read(16'h501, d, oe);
    checks++;
    if (d == 16'hDEAD) begin failures++; $display("FAIL CE on a command word executed"); end
    host_cmd(5, CMD_IDLE);
    host_read(0, d, oe);
    chk(oe, 0, "idle card does not drive SDB");
    // forced switch while in reset: host now sees the other bank
    host_cmd(5, CMD_FORCE_SWITCH); host_exec(0, 0);
    host_cmd(5, CMD_BANK_WRITE);
    for (int i = 0; i < 96; i++) host_exec(i, 16'hB000 + 16'(i));
    host_cmd(5, CMD_IDLE);
    status(st);
    chk(st[ST_BANK], 1, "forced switch");
    // run
    host_cmd(5, CMD_RUN); host_exec(0, 0); host_cmd(5, CMD_IDLE);
    chk(tms_rs_n, 1, "run");
    // DSP side: bank A (0xA0xx) is now the DSP's; PROM below 0x040
    for (int i = 0; i < 32; i++) begin
      dsp_tblr(12'h040 + 12'(i), d);
      chk(d, 16'hA040 + 16'(i), "DSP reads its bank above bifurcation");
    end
    for (int i = 0; i < 64; i += 5) begin
      dsp_tblr(12'(i), d);
      chk(d, prom_word(i), "DSP reads PROM below bifurcation");
    end
    // table writes: bank, PROM region, I/O page
    dsp_tblw(12'h045, 16'h5555);
    dsp_tblw(12'h025, 16'h6666);      // PROM region: no effect
    dsp_tblr(12'h045, d); chk(d, 16'h5555, "table write to bank");
    dsp_tblr(12'h025, d); chk(d, prom_word(16'h25), "PROM unchanged");
    dsp_tblr(12'h005, d); chk(d, prom_word(5), "PROM word 5");
    // move the bifurcation: 0x020 and up is now bank (word 0x025 = A025)
    bif_addr = 12'h020;
    dsp_tblr(12'h025, d); chk(d, 16'hA025, "bifurcation moved by jumpers");
    dsp_tblr(12'h01F, d); chk(d, prom_word(16'h1F), "still PROM below");
    bif_addr = 12'h040;
    // host side still sees bank B
    host_cmd(5, CMD_BANK_READ);
    host_read(16'h45, d, oe); chk(d, 16'hB045, "host bank untouched by DSP");
    host_cmd(5, CMD_IDLE);
    // handshake
    host_cmd(5, CMD_SWITCH_REQ); host_exec(0, 0); host_cmd(5, CMD_IDLE);
    chk(tms_bio_n, 0, "BIO low on request");
    status(st);
    chk(st[ST_ACK], 1, "ACK high while pending");
    dsp_out(PORT_SWITCH, 0);
    chk(tms_bio_n, 1, "BIO released");
    status(st);
    chk(st[ST_ACK], 0, "ACK low after switch");
    chk(st[ST_BANK], 0, "banks exchanged");
    host_cmd(5, CMD_BANK_READ);
    host_read(16'h45, d, oe); chk(d, 16'h5555, "host gets DSP's bank with its table write");
    host_cmd(5, CMD_IDLE);
    dsp_tblr(12'h045, d); chk(d, 16'hB045, "DSP gets host's bank");
    // timer: preset 3 -> interrupt every 3*DIV clocks
    dsp_out(PORT_TIMER, 16'd3);
    begin
      longint t0;
      while (tms_int_n) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      while (tms_int_n) @(negedge clk);
      chk(32'(cyc - t0), 3 * DIV, "sampling period");
    end
    // plant ports
    dsp_out(PORT_PLANT_ADDR, 16'h0042);
    chk(plant_addr, 8'h42, "plant address");
    dsp_out(PORT_PLANT_DATA, 16'h1234);
    chk(plant_dout, 16'h1234, "plant data out");
    dsp_in(PORT_PLANT_DATA, d);
    chk(d, 16'hBEEF, "plant data in");
    // flags
    dsp_out(PORT_FLAGS, 16'h0015);
    status(st);
    chk(st[7:3], 5'h15, "card flags");
    chk(st[ST_RUN], 1, "running");
    // reset command
    host_cmd(5, CMD_RESET); host_exec(0, 0); host_cmd(5, CMD_IDLE);
    chk(tms_rs_n, 0, "reset command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
