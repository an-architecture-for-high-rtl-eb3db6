// tb_dsp_system: end-to-end run of eight DSP cards on one host, at the
// design's default sizes (2-kword banks, 100 us timer base at a 20 MHz clock).
//
// The testbench plays the host and the eight processors. The host downloads a
// code word and the start-up parameters into both banks of every card while
// the DSPs are held in reset (using a forced bank switch to reach the second
// bank), starts all cards with one broadcast CE, and then runs the host loop:
// write new input data and a semaphore value into its banks, broadcast a bank
// switch request, poll every card's status until ACK falls, and read the
// results the DSPs left in the banks now handed back. Each processor runs the
// DSP loop: at every timer interrupt it counts its semaphore down and, at zero,
// honours a pending request by switching the banks; then it reads its input,
// reads the plant, writes the plant and writes its output and a sample count
// back to the bank. Results are checked against values computed here: output =
// input + plant value, sample count per bank = semaphore + 1, card flags =
// number of switches. Every mechanism is counted and must occur.
module tb_dsp_system;
  import card_pkg::*;

  localparam int N    = 8;
  localparam int S    = 2;        // semaphore value written by the host
  localparam int ITER = 4;        // host loop iterations
  localparam logic [11:0] BIF = 12'h800;
  localparam int W_SEM = 16, W_DIN = 17, W_DOUT = 18, W_CNT = 19, W_CODE = 40;

  logic clk = 0, rst_n = 0;
  logic [15:0] sab = 0, sdb_in = 0, sdb_out;
  logic        sdb_oe;
  logic [2:0]  card_id  [N];
  logic [11:0] bif_addr [N];
  logic [11:0] tms_a    [N];
  logic [15:0] tms_d_in [N], tms_d_out [N];
  logic        tms_men_n [N], tms_we_n [N], tms_den_n [N];
  logic        tms_bio_n [N], tms_int_n [N], tms_rs_n [N];
  logic [7:0]  plant_addr [N];
  logic [15:0] plant_dout [N], plant_din [N];
  logic        plant_wr_n [N], plant_rd_n [N];

  dsp_system dut (.*);

  always #25 clk = ~clk;   // 20 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_broadcast = 0, n_bank_write = 0, n_bank_read = 0, n_status_read = 0;
  int n_switch_req = 0, n_deferred = 0, n_switch = 0, n_forced = 0, n_run = 0;
  int n_reset = 0, n_timer = 0, n_plant_wr = 0, n_plant_rd = 0, n_prom = 0;
  int n_tblw = 0, n_code = 0, n_idle_ignored = 0;
  int switches [N];
  int errors   [N];

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  function automatic logic [15:0] plant_val(int k);
    return 16'(16'h0100 * (k + 1));
  endfunction

  function automatic logic [15:0] din_val(int k, int i);
    return 16'(k * 16'h1000 + i * 16'h10 + 1);
  endfunction

  // ---------------- host bus cycles ----------------
  task automatic host_cmd(input int card, input logic [7:0] cmd);
    @(negedge clk);
    sab = sab_command(3'(card), cmd);
    @(negedge clk);
    sab = '0;
  endtask

  task automatic host_exec(input int addr, input logic [15:0] data);
    @(negedge clk);
    sab = sab_execute(14'(addr));
    sdb_in = data;
    @(negedge clk);
    sab = '0;
  endtask

  task automatic host_read(input int addr, output logic [15:0] data);
    @(negedge clk);
    sab = sab_execute(14'(addr));
    #1;
    checks++;
    if (!sdb_oe) begin
      failures++;
      $display("FAIL nobody drives SDB on read at %0t", $time);
    end
    data = sdb_out;
    @(negedge clk);
    sab = '0;
  endtask

  task automatic bank_write(input int card, input int addr, input logic [15:0] data);
    host_cmd(card, CMD_BANK_WRITE);
    host_exec(addr, data);
    host_cmd(card, CMD_IDLE);
    n_bank_write++;
  endtask

  task automatic bank_read(input int card, input int addr, output logic [15:0] data);
    host_cmd(card, CMD_BANK_READ);
    host_read(addr, data);
    host_cmd(card, CMD_IDLE);
    n_bank_read++;
  endtask

  task automatic status_read(input int card, output logic [7:0] st);
    logic [15:0] d;
    host_cmd(card, CMD_LATCH_STATUS);
    host_exec(0, 0);
    host_cmd(card, CMD_STATUS_READ);
    host_read(0, d);
    host_cmd(card, CMD_IDLE);
    chk(32'(d[15:8]), 0, "status upper bits");
    st = d[7:0];
    n_status_read++;
  endtask

  task automatic broadcast(input logic [7:0] cmd);
    for (int c = 0; c < N; c++) host_cmd(c, cmd);
    host_exec(0, 0);
    for (int c = 0; c < N; c++) host_cmd(c, CMD_IDLE);
    n_broadcast++;
  endtask

  // ---------------- DSP bus cycles ----------------
  task automatic dsp_out(input int k, input logic [2:0] port, input logic [15:0] data);
    @(negedge clk);
    tms_a[k] = 12'(port); tms_d_in[k] = data; tms_we_n[k] = 0;
    repeat (2) @(negedge clk);
    tms_we_n[k] = 1;
  endtask

  task automatic dsp_in(input int k, input logic [2:0] port, output logic [15:0] data);
    @(negedge clk);
    tms_a[k] = 12'(port); tms_den_n[k] = 0;
    #1;
    data = tms_d_out[k];
    if (port == PORT_PLANT_DATA) begin
      checks++;
      if (plant_rd_n[k] !== 1'b0) begin
        failures++;
        $display("FAIL plant read strobe card %0d", k);
      end
      n_plant_rd++;
    end
    @(negedge clk);
    tms_den_n[k] = 1;
  endtask

  task automatic dsp_tblr(input int k, input logic [11:0] addr, output logic [15:0] data);
    @(negedge clk);
    tms_a[k] = addr; tms_men_n[k] = 0;
    #1;
    data = tms_d_out[k];
    @(negedge clk);
    tms_men_n[k] = 1;
  endtask

  task automatic dsp_tblw(input int k, input logic [11:0] addr, input logic [15:0] data);
    @(negedge clk);
    tms_a[k] = addr; tms_d_in[k] = data; tms_we_n[k] = 0;
    repeat (2) @(negedge clk);
    tms_we_n[k] = 1;
    n_tblw++;
  endtask

  // The DSP loop of one card.
  task automatic dsp_proc(input int k);
    logic [15:0] sem, x, y, c, code, pw;
    while (rst_n !== 1'b1 || tms_rs_n[k] !== 1'b1) @(negedge clk);
    dsp_out(k, PORT_TIMER, 16'd1);
    dsp_tblr(k, BIF + 12'(W_CODE), code);
    chk(32'(code), 32'(16'hC0DE ^ 16'(k)), "downloaded code word");
    n_code++;
    dsp_tblr(k, 12'(W_SEM), pw);   // below the bifurcation address: PROM
    chk(32'(pw), 0, "PROM read below bifurcation");
    n_prom++;
    forever begin
      while (tms_int_n[k] !== 1'b0) @(negedge clk);
      n_timer++;
      dsp_tblr(k, BIF + 12'(W_SEM), sem);
      if (sem == 0) begin
        if (tms_bio_n[k] == 1'b0) begin
          dsp_out(k, PORT_SWITCH, 0);
          switches[k]++;
          n_switch++;
        end else begin
          errors[k]++;
        end
      end else begin
        if (tms_bio_n[k] == 1'b0) n_deferred++;
        dsp_tblw(k, BIF + 12'(W_SEM), sem - 1'b1);
      end
      dsp_tblr(k, BIF + 12'(W_DIN), x);
      dsp_in(k, PORT_PLANT_DATA, y);
      chk(32'(y), 32'(plant_val(k)), "plant input");
      dsp_out(k, PORT_PLANT_ADDR, 16'(k));
      dsp_out(k, PORT_PLANT_DATA, x + y);
      dsp_tblw(k, BIF + 12'(W_DOUT), x + y);
      dsp_tblr(k, BIF + 12'(W_CNT), c);
      dsp_tblw(k, BIF + 12'(W_CNT), c + 1'b1);
      dsp_out(k, PORT_FLAGS, 16'({(errors[k] != 0), 4'(switches[k])}));
    end
  endtask

  // plant write strobes
  always @(posedge clk) for (int k = 0; k < N; k++) if (plant_wr_n[k] === 1'b0) n_plant_wr++;

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      card_id[k] = 3'(7 - k);    // jumpers in reverse order of the slots
      bif_addr[k] = BIF;
      tms_a[k] = 0; tms_d_in[k] = 0;
      tms_men_n[k] = 1; tms_we_n[k] = 1; tms_den_n[k] = 1;
      plant_din[k] = plant_val(k);
      switches[k] = 0; errors[k] = 0;
    end
    for (int k = 0; k < N; k++) begin
      fork
        automatic int kk = k;
        dsp_proc(kk);
      join_none
    end
  end

  // card slot of card address a is 7-a
  function automatic int slot(int a);
    return 7 - a;
  endfunction

  // ---------------- the host ----------------
  initial begin
    logic [15:0] d;
    logic [7:0]  st;
    logic [7:0]  bank_before [N];
    logic [15:0] exp16;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      chk(32'(tms_rs_n[slot(c)]), 0, "DSP held in reset after power-up");
    end
    // ---- download into both banks ----
    for (int b = 0; b < 2; b++) begin
      for (int c = 0; c < N; c++) begin
        bank_write(c, W_CODE, 16'hC0DE ^ 16'(slot(c)));
        bank_write(c, W_SEM, 16'(S));
        bank_write(c, W_DIN, 16'hF00 + 16'(slot(c)));
        bank_write(c, W_CNT, 0);
        bank_read(c, W_CODE, d);
        chk(32'(d), 32'(16'hC0DE ^ 16'(slot(c))), "bank read back");
      end
      if (b == 0) begin
        broadcast(CMD_FORCE_SWITCH);
        n_forced++;
      end
    end
    // an idle card ignores CE: card 0 holds idle while card 1 writes
    host_cmd(1, CMD_BANK_WRITE);
    host_exec(100, 16'h5A5A);
    host_cmd(1, CMD_IDLE);
    bank_read(0, 100, d);
    checks++;
    if (d == 16'h5A5A) begin failures++; $display("FAIL idle card executed a write"); end
    else n_idle_ignored++;
    bank_read(1, 100, d);
    chk(32'(d), 32'h5A5A, "addressed card wrote");
    for (int c = 0; c < N; c++) begin
      status_read(c, st);
      chk(32'(st[ST_BANK]), 1, "forced switch flipped the banks");
      chk(32'(st[ST_RUN]), 0, "not running yet");
    end
    // ---- start all cards at once ----
    broadcast(CMD_RUN);
    n_run++;
    @(negedge clk);
    for (int c = 0; c < N; c++) chk(32'(tms_rs_n[c]), 1, "running");
    // ---- host loop ----
    for (int i = 0; i < ITER; i++) begin
      for (int c = 0; c < N; c++) begin
        bank_write(c, W_DIN, din_val(slot(c), i));
        bank_write(c, W_SEM, 16'(S));
        bank_write(c, W_CNT, 0);
        status_read(c, st);
        bank_before[c] = 8'(st[ST_BANK]);
      end
      broadcast(CMD_SWITCH_REQ);
      n_switch_req++;
      for (int c = 0; c < N; c++) begin
        int polls;
        polls = 0;
        do begin
          status_read(c, st);
          polls++;
          repeat (50) @(negedge clk);
        end while (st[ST_ACK] && polls < 2000);
        chk(32'(st[ST_ACK]), 0, "request acknowledged");
        chk(32'(st[ST_BANK]), 32'(!bank_before[c][0]), "banks exchanged");
        // results left by the DSP in the bank now on the host side
        bank_read(c, W_DOUT, d);
        exp16 = (i == 0) ? 16'hF00 + 16'(slot(c)) : din_val(slot(c), i - 1);
        exp16 = exp16 + plant_val(slot(c));
        chk(32'(d), 32'(exp16), "DSP output");
        bank_read(c, W_CNT, d);
        chk(32'(d), 32'(i == 0 ? S : S + 1), "samples per bank");
        bank_read(c, W_SEM, d);
        chk(32'(d), 0, "semaphore ran out");
      end
    end
    // flags written by the DSPs: no error, number of switches
    repeat (20) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      status_read(c, st);
      chk(32'(st[7:3]), 32'({1'b0, 4'(ITER)}), "card flags");
      chk(32'(plant_addr[slot(c)]), 32'(slot(c)), "plant address bus");
      exp16 = din_val(slot(c), ITER - 1) + plant_val(slot(c));
      chk(32'(plant_dout[slot(c)]), 32'(exp16), "plant data bus");
    end
    // ---- stop all cards ----
    broadcast(CMD_RESET);
    n_reset++;
    @(negedge clk);
    for (int c = 0; c < N; c++) chk(32'(tms_rs_n[c]), 0, "stopped");
    // ---- every mechanism must have happened ----
    begin
      int cnt [string];
      cnt["broadcast CE"] = n_broadcast;   cnt["host bank write"] = n_bank_write;
      cnt["host bank read"] = n_bank_read; cnt["status read"] = n_status_read;
      cnt["switch request"] = n_switch_req; cnt["request deferred by semaphore"] = n_deferred;
      cnt["DSP bank switch"] = n_switch;   cnt["forced bank switch"] = n_forced;
      cnt["run"] = n_run;                  cnt["reset"] = n_reset;
      cnt["timer interrupt"] = n_timer;    cnt["plant write"] = n_plant_wr;
      cnt["plant read"] = n_plant_rd;      cnt["PROM read"] = n_prom;
      cnt["table write"] = n_tblw;         cnt["code download"] = n_code;
      cnt["idle card ignores CE"] = n_idle_ignored;
      foreach (cnt[m]) begin
        $display("mechanism %-30s %0d", m, cnt[m]);
        checks++;
        if (cnt[m] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", m);
        end
      end
      checks++;
      if (n_switch != N * ITER) begin
        failures++;
        $display("FAIL %0d bank switches, expected %0d", n_switch, N * ITER);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
