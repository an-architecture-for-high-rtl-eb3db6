// tb_learning_workload: the robot experiment's data flow on the full-size system.
//
// One card of the eight-card system is used, as in the experiment; the others
// stay in reset. The emulated DSP runs a proportional-plus-derivative loop for
// three joints every 400 us (timer preset 4). The host exchanges banks every
// 20 ms, i.e. every 50 sampling instants (semaphore 49). Per exchange the host
// downloads the next 50-sample segment of the reference y_d and the learned
// feedforward v_k for each joint (300 words). Every other sample, the DSP logs
// the position error e and the controller output u' of each joint in its bank
// (150 words per exchange), and the host reads the log back after the switch.
//
// The plant is a simple integrating model per joint (q += u/8 at each D/A
// write), read over the card's plant data bus with the joint number on the
// plant address bus (joints 0..2 read, 16..18 write). The plant model records
// what it really saw and received; the host checks every logged word against
// that record (e = y_d - q, u' = u - v_k). It also checks that the banks change
// hands every 20 ms exactly (400000 clocks at 20 MHz) and that the DSP never
// found its semaphore run out without a pending request.
module tb_learning_workload;
  import card_pkg::*;

  localparam int N      = 8;
  localparam int J      = 3;       // joints
  localparam int SPX    = 50;      // samples per exchange (20 ms / 400 us)
  localparam int EXCH   = 4;       // exchanges simulated
  localparam int PERIOD = 400000;  // clocks in 20 ms at 20 MHz
  localparam logic [11:0] BIF = 12'h800;
  // bank layout (words)
  localparam int W_SEM = 0, W_CNT = 1;
  localparam int W_YD  = 16;                 // y_d[n][j]  : 16 + 3n + j
  localparam int W_VK  = W_YD + SPX * J;     // v_k[n][j]
  localparam int W_LOG = W_VK + SPX * J;     // log[m][j]  : e, u' pairs

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

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // ---------------- reference signals ----------------
  function automatic logic [15:0] yd(int t, int j);     // t = global sample
    return 16'(200 * j + 8 * t);
  endfunction
  function automatic logic [15:0] vk(int t, int j);
    return 16'(j + (t % 7));
  endfunction

  // ---------------- plant model (card 0) ----------------
  logic [15:0] q [J];
  // record of what the plant saw, per global sample and joint
  logic [15:0] rec_q [EXCH * SPX + SPX][J];
  logic [15:0] rec_u [EXCH * SPX + SPX][J];
  int sample = -1;          // global sample index, advanced by the DSP model

  always_comb begin
    plant_din[0] = (plant_addr[0] < 8'(J)) ? q[plant_addr[0][1:0]] : 16'h0;
    for (int k = 1; k < N; k++) plant_din[k] = '0;
  end

  always @(posedge clk) begin
    if (rst_n && plant_wr_n[0] === 1'b0 && plant_addr[0] >= 8'h10 && plant_addr[0] < 8'h10 + 8'(J)) begin
      int j;
      j = int'(plant_addr[0]) - 16;
      rec_u[sample][j] = plant_dout[0];
      q[j] <= q[j] + 16'($signed(plant_dout[0]) >>> 3);
    end
  end

  // ---------------- bus cycles ----------------
  task automatic host_cmd(input logic [7:0] cmd);
    @(negedge clk); sab = sab_command(3'd0, cmd);
    @(negedge clk); sab = '0;
  endtask
  task automatic host_exec(input int addr, input logic [15:0] data);
    @(negedge clk); sab = sab_execute(14'(addr)); sdb_in = data;
    @(negedge clk); sab = '0;
  endtask
  task automatic host_read(input int addr, output logic [15:0] data);
    @(negedge clk); sab = sab_execute(14'(addr));
    #1; data = sdb_out;
    @(negedge clk); sab = '0;
  endtask
  task automatic status(output logic [7:0] st);
    logic [15:0] d;
    host_cmd(CMD_LATCH_STATUS); host_exec(0, 0);
    host_cmd(CMD_STATUS_READ);  host_read(0, d);
    host_cmd(CMD_IDLE);
    st = d[7:0];
  endtask

  task automatic dsp_out(input logic [7:0] port, input logic [15:0] data);
    @(negedge clk); tms_a[0] = 12'(port); tms_d_in[0] = data; tms_we_n[0] = 0;
    repeat (2) @(negedge clk); tms_we_n[0] = 1;
  endtask
  task automatic dsp_in(input logic [7:0] port, output logic [15:0] data);
    @(negedge clk); tms_a[0] = 12'(port); tms_den_n[0] = 0;
    #1; data = tms_d_out[0];
    @(negedge clk); tms_den_n[0] = 1;
  endtask
  task automatic dsp_tblr(input int word, output logic [15:0] data);
    @(negedge clk); tms_a[0] = BIF + 12'(word); tms_men_n[0] = 0;
    #1; data = tms_d_out[0];
    @(negedge clk); tms_men_n[0] = 1;
  endtask
  task automatic dsp_tblw(input int word, input logic [15:0] data);
    @(negedge clk); tms_a[0] = BIF + 12'(word); tms_d_in[0] = data; tms_we_n[0] = 0;
    repeat (2) @(negedge clk); tms_we_n[0] = 1;
  endtask

  // ---------------- DSP program of card 0 ----------------
  int dsp_errors = 0, dsp_switches = 0;
  initial begin
    logic [15:0] sem, n, y, v, pos, e, up, u;
    logic [15:0] e_prev [J];
    for (int j = 0; j < J; j++) e_prev[j] = 0;
    for (int k = 0; k < N; k++) begin
      card_id[k] = 3'(k); bif_addr[k] = BIF;
      tms_a[k] = 0; tms_d_in[k] = 0;
      tms_men_n[k] = 1; tms_we_n[k] = 1; tms_den_n[k] = 1;
    end
    for (int j = 0; j < J; j++) q[j] = 16'(100 * j);
    while (rst_n !== 1'b1 || tms_rs_n[0] !== 1'b1) @(negedge clk);
    // the PROM would hold this set-up code: 400 us sampling
    dsp_out(8'(PORT_TIMER), 16'd4);
    forever begin
      while (tms_int_n[0] !== 1'b0) @(negedge clk);
      dsp_tblr(W_SEM, sem);
      if (sem == 0) begin
        if (tms_bio_n[0] == 1'b0) begin
          dsp_out(8'(PORT_SWITCH), 0);
          dsp_switches++;
        end else dsp_errors++;
      end else begin
        dsp_tblw(W_SEM, sem - 1'b1);
      end
      sample++;
      dsp_tblr(W_CNT, n);
      for (int j = 0; j < J; j++) begin
        dsp_tblr(W_YD + 3 * int'(n) + j, y);
        dsp_tblr(W_VK + 3 * int'(n) + j, v);
        dsp_out(8'(PORT_PLANT_ADDR), 16'(j));
        dsp_in(8'(PORT_PLANT_DATA), pos);
        rec_q[sample][j] = pos;
        e  = y - pos;
        up = (e <<< 2) + (e - e_prev[j]);
        e_prev[j] = e;
        u  = up + v;
        dsp_out(8'(PORT_PLANT_ADDR), 16'(16 + j));
        dsp_out(8'(PORT_PLANT_DATA), u);
        if (n[0] == 1'b0) begin
          dsp_tblw(W_LOG + 6 * int'(n >> 1) + 2 * j, e);
          dsp_tblw(W_LOG + 6 * int'(n >> 1) + 2 * j + 1, up);
        end
      end
      dsp_tblw(W_CNT, n + 1'b1);
      dsp_out(8'(PORT_FLAGS), {11'd0, 1'(dsp_errors != 0), 4'(dsp_switches)});
    end
  end

  // ---------------- bank exchange instants ----------------
  longint sw_time [$];
  always @(posedge clk) if (rst_n && tms_bio_n[0] === 1'b0 && dut.g_card[0].u_card.u_rc.q1 === 1'b1
                            && tms_we_n[0] === 1'b0 && tms_a[0] == 12'(PORT_SWITCH)
                            && dut.g_card[0].u_card.io_wr_pulse[PORT_SWITCH])
    sw_time.push_back(cyc);

  initial begin
    repeat (EXCH * PERIOD + 3 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host (XT286 role) ----------------
  task automatic write_segment(input int seg);
    // segment seg covers global samples that the bank will serve
    host_cmd(CMD_BANK_WRITE);
    host_exec(W_SEM, 16'(SPX - 1));
    host_exec(W_CNT, 0);
    for (int n = 0; n < SPX; n++)
      for (int j = 0; j < J; j++) begin
        host_exec(W_YD + 3 * n + j, yd(seg_base(seg) + n, j));
        host_exec(W_VK + 3 * n + j, vk(seg_base(seg) + n, j));
      end
    host_cmd(CMD_IDLE);
  endtask

  // first global sample served by segment seg: the start-up bank serves
  // SPX-1 samples (no switch sample), later banks SPX each
  function automatic int seg_base(int seg);
    return (seg == 0) ? 0 : (SPX - 1) + (seg - 1) * SPX;
  endfunction
  function automatic int seg_len(int seg);
    return (seg == 0) ? SPX - 1 : SPX;
  endfunction

  initial begin
    logic [7:0] st;
    logic [15:0] d;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // download: segment 0 into the bank the DSP will start on
    write_segment(0);
    host_cmd(CMD_FORCE_SWITCH); host_exec(0, 0); host_cmd(CMD_IDLE);
    host_cmd(CMD_RUN); host_exec(0, 0); host_cmd(CMD_IDLE);
    for (int x = 1; x <= EXCH; x++) begin
      write_segment(x);
      host_cmd(CMD_SWITCH_REQ); host_exec(0, 0); host_cmd(CMD_IDLE);
      do begin
        repeat (200) @(negedge clk);
        status(st);
      end while (st[ST_ACK]);
      // the log of segment x-1 is now on the host side
      host_cmd(CMD_BANK_READ);
      for (int n = 0; n < seg_len(x - 1); n += 2)
        for (int j = 0; j < J; j++) begin
          int t;
          logic [15:0] e_exp, up_exp;
          t = seg_base(x - 1) + n;
          e_exp  = yd(t, j) - rec_q[t][j];
          up_exp = rec_u[t][j] - vk(t, j);
          host_read(W_LOG + 6 * (n >> 1) + 2 * j, d);
          chk(32'(d), 32'(e_exp), "logged position error");
          host_read(W_LOG + 6 * (n >> 1) + 2 * j + 1, d);
          chk(32'(d), 32'(up_exp), "logged controller output");
        end
      host_cmd(CMD_IDLE);
    end
    status(st);
    chk(32'(st[7:3]), 32'({1'b0, 4'(EXCH)}), "no semaphore overrun, switch count");
    // bank exchanges 20 ms apart
    chk(32'(sw_time.size()), EXCH, "number of exchanges");
    for (int i = 1; i < sw_time.size(); i++)
      chk(32'(sw_time[i] - sw_time[i - 1]), PERIOD, "20 ms between exchanges");
    $display("exchanges %0d, samples %0d, log words checked %0d", sw_time.size(), sample + 1, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
