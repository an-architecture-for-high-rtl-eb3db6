// tb_sample_timer: with a short time base (TICK_DIV=5) loads several presets
// and checks that the interrupt comes every PRESET*TICK_DIV clocks exactly,
// lasts one clock, and that preset zero stops the timer.
module tb_sample_timer;
  localparam int DIV = 5;
  logic clk = 0, rst_n = 0, load = 0, int_n;
  logic [12:0] preset = 0, preset_q;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sample_timer #(.TICK_DIV(DIV), .PRESET_W(13)) dut (.clk, .rst_n, .load, .preset, .int_n, .preset_q);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p_list [4] = '{1, 3, 7, 20};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // stopped after reset
    repeat (50) begin
      @(negedge clk);
      chk(int_n, 1, "stopped after reset");
    end
    foreach (p_list[i]) begin
      longint t_load, t_last;
      preset = 13'(p_list[i]); load = 1;
      @(negedge clk);
      load = 0;
      t_load = cyc;
      t_last = t_load;
      chk(preset_q, p_list[i], "preset stored");
      for (int n = 0; n < 4; n++) begin
        int w;
        w = 0;
        while (int_n) begin
          @(negedge clk);
          w++;
          if (w > 10 * DIV * p_list[i]) break;
        end
        chk(cyc - t_last, DIV * p_list[i], "period");
        t_last = cyc;
        @(negedge clk);
        chk(int_n, 1, "one clock pulse");
      end
    end
    preset = 0; load = 1;
    @(negedge clk);
    load = 0;
    repeat (200) begin
      @(negedge clk);
      chk(int_n, 1, "stopped by preset 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
