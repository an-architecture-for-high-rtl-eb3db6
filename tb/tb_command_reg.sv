// tb_command_reg: checks latching on `load`, that an execute pulse appears only
// on the first clock of CE and carries the stored command, that the level
// output follows CE, that a command stays stored across many executions and
// that idle executes nothing.
module tb_command_reg;
  import card_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, ce = 0;
  logic [7:0] cmd_in = 0;
  cmd_t cmd_q, exec_pulse, exec_level;
  int checks = 0, failures = 0;

  command_reg dut (.clk, .rst_n, .load, .cmd_in, .ce, .cmd_q, .exec_pulse, .exec_level);

  always #5 clk = ~clk;

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] stored;
    stored = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cmd_q, 8'h00, "reset idle");
    for (int it = 0; it < 40; it++) begin
      logic [7:0] c;
      c = 8'(1 << $urandom_range(0, 7));
      if (it % 7 == 3) c = CMD_IDLE;
      // latch
      cmd_in = c; load = 1;
      @(negedge clk);
      load = 0; cmd_in = ~c;
      stored = c;
      chk(cmd_q, stored, "latched");
      chk(exec_pulse, 8'h00, "no pulse without CE");
      // several executions of the same stored command
      for (int e = 0; e < 3; e++) begin
        ce = 1;
        #1;
        chk(exec_pulse, stored, "pulse on CE rise");
        chk(exec_level, stored, "level while CE");
        @(negedge clk);
        chk(exec_pulse, 8'h00, "pulse lasts one clock");
        chk(exec_level, stored, "level held");
        ce = 0;
        #1;
        chk(exec_level, 8'h00, "level drops with CE");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
