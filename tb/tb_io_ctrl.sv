// tb_io_ctrl: for every port number and every combination of WE, DEN and the
// internal address comparator, checks the write and read decoder outputs; then
// holds WE low for several clocks and checks that the write pulse lasts one.
module tb_io_ctrl;
  logic clk = 0, rst_n = 0, oe1_n = 1, oe2_n = 1, den_n = 1;
  logic [2:0] a = 0;
  logic [7:0] wr_n, rd_n, wr_pulse;
  int checks = 0, failures = 0;

  io_ctrl dut (.clk, .rst_n, .a, .oe1_n, .oe2_n, .den_n, .wr_n, .rd_n, .wr_pulse);

  always #5 clk = ~clk;

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s port %0d: got %h expected %h", what, a, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++)
      for (int m = 0; m < 8; m++) begin
        a = 3'(p); oe1_n = m[0]; oe2_n = m[1]; den_n = m[2];
        #1;
        chk(wr_n, (!oe1_n && !oe2_n) ? ~(8'h01 << p) : 8'hFF, "wr_n");
        chk(rd_n, (!den_n && !oe2_n) ? ~(8'h01 << p) : 8'hFF, "rd_n");
        @(negedge clk);
        oe1_n = 1; den_n = 1;
        @(negedge clk);
      end
    for (int p = 0; p < 8; p++) begin
      a = 3'(p); oe2_n = 0; oe1_n = 0;
      #1;
      chk(wr_pulse, 8'h01 << p, "pulse first clock");
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        chk(wr_pulse, 8'h00, "no pulse while held");
      end
      oe1_n = 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
