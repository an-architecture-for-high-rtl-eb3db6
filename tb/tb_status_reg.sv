// tb_status_reg: checks that the status register samples its inputs only on
// `latch`, holds them while the inputs change, and drives them on SDB[7:0]
// (upper bits zero) only while reading.
module tb_status_reg;
  logic clk = 0, rst_n = 0, latch = 0, rd_en = 0, sdb_oe;
  logic [7:0] status_in = 0, status_q;
  logic [15:0] sdb_out;
  int checks = 0, failures = 0;

  status_reg dut (.clk, .rst_n, .latch, .status_in, .rd_en, .status_q, .sdb_out, .sdb_oe);

  always #5 clk = ~clk;

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
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
    logic [7:0] snap;
    repeat (2) @(negedge clk);
    rst_n = 1;
    snap = 0;
    for (int it = 0; it < 50; it++) begin
      status_in = 8'($urandom);
      latch = (it % 3 != 1);
      @(negedge clk);
      if (latch) snap = status_in;
      latch = 0;
      status_in = ~status_in;
      @(negedge clk);
      chk(16'(status_q), 16'(snap), "held snapshot");
      rd_en = 0; #1;
      chk(16'(sdb_oe), 16'h0, "no drive");
      chk(sdb_out, 16'h0, "idle bus");
      rd_en = 1; #1;
      chk(16'(sdb_oe), 16'h1, "drive");
      chk(sdb_out, {8'h00, snap}, "read on SDB");
      rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
