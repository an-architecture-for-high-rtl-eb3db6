// tb_ram_bank: writes random words to random addresses of a 2-kword bank and
// reads them back against a reference array, including same-address rewrites
// and reads of every written word at the end.
module tb_ram_bank;
  localparam int WORDS = 2048;
  logic clk = 0, we = 0;
  logic [10:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_mem [WORDS];
  bit          valid [WORDS];
  int checks = 0, failures = 0;

  ram_bank #(.WORDS(WORDS), .DW(16)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      addr = 11'($urandom_range(0, 255) * 8 + (it % 8));
      if ($urandom_range(0, 1) == 1) begin
        wdata = 16'($urandom);
        we = 1;
        @(negedge clk);
        we = 0;
        ref_mem[addr] = wdata;
        valid[addr] = 1;
      end
      #1;
      if (valid[addr]) begin
        checks++;
        if (rdata !== ref_mem[addr]) begin
          failures++;
          $display("FAIL addr %0d: got %h expected %h", addr, rdata, ref_mem[addr]);
        end
      end
      @(negedge clk);
    end
    for (int a = 0; a < WORDS; a++) if (valid[a]) begin
      addr = 11'(a);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
