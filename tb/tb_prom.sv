// tb_prom: loads a 64-word image (word i = 0x1357*i + 0x2468, modulo 2^16) into
// a 64-word PROM and reads every address, in order and at random.
module tb_prom;
  logic [5:0] addr;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  prom #(.WORDS(64), .DW(16), .INIT_FILE("tb/prom_test.hex")) dut (.addr, .rdata);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int k = 0; k < 192; k++) begin
      int i;
      i = (k < 64) ? k : $urandom_range(0, 63);
      addr = 6'(i);
      #1;
      checks++;
      if (rdata !== 16'(i * 16'h1357 + 16'h2468)) begin
        failures++;
        $display("FAIL addr %0d: got %h", i, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
