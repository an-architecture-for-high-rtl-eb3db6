// tb_int_addr_comp: every 12-bit address is applied; the I/O enable must be
// active (low) exactly for addresses 0..7, the I/O port page.
module tb_int_addr_comp;
  logic [11:0] addr;
  logic io_n;
  int checks = 0, failures = 0;

  int_addr_comp #(.AW(12)) dut (.addr, .io_n);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      addr = 12'(a);
      #1;
      checks++;
      if (io_n !== (a >= 8)) begin
        failures++;
        $display("FAIL addr %h io_n=%b", addr, io_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
