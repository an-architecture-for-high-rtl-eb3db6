// tb_card_addr_comp: exhaustive check of the card address comparator. Every
// combination of ATN, SAB card field and jumper setting is applied and the
// enable compared with "ATN and equal".
module tb_card_addr_comp;
  logic       atn, enable;
  logic [2:0] sab_card, jumpers;
  int checks = 0, failures = 0;

  card_addr_comp dut (.atn, .sab_card, .jumpers, .enable);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int s = 0; s < 8; s++)
        for (int j = 0; j < 8; j++) begin
          atn = a[0]; sab_card = s[2:0]; jumpers = j[2:0];
          #1;
          checks++;
          if (enable !== (a == 1 && s == j)) begin
            failures++;
            $display("FAIL atn=%0d card=%0d jumpers=%0d enable=%0b", a, s, j, enable);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
