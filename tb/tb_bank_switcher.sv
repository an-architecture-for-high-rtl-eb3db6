// tb_bank_switcher: applies random host, DSP and RAM values in both switch
// positions and checks every routed output against the intended crossing:
// sel=0 host<->RAM1, DSP<->RAM2; sel=1 host<->RAM2, DSP<->RAM1.
module tb_bank_switcher;
  logic sel, h_we, d_we, r1_we, r2_we;
  logic [10:0] h_addr, d_addr, r1_addr, r2_addr;
  logic [15:0] h_wdata, d_wdata, r1_wdata, r2_wdata, h_rdata, d_rdata, r1_rdata, r2_rdata;
  int checks = 0, failures = 0;

  bank_switcher #(.AW(11), .DW(16)) dut (.*);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s sel=%0b: got %h expected %h", what, sel, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      sel = it[0];
      h_addr = 11'($urandom); d_addr = 11'($urandom);
      h_we = 1'($urandom); d_we = 1'($urandom);
      h_wdata = 16'($urandom); d_wdata = 16'($urandom);
      r1_rdata = 16'($urandom); r2_rdata = 16'($urandom);
      #1;
      if (!sel) begin
        chk(32'(r1_addr), 32'(h_addr), "r1_addr"); chk(32'(r1_we), 32'(h_we), "r1_we");
        chk(32'(r1_wdata), 32'(h_wdata), "r1_wdata"); chk(32'(h_rdata), 32'(r1_rdata), "h_rdata");
        chk(32'(r2_addr), 32'(d_addr), "r2_addr"); chk(32'(r2_we), 32'(d_we), "r2_we");
        chk(32'(r2_wdata), 32'(d_wdata), "r2_wdata"); chk(32'(d_rdata), 32'(r2_rdata), "d_rdata");
      end else begin
        chk(32'(r2_addr), 32'(h_addr), "r2_addr"); chk(32'(r2_we), 32'(h_we), "r2_we");
        chk(32'(r2_wdata), 32'(h_wdata), "r2_wdata"); chk(32'(h_rdata), 32'(r2_rdata), "h_rdata");
        chk(32'(r1_addr), 32'(d_addr), "r1_addr"); chk(32'(r1_we), 32'(d_we), "r1_we");
        chk(32'(r1_wdata), 32'(d_wdata), "r1_wdata"); chk(32'(d_rdata), 32'(r1_rdata), "d_rdata");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
