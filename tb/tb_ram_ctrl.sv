// tb_ram_ctrl: drives random sequences of host requests, DSP switch strobes and
// forced switches, and compares Q1, BIO, Q2 with a reference model of the
// set-reset and toggle flip-flops (set wins over reset; two toggles cancel).
// It also walks one full handshake by hand: request, BIO low, ACK high, DSP
// strobe, banks swapped, ACK low.
module tb_ram_ctrl;
  logic clk = 0, rst_n = 0, chgreq = 0, sw_strobe = 0, force_toggle = 0;
  logic q1, bio_n, q2, q2_n;
  logic m_q1, m_q2;
  int checks = 0, failures = 0;

  ram_ctrl dut (.clk, .rst_n, .chgreq, .sw_strobe, .force_toggle, .q1, .bio_n, .q2, .q2_n);

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic check_all();
    chk(q1, m_q1, "Q1"); chk(bio_n, ~m_q1, "BIO");
    chk(q2, m_q2, "Q2"); chk(q2_n, ~m_q2, "Q2n");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_q1 = 0; m_q2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    // one handshake
    chgreq = 1; @(negedge clk); chgreq = 0; m_q1 = 1;
    check_all();
    repeat (3) @(negedge clk);
    check_all();
    sw_strobe = 1; @(negedge clk); sw_strobe = 0; m_q1 = 0; m_q2 = 1;
    check_all();
    // random sequences
    for (int it = 0; it < 500; it++) begin
      chgreq = ($urandom_range(0, 3) == 0);
      sw_strobe = ($urandom_range(0, 3) == 0);
      force_toggle = ($urandom_range(0, 5) == 0);
      @(negedge clk);
      if (chgreq) m_q1 = 1; else if (sw_strobe) m_q1 = 0;
      if (sw_strobe ^ force_toggle) m_q2 = ~m_q2;
      chgreq = 0; sw_strobe = 0; force_toggle = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
