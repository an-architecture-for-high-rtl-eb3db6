// tb_plant_io: checks that OUTs latch the plant address and data, that the
// plant write strobe comes for one clock after a data write with the data
// already stable, and that an IN passes the plant data to the DSP only while
// reading.
module tb_plant_io;
  logic clk = 0, rst_n = 0, wr_addr = 0, wr_data = 0, rd_data = 0;
  logic [15:0] dsp_wdata = 0, dsp_rdata, plant_dout, plant_din = 0;
  logic [7:0] plant_addr;
  logic plant_wr_n, plant_rd_n;
  int checks = 0, failures = 0;

  plant_io #(.PA_W(8), .DW(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea;
    logic [15:0] ed;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ea = 0; ed = 0;
    @(negedge clk);
    chk(plant_addr, 0, "reset addr");
    chk(plant_wr_n, 1, "reset strobe");
    for (int it = 0; it < 100; it++) begin
      dsp_wdata = 16'($urandom);
      case ($urandom_range(0, 2))
        0: begin wr_addr = 1; ea = dsp_wdata[7:0]; end
        1: begin wr_data = 1; ed = dsp_wdata; end
        default: ;
      endcase
      @(negedge clk);
      chk(plant_wr_n, !wr_data, "write strobe follows data write");
      wr_addr = 0; wr_data = 0; dsp_wdata = ~dsp_wdata;
      chk(plant_addr, 16'(ea), "address latch");
      chk(plant_dout, ed, "data latch");
      plant_din = 16'($urandom);
      rd_data = 1; #1;
      chk(plant_rd_n, 0, "read strobe");
      chk(dsp_rdata, plant_din, "read data");
      rd_data = 0; #1;
      chk(plant_rd_n, 1, "read strobe off");
      chk(dsp_rdata, 0, "no read data");
      @(negedge clk);
      chk(plant_wr_n, 1, "strobe one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
