// sample_timer: the card's presettable sampling timer.
//
// It raises the DSP interrupt at every sampling instant. A prescaler divides
// the card clock by TICK_DIV to a 100 us time base (2000 clocks of an assumed
// 20 MHz card clock); a period counter counts PRESET time-base ticks and then
// pulls `int_n` low for one clock and starts again. With the 13-bit preset the
// period runs from 100 us (preset 1) to 819.1 ms (preset 8191), which matches
// the range "100 us to nearly 1 s" of the design; the time base, the preset
// width and the clock rate are this design's choices. The DSP writes the preset
// with an OUT instruction (`load` with `preset`); a preset of zero stops the
// timer, and reset leaves it stopped. Loading restarts the period.
module sample_timer #(
  parameter int unsigned TICK_DIV = 2000,
  parameter int unsigned PRESET_W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [PRESET_W-1:0] preset,
  output logic                int_n,
  output logic [PRESET_W-1:0] preset_q
);
  localparam int unsigned DIV_W = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [DIV_W-1:0]    div_cnt;
  logic [PRESET_W-1:0] per_cnt;
  logic                tick;

  always_comb tick = (div_cnt == DIV_W'(TICK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      preset_q <= '0;
      div_cnt  <= '0;
      per_cnt  <= '0;
      int_n    <= 1'b1;
    end else begin
      int_n <= 1'b1;
      if (load) begin
        preset_q <= preset;
        div_cnt  <= '0;
        per_cnt  <= '0;
      end else if (preset_q != '0) begin
        div_cnt <= tick ? '0 : div_cnt + 1'b1;
        if (tick) begin
          if (per_cnt == preset_q - 1'b1) begin
            per_cnt <= '0;
            int_n   <= 1'b0;
          end else begin
            per_cnt <= per_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
