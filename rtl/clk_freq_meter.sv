// clk_freq_meter: measures an internally generated clock against the CPU
// clock.
//
// A mod-80 counter on the CPU clock divides it by 80; its "MSB" output is
// high for 40 of the 80 cycles (count >= 40), so with the 30 ns CPU clock of
// the source the count-enable window lasts 40 x 30 ns = 1.2 us. A measure
// pulse clears the 32-bit cycle counter and arms the control logic; the
// control logic then opens count enable for exactly the next complete high
// phase of the MSB, and the cycle counter, clocked by the clock under test,
// counts while enable is high. The count reached (about 1.2 us / period)
// estimates the frequency; done rises when the window has closed and
// count_value has settled.
//
// Parts and numbers follow the source's measurement figure and text (mod-80
// counter, MSB, control logic with prefix, 32-bit counter, divide by 40,
// 1.2 us). The source calls the window signal the MSB of the mod-80 counter
// and also says the clock is divided by 40; a literal MSB of a 7-bit mod-80
// count would be high for only 16 cycles, so the 40-cycle reading is used.
// Enable and clear reach the measured-clock domain through two-flop
// synchronizers (this design's choice), which shifts both window edges by the
// same two cycles and keeps the count within one cycle.
module clk_freq_meter #(
  parameter int DIV        = 80,
  parameter int WINDOW     = 40,
  parameter int CNT_W      = 32
) (
  input  logic             cpu_clk,
  input  logic             rst,
  input  logic             measure,
  input  logic             meas_clk,
  output logic             done,
  output logic [CNT_W-1:0] count_value
);
  localparam int DW = $clog2(DIV);
  logic [DW-1:0] div_cnt;
  logic msb, msb_q;
  logic armed, window;

  always_ff @(posedge cpu_clk) begin
    if (rst) begin
      div_cnt <= '0;
      msb_q   <= 1'b0;
      armed   <= 1'b0;
      window  <= 1'b0;
      done    <= 1'b0;
    end else begin
      div_cnt <= (div_cnt == DW'(DIV - 1)) ? '0 : div_cnt + 1'b1;
      msb_q   <= msb;
      if (measure) begin
        armed  <= 1'b1;
        window <= 1'b0;
        done   <= 1'b0;
      end else if (armed && msb && !msb_q) begin
        armed  <= 1'b0;
        window <= 1'b1;
      end else if (window && !msb) begin
        window <= 1'b0;
        done   <= 1'b1;   // the counter has at most a few cycles to settle
      end
    end
  end
  assign msb = (div_cnt >= DW'(DIV - WINDOW));

  // measured-clock domain
  logic [1:0] en_sync, clr_sync;
  logic       clr_req;
  always_ff @(posedge cpu_clk) begin
    if (rst) clr_req <= 1'b0;
    else if (measure) clr_req <= 1'b1;
    else if (armed && msb && !msb_q) clr_req <= 1'b0;  // as the window opens
  end
  always_ff @(posedge meas_clk) begin
    en_sync  <= {en_sync[0], window};
    clr_sync <= {clr_sync[0], clr_req};
    if (clr_sync[1])     count_value <= '0;
    else if (en_sync[1]) count_value <= count_value + 1'b1;
  end
endmodule
