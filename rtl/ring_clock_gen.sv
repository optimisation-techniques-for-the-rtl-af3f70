// ring_clock_gen: BEHAVIOURAL MODEL of the internal clock generator, a ring
// oscillator made of an inverter and a delay block of 2:1 multiplexers. Its
// frequency rests on gate and routing delays, so it is not synthesizable
// logic; on an FPGA it is built from LUTs placed by hand.
//
// Structure, as drawn in the source: the inverter drives mux 16 -> 17 -> 18;
// majority logic votes over the outputs of muxes 16, 17 and 18; its output
// runs through muxes 8..15 and then muxes 0..7; an 8:1 multiplexer (selects
// tap) picks the output of one of muxes 0..7, and that is the clock, fed back
// to the inverter. Each 2:1 mux i passes the chain when s[i] = 1 and the
// constant a[i] when s[i] = 0 (a 0 anywhere on the path stops the ring).
// tap = k puts k+1 of muxes 0..7 in the loop.
//
// run = 0 holds the clock at 0 (the source: "When prefix code is 0, the clock
// is reset to 0"); how the reset reaches the ring is not drawn, so here the
// inverter is gated by run. The element delays are not given either; the
// defaults make tap 0 and tap 7 reproduce the two clock periods the source
// reports for 1 and 8 multiplexers in cascade, 6.076 ns and 13.704 ns
// (half period 2493 ps + (tap+1) * 545 ps, so 6.076 ns and 13.706 ns).
// Delay parameters are in picoseconds.
module ring_clock_gen #(
  parameter int TAP_MUX_DELAY = 545,  // muxes 0..7
  parameter int MUX_DELAY     = 150,  // muxes 8..18
  parameter int INV_DELAY     = 331,
  parameter int MAJ_DELAY     = 331,
  parameter int SEL_DELAY     = 331
) (
  input  logic        run,
  input  logic [18:0] s,
  input  logic [18:0] a,
  input  logic [2:0]  tap,
  output logic        clk_out
);
  // Each element is its logic function (a continuous assignment) followed by
  // a pure delay that wakes only when that function's value changes, so a
  // stage never samples its inputs at the wrong moment.
  logic inv_c, inv_out;
  logic m16_c, m16, m17_c, m17, m18_c, m18, maj_c, maj;
  logic sel_c, clk_int;

  initial begin
    inv_out = 1'b0; m16 = 1'b0; m17 = 1'b0; m18 = 1'b0; maj = 1'b0; clk_int = 1'b0;
  end

  assign inv_c = run && !clk_int;
  always @(inv_c) inv_out <= #(INV_DELAY * 1ps) inv_c;

  assign m16_c = s[16] ? inv_out : a[16];
  assign m17_c = s[17] ? m16 : a[17];
  assign m18_c = s[18] ? m17 : a[18];
  always @(m16_c) m16 <= #(MUX_DELAY * 1ps) m16_c;
  always @(m17_c) m17 <= #(MUX_DELAY * 1ps) m17_c;
  always @(m18_c) m18 <= #(MUX_DELAY * 1ps) m18_c;

  assign maj_c = (m16 & m17) | (m16 & m18) | (m17 & m18);
  always @(maj_c) maj <= #(MAJ_DELAY * 1ps) maj_c;

  // chain position i is mux 8+i for i < 8 and mux i-8 for i >= 8
  for (genvar i = 0; i < 16; i++) begin : g_mux
    localparam int MUX = (i < 8) ? i + 8 : i - 8;
    localparam int DLY = (i < 8) ? MUX_DELAY : TAP_MUX_DELAY;
    logic prev, m_c, m;
    initial m = 1'b0;
    if (i == 0) begin : g_first
      assign prev = maj;
    end else begin : g_next
      assign prev = g_mux[i-1].m;
    end
    assign m_c = s[MUX] ? prev : a[MUX];
    always @(m_c) m <= #(DLY * 1ps) m_c;
  end

  logic [7:0] taps;
  for (genvar t = 0; t < 8; t++) begin : g_taps
    assign taps[t] = g_mux[8+t].m;
  end

  assign sel_c = run && taps[tap];
  always @(sel_c) clk_int <= #(SEL_DELAY * 1ps) sel_c;
  assign clk_out = clk_int;
endmodule
