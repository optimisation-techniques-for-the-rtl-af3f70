// quant_zigzag: differential quantization and zig-zag scanning of one 8x8
// block of DCT coefficients.
//
// For each raster index k = 0..63 it reads F(k) from the coefficient memory
// (two-cycle read) and the scale S(k) = round(2^16 / Q(k)) from its own scale
// table, forms q = sign(F) * floor((|F| * S + 2^17) / 2^18), i.e. F/(4Q)
// rounded (F carries the factor four of the unnormalised DCT), and writes q
// in one cycle to address ZIGZAG_POS[k] of the output file. The zig-zag scan
// therefore costs nothing: it is only the write address, taken from a
// look-up table, as the source suggests ("just swapping the memory
// contents"). The DC term (k = 0) is coded differentially: the value written
// is q(0) minus the q(0) of the previous block, and the predictor is cleared
// by reset or clr_dc. 3 cycles per coefficient, 192 per block; done pulses
// after the last write; en low stops it.
//
// The scale table is written by the CPU on cfg_clk (one entry per write) and
// resets to the JPEG example luminance table. The reciprocal form of the
// table and all widths are this design's choices.
module quant_zigzag
  import jpeg_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic                         start,
  input  logic                         clr_dc,
  output logic                         done,
  // coefficient memory read port
  output logic [5:0]                   coef_raddr,
  input  logic signed [COEF_OUT_W-1:0] coef_rdata,
  // scale table write port (CPU clock)
  input  logic                         cfg_clk,
  input  logic                         cfg_rst,
  input  logic                         scale_we,
  input  logic [5:0]                   scale_waddr,
  input  logic [QSCALE_W-1:0]          scale_wdata,
  // output file write port, zig-zag order
  output logic                         out_we,
  output logic [5:0]                   out_waddr,
  output logic signed [QOUT_W-1:0]     out_wdata
);
  // ---- scale table, reset to the default luminance table
  logic [QSCALE_W-1:0] scale_mem [64];
  always_ff @(posedge cfg_clk) begin
    if (cfg_rst) begin
      for (int i = 0; i < 64; i++) scale_mem[i] <= qscale_of(int'(QTAB_LUM[i]));
    end else if (scale_we) begin
      scale_mem[scale_waddr] <= scale_wdata;
    end
  end

  typedef enum logic [1:0] {S_IDLE, S_READ0, S_READ1, S_WRITE} state_e;
  state_e state;
  logic [5:0] k;
  logic [5:0] scale_raddr_q;
  logic [QSCALE_W-1:0] scale_rd;
  logic signed [COEF_OUT_W-1:0] f_q;
  logic [QSCALE_W-1:0] s_q;
  logic signed [QOUT_W-1:0] prev_dc;

  assign coef_raddr = k;

  // two-cycle read of the scale, in step with the coefficient read
  always_ff @(posedge clk) scale_raddr_q <= k;
  assign scale_rd = scale_mem[scale_raddr_q];

  logic [COEF_OUT_W-1:0]          f_mag;
  logic [COEF_OUT_W+QSCALE_W-1:0] prod;
  logic [COEF_OUT_W-1:0]          q_mag;
  logic signed [QOUT_W-1:0]       q_val;
  always_comb begin
    f_mag = f_q[COEF_OUT_W-1] ? COEF_OUT_W'(-f_q) : COEF_OUT_W'(f_q);
    prod  = (COEF_OUT_W+QSCALE_W)'(f_mag) * (COEF_OUT_W+QSCALE_W)'(s_q)
          + (COEF_OUT_W+QSCALE_W)'(1 << 17);
    q_mag = COEF_OUT_W'(prod >> 18);
    q_val = f_q[COEF_OUT_W-1] ? -$signed(QOUT_W'(q_mag)) : $signed(QOUT_W'(q_mag));
    out_we    = (state == S_WRITE) && en;
    out_waddr = ZIGZAG_POS[k];
    out_wdata = (k == 6'd0) ? q_val - prev_dc : q_val;
  end

  always_ff @(posedge clk) begin
    if (rst || clr_dc) prev_dc <= '0;
    else if (state == S_WRITE && en && k == 6'd0) prev_dc <= q_val;
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state <= S_IDLE;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) begin
          state <= S_READ0;
          k     <= '0;
        end
        S_READ0: state <= S_READ1;
        S_READ1: begin
          f_q   <= coef_rdata;
          s_q   <= scale_rd;
          state <= S_WRITE;
        end
        S_WRITE: begin
          k <= k + 6'd1;
          if (k == 6'd63) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_READ0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
