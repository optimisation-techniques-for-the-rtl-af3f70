// rle_encoder: run-length coding of one block of 64 quantized coefficients
// in zig-zag order, in the baseline JPEG form.
//
// It reads coefficient k = 0..63 through a two-cycle memory read port. k = 0
// is the DC difference and becomes a DC symbol (size category and amplitude
// bits). For k >= 1 zeros are counted; a nonzero value becomes the symbol
// (run of preceding zeros, size, amplitude), preceded by one ZRL symbol
// (run 15, size 0) for every full 16 zeros in the run; zeros up to k = 63
// become a single EOB symbol (run 0, size 0). The amplitude bits of a value v
// are v for v > 0 and v - 1 for v < 0, taken in their low `size` bits.
//
// Symbols leave on a valid/ready handshake and are held stable until taken.
// Timing: two cycles per zero coefficient, three per symbol plus any cycles
// the receiver stalls. done pulses once the last symbol has been taken. The
// source only names run-length coding; this is the standard JPEG baseline
// scheme.
module rle_encoder
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [5:0]  rd_addr,
  input  logic signed [15:0] rd_data,
  output logic        sym_valid,
  input  logic        sym_ready,
  output rle_sym_t    sym
);
  typedef enum logic [1:0] {S_IDLE, S_READ0, S_READ1, S_EMIT} state_e;
  state_e state;
  logic [5:0] k;
  logic [5:0] zrun;
  logic       last_sym;   // the pending symbol ends the block
  logic       pend_zrl;   // ZRL symbols still go out before sym_main
  rle_sym_t   sym_main;

  function automatic logic [3:0] size_of(input logic signed [15:0] v);
    logic [15:0] m;
    m = v[15] ? 16'(-v) : 16'(v);
    size_of = 4'd0;
    for (int b = 0; b < 12; b++) if (m[b]) size_of = 4'(b + 1);
  endfunction

  logic [3:0]  v_size;
  logic [11:0] v_amp;
  always_comb begin
    v_size  = size_of(rd_data);
    v_amp   = rd_data[15] ? 12'(rd_data - 16'sd1) : 12'(rd_data);
    rd_addr = k;
    busy    = (state != S_IDLE);
    sym_valid = (state == S_EMIT);
    if (pend_zrl) sym = '{is_dc: 1'b0, run: 4'd15, size: 4'd0, amp: 12'd0};
    else          sym = sym_main;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      k        <= '0;
      zrun     <= '0;
      done     <= 1'b0;
      last_sym <= 1'b0;
      pend_zrl <= 1'b0;
      sym_main <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_READ0;
          k     <= '0;
          zrun  <= '0;
        end
        S_READ0: state <= S_READ1;
        S_READ1: begin
          last_sym <= (k == 6'd63);
          pend_zrl <= 1'b0;
          if (k == 6'd0) begin
            sym_main <= '{is_dc: 1'b1, run: 4'd0, size: v_size, amp: v_amp};
            state    <= S_EMIT;
          end else if (rd_data != 16'sd0) begin
            sym_main <= '{is_dc: 1'b0, run: zrun[3:0], size: v_size, amp: v_amp};
            pend_zrl <= (zrun >= 6'd16);
            state    <= S_EMIT;
          end else if (k == 6'd63) begin
            sym_main <= '{is_dc: 1'b0, run: 4'd0, size: 4'd0, amp: 12'd0};  // EOB
            state    <= S_EMIT;
          end else begin
            zrun  <= zrun + 6'd1;
            k     <= k + 6'd1;
            state <= S_READ0;
          end
        end
        S_EMIT: if (sym_ready) begin
          if (pend_zrl) begin
            zrun     <= zrun - 6'd16;
            pend_zrl <= (zrun - 6'd16 >= 6'd16);
            sym_main.run <= 4'(zrun - 6'd16);
          end else begin
            zrun <= '0;
            if (last_sym) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              k     <= k + 6'd1;
              state <= S_READ0;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rule: a symbol on offer stays put until it is taken
  logic     held_valid;
  rle_sym_t held_sym;
  always_ff @(posedge clk) begin
    if (rst) begin
      held_valid <= 1'b0;
    end else begin
      if (held_valid) assert (sym_valid && sym == held_sym)
        else $error("rle_encoder changed a symbol before it was taken");
      held_valid <= sym_valid && !sym_ready;
    end
    held_sym <= sym;
  end
endmodule
