// dct_2d: 8x8 two-dimensional DCT by rows, then columns, through one shared
// 13-multiplier AAT 1D DCT and a transpose memory.
//
// Pass 0 reads each row of the 64 level-shifted 8-bit samples (raster order,
// input memory outside this module), transforms it and writes the eight
// results down a column of the 64 x 12-bit transpose memory, so pass 1 can
// read each column as a row. Pass 1 transforms the columns and writes the
// coefficients, in raster order F(u,v) at address 8u+v, to the coefficient
// memory outside this module. Scaling follows the DCT formula of the source,
// applied twice: F(u,v) = alpha(u) alpha(v) sum sum x cos cos, which is four
// times the JPEG-normalised coefficient.
//
// Timing, per 8-element vector: 8 reads of two cycles each (address held, data
// taken on the second cycle), one cycle in which the 1D DCT result is
// registered, 8 one-cycle writes: 25 cycles, 400 cycles for the block, plus
// one cycle from start to the first read. done pulses after the last write.
// All of this runs on the memory clock; en low stops the engine and returns
// it to idle. The read/write split follows the source's memory timing; the
// sequencing and the 12-bit transpose width (one fraction bit) are this
// design's choices.
module dct_2d
  import jpeg_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic                         start,
  output logic                         done,
  // sample memory: 16 words of four samples, sample k in byte k%4 of word k/4
  output logic [3:0]                   in_raddr,
  input  logic [31:0]                  in_rdata,
  // coefficient memory write port
  output logic                         coef_we,
  output logic [5:0]                   coef_waddr,
  output logic signed [COEF_OUT_W-1:0] coef_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_CALC, S_WRITE} state_e;
  state_e state;
  logic       pass;       // 0: rows, 1: columns
  logic [2:0] vec;        // row (pass 0) or column (pass 1) number
  logic [2:0] idx;        // element within the vector
  logic       phase;      // second cycle of a read

  logic signed [11:0] vin  [8];
  logic signed [16:0] vout [8];
  logic signed [16:0] res  [8];

  dct_1d_aat #(.IN_W(12), .IN_FRAC(ROW_FRAC), .OUT_W(17), .OUT_FRAC(ROW_FRAC)) u_dct (
    .x(vin), .y(vout));

  // transpose memory
  logic        tr_we;
  logic [5:0]  tr_waddr, tr_raddr;
  logic [11:0] tr_wdata, tr_rdata;
  ram_2c #(.ADDR_W(6), .LANE_W(12), .LANES(1)) u_tr (
    .wclk(clk), .we(tr_we), .waddr(tr_waddr), .wdata(tr_wdata),
    .rclk(clk), .raddr(tr_raddr), .rdata(tr_rdata));

  logic [5:0] rd_index;
  logic signed [11:0] rd_value;
  logic [7:0] in_byte;
  always_comb begin
    rd_index = {vec, idx};
    in_raddr = rd_index[5:2];
    tr_raddr = rd_index;
    in_byte  = in_rdata[8*rd_index[1:0] +: 8];
    // samples enter with one fraction bit like the row-pass results
    rd_value = pass ? $signed(tr_rdata) : {{3{in_byte[7]}}, in_byte, 1'b0};
  end

  // writes: pass 0 transposes into the transpose memory, pass 1 transposes
  // back into raster order
  logic signed [16:0] wr_value;
  always_comb begin
    wr_value   = res[idx];
    tr_we      = (state == S_WRITE) && !pass && en;
    tr_waddr   = {idx, vec};
    tr_wdata   = wr_value[11:0];
    coef_we    = (state == S_WRITE) && pass && en;
    coef_waddr = {idx, vec};
    // drop the fraction bit, rounding half up
    coef_wdata = COEF_OUT_W'((wr_value + 17'sd1) >>> 1);
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state <= S_IDLE;
      pass  <= 1'b0;
      vec   <= '0;
      idx   <= '0;
      phase <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_READ;
          pass  <= 1'b0;
          vec   <= '0;
          idx   <= '0;
          phase <= 1'b0;
        end
        S_READ: begin
          phase <= ~phase;
          if (phase) begin
            vin[idx] <= rd_value;
            idx      <= idx + 3'd1;
            if (idx == 3'd7) state <= S_CALC;
          end
        end
        S_CALC: begin
          res   <= vout;
          state <= S_WRITE;
        end
        S_WRITE: begin
          idx <= idx + 3'd1;
          if (idx == 3'd7) begin
            vec <= vec + 3'd1;
            if (vec == 3'd7) begin
              if (pass) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                pass  <= 1'b1;
                state <= S_READ;
              end
            end else begin
              state <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
