// dct_custom_block: Nios custom instruction that runs the 2D DCT,
// differential quantization and zig-zag scan of one 8x8 block concurrently
// with the CPU.
//
// Scheme (after the source's concurrency figure): the CPU writes the 64
// samples into the input register file, issues a start, is then free for
// other work (run-length and Huffman coding of the previous block, say), and
// later reads the 64 quantized coefficients out of the output register file.
// A counter loaded with a mod value runs the sequential block for exactly that
// many memory-clock cycles and disables both register files meanwhile.
//
// Interface: one Nios custom-instruction request (start, 11-bit prefix,
// 32-bit dataa and datab) on the CPU clock clk, and a 32-bit result that is
// valid two clk cycles after start (the start cycle and one more), for every
// prefix; the CPU side should declare the instruction as multi-cycle with a
// cycle count of 2. Prefix codes (jpeg_pkg::dct_prefix_e):
//   LOAD    dataa[3:0] = word w, datab = samples 4w..4w+3, sample 4w+i in
//           byte i; samples are level-shifted (pixel - 128), signed 8-bit,
//           raster order. Ignored while busy.
//   START   clear and start the counter.
//   READ    dataa[4:0] = pair p; result = {q(2p+1), q(2p)}, 16-bit each, in
//           zig-zag scan order; position 0 holds the DC difference. Reads 0
//           while busy.
//   SET_Q   dataa[5:0] = raster index, datab[16:0] = round(65536 / Q).
//   SET_MOD datab[15:0] = counter mod value (default DEFAULT_MOD).
//   CLR_DC  clear the DC predictor (start of an image).
//   STATUS  result = {busy, 15'b0, counter value}.
// The engine runs on clk_mem, which must be the CPU clock doubled by a PLL
// and phase-aligned to it, as in the source ("the CPU clock is multiplied by
// two and it is used as the basic clock for memory operations"); the CPU-side
// and engine-side registers exchange signals directly on that assumption.
// Memory reads take two clk_mem cycles and writes one. One block takes 594
// clk_mem cycles = 297 CPU cycles: one start cycle, 400 for the DCT, one
// hand-over cycle, 192 for quantization and zig-zag. The prefix code values,
// packing of operands and the result latency are this design's choices.
module dct_custom_block
  import jpeg_pkg::*;
#(
  parameter int DEFAULT_MOD = 594
) (
  input  logic        clk,
  input  logic        clk_mem,
  input  logic        reset,
  input  logic        clk_en,
  input  ci_req_t     req,
  output logic [31:0] result
);
  // ------------------------------------------------------------ CPU side
  logic        issue;
  dct_prefix_e pfx;
  logic [15:0] mod_value;
  logic        start_tgl, clr_tgl;
  logic        busy;
  dct_prefix_e pfx_q;
  logic        issue_q;

  always_comb begin
    issue = req.start && clk_en;
    pfx   = dct_prefix_e'(req.prefix);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      mod_value <= 16'(DEFAULT_MOD);
      start_tgl <= 1'b0;
      clr_tgl   <= 1'b0;
      issue_q   <= 1'b0;
      pfx_q     <= DPFX_NOP;
    end else begin
      issue_q <= issue;
      if (issue) begin
        pfx_q <= pfx;
        unique case (pfx)
          DPFX_START:   start_tgl <= ~start_tgl;
          DPFX_SET_MOD: mod_value <= req.datab[15:0];
          DPFX_CLR_DC:  clr_tgl   <= ~clr_tgl;
          default: ;
        endcase
      end
    end
  end

  // input register file: written by the CPU, read by the engine
  logic [3:0]  in_raddr;
  logic [31:0] in_rdata;
  ram_2c #(.ADDR_W(4), .LANE_W(8), .LANES(4)) u_infile (
    .wclk(clk), .we({4{issue && pfx == DPFX_LOAD && !busy}}),
    .waddr(req.dataa[3:0]), .wdata(req.datab),
    .rclk(clk_mem), .raddr(in_raddr), .rdata(in_rdata));

  // output register file: written by the engine, read by the CPU
  logic [1:0]  out_we;
  logic [5:0]  out_waddr;
  logic signed [QOUT_W-1:0] out_wdata;
  logic [31:0] out_rdata;
  ram_2c #(.ADDR_W(5), .LANE_W(16), .LANES(2)) u_outfile (
    .wclk(clk_mem), .we(out_we), .waddr(out_waddr[5:1]), .wdata({out_wdata, out_wdata}),
    .rclk(clk), .raddr(req.dataa[4:0]), .rdata(out_rdata));

  // ------------------------------------------------------------ engine side
  logic        rst_mem;
  logic        start_seen, clr_seen;
  logic        start_pulse, clr_pulse;
  logic        run, first;
  logic [15:0] count;

  always_ff @(posedge clk_mem) begin
    rst_mem    <= reset;
    start_seen <= start_tgl;
    clr_seen   <= clr_tgl;
  end
  always_comb begin
    start_pulse = (start_tgl != start_seen) && !rst_mem;
    clr_pulse   = (clr_tgl != clr_seen) && !rst_mem;
    first       = run && (count == 16'd0);
    // busy from the START issue until the counter has expired
    busy        = run || (start_tgl != start_seen);
  end

  op_counter #(.CNT_W(16)) u_counter (
    .clk(clk_mem), .rst(rst_mem), .start(start_pulse), .mod_value(mod_value),
    .run(run), .done(), .count(count));

  logic        dct_done;
  logic        coef_we;
  logic [5:0]  coef_waddr, coef_raddr;
  logic signed [COEF_OUT_W-1:0] coef_wdata, coef_rdata;

  dct_2d u_dct2d (
    .clk(clk_mem), .rst(rst_mem), .en(run), .start(first), .done(dct_done),
    .in_raddr(in_raddr), .in_rdata(in_rdata),
    .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wdata(coef_wdata));

  ram_2c #(.ADDR_W(6), .LANE_W(COEF_OUT_W), .LANES(1)) u_coefmem (
    .wclk(clk_mem), .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .rclk(clk_mem), .raddr(coef_raddr), .rdata(coef_rdata));

  logic qz_we;
  quant_zigzag u_qz (
    .clk(clk_mem), .rst(rst_mem), .en(run), .start(dct_done), .clr_dc(clr_pulse),
    .done(),
    .coef_raddr(coef_raddr), .coef_rdata(coef_rdata),
    .cfg_clk(clk), .cfg_rst(reset),
    .scale_we(issue && pfx == DPFX_SET_Q), .scale_waddr(req.dataa[5:0]),
    .scale_wdata(req.datab[QSCALE_W-1:0]),
    .out_we(qz_we), .out_waddr(out_waddr), .out_wdata(out_wdata));

  always_comb out_we = {qz_we && out_waddr[0], qz_we && !out_waddr[0]};

  // ------------------------------------------------------------ result
  always_ff @(posedge clk) begin
    if (reset) begin
      result <= '0;
    end else if (issue_q) begin
      unique case (pfx_q)
        DPFX_READ:   result <= busy ? 32'd0 : out_rdata;
        DPFX_STATUS: result <= {busy, 15'd0, count};
        default:     result <= '0;
      endcase
    end
  end

endmodule
