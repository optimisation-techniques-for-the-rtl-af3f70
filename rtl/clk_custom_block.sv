// clk_custom_block: Nios custom instruction that drives the internal clock
// generator and reads back its measured frequency.
//
// The generator itself (ring_clock_gen) sits outside this block; this block
// holds its control registers and the frequency meter. Prefix codes
// (jpeg_pkg::clk_prefix_e):
//   STOP    (prefix 0) stop the internal clock; it is held at 0.
//   RUN     latch s = dataa[18:0] (mux selects), tap = dataa[21:19] (8:1 mux
//           select), a = datab[18:0] (mux data inputs), and let it run.
//   MEASURE clear the cycle counter and measure over the next 1.2 us window.
//   READ    result = count value.
//   STATUS  result = {30'b0, measurement done, clock running}.
// The source connects s and a directly to the dataa and datab ports and says
// prefix 0 resets the clock; here they are latched by an instruction so that
// they hold between instructions, and the 8:1 select (S1..S3, whose source
// the text does not give) is taken from dataa[21:19]. The result is valid two
// clk cycles after start. Clock: clk (CPU); int_clk is the measured clock.
module clk_custom_block
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        clk_en,
  input  ci_req_t     req,
  output logic [31:0] result,
  // internal clock generator
  output logic        gen_run,
  output logic [18:0] gen_s,
  output logic [18:0] gen_a,
  output logic [2:0]  gen_tap,
  input  logic        int_clk
);
  logic        issue, issue_q;
  clk_prefix_e pfx, pfx_q;
  logic        meas_done;
  logic [31:0] meas_count;

  always_comb begin
    issue = req.start && clk_en;
    pfx   = clk_prefix_e'(req.prefix);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      gen_run <= 1'b0;
      gen_s   <= '0;
      gen_a   <= '0;
      gen_tap <= '0;
      issue_q <= 1'b0;
      pfx_q   <= CPFX_STOP;
      result  <= '0;
    end else begin
      issue_q <= issue;
      if (issue) begin
        pfx_q <= pfx;
        unique case (pfx)
          CPFX_STOP: gen_run <= 1'b0;
          CPFX_RUN: begin
            gen_run <= 1'b1;
            gen_s   <= req.dataa[18:0];
            gen_tap <= req.dataa[21:19];
            gen_a   <= req.datab[18:0];
          end
          default: ;
        endcase
      end
      if (issue_q) begin
        unique case (pfx_q)
          CPFX_READ:   result <= meas_count;
          CPFX_STATUS: result <= {30'd0, meas_done, gen_run};
          default:     result <= '0;
        endcase
      end
    end
  end

  clk_freq_meter #(.DIV(80), .WINDOW(40), .CNT_W(32)) u_meter (
    .cpu_clk(clk), .rst(reset), .measure(issue && pfx == CPFX_MEASURE),
    .meas_clk(int_clk), .done(meas_done), .count_value(meas_count));
endmodule
