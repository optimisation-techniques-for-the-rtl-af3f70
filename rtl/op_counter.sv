// op_counter: the operation counter of the concurrent custom-instruction
// scheme.
//
// A start pulse clears the count and raises run; run stays high for exactly
// mod_value clock cycles and then falls, with a one-cycle done pulse. While
// run is high the sequential block is enabled and the input and output
// register files are disabled for the CPU; when run falls the sequential
// block is stopped wherever it is, so mod_value must cover the work. This is
// the counter of the source's concurrency figure ("Mod value = No. of clock
// cycles needed to complete the operation"); a start while running restarts
// it, and a mod_value of 0 behaves as 1, which are this design's choices.
module op_counter #(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [CNT_W-1:0] mod_value,
  output logic             run,
  output logic             done,
  output logic [CNT_W-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst) begin
      run   <= 1'b0;
      done  <= 1'b0;
      count <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run   <= 1'b1;
        count <= '0;
      end else if (run) begin
        if (count + 1'b1 >= mod_value) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        count <= count + 1'b1;
      end
    end
  end

  // run never outlasts the programmed mod value
  always_ff @(posedge clk)
    if (!rst && run) assert (count < mod_value || mod_value == '0)
      else $error("op_counter ran past its mod value");
endmodule
