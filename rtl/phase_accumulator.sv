// phase_accumulator: the DDS phase accumulator of the pulse synthesizer.
//
// Each sample clock the N-bit phase P advances by the frequency control word K and wraps modulo
// 2**N. The value left after a wrap is the overflow value P_new, which the rest of the pipeline
// uses as the sub-sample time of the new period; it falls out of the register width with no
// extra logic, as the published design describes. `wrap` marks the first sample of every pulse
// period, including the first sample after start.
//
// Interface and timing: while `run` is low the accumulator follows `phase0` and `valid` is low.
// The cycle after `run` rises, `phase` = phase0 (as sampled on that first clock with `run` high)
// with `valid` and `wrap` high; from then on one new phase per clock. The published design
// advances the accumulator on the falling clock edge
// and reads addresses on the rising edge; here everything is on the rising edge and the stages
// are separated by registers instead. Reset (active low, synchronous) clears everything.
module phase_accumulator #(
  parameter int unsigned W = pulse_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic [W-1:0] k,
  input  logic [W-1:0] phase0,
  output logic [W-1:0] phase,
  output logic         wrap,
  output logic         valid
);

  logic [W:0] sum;
  assign sum = {1'b0, phase} + {1'b0, k};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      wrap  <= 1'b0;
      valid <= 1'b0;
    end else if (!run) begin
      phase <= phase0;
      wrap  <= 1'b0;
      valid <= 1'b0;
    end else if (!valid) begin
      // first sample: start from phase0, a new period begins
      phase <= phase0;
      valid <= 1'b1;
      wrap  <= 1'b1;
    end else begin
      phase <= sum[W-1:0];
      wrap  <= sum[W];
    end
  end

endmodule
