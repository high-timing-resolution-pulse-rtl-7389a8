// amplitude_scaler: amplitude control by scaling every output sample.
//
// The published design adjusts the pulse amplitude by scaling the waveform samples in
// proportion. Here each sample is multiplied by an unsigned fixed-point gain with GAIN_FRAC
// fraction bits (2**GAIN_FRAC is unity), truncated, and saturated at full scale if the gain is
// above one. The multiplier maps to one DSP block.
//
// Interface and timing: one registered stage; `valid` follows `valid_in` by one clock. The gain
// may change at any time and applies from the next sample.
module amplitude_scaler #(
  parameter int unsigned DW        = pulse_pkg::DAC_W,
  parameter int unsigned GW        = pulse_pkg::GAIN_W,
  parameter int unsigned GAIN_FRAC = pulse_pkg::GAIN_FRAC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_in,
  input  logic [DW-1:0] sample_in,
  input  logic [GW-1:0] gain,
  output logic [DW-1:0] sample,
  output logic          valid
);

  logic [DW+GW-1:0] prod;
  logic [DW+GW-1:0] scaled;

  always_comb begin
    prod   = (DW+GW)'(sample_in) * (DW+GW)'(gain);
    scaled = prod >> GAIN_FRAC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample <= '0;
      valid  <= 1'b0;
    end else begin
      valid  <= valid_in;
      sample <= (scaled > (DW+GW)'({DW{1'b1}})) ? {DW{1'b1}} : scaled[DW-1:0];
    end
  end

endmodule
