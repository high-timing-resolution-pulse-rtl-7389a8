// phase_offset_calculator: the arithmetic core of the adaptive phase adjustment.
//
// When an edge starts, the phase has run past the edge's start phase by an excess E (for the
// rising edge this is the accumulator overflow value P_new). That excess is a time
// T_fine = E*Ts/K, and the edge-memory start address has to move by T_fine/Tres = E*D/K entries,
// where D = Ts/Tres. This block computes that number rounded to the nearest whole entry,
// offset = floor((E*D + floor(K/2)) / K), exactly; the result lies in 0..D. Rounding (rather
// than truncating) keeps the edge placement error within half a resolution step and reproduces
// the published worked example (P_new = 77155094, K = 257183670, D = 10 gives 3, i.e.
// T_fine = 0.3 ns, although E*D/K is 2.9999997 there).
//
// How: one stage forms E*D + K/2, then STEP_W restoring-division stages each
// decide one quotient bit, most significant first, by comparing the remainder with K shifted
// left by that bit's weight. Because E < K and D < 2**STEP_W, the quotient is at most D and
// always fits in STEP_W bits. The published design states only the formula; doing the division
// as a fixed-latency
// pipeline (rather than, say, a reciprocal multiply) is this implementation's choice, and it
// gives the exact floor for every K.
//
// Interface and timing: fully pipelined, one new E per clock, result LATENCY = STEP_W + 1 clocks
// after the input. K and D must be held constant while the pipeline is in use. No reset: the
// output is only consumed together with a valid flag delayed alongside it.
module phase_offset_calculator #(
  parameter int unsigned W      = pulse_pkg::PHASE_W,
  parameter int unsigned STEP_W = pulse_pkg::STEP_W
) (
  input  logic              clk,
  input  logic [W-1:0]      excess,
  input  logic [W-1:0]      k,
  input  logic [STEP_W-1:0] d,
  output logic [STEP_W-1:0] offset
);

  localparam int unsigned RW = W + STEP_W;  // remainder width, holds E*D + K/2 < K * 2**STEP_W

  logic [RW-1:0]     rem [STEP_W+1];
  logic [STEP_W-1:0] quo [STEP_W+1];

  // stage 0: E * D + K/2
  always_ff @(posedge clk) begin
    rem[0] <= RW'(excess) * RW'(d) + RW'(k >> 1);
    quo[0] <= '0;
  end

  // stages 1..STEP_W: one quotient bit each, MSB first
  for (genvar s = 1; s <= STEP_W; s++) begin : g_div
    localparam int unsigned BIT = STEP_W - s;
    logic [RW-1:0] shifted_k;
    assign shifted_k = RW'(k) << BIT;
    always_ff @(posedge clk) begin
      if (rem[s-1] >= shifted_k) begin
        rem[s]      <= rem[s-1] - shifted_k;
        quo[s]      <= quo[s-1] | (STEP_W'(1) << BIT);
      end else begin
        rem[s]      <= rem[s-1];
        quo[s]      <= quo[s-1];
      end
    end
  end

  assign offset = quo[STEP_W];

endmodule
