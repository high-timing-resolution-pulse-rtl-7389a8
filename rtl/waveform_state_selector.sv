// waveform_state_selector: decides which part of the pulse the current phase belongs to.
//
// The pulse period is split by three phase thresholds computed by the host: the rising edge
// occupies [0, P1), the high level [P1, P2), the falling edge [P2, P3) and the low level
// [P3, P4] with P4 = 2**N - 1, the top of the phase range. The comparison is a plain chain of
// unsigned compares, as in the published design.
//
// Interface and timing: one registered stage. The phase, wrap flag and valid flag are delayed
// with the state so that they stay aligned with `ws`.
module waveform_state_selector
  import pulse_pkg::*;
#(
  parameter int unsigned W = PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  logic [W-1:0] phase_in,
  input  logic         wrap_in,
  input  logic [W-1:0] p1,
  input  logic [W-1:0] p2,
  input  logic [W-1:0] p3,
  output wstate_e      ws,
  output logic [W-1:0] phase,
  output logic         wrap,
  output logic         valid
);

  wstate_e ws_next;

  always_comb begin
    if (phase_in < p1)      ws_next = WS_RISE;
    else if (phase_in < p2) ws_next = WS_HIGH;
    else if (phase_in < p3) ws_next = WS_FALL;
    else                    ws_next = WS_LOW;   // up to P4 = 2**N - 1
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ws    <= WS_LOW;
      phase <= '0;
      wrap  <= 1'b0;
      valid <= 1'b0;
    end else begin
      ws    <= ws_next;
      phase <= phase_in;
      wrap  <= wrap_in;
      valid <= valid_in;
    end
  end

endmodule
