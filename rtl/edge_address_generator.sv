// edge_address_generator: the phase-to-address mapper's address half, with the adaptive phase
// adjustment.
//
// It turns the waveform state WS and the phase P into an edge-memory address:
//   low level   address 0 (the low-level word of the rising set)
//   high level  address NR_total+1 (the high-level word of the rising set)
//   rising edge first sample 1 + offset, then +D per sample, held at NR_total+1
//   falling edge first sample NF_total+1 - offset, then -D per sample, held at 0; the falling
//               address is relative to fall_base, so the falling edge may use its own sample set
// D = Ts/Tres is the number of stored samples per sample period. The offset is E*D/K rounded
// to the nearest whole entry,
// where E is how far the phase has run past the start of the edge when its first sample is
// taken: for the rising edge this is the accumulator overflow value P_new, as in the published
// algorithm. For the falling edge the published example uses the same P_new, which is equal to
// P - P2 when P2 is a whole multiple of K; this design uses P - P2 in general so that the
// falling edge is placed correctly for any pulse width.
//
// An edge starts at the first valid sample in RISE (or any RISE sample that begins a new period)
// and at the first FALL sample after a non-FALL one. The offset comes from
// phase_offset_calculator, so the state and the start flag are delayed by its latency.
//
// Rule: the phase excess at an edge start must be below K. This always holds once running; it
// forbids only a start phase more than one sample into an edge (checked by an assertion).
//
// Interface and timing: one sample per clock; the address appears LATENCY = SW + 2 clocks (SW
// is the width of D)
// after the input state. `ws`, `edge_start` and `offset` are aligned with `addr` for monitoring.
// Configuration must be constant while running.
module edge_address_generator
  import pulse_pkg::*;
#(
  parameter int unsigned W      = PHASE_W,
  parameter int unsigned AW     = ADDR_W,
  parameter int unsigned SW     = STEP_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_in,
  input  wstate_e           ws_in,
  input  logic [W-1:0]      phase_in,
  input  logic              wrap_in,
  input  logic [W-1:0]      k,
  input  logic [W-1:0]      p2,
  input  logic [SW-1:0] d,
  input  logic [AW-1:0]     nr_total,
  input  logic [AW-1:0]     nf_total,
  input  logic [AW-1:0]     fall_base,
  output logic [AW-1:0]     addr,
  output wstate_e           ws,
  output logic              edge_start,
  output logic [SW-1:0] offset,
  output logic              valid
);

  localparam int unsigned LAT = SW + 1;  // phase_offset_calculator latency

  // ---- edge start detection and phase excess ----
  wstate_e      prev_ws;
  logic         start_in;
  logic [W-1:0] excess_in;

  always_comb begin
    start_in  = valid_in && (((ws_in == WS_RISE) && (wrap_in || prev_ws != WS_RISE)) ||
                             ((ws_in == WS_FALL) && (prev_ws != WS_FALL)));
    excess_in = (ws_in == WS_FALL) ? phase_in - p2 : phase_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !valid_in) prev_ws <= WS_LOW;
    else                     prev_ws <= ws_in;
  end

  // The offset division needs the excess to be less than one phase step.
  always_ff @(posedge clk) begin
    if (rst_n && start_in)
      assert (excess_in < k) else $error("edge start with phase excess %0d >= K %0d", excess_in, k);
  end

  logic [SW-1:0] ofs;
  phase_offset_calculator #(.W(W), .STEP_W(SW)) u_offset (
    .clk   (clk),
    .excess(excess_in),
    .k     (k),
    .d     (d),
    .offset(ofs)
  );

  // ---- delay state and flags alongside the division ----
  wstate_e ws_d    [LAT];
  logic    start_d [LAT];
  logic    valid_d [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        ws_d[i]    <= WS_LOW;
        start_d[i] <= 1'b0;
        valid_d[i] <= 1'b0;
      end
    end else begin
      ws_d[0]    <= ws_in;
      start_d[0] <= start_in;
      valid_d[0] <= valid_in;
      for (int i = 1; i < LAT; i++) begin
        ws_d[i]    <= ws_d[i-1];
        start_d[i] <= start_d[i-1];
        valid_d[i] <= valid_d[i-1];
      end
    end
  end

  // ---- rising / falling address generators and address selection ----
  wstate_e       cur_ws;
  logic          cur_start;
  logic [AW+1:0] rel, rel_next;  // address within the selected sample set
  logic [AW+1:0] top_r, top_f, dd, oo;

  always_comb begin
    cur_ws    = ws_d[LAT-1];
    cur_start = start_d[LAT-1];
    top_r     = (AW+2)'(nr_total) + 1'b1;
    top_f     = (AW+2)'(nf_total) + 1'b1;
    dd        = (AW+2)'(d);
    oo        = (AW+2)'(ofs);
    unique case (cur_ws)
      WS_RISE: begin
        rel_next = cur_start ? (AW+2)'(1) + oo : rel + dd;
        if (rel_next > top_r) rel_next = top_r;
      end
      WS_FALL: begin
        if (cur_start) rel_next = (oo > top_f) ? '0 : top_f - oo;
        else           rel_next = (rel < dd) ? '0 : rel - dd;
      end
      WS_HIGH: rel_next = top_r;
      default: rel_next = '0;  // WS_LOW
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rel        <= '0;
      addr       <= '0;
      ws         <= WS_LOW;
      edge_start <= 1'b0;
      offset     <= '0;
      valid      <= 1'b0;
    end else begin
      rel        <= rel_next;
      addr       <= (cur_ws == WS_FALL) ? fall_base + rel_next[AW-1:0] : rel_next[AW-1:0];
      ws         <= cur_ws;
      edge_start <= cur_start;
      offset     <= cur_start ? ofs : '0;
      valid      <= valid_d[LAT-1];
    end
  end

endmodule
