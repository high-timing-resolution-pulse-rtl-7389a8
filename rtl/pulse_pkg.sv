// pulse_pkg: widths, the waveform-state encoding and the run-time configuration record shared by
// the feature-fitting pulse synthesizer.
//
// The phase accumulator width (32 bits) and the 16-bit sample width of the DAC follow the
// published design. The edge-memory address width (2048 words, i.e. one 36 Kb block RAM of 16-bit
// words), the 7-bit address step D (so D = Ts/Tres up to 127, covering the 100 ps and 10 ps
// resolutions) and the Q1.16 gain format are choices of this implementation.
package pulse_pkg;

  localparam int unsigned PHASE_W   = 32;  // N, phase accumulator width
  localparam int unsigned DAC_W     = 16;  // N_DAC, sample width
  localparam int unsigned ADDR_W    = 11;  // edge memory address width (2048 words)
  localparam int unsigned STEP_W    = 7;   // width of the address step D = Ts/Tres
  localparam int unsigned GAIN_W    = 17;  // amplitude gain, unsigned fixed point
  localparam int unsigned GAIN_FRAC = 16;  // gain fraction bits: 2**16 is unity

  // Waveform state WS decided by the waveform state selector.
  typedef enum logic [1:0] {
    WS_LOW  = 2'd0,
    WS_RISE = 2'd1,
    WS_HIGH = 2'd2,
    WS_FALL = 2'd3
  } wstate_e;

  // Run-time configuration, computed by the host from period, pulse width, rise and fall time.
  //   k         frequency control word, K = 2**N * Ts / period
  //   phase0    initial phase loaded when synthesis starts
  //   p1        end of the rising edge,  P1 = TR*K/(0.8*Ts)
  //   p2        start of the falling edge, P2 = (TR + 1.6*TW - TF)*K/(1.6*Ts)
  //   p3        end of the falling edge,   P3 = (TR + 1.6*TW + TF)*K/(1.6*Ts)
  //   d         address step per sample, D = Ts/Tres
  //   nr_total  number of rising-edge samples stored (NR_total); the rising set occupies
  //             addresses 0 (low level), 1..nr_total (edge), nr_total+1 (high level)
  //   nf_total  number of falling-edge samples stored (NF_total)
  //   fall_base base address of the falling set, laid out like the rising set; equal to 0 when
  //             rise and fall times are equal and one set serves both edges
  //   gain      output amplitude gain, 2**GAIN_FRAC = 1.0
  typedef struct packed {
    logic [PHASE_W-1:0] k;
    logic [PHASE_W-1:0] phase0;
    logic [PHASE_W-1:0] p1;
    logic [PHASE_W-1:0] p2;
    logic [PHASE_W-1:0] p3;
    logic [STEP_W-1:0]  d;
    logic [ADDR_W-1:0]  nr_total;
    logic [ADDR_W-1:0]  nf_total;
    logic [ADDR_W-1:0]  fall_base;
    logic [GAIN_W-1:0]  gain;
  } pulse_cfg_t;

endpackage
