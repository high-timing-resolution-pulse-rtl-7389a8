// feature_fitting_pulse_synth: feature-fitting DDS pulse synthesizer (the synthesis module).
//
// A conventional DDS stores a whole waveform period and can place a pulse edge only on the
// sample grid (1 ns at 1 GSPS). This synthesizer stores only the pulse edges, sampled D times
// more finely in amplitude than one sample period needs, and places each edge with a time
// resolution Tres = Ts/D: it picks, for every edge, the set of stored samples whose amplitudes
// are shifted by the fraction of a sample period that the phase accumulator says the edge
// start lies before the sample instant (the adaptive phase adjustment).
//
// Datapath, one sample per clock:
//   phase_accumulator -> waveform_state_selector -> edge_address_generator (with
//   phase_offset_calculator) -> edge_memory -> amplitude_scaler -> DAC sample port
// The DAC, its serial link and the sample clock generator are outside this module.
//
// Interface: `cfg` holds the host-computed pulse parameters (see pulse_pkg::pulse_cfg_t). All of
// it except `gain` (any time) and `phase0` (taken when `run` rises) must be stable while `run` is
// high; an assertion checks this. The edge memory is loaded through mem_we/mem_waddr/
// mem_wdata while `run` is low. Raising `run` starts synthesis from cfg.phase0; the first sample
// appears LATENCY = STEP_W + 6 clocks later (13 clocks at the defaults), then one sample per
// clock with `dac_valid` high. mon_state, mon_edge_start and mon_offset are the waveform
// state, the edge
// start flag and the address offset chosen at that start for the sample on dac_sample, for
// observation only.
module feature_fitting_pulse_synth
  import pulse_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  pulse_cfg_t        cfg,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_waddr,
  input  logic [DAC_W-1:0]  mem_wdata,
  output logic [DAC_W-1:0]  dac_sample,
  output logic              dac_valid,
  output wstate_e           mon_state,
  output logic              mon_edge_start,
  output logic [STEP_W-1:0] mon_offset
);

  // Configuration rule: all fields except gain and phase0 stay fixed while synthesis runs.
  localparam int unsigned FIXED_W = 4 * PHASE_W + STEP_W + 3 * ADDR_W;
  logic [FIXED_W-1:0] fixed_now, fixed_q;
  logic               run_q;
  assign fixed_now = {cfg.k, cfg.p1, cfg.p2, cfg.p3, cfg.d, cfg.nr_total, cfg.nf_total, cfg.fall_base};
  always_ff @(posedge clk) begin
    fixed_q <= fixed_now;
    run_q   <= run;
    if (rst_n && run && run_q)
      assert (fixed_now == fixed_q) else $error("configuration changed while running");
  end

  // phase accumulator
  logic [PHASE_W-1:0] acc_phase;
  logic               acc_wrap, acc_valid;

  phase_accumulator #(.W(PHASE_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .run   (run),
    .k     (cfg.k),
    .phase0(cfg.phase0),
    .phase (acc_phase),
    .wrap  (acc_wrap),
    .valid (acc_valid)
  );

  // waveform state selector
  wstate_e            sel_ws;
  logic [PHASE_W-1:0] sel_phase;
  logic               sel_wrap, sel_valid;

  waveform_state_selector #(.W(PHASE_W)) u_sel (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_in(acc_valid),
    .phase_in(acc_phase),
    .wrap_in (acc_wrap),
    .p1      (cfg.p1),
    .p2      (cfg.p2),
    .p3      (cfg.p3),
    .ws      (sel_ws),
    .phase   (sel_phase),
    .wrap    (sel_wrap),
    .valid   (sel_valid)
  );

  // edge address generator with adaptive phase adjustment
  logic [ADDR_W-1:0] ag_addr;
  wstate_e           ag_ws;
  logic              ag_start, ag_valid;
  logic [STEP_W-1:0] ag_offset;

  edge_address_generator #(.W(PHASE_W), .AW(ADDR_W), .SW(STEP_W)) u_addr (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (sel_valid),
    .ws_in     (sel_ws),
    .phase_in  (sel_phase),
    .wrap_in   (sel_wrap),
    .k         (cfg.k),
    .p2        (cfg.p2),
    .d         (cfg.d),
    .nr_total  (cfg.nr_total),
    .nf_total  (cfg.nf_total),
    .fall_base (cfg.fall_base),
    .addr      (ag_addr),
    .ws        (ag_ws),
    .edge_start(ag_start),
    .offset    (ag_offset),
    .valid     (ag_valid)
  );

  // edge memory (one registered read)
  logic [DAC_W-1:0] mem_rdata;
  logic             mem_valid;
  wstate_e          mem_ws;
  logic             mem_start;
  logic [STEP_W-1:0] mem_offset;

  edge_memory #(.AW(ADDR_W), .DW(DAC_W)) u_mem (
    .clk  (clk),
    .we   (mem_we),
    .waddr(mem_waddr),
    .wdata(mem_wdata),
    .raddr(ag_addr),
    .rdata(mem_rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_valid <= 1'b0;
      mem_ws    <= WS_LOW;
      mem_start <= 1'b0;
      mon_state      <= WS_LOW;
      mon_edge_start <= 1'b0;
      mem_offset     <= '0;
      mon_offset     <= '0;
    end else begin
      mem_valid <= ag_valid;
      mem_ws    <= ag_ws;
      mem_start <= ag_start;
      mon_state      <= mem_ws;
      mon_edge_start <= mem_start;
      mem_offset     <= ag_offset;
      mon_offset     <= mem_offset;
    end
  end

  // amplitude control
  amplitude_scaler #(.DW(DAC_W), .GW(GAIN_W), .GAIN_FRAC(GAIN_FRAC)) u_amp (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (mem_valid),
    .sample_in(mem_rdata),
    .gain     (cfg.gain),
    .sample   (dac_sample),
    .valid    (dac_valid)
  );

endmodule
