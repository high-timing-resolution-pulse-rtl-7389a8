// tb_feature_fitting_pulse_synth: end-to-end test of the feature-fitting pulse synthesizer at its
// default sizes (32-bit phase, 16-bit samples, 2048-word edge memory).
//
// The testbench acts as the host: it computes K, P1..P3, D and the edge sample sets from the
// pulse period, width, rise and fall times and the resolution, loads the edge memory through the
// write port and starts synthesis. Every output sample is compared with an independent closed
// form (phase -> state -> address -> stored value -> gain). Independently of that, the 50 %
// crossings of the rising and falling edges are found by interpolating between output samples
// and compared with the ideal crossing times of the requested pulse: they must lie within half a
// resolution step, which is the timing resolution the design claims. The start latency is
// checked on every run. The runs cover the pulse settings the design is evaluated with:
// 16.7 ns period at 100 ps and at 1 ns, non-zero start phases, 100 ps period sweeps
// 16.0..16.3 ns and 18.4..19.4 ns, a 10 ps sweep 18.40..18.50 ns, unequal rise and fall times
// with separate sample sets, amplitude steps and sample-period changes. Each mechanism (phase
// overflow, non-zero rising and falling offsets, clamping at the
// high level, separate falling set, amplitude scaling, all four states) is counted and must
// occur.
module tb_feature_fitting_pulse_synth;
  timeunit 1ns; timeprecision 100ps;
  import pulse_pkg::*;

  localparam int unsigned LATENCY = STEP_W + 6;
  localparam real FS = 65536.0;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  pulse_cfg_t cfg;
  logic mem_we = 1'b0;
  logic [ADDR_W-1:0] mem_waddr = '0;
  logic [DAC_W-1:0] mem_wdata = '0;
  logic [DAC_W-1:0] dac_sample;
  logic dac_valid;
  wstate_e mon_state;
  logic mon_edge_start;
  logic [STEP_W-1:0] mon_offset;

  feature_fitting_pulse_synth dut (.*);

  always #0.5 clk = ~clk;  // 1 GSPS sample clock

  int checks = 0, failures = 0;
  // mechanism counters
  int n_wrap = 0, n_rise_ofs = 0, n_fall_ofs = 0, n_clamp = 0, n_sep_fall = 0, n_gain = 0;
  int n_state [4];
  int n_cross = 0;
  real worst_err = 0.0;

  logic [DAC_W-1:0] table_m [2**ADDR_W];  // the host's copy of the edge memory

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  typedef struct {
    longint unsigned k, p1, p2, p3, d, nr, nf, fb, gain;
    real period, tw, tr, tf;  // in sample periods
  } tcfg_t;

  // Host parameter calculation; all times in units of the sample period Ts.
  function automatic tcfg_t make_cfg(input real period, input real tw, input real tr,
                                     input real tf, input real tres, input real g);
    tcfg_t c;
    c.period = period; c.tw = tw; c.tr = tr; c.tf = tf;
    c.k  = longint'($floor(4294967296.0 / period));
    c.p1 = longint'($floor(tr * real'(c.k) / 0.8));
    c.p2 = longint'($floor((tr + 1.6 * tw - tf) * real'(c.k) / 1.6));
    c.p3 = longint'($floor((tr + 1.6 * tw + tf) * real'(c.k) / 1.6));
    c.d  = longint'(1.0 / tres);
    c.nr = longint'($floor(tr / (0.8 * tres) + 1e-6));
    c.nf = longint'($floor(tf / (0.8 * tres) + 1e-6));
    c.fb = (c.nr == c.nf) ? 0 : c.nr + 2;
    c.gain = longint'(g * 65536.0);
    return c;
  endfunction

  task automatic load_set(input int base, input int n);
    for (int a = 0; a <= n + 1; a++) begin
      longint unsigned v;
      v = (a == 0) ? 0 : (a == n + 1) ? 65535 : (longint'(a) - 1) * 65536 / longint'(n);
      @(negedge clk);
      mem_we = 1'b1;
      mem_waddr = ADDR_W'(base + a);
      mem_wdata = DAC_W'(v);
      table_m[base + a] = DAC_W'(v);
    end
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  function automatic longint unsigned rnd_div(input longint unsigned num, input longint unsigned den);
    return (num + den / 2) / den;
  endfunction

  // Run one pulse setting for n_periods periods and check everything.
  task automatic run_pulse(input tcfg_t c, input int n_periods, input bit reload,
                          input longint unsigned phase0 = 0);
    longint unsigned p;
    int n_samples, lat;
    wstate_e prev_s;
    real prev_v, mid;
    real tol;
    if (reload) begin
      load_set(0, int'(c.nr));
      if (c.fb != 0) load_set(int'(c.fb), int'(c.nf));
    end
    cfg.k = PHASE_W'(c.k); cfg.phase0 = PHASE_W'(phase0);
    cfg.p1 = PHASE_W'(c.p1); cfg.p2 = PHASE_W'(c.p2); cfg.p3 = PHASE_W'(c.p3);
    cfg.d = STEP_W'(c.d); cfg.nr_total = ADDR_W'(c.nr); cfg.nf_total = ADDR_W'(c.nf);
    cfg.fall_base = ADDR_W'(c.fb); cfg.gain = GAIN_W'(c.gain);
    n_samples = int'($ceil(real'(n_periods) * c.period));
    mid = 65535.0 * real'(c.gain) / 65536.0 / 2.0;
    tol = 0.5 / real'(c.d) + 0.002;
    // start and measure the latency
    @(negedge clk);
    run = 1'b1;
    lat = 0;
    do begin
      @(posedge clk); #0.1;
      lat++;
    end while (!dac_valid && lat < 100);
    checks++;
    if (lat != LATENCY) fail($sformatf("latency %0d, expected %0d", lat, LATENCY));
    p = phase0;
    prev_s = WS_LOW;
    prev_v = 0.0;
    for (int n = 0; n < n_samples; n++) begin
      wstate_e s;
      longint unsigned a, o, v;
      bit st;
      if (n > 0) begin @(posedge clk); #0.1; end
      // reference: state, address, stored value, gain
      s = (p < c.p1) ? WS_RISE : (p < c.p2) ? WS_HIGH : (p < c.p3) ? WS_FALL : WS_LOW;
      o = 0;
      st = 1'b0;
      unique case (s)
        WS_RISE: begin
          o = rnd_div(p * c.d, c.k);
          a = 1 + o;
          if (a > c.nr + 1) a = c.nr + 1;
          st = (n == 0) || (p < c.k) || (prev_s != WS_RISE);
        end
        WS_HIGH: a = c.nr + 1;
        WS_FALL: begin
          o = rnd_div((p - c.p2) * c.d, c.k);
          a = c.fb + ((o > c.nf + 1) ? 0 : c.nf + 1 - o);
          st = (prev_s != WS_FALL);
        end
        default: a = 0;
      endcase
      v = (longint'(table_m[ADDR_W'(a)]) * c.gain) >> 16;
      if (v > 65535) v = 65535;
      checks++;
      if (!dac_valid || dac_sample != DAC_W'(v) || mon_state != s || mon_edge_start != st ||
          (st && mon_offset != STEP_W'(o)))
        fail($sformatf("sample %0d: got %0d state %s start %b ofs %0d, expected %0d %s %b %0d",
                       n, dac_sample, mon_state.name(), mon_edge_start, mon_offset, v, s.name(), st, o));
      // mechanism counters
      n_state[s]++;
      if (n > 0 && p < c.k) n_wrap++;
      if (st && s == WS_RISE && o != 0) n_rise_ofs++;
      if (st && s == WS_FALL && o != 0) n_fall_ofs++;
      if (st && s == WS_FALL && c.fb != 0) n_sep_fall++;
      if (s == WS_RISE && a == c.nr + 1) n_clamp++;
      if (c.gain != 65536 && s == WS_HIGH) n_gain++;
      // 50 % crossings, measured only between two samples on the same ramp
      if (phase0 == 0 && n > 0 && s == prev_s && (s == WS_RISE || s == WS_FALL) &&
          a != 0 && a != c.nr + 1 && a != c.fb && a != c.fb + c.nf + 1) begin
        real vr, t_meas, t_ideal, cyc_start;
        longint unsigned cyc;
        vr = real'(dac_sample);
        if ((s == WS_RISE && prev_v < mid && vr >= mid) || (s == WS_FALL && prev_v > mid && vr <= mid)) begin
          t_meas = real'(n - 1) + (mid - prev_v) / (vr - prev_v);
          // the period this sample belongs to starts where the phase last wrapped
          cyc = (longint'(n) * c.k) >> 32;
          cyc_start = real'(cyc) * 4294967296.0 / real'(c.k);
          t_ideal = cyc_start + ((s == WS_RISE) ? c.tr / 1.6 : real'(c.p2) / real'(c.k) + c.tf / 1.6);
          n_cross++;
          checks++;
          if (t_meas - t_ideal > tol || t_ideal - t_meas > tol)
            fail($sformatf("%s crossing at %f, ideal %f", s.name(), t_meas, t_ideal));
          if (t_meas - t_ideal > worst_err) worst_err = t_meas - t_ideal;
          if (t_ideal - t_meas > worst_err) worst_err = t_ideal - t_meas;
        end
      end
      prev_s = s;
      prev_v = real'(dac_sample);
      p = (p + c.k) & 64'hFFFF_FFFF;
    end
    // stop and drain
    @(negedge clk);
    run = 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    #0.1;
    checks++;
    if (dac_valid) fail("output still valid after stop");
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 16.7 ns period, 8 ns width, 3.2 ns edges, 100 ps resolution (40 edge samples)
    run_pulse(make_cfg(16.7, 8.0, 3.2, 3.2, 0.1, 1.0), 300, 1'b1);
    // the same pulse at 1 ns resolution (4 edge samples), and from start phases in the low and
    // high levels (a start phase inside an edge is not allowed)
    run_pulse(make_cfg(16.7, 8.0, 3.2, 3.2, 1.0, 1.0), 100, 1'b1);
    run_pulse(make_cfg(16.7, 8.0, 3.2, 3.2, 0.1, 1.0), 100, 1'b1, 64'd3_500_000_000);
    run_pulse(make_cfg(16.7, 8.0, 3.2, 3.2, 0.1, 1.0), 100, 1'b0, 64'd1_500_000_000);
    // periods 16.0 .. 16.3 ns in 100 ps steps, the pre-hardware simulation settings
    for (int i = 0; i <= 3; i++)
      run_pulse(make_cfg(16.0 + 0.1 * i, 8.0, 3.2, 3.2, 0.1, 1.0), 60, 1'b0);
    // 100 ps period steps, 18.4 .. 19.4 ns
    for (int i = 0; i <= 10; i++)
      run_pulse(make_cfg(18.4 + 0.1 * i, 8.0, 3.2, 3.2, 0.1, 1.0), 60, 1'b0);
    // 10 ps resolution (400 edge samples), period steps 18.40 .. 18.50 ns
    for (int i = 0; i <= 10; i++)
      run_pulse(make_cfg(18.4 + 0.01 * i, 8.0, 3.2, 3.2, 0.01, 1.0), 60, i == 0);
    // unequal edges, 50 ns period, 25 ns width: rise 10 / fall 3.2, then rise 3.2 / fall 8
    run_pulse(make_cfg(50.0, 25.0, 10.0, 3.2, 0.1, 1.0), 60, 1'b1);
    run_pulse(make_cfg(50.0, 25.0, 3.2, 8.0, 0.1, 1.0), 60, 1'b1);
    // amplitude steps: 800 mV .. 1.6 V peak-to-peak on a 1.6 V full scale
    for (int mv = 800; mv <= 1600; mv += 100)
      run_pulse(make_cfg(16.7, 8.0, 3.2, 3.2, 0.1, real'(mv) / 1600.0), 40, mv == 800);
    // sample period 1, 2, 5, 10 ns at a fixed 100 ps resolution: period 100.3 ns, 8 ns edges
    foreach (ts_list[i])
      run_pulse(make_cfg(100.3 / ts_list[i], 40.0 / ts_list[i], 8.0 / ts_list[i], 8.0 / ts_list[i],
                         0.1 / ts_list[i], 1.0), 20, 1'b1);

    checks += 10;
    if (n_wrap == 0)     fail("no phase overflow");
    if (n_rise_ofs == 0) fail("no rising edge with a non-zero offset");
    if (n_fall_ofs == 0) fail("no falling edge with a non-zero offset");
    if (n_clamp == 0)    fail("rising address never held at the high level");
    if (n_sep_fall == 0) fail("separate falling set never used");
    if (n_gain == 0)     fail("amplitude scaling never applied");
    if (n_cross < 1000)  fail("too few edge crossings measured");
    for (int s = 0; s < 4; s++) if (n_state[s] == 0) fail($sformatf("state %0d never seen", s));
    $display("overflows %0d, rising offsets %0d, falling offsets %0d, clamps %0d, separate-set falls %0d, scaled samples %0d",
             n_wrap, n_rise_ofs, n_fall_ofs, n_clamp, n_sep_fall, n_gain);
    $display("edge crossings measured %0d, worst timing error %f sample periods", n_cross, worst_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ts_list [4] = '{1.0, 2.0, 5.0, 10.0};
endmodule
