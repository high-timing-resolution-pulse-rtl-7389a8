// tb_edge_address_generator: self-checking test of the edge address generator.
// The testbench plays the phase accumulator and state selector itself (phase0 + n*K mod 2**32,
// state from P1..P3) and checks every address, SW+2 clocks later, against the closed form
//   rising:  min(1 + round(P*D/K), NR_total+1)
//   falling: fall_base + max(0, NF_total+1 - round((P-P2)*D/K))
//   high:    NR_total+1,  low: 0
// which the block reaches by accumulation instead. Configurations: the published 16.7 ns /
// 100 ps example, a 10 ps resolution pulse, unequal rise and fall times with a separate falling
// set, and a random start phase. It counts edge starts with a non-zero offset and clamping at
// the high level, and fails if either never happens.
module tb_edge_address_generator;
  timeunit 1ns; timeprecision 100ps;
  import pulse_pkg::*;
  localparam int unsigned W = 32, AW = 11, SW = 7, LAT = SW + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0, wrap_in = 1'b0;
  wstate_e ws_in = WS_LOW;
  logic [W-1:0] phase_in = '0, k = 1, p2 = '0;
  logic [SW-1:0] d = 1;
  logic [AW-1:0] nr_total = '0, nf_total = '0, fall_base = '0;
  logic [AW-1:0] addr;
  wstate_e ws;
  logic edge_start, valid;
  logic [SW-1:0] offset;
  int checks = 0, failures = 0, ofs_starts = 0, clamps = 0, fall_starts = 0;

  edge_address_generator #(.W(W), .AW(AW), .SW(SW)) dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned rnd_div(input longint unsigned num, input longint unsigned den);
    return (num + den / 2) / den;
  endfunction

  typedef struct {
    longint unsigned k, p1, p2, p3, d, nr, nf, fb;
  } tcfg_t;

  // host-side parameter calculation, times in sample periods (Ts = 1 ns)
  function automatic tcfg_t make_cfg(input real period, input real tw, input real tr,
                                     input real tf, input real tres);
    tcfg_t c;
    c.k  = longint'($floor(4294967296.0 / period));
    c.p1 = longint'($floor(tr * real'(c.k) / 0.8));
    c.p2 = longint'($floor((tr + 1.6 * tw - tf) * real'(c.k) / 1.6));
    c.p3 = longint'($floor((tr + 1.6 * tw + tf) * real'(c.k) / 1.6));
    c.d  = longint'(1.0 / tres);
    c.nr = longint'($floor(tr / (0.8 * tres) + 1e-6));
    c.nf = longint'($floor(tf / (0.8 * tres) + 1e-6));
    c.fb = (c.nr == c.nf) ? 0 : c.nr + 2;
    return c;
  endfunction

  task automatic run_case(input tcfg_t c, input longint unsigned phase0, input int n);
    longint unsigned p;
    wstate_e s;
    longint unsigned exp_q [$];
    wstate_e exp_s [$];
    k = W'(c.k); p2 = W'(c.p2); d = SW'(c.d);
    nr_total = AW'(c.nr); nf_total = AW'(c.nf); fall_base = AW'(c.fb);
    p = phase0;
    for (int i = 0; i < n + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        longint unsigned ea;
        wstate_e es;
        ea = exp_q.pop_front();
        es = exp_s.pop_front();
        checks++;
        if (!valid || addr != AW'(ea) || ws != es) begin
          failures++;
          $display("FAIL sample %0d ws %s/%s addr %0d exp %0d", i - LAT, ws.name(), es.name(), addr, ea);
        end
        if (edge_start && offset != 0) ofs_starts++;
        if (edge_start && ws == WS_FALL) fall_starts++;
        if (ws == WS_RISE && addr == AW'(c.nr + 1)) clamps++;
      end
      if (i < n) begin
        longint unsigned a;
        s = (p < c.p1) ? WS_RISE : (p < c.p2) ? WS_HIGH : (p < c.p3) ? WS_FALL : WS_LOW;
        unique case (s)
          WS_RISE: begin a = 1 + rnd_div(p * c.d, c.k); if (a > c.nr + 1) a = c.nr + 1; end
          WS_HIGH: a = c.nr + 1;
          WS_FALL: begin
            longint unsigned o;
            o = rnd_div((p - c.p2) * c.d, c.k);
            a = c.fb + ((o > c.nf + 1) ? 0 : c.nf + 1 - o);
          end
          default: a = 0;
        endcase
        exp_q.push_back(a);
        exp_s.push_back(s);
        valid_in = 1'b1;
        ws_in = s;
        phase_in = W'(p);
        wrap_in = (i == 0) || (p < c.k);  // first sample, or the phase just overflowed
        p = (p + c.k) & 64'hFFFF_FFFF;
      end else begin
        valid_in = 1'b0;
      end
    end
    // let the pipeline drain while idle
    repeat (LAT + 2) @(negedge clk);
  endtask

  initial begin
    tcfg_t c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // published example: period 16.7 ns, width 8 ns, edges 3.2 ns, 100 ps resolution
    c = make_cfg(16.7, 8.0, 3.2, 3.2, 0.1);
    if (c.k != 257183670 || c.nr != 40) begin
      failures++;
      $display("FAIL host calc K %0d NR %0d", c.k, c.nr);
    end
    run_case(c, 0, 2000);
    // 10 ps resolution, period 18.45 ns
    run_case(make_cfg(18.45, 8.0, 3.2, 3.2, 0.01), 0, 2000);
    // unequal edges: period 50 ns, width 25 ns, rise 10 ns, fall 3.2 ns; and the reverse
    run_case(make_cfg(50.0, 25.0, 10.0, 3.2, 0.1), 0, 2000);
    run_case(make_cfg(50.0, 25.0, 3.2, 8.0, 0.1), 0, 2000);
    // random start phase
    run_case(make_cfg(19.3, 8.0, 3.2, 3.2, 0.1), 64'($urandom), 2000);
    checks++;
    if (ofs_starts < 100 || clamps == 0 || fall_starts < 100) begin
      failures++;
      $display("FAIL mechanisms: offset starts %0d clamps %0d fall starts %0d", ofs_starts, clamps, fall_starts);
    end
    $display("offset starts %0d, clamps %0d, fall starts %0d", ofs_starts, clamps, fall_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
