// tb_phase_accumulator: self-checking test of the DDS phase accumulator.
// Checks the phase sequence phase0 + n*K mod 2**32 against a 64-bit reference, the wrap flag on
// every overflow and on the first sample, the one-clock start latency and that the start phase
// is the one present on the first clock with run high.
module tb_phase_accumulator;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [W-1:0] k, phase0, phase;
  logic wrap, valid;
  int checks = 0, failures = 0, wraps = 0;

  phase_accumulator #(.W(W)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input logic [W-1:0] kk, input logic [W-1:0] p0, input int n);
    longint unsigned ref_p;
    k = kk;
    phase0 = ~p0;
    run = 1'b0;
    repeat (3) @(posedge clk);
    #0.1 check(!valid && phase == ~p0, "idle follows phase0");
    // the start phase is taken on the first clock with run high
    phase0 = p0;
    run = 1'b1;
    @(posedge clk); #0.1;
    check(valid && wrap && phase == p0, "first sample one clock after run");
    ref_p = longint'(p0);
    for (int i = 1; i < n; i++) begin
      logic exp_wrap;
      @(posedge clk); #0.1;
      ref_p = ref_p + longint'(kk);
      exp_wrap = (ref_p >= 64'h1_0000_0000);
      ref_p = ref_p & 64'hFFFF_FFFF;
      check(valid && phase == W'(ref_p) && wrap == exp_wrap,
            $sformatf("sample %0d phase %h exp %h wrap %b", i, phase, ref_p, wrap));
      if (wrap) wraps++;
    end
    run = 1'b0;
  endtask

  initial begin
    k = '0;
    phase0 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 16.7 ns period at 1 GSPS: K = floor(2**32 / 16.7)
    run_case(32'd257183670, 32'd0, 200);
    run_case(32'd233422135, 32'd12345, 200);  // 18.4 ns
    for (int t = 0; t < 5; t++) run_case($urandom, $urandom, 300);
    check(wraps > 20, "overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
