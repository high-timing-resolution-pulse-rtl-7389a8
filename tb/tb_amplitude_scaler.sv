// tb_amplitude_scaler: self-checking test of the amplitude scaler.
// Random samples and gains, plus the gains for 800 mV..1.6 V peak-to-peak in 100 mV steps on a
// 1.6 V full scale; each output is compared with min(floor(s*g/2**16), 65535) one clock later,
// with valid delayed alongside.
module tb_amplitude_scaler;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned DW = 16, GW = 17, GF = 16;
  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0, valid;
  logic [DW-1:0] sample_in = '0, sample;
  logic [GW-1:0] gain = '0;
  int checks = 0, failures = 0, sats = 0;

  amplitude_scaler #(.DW(DW), .GW(GW), .GAIN_FRAC(GF)) dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint unsigned s, input longint unsigned g, input bit v);
    longint unsigned e;
    @(negedge clk);
    sample_in = DW'(s); gain = GW'(g); valid_in = v;
    e = (s * g) >> GF;
    if (e > 65535) begin e = 65535; sats++; end
    @(posedge clk); #0.1;
    checks++;
    if (sample != DW'(e) || valid != v) begin
      failures++;
      $display("FAIL s %0d g %0d out %0d exp %0d", s, g, sample, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int mv = 800; mv <= 1600; mv += 100)
      for (int s = 0; s < 65536; s += 4099) one(64'(s), (longint'(mv) * 65536) / 1600, 1'b1);
    one(65535, 65536, 1'b1);
    for (int i = 0; i < 3000; i++) one(64'($urandom_range(0, 65535)), 64'($urandom_range(0, 131071)), 1'($urandom));
    checks++;
    if (sats == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
