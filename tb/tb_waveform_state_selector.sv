// tb_waveform_state_selector: self-checking test of the waveform state selector.
// Drives random and boundary phases against random ordered thresholds P1 <= P2 <= P3 and checks
// the registered state and the delayed phase/wrap/valid one clock later.
module tb_waveform_state_selector;
  timeunit 1ns; timeprecision 100ps;
  import pulse_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0, wrap_in = 1'b0;
  logic [W-1:0] phase_in = '0, p1, p2, p3, phase;
  wstate_e ws;
  logic wrap, valid;
  int checks = 0, failures = 0;
  int seen [4];

  waveform_state_selector #(.W(W)) dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wstate_e ref_state(input logic [W-1:0] p);
    if (p < p1) return WS_RISE;
    if (p < p2) return WS_HIGH;
    if (p < p3) return WS_FALL;
    return WS_LOW;
  endfunction

  initial begin
    logic [W-1:0] a, b, c, t;
    logic [W-1:0] pv;
    logic wv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (a > b) begin t = a; a = b; b = t; end
      if (b > c) begin t = b; b = c; c = t; end
      if (a > b) begin t = a; a = b; b = t; end
      if (r == 0) begin  // the published 16.7 ns example: P1 = 4K, P2 = 8K, P3 = 12K
        a = 32'd257183670 * 4; b = 32'd257183670 * 8; c = 32'd257183670 * 12;
      end
      p1 = a; p2 = b; p3 = c;
      for (int i = 0; i < 100; i++) begin
        case (i % 10)
          0: pv = p1 - 1;
          1: pv = p1;
          2: pv = p2 - 1;
          3: pv = p2;
          4: pv = p3 - 1;
          5: pv = p3;
          6: pv = 32'hFFFF_FFFF;
          7: pv = 0;
          default: pv = $urandom;
        endcase
        wv = 1'($urandom);
        @(negedge clk);
        phase_in = pv; wrap_in = wv; valid_in = 1'b1;
        @(posedge clk); #0.1;
        checks++;
        if (ws != ref_state(pv) || phase != pv || wrap != wv || !valid) begin
          failures++;
          $display("FAIL phase %h p1 %h p2 %h p3 %h ws %s", pv, p1, p2, p3, ws.name());
        end
        seen[ws]++;
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
