// tb_phase_offset_calculator: self-checking test of the pipelined offset divider.
// Streams one random (E, K, D) per clock with E < K and checks, STEP_W+1 clocks later, that the
// offset equals round(E*D/K) = floor((E*D + floor(K/2))/K) computed with 64-bit arithmetic. K
// and D change between bursts
// only, as in use. Includes the published example: P_new = 77155094, K = 257183670, D = 10
// gives offset 3 (T_fine = 0.3 ns).
module tb_phase_offset_calculator;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned W = 32, SW = 7, LAT = SW + 1;
  logic clk = 1'b0;
  logic [W-1:0] excess, k;
  logic [SW-1:0] d, offset;
  int checks = 0, failures = 0;
  longint unsigned expq [$];

  phase_offset_calculator #(.W(W), .STEP_W(SW)) dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e, kk, dd;
    for (int burst = 0; burst < 60; burst++) begin
      kk = (burst == 0) ? 257183670 : 64'($urandom_range(1, 32'hFFFF_FFFF));
      if (burst % 7 == 3) kk = 64'($urandom_range(1, 1000));
      dd = (burst == 0) ? 10 : (burst % 2 == 1) ? 100 : 64'($urandom_range(1, 127));
      expq.delete();
      for (int i = 0; i < 200 + LAT; i++) begin
        @(negedge clk);
        if (i < 200) begin
          e = (burst == 0 && i == 0) ? 77155094 :
              (i == 1) ? kk - 1 : (i == 2) ? 0 : 64'($urandom) % kk;
          excess = W'(e); k = W'(kk); d = SW'(dd);
          expq.push_back((e * dd + kk / 2) / kk);
        end
        if (i >= LAT) begin
          longint unsigned ex;
          ex = expq.pop_front();
          checks++;
          if (offset != SW'(ex)) begin
            failures++;
            $display("FAIL K %0d D %0d offset %0d exp %0d", kk, dd, offset, ex);
          end
        end
        if (burst == 0 && i == LAT) begin
          checks++;
          if (offset != 3) begin failures++; $display("FAIL published example gives %0d", offset); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
