// tb_edge_memory: self-checking test of the edge sample memory.
// Loads a rising set (low word, 40 edge samples floor((a-1)*65536/40), high word) and random
// words elsewhere, then reads addresses back and checks the one-clock read latency, a read and a
// write to the same address in one clock (read returns the old word), and that all 2048 words
// are distinct storage.
module tb_edge_memory;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned AW = 11, DW = 16;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  edge_memory #(.AW(AW), .DW(DW)) dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [DW-1:0] v);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = v;
    model[a] = v;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd_check(input int a);
    @(negedge clk);
    raddr = AW'(a);
    @(posedge clk); #0.1;
    checks++;
    if (rdata != model[a]) begin
      failures++;
      $display("FAIL addr %0d read %h exp %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    // every word gets a distinct value first
    for (int a = 0; a < 2**AW; a++) wr(a, DW'(a * 37 + 5));
    // rising set for 3.2 ns edges at 100 ps resolution, 16-bit DAC
    wr(0, 16'd0);
    for (int a = 1; a <= 40; a++) wr(a, DW'(((a - 1) * 65536) / 40));
    wr(41, 16'hFFFF);
    for (int a = 0; a < 2**AW; a++) rd_check(a);
    for (int i = 0; i < 500; i++) rd_check($urandom_range(0, 2**AW - 1));
    // published Table 1, scaled to 16 bits: address 35 is S4 at T_fine = 0.4 ns, 3481.6 * 16
    checks++;
    if (model[35] != 16'd55705) begin failures++; $display("FAIL table value"); end
    // read-during-write returns the old word
    @(negedge clk);
    raddr = 11'd7; we = 1'b1; waddr = 11'd7; wdata = 16'hABCD;
    @(posedge clk); #0.1;
    checks++;
    if (rdata != model[7]) begin failures++; $display("FAIL read during write"); end
    model[7] = 16'hABCD;
    @(negedge clk); we = 1'b0;
    rd_check(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
