// edge_memory: the feature-sample memory of the synthesizer.
//
// Instead of a whole waveform period, it holds only the edge ("feature") samples plus the two
// level words. For a rising set of NR_total samples the layout is: address 0 the low level,
// addresses 1..NR_total the edge samples in rising order, spaced by 2**N_DAC / NR_total in
// amplitude (sample a holds floor((a-1) * 2**N_DAC / NR_total)), and address NR_total+1 the high
// level. The falling set, when rise and fall times differ, uses the same layout at its own base.
// The published design fits the table in one block RAM; 2048 x 16 bits is one 36 Kb block RAM
// and holds, for example, 400 samples for a 3.2 ns edge at 10 ps resolution.
//
// Interface and timing: simple dual-port RAM. The host writes through (we, waddr, wdata); the
// synthesis path reads every clock with a one-clock registered read (rdata is the word at the
// raddr of the previous clock). The contents have no reset and must be loaded before use.
module edge_memory #(
  parameter int unsigned AW = pulse_pkg::ADDR_W,
  parameter int unsigned DW = pulse_pkg::DAC_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
