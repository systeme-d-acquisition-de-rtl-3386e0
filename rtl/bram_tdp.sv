// bram_tdp: true dual-port block RAM with byte write enables.
//
// One instance holds one packet buffer (BRAM#0 or BRAM#1). Port A belongs to
// the programmable logic (the ping-pong manager), port B to the processor
// side. Both ports are synchronous: the address is sampled on the clock edge
// and read data appears one cycle later (read-first on the same port).
// we is a 4-bit byte enable for the 32-bit word, as the 4-bit write-enable
// bus of the manager. The array starts all zero, which is the "free" status
// in word 0. Depth 1024 x 32 bits (one 36 Kbit block) is this design's
// choice; both ports share one clock.
module bram_tdp #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  // port A (logic side)
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [3:0]               a_we,
  input  logic [31:0]              a_wdata,
  output logic [31:0]              a_rdata,
  // port B (processor side)
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [3:0]               b_we,
  input  logic [31:0]              b_wdata,
  output logic [31:0]              b_rdata
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    for (int b = 0; b < 4; b++)
      if (a_we[b]) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
    b_rdata <= mem[b_addr];
    for (int b = 0; b < 4; b++)
      if (b_we[b]) mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
  end
endmodule
