// Behavioural model of one bank of four 36-bit synchronous SRAM chips with a
// common address bus, for simulation only. Address, write enable and write
// data are registered on the clock edge; a write stores at that edge, a read
// returns the word on rdata one further clock later (two-clock pipelined read).
// Contents start random, as in a real chip.
module sram_model #(
  parameter int unsigned ADDR_W = 18
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [3:0][35:0]  wdata,
  output logic [3:0][35:0]  rdata
);
  logic [3:0][35:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] a_q;
  logic              we_q;
  logic [3:0][35:0]  d_q;
  always_ff @(posedge clk) begin
    a_q  <= addr;
    we_q <= we;
    d_q  <= wdata;
    if (we_q) mem[a_q] <= d_q;
    rdata <= mem[a_q];
  end
endmodule
