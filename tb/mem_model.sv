// mem_model: behavioural memory module for the crossbar testbenches (the
// memory modules themselves lie outside the crossbar). DEPTH words, indexed
// by the low address bits; reads are combinational, a write is taken at the
// rising clock edge when the module is selected with write mode set.
// Contents start at zero.
module mem_model #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 256
) (
  input  logic              clk,
  input  logic              sel,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  initial for (int a = 0; a < DEPTH; a++) mem[a] = '0;

  assign rdata = mem[int'(addr) % DEPTH];

  always_ff @(posedge clk)
    if (sel && we) mem[int'(addr) % DEPTH] <= wdata;
endmodule
