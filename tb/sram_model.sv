// sram_model: behavioural model of one SRAM bank of the on-board computer,
// 2**ADDR_W words by WIDTH bits (1M x 32 by default), for simulation only.
//
// Reads are asynchronous: rdata shows the addressed word while oe is high
// and is zero otherwise. Writes take place at the rising edge of clk while
// we is high; a real asynchronous SRAM would write at the end of its write
// pulse, which a testbench clock edge stands in for here. upset() flips
// one stored bit, as a single event upset would, and peek() reads a word
// without the bus.
module sram_model #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned WIDTH  = 32
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              oe,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  initial for (int unsigned a = 0; a < 2**ADDR_W; a++) mem[a] = '0;

  always_ff @(posedge clk) if (we) mem[addr] <= wdata;

  assign rdata = oe ? mem[addr] : '0;

  function automatic void upset(logic [ADDR_W-1:0] a, int unsigned bit_idx);
    mem[a][bit_idx] = ~mem[a][bit_idx];
  endfunction

  function automatic logic [WIDTH-1:0] peek(logic [ADDR_W-1:0] a);
    return mem[a];
  endfunction

endmodule
