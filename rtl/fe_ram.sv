// fe_ram: dual-port block memory for field elements.
//
// Holds DEPTH words of 255 bits: the two ladder points, the input x, the ladder
// constant, the projective randomizer, temporaries and the result. Each of the
// two ports reads or writes one word per cycle. Reads are synchronous with one
// cycle of latency, as in an FPGA block RAM; a read of the address written in
// the same cycle on the same port returns the old word. Writing one address
// from both ports in one cycle is not allowed. The contents are not reset.
//
// Interface: per port an address, a write enable, write data and read data.
// The 6-bit address width follows the design description; the word width of a
// whole field element (instead of a narrow BRAM word read serially) is this
// design's own choice.
module fe_ram
  import c25519_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic  clk,
  input  addr_t addr_a,
  input  logic  we_a,
  input  fe_t   wdata_a,
  output fe_t   rdata_a,
  input  addr_t addr_b,
  input  logic  we_b,
  input  fe_t   wdata_b,
  output fe_t   rdata_b
);

  fe_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_b <= mem[addr_b];
  end

  always_ff @(posedge clk) begin
    assert (!(we_a && we_b && addr_a == addr_b))
      else $error("fe_ram: both ports write address %0d", addr_a);
  end

endmodule
