// addr_scrambler: random permutation of the block-memory addresses.
//
// The Montgomery ladder reads the two ladder points in an order set by the
// secret scalar bit, so the memory addresses it drives depend on the key. This
// block hides that dependency: before every scalar multiplication a 6-bit LFSR
// (x^6 + x^5 + 1, maximal length) is mixed with 6 fresh random bits and then
// clocked, and its state becomes a mask that is XORed onto every address of both
// memory ports. XOR with a fixed mask is a bijection, so the program's data
// layout is kept, but the physical addresses of R0 and R1 differ from run to run.
//
// Interface: pulse start with seed; busy is high for INIT_CYCLES - 1 cycles and
// done pulses in the cycle after (INIT_CYCLES = 22 cycles from start to done, the
// initialisation delay given for this countermeasure). The mask must not change
// while the memory holds live data, so start only between multiplications. The
// two address ports are combinational.
//
// The 6-bit LFSR, the 6-bit random seed and the 22-cycle initialisation follow
// the design description; the polynomial, the XOR mapping and the mixing of the
// seed into the running state are this design's own choices.
module addr_scrambler
  import c25519_pkg::*;
#(
  parameter int unsigned INIT_CYCLES = 22
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] seed,
  output logic              busy,
  output logic              done,
  output logic [ADDR_W-1:0] mask,
  input  addr_t             log_a,
  input  addr_t             log_b,
  output addr_t             phys_a,
  output addr_t             phys_b
);

  logic [ADDR_W-1:0] lfsr;
  logic [ADDR_W-1:0] mixed;
  logic [$clog2(INIT_CYCLES+1)-1:0] cnt;

  function automatic logic [ADDR_W-1:0] lfsr_step(input logic [ADDR_W-1:0] s);
    return {s[ADDR_W-2:0], s[5] ^ s[4]};
  endfunction

  assign mixed = lfsr ^ seed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= 6'b000001;
      mask <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // The all-zero state would lock the LFSR.
        lfsr <= (mixed == '0) ? 6'b000001 : mixed;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        lfsr <= lfsr_step(lfsr);
        cnt  <= cnt + 1'b1;
        if (32'(cnt) == INIT_CYCLES - 2) begin
          busy <= 1'b0;
          done <= 1'b1;
          mask <= lfsr_step(lfsr);
        end
      end
    end
  end

  assign phys_a = log_a ^ mask;
  assign phys_b = log_b ^ mask;

endmodule
