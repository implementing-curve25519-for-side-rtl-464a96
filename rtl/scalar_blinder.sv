// scalar_blinder: scalar blinding k' = k + r * #E.
//
// #E = 8 * l is the order of the Curve25519 group, so k' * P = k * P for every
// point P on the curve, while the bits the ladder walks through change with the
// random r on every run. The product r * #E and the sum are formed
// digit-serially in DIGIT_W-bit digits, least significant first: one
// R_W x DIGIT_W multiplication and one addition per cycle (two DSP slices), with
// the carry kept in a register. NDIG digits cover the SCALAR_W-bit result.
//
// Interface: pulse start with k (already clamped) and r. done pulses NDIG + 1
// cycles later (18 by default; the digit loop itself takes the 17 cycles given
// as this countermeasure's initialisation delay) with k' in kb, held until the
// next start.
//
// The 24-bit r, the use of the group order and the two multiply/add units follow
// the design description; the 17-bit digit schedule is this design's own.
module scalar_blinder
  import c25519_pkg::*;
#(
  parameter int unsigned R_W      = 24,
  parameter int unsigned SCALAR_W = 256 + R_W,
  parameter int unsigned DIGIT_W  = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [255:0]        k,
  input  logic [R_W-1:0]      r,
  output logic                done,
  output logic [SCALAR_W-1:0] kb
);

  localparam int unsigned NDIG = (SCALAR_W + DIGIT_W - 1) / DIGIT_W;
  localparam int unsigned W    = NDIG * DIGIT_W;
  localparam int unsigned PW   = R_W + DIGIT_W;     // product width
  localparam int unsigned CW   = R_W + 1;           // carry width

  logic [W-1:0]         k_sh, e_sh, res_sh;
  logic [R_W-1:0]       r_q;
  logic [CW-1:0]        carry;
  logic                 busy;
  logic [$clog2(NDIG+1)-1:0] cnt;
  logic [PW:0]          sum;
  logic [PW-1:0]        prod;

  assign prod = PW'(r_q) * PW'(e_sh[DIGIT_W-1:0]);
  assign sum  = (PW+1)'(prod) + (PW+1)'(k_sh[DIGIT_W-1:0]) + (PW+1)'(carry);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      k_sh   <= '0;
      e_sh   <= '0;
      res_sh <= '0;
      r_q    <= '0;
      carry  <= '0;
      kb     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt   <= '0;
        k_sh  <= W'(k);
        e_sh  <= W'(GROUP_ORDER);
        r_q   <= r;
        carry <= '0;
      end else if (busy) begin
        k_sh   <= k_sh >> DIGIT_W;
        e_sh   <= e_sh >> DIGIT_W;
        res_sh <= {sum[DIGIT_W-1:0], res_sh[W-1:DIGIT_W]};
        carry  <= CW'(sum >> DIGIT_W);
        cnt    <= cnt + 1'b1;
        if (32'(cnt) == NDIG - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          kb   <= SCALAR_W'({sum[DIGIT_W-1:0], res_sh[W-1:DIGIT_W]});
        end
      end
    end
  end

endmodule
