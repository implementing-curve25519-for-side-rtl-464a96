// mod_addsub: modular addition / subtraction C = A +/- B mod p, p = 2^255 - 19.
//
// The operands are processed digit-serially, least significant digit first,
// NDIGITS digits of DIGIT_W bits per operation (8 x 34 bits cover the padded
// 255-bit operands). Two carry chains run side by side, as the design uses two
// DSP slices: the first forms S = A + B (or A - B), the second forms the reduced
// candidate T = S - p (or S + p) from the digit the first chain has just produced.
// When the last digit is done, the final carry (addition) or borrow
// (subtraction) picks S or T as the result. Both chains always run, so the
// latency does not depend on the data.
//
// Interface: pulse start with op (0 add, 1 sub), a and b; a and b must be
// reduced (< p). done pulses for one cycle with the reduced result in c, which
// holds until the next start. ready is high while the unit is idle.
// Timing: done follows start by NDIGITS + 1 cycles (9 by default).
//
// The digit width, the number of steps and the two-chain structure with output
// selection follow the design description; the handshake is this design's own.
module mod_addsub
  import c25519_pkg::*;
#(
  parameter int unsigned DIGIT_W = 34,
  parameter int unsigned NDIGITS = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      op,      // 0: a + b, 1: a - b
  input  fe_t       a,
  input  fe_t       b,
  output logic      ready,
  output logic      done,
  output fe_t       c
);

  localparam int unsigned W = DIGIT_W * NDIGITS;
  localparam logic [W-1:0] P_PAD = W'(P_MOD);

  initial begin
    assert (W >= FE_W + 1) else $fatal(1, "mod_addsub: digits do not cover the operand");
  end

  logic [W-1:0]        a_sh, b_sh, p_sh;     // operand shift registers
  logic [W-1:0]        s_sh, t_sh;           // result shift registers (fill from the top)
  logic                c1, c2;               // carries of the two chains
  logic                op_q;
  logic                busy;
  logic [$clog2(NDIGITS+1)-1:0] cnt;

  logic [DIGIT_W-1:0]  a_d, b_d, p_d, s_d, t_d;
  logic                c1_n, c2_n;

  assign a_d = a_sh[DIGIT_W-1:0];
  assign b_d = op_q ? ~b_sh[DIGIT_W-1:0] : b_sh[DIGIT_W-1:0];
  assign p_d = op_q ?  p_sh[DIGIT_W-1:0] : ~p_sh[DIGIT_W-1:0];

  // First chain: main operation. Second chain: reduction of the digit just formed.
  always_comb begin
    {c1_n, s_d} = {1'b0, a_d} + {1'b0, b_d} + {{DIGIT_W{1'b0}}, c1};
    {c2_n, t_d} = {1'b0, s_d} + {1'b0, p_d} + {{DIGIT_W{1'b0}}, c2};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      op_q <= 1'b0;
      c1   <= 1'b0;
      c2   <= 1'b0;
      a_sh <= '0;
      b_sh <= '0;
      p_sh <= '0;
      s_sh <= '0;
      t_sh <= '0;
      c    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        op_q <= op;
        // Carry-in of 1 turns the inverted operand into its two's complement.
        c1   <= op;      // subtraction: A + ~B + 1
        c2   <= !op;     // addition:    S + ~P + 1
        a_sh <= W'(a);
        b_sh <= W'(b);
        p_sh <= P_PAD;
      end else if (busy) begin
        a_sh <= a_sh >> DIGIT_W;
        b_sh <= b_sh >> DIGIT_W;
        p_sh <= p_sh >> DIGIT_W;
        s_sh <= {s_d, s_sh[W-1:DIGIT_W]};
        t_sh <= {t_d, t_sh[W-1:DIGIT_W]};
        c1   <= c1_n;
        c2   <= c2_n;
        cnt  <= cnt + 1'b1;
        if (32'(cnt) == NDIGITS - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          // Addition: carry out of S - p means S >= p, take T.
          // Subtraction: no carry out of A - B means a borrow, take T = S + p.
          if (op_q ? !c1_n : c2_n)
            c <= fe_t'({t_d, t_sh[W-1:DIGIT_W]});
          else
            c <= fe_t'({s_d, s_sh[W-1:DIGIT_W]});
        end
      end
    end
  end

  assign ready = !busy;

endmodule
