// mod_mul: modular multiplication / squaring C = A * B mod p, p = 2^255 - 19.
//
// The design exploits 255 = 15 * 17: both operands are split into NLIMB limbs of
// LIMB_W bits, a size a DSP slice multiplies unsigned in one step.
//
// Stage 1 (partial products, NLIMB cycles): Horner's rule over the limbs of B,
// most significant first. Each cycle all NLIMB limbs of A are multiplied by one
// limb of B (NLIMB multipliers in parallel) and added to a rotating set of
// column accumulators: acc <- acc * 2^17 + A * b_j. Multiplying by 2^17 moves every
// column up by one; the column that leaves the top stands for 2^255 = 19 (mod p)
// and re-enters at the bottom multiplied by 19 (the pre-reduction multiplier).
// No carries are propagated here; the columns stay below 2^43.
//
// Stage 2 (post-reduction), split in two sub-stages of NLIMB cycles each:
// 2a (pass 1) propagates the carries column by column, leaving 17-bit limbs and
// a carry c above bit 255. 2b (pass 2) adds 19 * c into the lowest limb and
// propagates again while a second chain forms the same value plus 19. The final
// carries select the fully reduced result (< p), as in the adder: V if it is
// below p, otherwise V + 19 mod 2^255.
//
// Stage 1, 2a and 2b each have their own registers and hand their work on when
// the next one is free (or frees itself in the same cycle), so up to three
// products are in flight and a new one can start every NLIMB + 1 cycles.
//
// Interface: start is taken when ready is high; a and b may be any 255-bit
// values. done pulses for one cycle with the result in c (held until the next
// done); results leave in the order the products started. Timing: done follows
// start by 3 * NLIMB + 3 cycles (48 by default) when nothing waits ahead of it.
//
// The limb split, the count of multipliers (15 partial-product, 1 pre-reduction,
// the reduction by 19) and the two-stage arrangement follow the design
// description; the exact carry-propagation schedule of stage 2 and its split
// into two sub-stages are this design's own.
module mod_mul
  import c25519_pkg::*;
#(
  parameter int unsigned LIMB_W = 17,
  parameter int unsigned NLIMB  = 15,
  parameter int unsigned ACC_W  = 48
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fe_t  a,
  input  fe_t  b,
  output logic ready,
  output logic done,
  output fe_t  c
);

  localparam int unsigned CW = ACC_W - LIMB_W + 1;   // carry width in stage 2

  initial begin
    assert (LIMB_W * NLIMB == FE_W) else $fatal(1, "mod_mul: limbs must cover 255 bits");
  end

  typedef logic [ACC_W-1:0] acc_t;

  // ---------------------------------------------------------------- stage 1
  fe_t                      a_q, b_sh;
  acc_t                     acc   [NLIMB];
  logic                     s1_busy, s1_full;
  logic [$clog2(NLIMB)-1:0] s1_cnt;
  logic [LIMB_W-1:0]        b_j;
  acc_t                     pp    [NLIMB];           // partial products a_i * b_j
  acc_t                     wrap;                    // pre-reduction: 19 * top column

  // ------------------------------------------------------ stage 2a (pass 1)
  acc_t                     col   [NLIMB];           // columns, shifted down each cycle
  logic                     s2a_busy, s2a_full;
  logic [$clog2(NLIMB)-1:0] s2a_cnt;
  logic [CW-1:0]            carry_a;                 // pass-1 carry
  logic [CW-1:0]            top_a;                   // carry left over after pass 1

  // ------------------------------------------------------ stage 2b (pass 2)
  fe_t                      lim;                     // 17-bit limbs, shifted down each cycle
  logic                     s2b_busy;
  logic [$clog2(NLIMB)-1:0] s2b_cnt;
  logic [CW-1:0]            top_b;                   // folded in at the lowest limb
  logic [CW-1:0]            carry_b;                 // pass-2 carry of V
  logic [5:0]               carry_w;                 // pass-2 carry of V + 19
  fe_t                      v_sh, w_sh;              // pass-2 results, filled from the top

  logic                     handoff, handoff_2a;

  assign b_j     = b_sh[FE_W-1 -: LIMB_W];
  assign wrap    = acc_t'(acc[NLIMB-1] * acc_t'(19));
  // A stage takes new work in the same cycle it hands its own on.
  assign handoff_2a = s2a_full && !s2b_busy;
  assign handoff    = s1_full && !s2a_busy && (!s2a_full || handoff_2a);
  assign ready      = !s1_busy && (!s1_full || handoff);

  always_comb begin
    for (int i = 0; i < NLIMB; i++)
      pp[i] = acc_t'(a_q[i*LIMB_W +: LIMB_W]) * acc_t'(b_j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_busy <= 1'b0;
      s1_full <= 1'b0;
      s1_cnt  <= '0;
      a_q     <= '0;
      b_sh    <= '0;
      for (int i = 0; i < NLIMB; i++) acc[i] <= '0;
    end else begin
      if (start && ready) begin
        s1_busy <= 1'b1;
        s1_full <= 1'b0;
        s1_cnt  <= '0;
        a_q     <= a;
        b_sh    <= b;
        for (int i = 0; i < NLIMB; i++) acc[i] <= '0;
      end else if (s1_busy) begin
        acc[0] <= wrap + pp[0];
        for (int i = 1; i < NLIMB; i++) acc[i] <= acc[i-1] + pp[i];
        b_sh   <= b_sh << LIMB_W;
        s1_cnt <= s1_cnt + 1'b1;
        if (32'(s1_cnt) == NLIMB - 1) begin
          s1_busy <= 1'b0;
          s1_full <= 1'b1;
        end
      end else if (handoff) begin
        s1_full <= 1'b0;
      end
    end
  end

  // Stage 2a: pass 1 over the lowest column.
  logic [ACC_W:0]    sum1;    // column + carry
  // Stage 2b: pass 2 over the lowest limb.
  logic [ACC_W:0]    sum2;    // limb + folded top carry + carry
  logic [LIMB_W:0]   sumw;    // second chain: limb of V + 19
  logic [LIMB_W-1:0] v_limb;

  always_comb begin
    sum1   = {1'b0, col[0]} + (ACC_W+1)'(carry_a);
    sum2   = (ACC_W+1)'(lim[LIMB_W-1:0]) + (ACC_W+1)'(carry_b)
           + ((s2b_cnt == 0) ? (ACC_W+1)'(top_b) * (ACC_W+1)'(19) : '0);
    v_limb = sum2[LIMB_W-1:0];
    sumw   = {1'b0, v_limb} + (LIMB_W+1)'(carry_w) + ((s2b_cnt == 0) ? (LIMB_W+1)'(19) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2a_busy <= 1'b0;
      s2a_full <= 1'b0;
      s2a_cnt  <= '0;
      carry_a  <= '0;
      top_a    <= '0;
      for (int i = 0; i < NLIMB; i++) col[i] <= '0;
    end else begin
      if (handoff) begin
        for (int i = 0; i < NLIMB; i++) col[i] <= acc[i];
        carry_a  <= '0;
        s2a_cnt  <= '0;
        s2a_busy <= 1'b1;
        s2a_full <= 1'b0;
      end else if (s2a_busy) begin
        for (int i = 0; i < NLIMB - 1; i++) col[i] <= col[i+1];
        col[NLIMB-1] <= acc_t'(sum1[LIMB_W-1:0]);
        carry_a      <= CW'(sum1 >> LIMB_W);
        s2a_cnt      <= s2a_cnt + 1'b1;
        if (32'(s2a_cnt) == NLIMB - 1) begin
          top_a    <= CW'(sum1 >> LIMB_W);
          s2a_busy <= 1'b0;
          s2a_full <= 1'b1;
        end
      end else if (handoff_2a) begin
        s2a_full <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2b_busy <= 1'b0;
      s2b_cnt  <= '0;
      lim      <= '0;
      top_b    <= '0;
      carry_b  <= '0;
      carry_w  <= '0;
      v_sh     <= '0;
      w_sh     <= '0;
      done     <= 1'b0;
      c        <= '0;
    end else begin
      done <= 1'b0;
      if (handoff_2a) begin
        for (int i = 0; i < NLIMB; i++) lim[i*LIMB_W +: LIMB_W] <= col[i][LIMB_W-1:0];
        top_b    <= top_a;
        carry_b  <= '0;
        carry_w  <= '0;
        s2b_cnt  <= '0;
        s2b_busy <= 1'b1;
      end else if (s2b_busy) begin
        lim     <= lim >> LIMB_W;
        carry_b <= CW'(sum2 >> LIMB_W);
        carry_w <= 6'(sumw >> LIMB_W);
        v_sh    <= {v_limb, v_sh[FE_W-1:LIMB_W]};
        w_sh    <= {sumw[LIMB_W-1:0], w_sh[FE_W-1:LIMB_W]};
        s2b_cnt <= s2b_cnt + 1'b1;
        if (32'(s2b_cnt) == NLIMB - 1) begin
          s2b_busy <= 1'b0;
          done     <= 1'b1;
          // Overflow of V past 2^255 (worth 19), or V + 19 reaching 2^255
          // (V >= p): the reduced value is V + 19 mod 2^255.
          if ((sum2 >> LIMB_W) != 0 || (sumw >> LIMB_W) != 0)
            c <= {sumw[LIMB_W-1:0], w_sh[FE_W-1:LIMB_W]};
          else
            c <= {v_limb, v_sh[FE_W-1:LIMB_W]};
        end
      end
    end
  end

endmodule
