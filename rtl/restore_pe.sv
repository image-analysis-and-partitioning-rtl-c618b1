// restore_pe: one restoration processor of the array, responsible for one pixel.
//
// It computes one iteration of the restoration update
//     f(k+1) = f(k) + lambda*g - lambda*(r0*f(k) + r1*sum of the eight 1-neighbours)
// with the weights, the normalisation and the gain all powers of two, so that the only
// functional units are two adders, one shifter and one subtractor. The units are shared
// over seven clock steps, following the published schedule of hardware units:
//   step 1  Adder2  : W + C
//   step 2  Adder1  : W + E            Adder2 : (W + C) + E  -> row partial sum, sent N and S
//           Shifter : C << R0_SHIFT    (centre weight relative to a neighbour)
//   step 3  Adder1  : (W + E) + partial sum from S    Adder2 : (C << R0_SHIFT) + partial sum from N
//   step 4  Adder1  : sum of both halves = weighted 3x3 sum in units of r1
//   step 5  Shifter : >> NORM_SHIFT    (divide by the common denominator)
//   step 6  Shifter : >> GAIN_SHIFT    (gain lambda)   Adder2 : C + lambda*g
//   step 7  Subtractor : (C + lambda*g) - lambda*(b * f)  -> new pixel value (if commit)
// The diagonal neighbours are never wired to this processor: they arrive inside the N and
// S row partial sums, so only the four edge-adjacent neighbours are connected. At load
// (ld_en) the shifter forms lambda*g once; it is kept as the constant term and is also the
// initial guess f(0). Shifts right are arithmetic (floor). The new value is clamped to
// the range of val_t. x_prev keeps the estimate of the previous iteration for the
// residual test. A processor loaded with ld_live low stands for a pixel outside the
// image: it holds zero and never commits, so its neighbours see the zero value assumed
// for pixels that do not exist.
//
// Interface: step/commit come from the schedule controller and are the same for every
// processor; x goes to the W and E neighbours, ps to the N and S neighbours. Timing: ps is
// valid from the end of step 2, x changes only at the end of a committed step 7.
// Everything except the unit allocation per step is this design's choice: the fixed-point
// format, the clamping, the gain value and the load behaviour.
module restore_pe
  import restore_pkg::*;
#(
  parameter int R0_SHIFT   = 3,  // centre weight 1/2 = 8 x neighbour weight 1/16
  parameter int NORM_SHIFT = 4,  // common denominator 16
  parameter int GAIN_SHIFT = 1   // gain lambda = 1/2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  step_e step,
  input  logic  commit,
  input  logic  ld_en,
  input  logic  ld_live,
  input  val_t  ld_g,
  input  val_t  x_w,
  input  val_t  x_e,
  input  sum_t  ps_n,
  input  sum_t  ps_s,
  output val_t  x,
  output val_t  x_prev,
  output sum_t  ps
);

  sum_t r_a1, r_a2, r_sh, r_ps;  // result registers of Adder1, Adder2, Shifter, partial sum
  val_t lg;                      // lambda * g
  logic live;                    // this processor holds a pixel that exists

  // ---------------- shared shifter ----------------
  sum_t sh_in, sh_out;
  logic sh_left;
  int unsigned sh_amt;
  always_comb begin
    sh_in   = '0;
    sh_left = 1'b0;
    sh_amt  = 0;
    if (ld_en) begin
      sh_in  = sum_t'(ld_g);
      sh_amt = GAIN_SHIFT;
    end else begin
      unique case (step)
        STEP_2: begin sh_in = sum_t'(x); sh_left = 1'b1; sh_amt = R0_SHIFT; end
        STEP_5: begin sh_in = r_a1; sh_amt = NORM_SHIFT; end
        STEP_6: begin sh_in = r_sh; sh_amt = GAIN_SHIFT; end
        default: ;
      endcase
    end
    sh_out = sh_left ? (sh_in <<< sh_amt) : (sh_in >>> sh_amt);
  end

  // ---------------- Adder1 ----------------
  sum_t a1_x, a1_y, a1_out;
  always_comb begin
    a1_x = '0;
    a1_y = '0;
    unique case (step)
      STEP_2: begin a1_x = sum_t'(x_w); a1_y = sum_t'(x_e); end
      STEP_3: begin a1_x = r_a1;        a1_y = ps_s;        end
      STEP_4: begin a1_x = r_a1;        a1_y = r_a2;        end
      default: ;
    endcase
    a1_out = a1_x + a1_y;
  end

  // ---------------- Adder2 ----------------
  sum_t a2_x, a2_y, a2_out;
  always_comb begin
    a2_x = '0;
    a2_y = '0;
    unique case (step)
      STEP_1: begin a2_x = sum_t'(x_w); a2_y = sum_t'(x);  end
      STEP_2: begin a2_x = r_a2;        a2_y = sum_t'(x_e); end
      STEP_3: begin a2_x = r_sh;        a2_y = ps_n;        end
      STEP_6: begin a2_x = sum_t'(x);   a2_y = sum_t'(lg);  end
      default: ;
    endcase
    a2_out = a2_x + a2_y;
  end

  // ---------------- Subtractor ----------------
  sum_t sub_out;
  assign sub_out = r_a2 - r_sh;

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_a1   <= '0;
      r_a2   <= '0;
      r_sh   <= '0;
      r_ps   <= '0;
      lg     <= '0;
      live   <= 1'b0;
      x      <= '0;
      x_prev <= '0;
    end else if (ld_en) begin
      live   <= ld_live;
      lg     <= ld_live ? val_t'(sh_out) : '0;
      x      <= ld_live ? val_t'(sh_out) : '0;
      x_prev <= '0;
    end else begin
      unique case (step)
        STEP_1: r_a2 <= a2_out;
        STEP_2: begin r_a1 <= a1_out; r_ps <= a2_out; r_sh <= sh_out; end
        STEP_3: begin r_a1 <= a1_out; r_a2 <= a2_out; end
        STEP_4: r_a1 <= a1_out;
        STEP_5: r_sh <= sh_out;
        STEP_6: begin r_sh <= sh_out; r_a2 <= a2_out; end
        STEP_7: if (commit && live) begin
          x_prev <= x;
          x      <= sat_val(sub_out);
        end
        default: ;
      endcase
    end
  end

  assign ps = r_ps;

endmodule
