// restore_pkg: types and constants shared by the iterative image restoration engine.
//
// Pixels enter the engine as PIX_W-bit unsigned grey values and are held inside the
// processors as signed fixed-point numbers with FRAC_W fraction bits in VAL_W bits.
// Intermediate sums of the weighted 3x3 neighbourhood are SUM_W bits wide, enough for
// eight neighbours plus an eight-fold centre without overflow. One iteration of the
// restoration update takes N_STEPS clock cycles; step_e names those cycles. The
// 7-step schedule follows the published schedule of hardware units; all widths and the
// fixed-point format are this design's own choice.
package restore_pkg;

  localparam int PIX_W  = 8;          // grey value width at the host interface
  localparam int FRAC_W = 4;          // fraction bits of the internal pixel format
  localparam int VAL_W  = 16;         // internal pixel estimate width (signed)
  localparam int SUM_W  = VAL_W + 6;  // width of partial and weighted sums (signed)
  localparam int N_STEPS = 7;         // clock cycles per iteration

  typedef logic signed [VAL_W-1:0] val_t;
  typedef logic signed [SUM_W-1:0] sum_t;

  // Schedule step driven to every processor. STEP_HOLD leaves all registers alone.
  typedef enum logic [2:0] {
    STEP_HOLD = 3'd0,
    STEP_1    = 3'd1,   // Adder2: W + C
    STEP_2    = 3'd2,   // Adder1: W + E, Adder2: (W + C) + E, Shifter: C << R0_SHIFT
    STEP_3    = 3'd3,   // Adder1: + partial sum from S, Adder2: + partial sum from N
    STEP_4    = 3'd4,   // Adder1: sum of both halves
    STEP_5    = 3'd5,   // Shifter: >> NORM_SHIFT (divide by common denominator)
    STEP_6    = 3'd6,   // Shifter: >> GAIN_SHIFT (gain), Adder2: C + lambda*g
    STEP_7    = 3'd7    // Subtractor: new pixel value
  } step_e;

  // Grey value -> internal fixed point.
  function automatic val_t pix_to_val(input logic [PIX_W-1:0] p);
    return val_t'({{(VAL_W-PIX_W-FRAC_W){1'b0}}, p, {FRAC_W{1'b0}}});
  endfunction

  // Internal fixed point -> grey value: round to nearest and clamp to [0, 2^PIX_W-1].
  function automatic logic [PIX_W-1:0] val_to_pix(input val_t v);
    logic signed [VAL_W:0] r;
    r = ({v[VAL_W-1], v} + (VAL_W+1)'(1 << (FRAC_W-1))) >>> FRAC_W;
    if (r < 0) return '0;
    else if (r > (VAL_W+1)'((1 << PIX_W) - 1)) return '1;
    else return r[PIX_W-1:0];
  endfunction

  // Clamp a sum to the signed range of val_t.
  function automatic val_t sat_val(input sum_t s);
    if (s > sum_t'((1 <<< (VAL_W-1)) - 1)) return val_t'((1 <<< (VAL_W-1)) - 1);
    else if (s < -sum_t'(1 <<< (VAL_W-1))) return val_t'(-(1 <<< (VAL_W-1)));
    else return val_t'(s);
  endfunction

endpackage
