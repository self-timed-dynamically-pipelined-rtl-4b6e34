// dlms_pkg: shared types and word lengths of the self-timed DLMS equalizer.
//
// The word lengths follow the equalizer described for the EPR4 read channel:
// 6-bit input samples, 10-bit coefficients, 10-bit fed-back error, 9-bit step
// size and 16-bit intermediate results, for a 9-tap filter.  The fixed-point
// scaling (where the binary point sits) is this design's own choice and is
// listed next to each constant.
package dlms_pkg;

  // Initial state of one self-timed stage after reset.
  //   INIT_BUBBLE : enabled (EN=1), output invalid   -> free slot
  //   INIT_DATA   : enabled (EN=1), output valid     -> holds a datum
  //   INIT_SPACER : precharged (EN=0), output invalid -> the spacer behind a datum
  typedef enum logic [1:0] {
    INIT_BUBBLE = 2'd0,
    INIT_DATA   = 2'd1,
    INIT_SPACER = 2'd2
  } stage_init_e;

  localparam int unsigned TAPS    = 9;   // filter length
  localparam int unsigned IN_W    = 6;   // input samples u(n), Q0.5
  localparam int unsigned COEF_W  = 10;  // coefficients w, Q1.8
  localparam int unsigned ERR_W   = 10;  // fed-back error e, Q2.7
  localparam int unsigned MU_W    = 9;   // step size mu, Q0.8
  localparam int unsigned ACC_W   = 16;  // products, sums, d(n), mu*e, updates

  // Bits dropped when the 16-bit error (Q2.13) is cut to the 10-bit feedback error.
  localparam int unsigned ERR_SHIFT  = 6;
  // Bits dropped from the 19-bit e*mu product (Q.15) to get the 16-bit mu*e (Q.12).
  localparam int unsigned MUE_SHIFT  = 3;
  // Bits dropped from the 22-bit u*mu*e product (Q.17) to get the 16-bit update (Q.11).
  localparam int unsigned UPD_SHIFT  = 6;
  // Right shift aligning the 16-bit update (Q.11) with the coefficient (Q.8).
  localparam int unsigned ALIGN_SHIFT = 3;

  // Saturate a 17-bit signed value to COEF_W bits.
  function automatic logic signed [COEF_W-1:0] sat_coef(input logic signed [16:0] v);
    localparam logic signed [16:0] MAXV = 17'sd511;
    localparam logic signed [16:0] MINV = -17'sd512;
    if (v > MAXV)      return COEF_W'(MAXV);
    else if (v < MINV) return COEF_W'(MINV);
    else               return COEF_W'(v);
  endfunction

endpackage
