// fxp_pkg -- bit-accurate fixed-point arithmetic helpers shared by every operator.
//
// A fixed-point value is a signed two's-complement integer I together with a width W and a
// number of fractional bits F; its real value is I / 2**F. Every operator is split into three
// steps: the core operation (with decimal-point alignment where the operation needs it), a
// rounding manager that drops fractional bits, and an overflow manager that fits the result
// into the output width. The rounding modes (truncate, floor, ceil, round) and overflow modes
// (wrap, saturate) are the ones the fixed-point model provides; wrapping is done by masking the
// kept bits and sign-extending them. The functions work on 64-bit integers, so every
// intermediate result must fit in 64 bits, a limit the C model shares.
//
// Design choices: "round" is round-half-up (ties toward +infinity); "truncate" is rounding
// toward zero. These functions are purely combinational and are inlined wherever called.
package fxp_pkg;

  typedef enum logic [1:0] {
    RND_TRUNC = 2'd0,  // toward zero
    RND_FLOOR = 2'd1,  // toward -infinity
    RND_CEIL  = 2'd2,  // toward +infinity
    RND_ROUND = 2'd3   // to nearest, ties toward +infinity
  } round_mode_e;

  typedef enum logic {
    OVF_WRAP = 1'b0,   // keep the low bits, masked sign extension
    OVF_SAT  = 1'b1    // clamp to the most positive / most negative code
  } ovf_mode_e;

  // Rounding manager: drop SH fractional bits of v (SH <= 0 appends -SH zero bits instead).
  function automatic longint fxp_round(longint v, int sh, round_mode_e mode);
    longint fl, rem, half, r;
    if (sh <= 0) begin
      r = v <<< (-sh);
    end else begin
      fl   = v >>> sh;
      rem  = v - (fl <<< sh);
      half = 64'sd1 <<< (sh - 1);
      case (mode)
        RND_FLOOR: r = fl;
        RND_CEIL:  r = fl + ((rem != 0) ? 64'sd1 : 64'sd0);
        RND_TRUNC: r = fl + (((v < 0) && (rem != 0)) ? 64'sd1 : 64'sd0);
        default:   r = fl + ((rem >= half) ? 64'sd1 : 64'sd0);
      endcase
    end
    return r;
  endfunction

  // Masked sign extension: keep the low W bits of v and sign-extend them.
  function automatic longint fxp_sext(longint v, int w);
    return (v <<< (64 - w)) >>> (64 - w);
  endfunction

  // Overflow manager: fit v into a W-bit signed word.
  function automatic longint fxp_overflow(longint v, int w, ovf_mode_e mode);
    longint maxv, minv, r;
    maxv = (64'sd1 <<< (w - 1)) - 64'sd1;
    minv = -(64'sd1 <<< (w - 1));
    if (mode == OVF_SAT) r = (v > maxv) ? maxv : ((v < minv) ? minv : v);
    else                 r = fxp_sext(v, w);
    return r;
  endfunction

  // True when the overflow manager changes the value.
  function automatic logic fxp_overflows(longint v, int w);
    return fxp_sext(v, w) != v;
  endfunction

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

endpackage
