// fxp_mul -- fixed-point multiplier with rounding and overflow management.
//
// Computes y = a * b. No alignment is needed: the exact product has AW+BW bits and AF+BF
// fractional bits. With DEFAULT_MODE = 1 the exact product is passed on (OW >= AW+BW,
// OF == AF+BF); otherwise the rounding manager reduces the fraction to OF bits with mode RND
// and the overflow manager fits the result into OW bits with mode OVF, raising `ovf` when it
// changes the value. Purely combinational. Same managers and mode choices as fxp_add.
module fxp_mul
  import fxp_pkg::*;
#(
  parameter int          AW = 16, AF = 15,
  parameter int          BW = 16, BF = 14,
  parameter int          OW = 16, OF = 15,
  parameter bit          DEFAULT_MODE = 1'b0,
  parameter round_mode_e RND = RND_ROUND,
  parameter ovf_mode_e   OVF = OVF_SAT
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [OW-1:0] y,
  output logic                 ovf
);
  localparam int FULL_W = AW + BW;
  localparam int F      = AF + BF;

  initial begin
    assert (FULL_W <= 63) else $error("fxp_mul: product wider than 63 bits");
    if (DEFAULT_MODE)
      assert (OW >= FULL_W && OF == F) else $error("fxp_mul: default mode needs OW >= %0d, OF == %0d", FULL_W, F);
  end

  logic signed [FULL_W-1:0] full;
  assign full = FULL_W'(longint'(a) * longint'(b));   // core operation

  if (DEFAULT_MODE) begin : g_default
    assign y   = OW'(full);
    assign ovf = 1'b0;
  end else begin : g_managed
    logic signed [63:0] rnd;
    assign rnd = fxp_round(longint'(full), F - OF, RND);        // rounding manager
    assign y   = OW'(fxp_overflow(rnd, OW, OVF));     // overflow manager
    assign ovf = fxp_overflows(rnd, OW);
  end
endmodule
