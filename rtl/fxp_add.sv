// fxp_add -- fixed-point adder / subtractor with rounding and overflow management.
//
// Computes y = a + b (SUB = 0) or y = a - b (SUB = 1) on fixed-point operands of any width and
// point position. The flow follows the fixed-point addition flow chart: the decimal points are
// aligned to the larger fractional length, the full-precision sum is formed (one bit wider than
// the widest aligned operand), and then either
//   * DEFAULT_MODE = 1: the full-precision result is kept; the output is that sum,
//     masked and sign-extended to OW bits (OW must hold it and OF must equal the aligned
//     fractional length), or
//   * DEFAULT_MODE = 0: the rounding manager reduces the fraction to OF bits with mode RND
//     and the overflow manager fits the result into OW bits with mode OVF.
// `ovf` is high when the overflow manager had to change the value. Purely combinational.
// All format and mode choices are elaboration-time parameters, so the hardware is sized to
// exactly the bits in use. The steps and modes follow the published fixed-point operator model;
// the tie rules of the rounding modes are choices made here (see fxp_pkg).
module fxp_add
  import fxp_pkg::*;
#(
  parameter int          AW = 16, AF = 15,
  parameter int          BW = 16, BF = 15,
  parameter int          OW = 16, OF = 15,
  parameter bit          SUB = 1'b0,
  parameter bit          DEFAULT_MODE = 1'b0,
  parameter round_mode_e RND = RND_ROUND,
  parameter ovf_mode_e   OVF = OVF_SAT
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [OW-1:0] y,
  output logic                 ovf
);
  localparam int F  = imax(AF, BF);                   // aligned fractional length
  localparam int IB = imax(AW - AF, BW - BF);         // aligned integer length
  localparam int FULL_W = IB + F + 1;                 // width of the exact sum

  initial begin
    assert (FULL_W <= 63) else $error("fxp_add: result wider than 63 bits");
    if (DEFAULT_MODE)
      assert (OW >= FULL_W && OF == F) else $error("fxp_add: default mode needs OW >= %0d, OF == %0d", FULL_W, F);
  end

  logic signed [63:0] sa, sb, full;

  always_comb begin
    sa   = longint'(a) <<< (F - AF);                  // align decimal point
    sb   = longint'(b) <<< (F - BF);
    full = SUB ? (sa - sb) : (sa + sb);               // core operation
  end

  if (DEFAULT_MODE) begin : g_default
    assign y   = OW'(fxp_sext(full, FULL_W));         // masked sign extension
    assign ovf = 1'b0;
  end else begin : g_managed
    logic signed [63:0] rnd;
    assign rnd = fxp_round(full, F - OF, RND);        // rounding manager
    assign y   = OW'(fxp_overflow(rnd, OW, OVF));     // overflow manager
    assign ovf = fxp_overflows(rnd, OW);
  end
endmodule
