// fft_butterfly -- radix-2 butterfly built from real fixed-point operators.
//
// Y0 = X1 + W*X0 and Y1 = X1 - W*X0, with complex W*X0 formed by four multipliers and two
// adders:  Pr = X0r*Wr - X0i*Wi,  Pi = X0r*Wi + X0i*Wr. The products and the two product sums
// keep full precision (fixed-point default mode); only the four output adders round and
// manage overflow. The output format is (OW, OF): with OF = IF - 1 and OW = IW the stage
// scales its result by 1/2 by rounding, so the word width stays constant from stage to stage;
// with OF = IF and OW = IW + 1 the word grows by one bit instead.
// Inputs: X0 (the operand multiplied by the twiddle), X1, W in (TW, TF) format.
// Outputs: Y0, Y1 and `ovf`, high when any output adder overflowed. Purely combinational.
// The operator graph and rounding between stages follow the published butterfly; keeping the
// products at full precision and the 16-bit, 14-fractional-bit twiddle are choices made here.
module fft_butterfly
  import fxp_pkg::*;
#(
  parameter int          IW = 16, IF = 15,
  parameter int          OW = 16, OF = 14,
  parameter int          TW = 16, TF = 14,
  parameter round_mode_e RND = RND_ROUND,
  parameter ovf_mode_e   OVF = OVF_SAT
) (
  input  logic signed [IW-1:0] x0_re, x0_im,
  input  logic signed [IW-1:0] x1_re, x1_im,
  input  logic signed [TW-1:0] w_re,  w_im,
  output logic signed [OW-1:0] y0_re, y0_im,
  output logic signed [OW-1:0] y1_re, y1_im,
  output logic                 ovf
);
  localparam int PW = IW + TW;      // exact product
  localparam int PF = IF + TF;
  localparam int SW = PW + 1;       // exact sum of two products

  logic signed [PW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [SW-1:0] t_re, t_im;
  logic [3:0] o;
  logic [5:0] unused_ovf;

  fxp_mul #(.AW(IW), .AF(IF), .BW(TW), .BF(TF), .OW(PW), .OF(PF), .DEFAULT_MODE(1'b1))
    u_m_rr (.a(x0_re), .b(w_re), .y(p_rr), .ovf(unused_ovf[0]));
  fxp_mul #(.AW(IW), .AF(IF), .BW(TW), .BF(TF), .OW(PW), .OF(PF), .DEFAULT_MODE(1'b1))
    u_m_ii (.a(x0_im), .b(w_im), .y(p_ii), .ovf(unused_ovf[1]));
  fxp_mul #(.AW(IW), .AF(IF), .BW(TW), .BF(TF), .OW(PW), .OF(PF), .DEFAULT_MODE(1'b1))
    u_m_ri (.a(x0_re), .b(w_im), .y(p_ri), .ovf(unused_ovf[2]));
  fxp_mul #(.AW(IW), .AF(IF), .BW(TW), .BF(TF), .OW(PW), .OF(PF), .DEFAULT_MODE(1'b1))
    u_m_ir (.a(x0_im), .b(w_re), .y(p_ir), .ovf(unused_ovf[3]));

  fxp_add #(.AW(PW), .AF(PF), .BW(PW), .BF(PF), .OW(SW), .OF(PF), .SUB(1'b1), .DEFAULT_MODE(1'b1))
    u_t_re (.a(p_rr), .b(p_ii), .y(t_re), .ovf(unused_ovf[4]));
  fxp_add #(.AW(PW), .AF(PF), .BW(PW), .BF(PF), .OW(SW), .OF(PF), .SUB(1'b0), .DEFAULT_MODE(1'b1))
    u_t_im (.a(p_ri), .b(p_ir), .y(t_im), .ovf(unused_ovf[5]));

  fxp_add #(.AW(IW), .AF(IF), .BW(SW), .BF(PF), .OW(OW), .OF(OF), .SUB(1'b0), .RND(RND), .OVF(OVF))
    u_y0_re (.a(x1_re), .b(t_re), .y(y0_re), .ovf(o[0]));
  fxp_add #(.AW(IW), .AF(IF), .BW(SW), .BF(PF), .OW(OW), .OF(OF), .SUB(1'b0), .RND(RND), .OVF(OVF))
    u_y0_im (.a(x1_im), .b(t_im), .y(y0_im), .ovf(o[1]));
  fxp_add #(.AW(IW), .AF(IF), .BW(SW), .BF(PF), .OW(OW), .OF(OF), .SUB(1'b1), .RND(RND), .OVF(OVF))
    u_y1_re (.a(x1_re), .b(t_re), .y(y1_re), .ovf(o[2]));
  fxp_add #(.AW(IW), .AF(IF), .BW(SW), .BF(PF), .OW(OW), .OF(OF), .SUB(1'b1), .RND(RND), .OVF(OVF))
    u_y1_im (.a(x1_im), .b(t_im), .y(y1_im), .ovf(o[3]));

  assign ovf = |o;
endmodule
