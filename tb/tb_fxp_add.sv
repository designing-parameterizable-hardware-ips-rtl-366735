// tb_fxp_add -- self-checking test of the fixed-point adder/subtractor.
//
// Operands a (12 bits, 8 fractional) and b (10 bits, 3 fractional) are added or subtracted
// into an 8-bit result with 2 fractional bits, so six fractional bits are rounded away and the
// integer part often overflows. One instance per rounding mode (saturating), one wrapping
// instance and one full-precision (default mode) instance are compared with values computed
// with real arithmetic: floor/ceil/truncate/round-half-up of the exact result, then clamping or
// modulo-2**8 wrapping. Random and corner operands are used.
module tb_fxp_add;
  import fxp_pkg::*;
  localparam int AW = 12, AF = 8, BW = 10, BF = 3, OW = 8, OF = 2;
  localparam int FW = 17;     // full-precision result of default mode (7+8+1 bits, 8 fractional)

  logic signed [AW-1:0] a;
  logic signed [BW-1:0] b;
  logic signed [OW-1:0] y_add [4], y_sub [4];
  logic                 o_add [4], o_sub [4];
  logic signed [OW-1:0] y_wrap;
  logic                 o_wrap;
  logic signed [FW-1:0] y_full;
  logic                 o_full;

  for (genvar m = 0; m < 4; m++) begin : g_mode
    fxp_add #(.AW(AW), .AF(AF), .BW(BW), .BF(BF), .OW(OW), .OF(OF), .SUB(1'b0),
              .RND(round_mode_e'(m)), .OVF(OVF_SAT)) u_add (.a, .b, .y(y_add[m]), .ovf(o_add[m]));
    fxp_add #(.AW(AW), .AF(AF), .BW(BW), .BF(BF), .OW(OW), .OF(OF), .SUB(1'b1),
              .RND(round_mode_e'(m)), .OVF(OVF_SAT)) u_sub (.a, .b, .y(y_sub[m]), .ovf(o_sub[m]));
  end
  fxp_add #(.AW(AW), .AF(AF), .BW(BW), .BF(BF), .OW(OW), .OF(OF), .SUB(1'b0),
            .RND(RND_FLOOR), .OVF(OVF_WRAP)) u_wrap (.a, .b, .y(y_wrap), .ovf(o_wrap));
  fxp_add #(.AW(AW), .AF(AF), .BW(BW), .BF(BF), .OW(FW), .OF(AF), .SUB(1'b1),
            .DEFAULT_MODE(1'b1)) u_full (.a, .b, .y(y_full), .ovf(o_full));

  int checks = 0, failures = 0, n_sat = 0;

  function automatic real rnd(real v, int m);
    case (m)
      0: return (v < 0.0) ? $ceil(v) : $floor(v);
      1: return $floor(v);
      2: return $ceil(v);
      default: return $floor(v + 0.5);
    endcase
  endfunction

  task automatic check(logic signed [OW-1:0] got, logic gov, real exact, int m, bit sat, string what);
    real r, lo, hi, e;
    bit eov;
    r  = rnd(exact * 4.0, m);               // in units of 2**-OF
    lo = -128.0; hi = 127.0;
    eov = (r < lo) || (r > hi);
    if (sat) e = eov ? ((r < lo) ? lo : hi) : r;
    else begin
      e = r - 256.0 * $floor((r + 128.0) / 256.0);
    end
    checks++;
    if (real'(got) != e || gov != eov) begin
      failures++;
      if (failures < 10) $display("FAIL %s mode %0d: a=%0d b=%0d got %0d/%0b exp %0.1f/%0b", what, m, a, b, got, gov, e, eov);
    end
    if (eov) n_sat++;
  endtask

  initial begin : main
    for (int t = 0; t < 3000; t++) begin
      if (t < 4) begin
        a = (t[0]) ? {1'b0, {(AW-1){1'b1}}} : {1'b1, {(AW-1){1'b0}}};
        b = (t[1]) ? {1'b0, {(BW-1){1'b1}}} : {1'b1, {(BW-1){1'b0}}};
      end else begin
        a = AW'($urandom);
        b = BW'($urandom);
      end
      #1;
      for (int m = 0; m < 4; m++) begin
        check(y_add[m], o_add[m], real'(a) / 256.0 + real'(b) / 8.0, m, 1'b1, "add");
        check(y_sub[m], o_sub[m], real'(a) / 256.0 - real'(b) / 8.0, m, 1'b1, "sub");
      end
      check(y_wrap, o_wrap, real'(a) / 256.0 + real'(b) / 8.0, 1, 1'b0, "wrap");
      checks++;
      if (y_full != FW'(longint'(a) - (longint'(b) <<< 5)) || o_full) begin
        failures++;
        $display("FAIL default mode: a=%0d b=%0d got %0d", a, b, y_full);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
