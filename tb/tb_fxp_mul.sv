// tb_fxp_mul -- self-checking test of the fixed-point multiplier.
//
// a (10 bits, 6 fractional) times b (8 bits, 7 fractional) gives an exact 18-bit product with
// 13 fractional bits; the managed instances round it to 8 bits with 4 fractional bits, one
// per rounding mode with saturation plus one wrapping instance; a default-mode instance keeps
// the exact product. Results are compared with real-arithmetic rounding, clamping and
// modulo-256 wrapping of the exact product.
module tb_fxp_mul;
  import fxp_pkg::*;
  localparam int AW = 10, AF = 6, BW = 8, BF = 7, OW = 8, OF = 4;

  logic signed [AW-1:0] a;
  logic signed [BW-1:0] b;
  logic signed [OW-1:0] y [4];
  logic                 o [4];
  logic signed [OW-1:0] y_wrap;
  logic                 o_wrap;
  logic signed [AW+BW-1:0] y_full;
  logic                 o_full;

  for (genvar m = 0; m < 4; m++) begin : g_mode
    fxp_mul #(.AW(AW), .AF(AF), .BW(BW), .BF(BF), .OW(OW), .OF(OF),
              .RND(round_mode_e'(m)), .OVF(OVF_SAT)) u_mul (.a, .b, .y(y[m]), .ovf(o[m]));
  end
  fxp_mul #(.AW(AW), .AF(AF), .BW(BW), .BF(BF), .OW(OW), .OF(OF),
            .RND(RND_ROUND), .OVF(OVF_WRAP)) u_wrap (.a, .b, .y(y_wrap), .ovf(o_wrap));
  fxp_mul #(.AW(AW), .AF(AF), .BW(BW), .BF(BF), .OW(AW + BW), .OF(AF + BF),
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

  task automatic check(logic signed [OW-1:0] got, logic gov, int m, bit sat, string what);
    real exact, r, e;
    bit eov;
    exact = (real'(a) / 64.0) * (real'(b) / 128.0);
    r   = rnd(exact * 16.0, m);
    eov = (r < -128.0) || (r > 127.0);
    if (sat) e = (r < -128.0) ? -128.0 : ((r > 127.0) ? 127.0 : r);
    else     e = r - 256.0 * $floor((r + 128.0) / 256.0);
    checks++;
    if (real'(got) != e || gov != eov) begin
      failures++;
      if (failures < 10) $display("FAIL %s mode %0d: a=%0d b=%0d got %0d exp %0.1f", what, m, a, b, got, e);
    end
    if (eov) n_sat++;
  endtask

  initial begin : main
    for (int t = 0; t < 3000; t++) begin
      a = AW'($urandom);
      b = BW'($urandom);
      if (t == 0) begin a = {1'b1, {(AW-1){1'b0}}}; b = {1'b1, {(BW-1){1'b0}}}; end
      #1;
      for (int m = 0; m < 4; m++) check(y[m], o[m], m, 1'b1, "sat");
      check(y_wrap, o_wrap, 3, 1'b0, "wrap");
      checks++;
      if (longint'(y_full) != longint'(a) * longint'(b) || o_full) begin
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
