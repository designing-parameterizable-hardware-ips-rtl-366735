// tb_fft_butterfly -- self-checking test of the radix-2 butterfly.
//
// Two instances: the constant-width stage (16-bit in, 15 fractional; 16-bit out, 14 fractional,
// i.e. the result is halved) and the growing stage (16-bit in, 17-bit out, same point). Inputs
// are random, with full-scale corner values mixed in; twiddles are W = cos(t) - j sin(t) for
// random angles quantised to 16 bits with 14 fractional bits. The expected outputs are the
// exact complex values X1 +/- W*X0 rounded half-up to the output point and saturated, with the
// overflow flag expected whenever a saturation was needed.
module tb_fft_butterfly;
  import fxp_pkg::*;
  localparam int IW = 16, IF = 15, TW = 16, TF = 14;

  logic signed [IW-1:0] x0r, x0i, x1r, x1i;
  logic signed [TW-1:0] wr, wi;
  logic signed [15:0]   a0r, a0i, a1r, a1i;   // halving instance
  logic signed [16:0]   b0r, b0i, b1r, b1i;   // growing instance
  logic                 a_ovf, b_ovf;

  fft_butterfly #(.IW(IW), .IF(IF), .OW(16), .OF(IF - 1), .TW(TW), .TF(TF)) u_half (
    .x0_re(x0r), .x0_im(x0i), .x1_re(x1r), .x1_im(x1i), .w_re(wr), .w_im(wi),
    .y0_re(a0r), .y0_im(a0i), .y1_re(a1r), .y1_im(a1i), .ovf(a_ovf));
  fft_butterfly #(.IW(IW), .IF(IF), .OW(17), .OF(IF), .TW(TW), .TF(TF)) u_grow (
    .x0_re(x0r), .x0_im(x0i), .x1_re(x1r), .x1_im(x1i), .w_re(wr), .w_im(wi),
    .y0_re(b0r), .y0_im(b0i), .y1_re(b1r), .y1_im(b1i), .ovf(b_ovf));

  int checks = 0, failures = 0, n_ovf = 0;

  // expected word for exact integer value e (units 2**-(IF+TF)), dropping sh bits, w-bit result
  function automatic longint exp_word(longint e, int sh, int w, ref bit o);
    real v;
    longint r, mx, mn;
    v  = real'(e) / real'(64'sd1 <<< sh);
    r  = longint'($floor(v + 0.5));
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    if (r > mx) begin o = 1; r = mx; end
    if (r < mn) begin o = 1; r = mn; end
    return r;
  endfunction

  initial begin : main
    for (int t = 0; t < 4000; t++) begin
      real th;
      longint pr, pi;
      bit oa, ob;
      th  = 6.283185307179586 * real'($urandom_range(9999)) / 10000.0;
      wr  = TW'($rtoi($floor($cos(th) * 16384.0 + 0.5)));
      wi  = TW'($rtoi($floor(-$sin(th) * 16384.0 + 0.5)));
      if (t % 4 == 0) begin
        x0r = ($urandom_range(1) != 0) ? 16'sd32767 : -16'sd32768;
        x0i = ($urandom_range(1) != 0) ? 16'sd32767 : -16'sd32768;
        x1r = ($urandom_range(1) != 0) ? 16'sd32767 : -16'sd32768;
        x1i = ($urandom_range(1) != 0) ? 16'sd32767 : -16'sd32768;
      end else begin
        x0r = IW'($urandom); x0i = IW'($urandom); x1r = IW'($urandom); x1i = IW'($urandom);
      end
      #1;
      pr = longint'(x0r) * wr - longint'(x0i) * wi;
      pi = longint'(x0r) * wi + longint'(x0i) * wr;
      oa = 0; ob = 0;
      checks += 10;
      if (longint'(a0r) != exp_word((longint'(x1r) <<< TF) + pr, TF + 1, 16, oa)) failures++;
      if (longint'(a0i) != exp_word((longint'(x1i) <<< TF) + pi, TF + 1, 16, oa)) failures++;
      if (longint'(a1r) != exp_word((longint'(x1r) <<< TF) - pr, TF + 1, 16, oa)) failures++;
      if (longint'(a1i) != exp_word((longint'(x1i) <<< TF) - pi, TF + 1, 16, oa)) failures++;
      if (longint'(b0r) != exp_word((longint'(x1r) <<< TF) + pr, TF, 17, ob)) failures++;
      if (longint'(b0i) != exp_word((longint'(x1i) <<< TF) + pi, TF, 17, ob)) failures++;
      if (longint'(b1r) != exp_word((longint'(x1r) <<< TF) - pr, TF, 17, ob)) failures++;
      if (longint'(b1i) != exp_word((longint'(x1i) <<< TF) - pi, TF, 17, ob)) failures++;
      if (a_ovf != oa) failures++;
      if (b_ovf != ob) failures++;
      if (oa || ob) n_ovf++;
      if (failures != 0 && failures < 5)
        $display("FAIL t=%0d x0=%0d,%0d x1=%0d,%0d w=%0d,%0d y0=%0d,%0d y1=%0d,%0d", t, x0r, x0i,
                 x1r, x1i, wr, wi, a0r, a0i, a1r, a1i);
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("no saturation exercised"); end
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
