// tb_fft_twiddle_rom -- checks every entry of merged and single-stage twiddle tables.
//
// Instance A holds stages 2..4 of a 16-point FFT (tables of 2, 4 and 8 factors); instance B the
// last stage of a 256-point FFT (128 factors). For stage s and index j the expected factor is
// W_N^(j*N/2**s) = cos - j*sin of 2*pi*j/2**s, quantised to 16 bits with 14 fractional bits
// (round half up). Indices beyond a stage's table wrap modulo its size.
module tb_fft_twiddle_rom;
  logic [1:0] a_stage;
  logic [3:0] a_idx;
  logic signed [15:0] a_re, a_im;
  logic [0:0] b_stage;
  logic [7:0] b_idx;
  logic signed [15:0] b_re, b_im;

  fft_twiddle_rom #(.N(16), .FIRST(2), .G(3), .TW(16)) u_a (.stage(a_stage), .idx(a_idx), .w_re(a_re), .w_im(a_im));
  fft_twiddle_rom #(.N(256), .FIRST(8), .G(1), .TW(16)) u_b (.stage(b_stage), .idx(b_idx), .w_re(b_re), .w_im(b_im));

  int checks = 0, failures = 0;

  function automatic int q(real v);
    return $rtoi($floor(v * 16384.0 + 0.5));
  endfunction

  initial begin : main
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 16; j++) begin
        int s, n;
        real th;
        s = 2 + k; n = 1 << (s - 1);
        a_stage = 2'(k); a_idx = 4'(j);
        #1;
        th = 6.283185307179586 * real'(j % n) / real'(2 * n);
        checks++;
        if (int'(a_re) != q($cos(th)) || int'(a_im) != q(-$sin(th))) begin
          failures++;
          $display("FAIL A stage %0d j %0d: got %0d %0d exp %0d %0d", s, j, a_re, a_im, q($cos(th)), q(-$sin(th)));
        end
      end
    b_stage = 1'b0;
    for (int j = 0; j < 128; j++) begin
      real th;
      b_idx = 8'(j);
      #1;
      th = 6.283185307179586 * real'(j) / 256.0;
      checks++;
      if (int'(b_re) != q($cos(th)) || int'(b_im) != q(-$sin(th))) begin
        failures++;
        $display("FAIL B j %0d: got %0d %0d", j, b_re, b_im);
      end
    end
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
