// tb_fft_stage_group -- self-checking test of a stage group (one FFT thread).
//
// A: one group holding all 4 stages of a 16-point FFT (the fully shared case), 12-bit words
//    halved at every stage: the output must be DFT/16, in bit-reversed order.
// B: two chained groups of 2 stages each, 12-bit input growing one bit per stage (16-bit out):
//    the output must be the DFT itself.
// Four random frames are streamed in with random idle cycles (after frame 0); frames 0..2 are
// compared with a floating-point DFT, within a rounding tolerance of 3 LSB (the fixed-point
// rounding of four stages). Also checked: a group with G stages takes a sample at most every G
// clocks and exactly every G clocks while its input is always valid (frame 0); the first
// output of A appears G+1 clocks after the frame's last sample.
module tb_fft_stage_group;
  import fxp_pkg::*;
  localparam int N = 16, W = 12, FR = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  longint xr [FR][N], xi [FR][N];
  int sent_a, sent_b, got_a, got_b;
  logic va, vb, ra, rb, ova, ovb, f_a, f_b, m_v, m_r, m_o, want;
  logic signed [W-1:0]  ina_re, ina_im, inb_re, inb_im, oa_re, oa_im;
  logic signed [W+1:0]  m_re, m_im;
  logic signed [W+3:0]  ob_re, ob_im;

  fft_stage_group #(.N(N), .FIRST(1), .G(4), .IN_W(W), .IN_F(W - 1), .GROW(0)) u_a (
    .clk, .rst_n, .in_valid(va), .in_re(ina_re), .in_im(ina_im), .in_ready(ra),
    .out_valid(ova), .out_re(oa_re), .out_im(oa_im), .ovf(f_a));
  fft_stage_group #(.N(N), .FIRST(1), .G(2), .IN_W(W), .IN_F(W - 1), .GROW(1)) u_b1 (
    .clk, .rst_n, .in_valid(vb), .in_re(inb_re), .in_im(inb_im), .in_ready(rb),
    .out_valid(m_v), .out_re(m_re), .out_im(m_im), .ovf(m_o));
  fft_stage_group #(.N(N), .FIRST(3), .G(2), .IN_W(W), .IN_F(W - 1), .GROW(1)) u_b2 (
    .clk, .rst_n, .in_valid(m_v), .in_re(m_re), .in_im(m_im), .in_ready(m_r),
    .out_valid(ovb), .out_re(ob_re), .out_im(ob_im), .ovf(f_b));

  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  int acc_a [$], acc_b [$];
  int a_last_in, a_first_out;

  assign ina_re = W'(xr[sent_a / N][sent_a % N]);
  assign ina_im = W'(xi[sent_a / N][sent_a % N]);
  assign inb_re = W'(xr[sent_b / N][sent_b % N]);
  assign inb_im = W'(xi[sent_b / N][sent_b % N]);
  assign va = want && sent_a < FR * N;
  assign vb = want && sent_b < FR * N;

  function automatic int brev4(int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  task automatic cmp(string nm, int idx, longint gr, longint gi, real scale);
    int f, k;
    real sr, si;
    f = idx / N; k = brev4(idx % N);
    sr = 0.0; si = 0.0;
    for (int n = 0; n < N; n++) begin
      real th = 6.283185307179586 * k * n / N;
      sr += xr[f][n] * $cos(th) + xi[f][n] * $sin(th);
      si += xi[f][n] * $cos(th) - xr[f][n] * $sin(th);
    end
    sr *= scale; si *= scale;
    checks++;
    if ((real'(gr) - sr) > 3.0 || (real'(gr) - sr) < -3.0 || (real'(gi) - si) > 3.0 || (real'(gi) - si) < -3.0) begin
      failures++;
      if (failures < 10) $display("FAIL %s frame %0d bin %0d: got %0d %0d dft %f %f", nm, f, k, gr, gi, sr, si);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (va && ra) begin acc_a.push_back(cyc); if (sent_a == N - 1) a_last_in = cyc; sent_a <= sent_a + 1; end
    if (vb && rb) begin acc_b.push_back(cyc); sent_b <= sent_b + 1; end
    checks++;
    if (m_v && !m_r) begin failures++; $display("FAIL: chained group stalled"); end
    if (ova && got_a < (FR - 1) * N) begin
      if (got_a == 0) a_first_out = cyc;
      cmp("A", got_a, longint'(oa_re), longint'(oa_im), 1.0 / N); got_a++;
    end
    if (ovb && got_b < (FR - 1) * N) begin cmp("B", got_b, longint'(ob_re), longint'(ob_im), 1.0); got_b++; end
    if (sent_a >= N && $urandom_range(99) < 25) begin want <= 1'b0; gaps++; end
    else want <= 1'b1;
  end

  initial begin : main
    want = 1'b1; sent_a = 0; sent_b = 0; got_a = 0; got_b = 0;
    for (int f = 0; f < FR; f++)
      for (int i = 0; i < N; i++) begin
        xr[f][i] = longint'($urandom_range(1600)) - 800;
        xi[f][i] = longint'($urandom_range(1600)) - 800;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (got_a == (FR - 1) * N && got_b == (FR - 1) * N);
    // throughput: frame 0 taken at exactly one sample per G clocks, never faster afterwards
    for (int i = 1; i < acc_a.size(); i++) begin
      checks++;
      if ((i < N && acc_a[i] - acc_a[i-1] != 4) || acc_a[i] - acc_a[i-1] < 4) begin
        failures++; $display("FAIL A sample %0d taken %0d clocks after the previous", i, acc_a[i] - acc_a[i-1]);
      end
    end
    for (int i = 1; i < acc_b.size(); i++) begin
      checks++;
      if ((i < N && acc_b[i] - acc_b[i-1] != 2) || acc_b[i] - acc_b[i-1] < 2) begin
        failures++; $display("FAIL B sample %0d taken %0d clocks after the previous", i, acc_b[i] - acc_b[i-1]);
      end
    end
    checks += 2;
    if (a_first_out - a_last_in != 5) begin
      failures++; $display("FAIL A latency %0d clocks, expected 5", a_first_out - a_last_in);
    end
    if (gaps == 0) begin failures++; $display("no idle input cycles exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
