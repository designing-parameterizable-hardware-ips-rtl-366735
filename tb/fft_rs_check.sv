// fft_rs_check -- one fft_resource_shared instance (direct, or as fft_hls_ip with SHARED_BF)
// with its stimulus and bit-accurate checker.
//
// Drives FRAMES random complex frames of amplitude AMP (BINARY: every component is +AMP or
// -AMP) into the core; from frame 2 on the source leaves random idle cycles (GAP_PCT percent).
// Each frame's expected spectrum comes from an independent in-place radix-2 FFT written in
// plain integer arithmetic: stage s pairs samples N/2**s apart, multiplies the second by
// W_N^(bitrev(block) * N/2**s) quantised to TW-2 fractional bits, keeps the exact products,
// rounds the TW-1-GROW dropped bits half up and saturates to DATA_W + s*GROW bits. Every
// output word and its bin (natural order, 0 .. N-1) is compared with it, and frame 0 also with
// a floating-point DFT within log2(N)+2 LSB. The checker also requires: no input before
// `start`; bin 0 exactly log2(N)*N/(2*NBF) + 2 clocks after a frame's last sample; the next
// frame's first sample exactly 2*N + log2(N)*N/(2*NBF) clocks after the previous one's while
// the source never idles; N consecutive output clocks per frame; and, if MUST_OVF, at least
// one `ovf` pulse. Results are outputs; the enclosing testbench adds them up.
module fft_rs_check
  import fxp_pkg::*;
#(
  parameter int N        = 64,
  parameter int DATA_W   = 16,
  parameter int NBF      = 1,
  parameter int GROW     = 0,
  parameter int TW       = 16,
  parameter int FRAMES   = 3,
  parameter int AMP      = 4000,
  parameter int GAP_PCT  = 20,
  parameter int SEED     = 1,
  parameter bit BINARY   = 1'b0,
  parameter bit MUST_OVF = 1'b0,
  parameter bit USE_TOP  = 1'b0,   // 1: reach the core through fft_hls_ip with SHARED_BF = NBF
  localparam int L       = $clog2(N),
  localparam int OUT_W   = DATA_W + L * GROW
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_ovf
);
  localparam int TF = TW - 2;
  localparam int CK = L * N / (2 * NBF);    // compute clocks per frame

  logic                    start, in_valid, in_ready, out_valid, ovf;
  logic signed [DATA_W-1:0] in_re, in_im;
  logic signed [OUT_W-1:0]  out_re, out_im;
  logic [L-1:0]             out_bin;

  if (USE_TOP) begin : g_top
    fft_hls_ip #(.N(N), .DATA_W(DATA_W), .SHARED_BF(NBF), .GROW(GROW), .TW(TW)) dut (
      .clk, .rst_n, .start, .in_valid, .in_re, .in_im, .in_ready,
      .out_valid, .out_re, .out_im, .out_bin, .ovf);
  end else begin : g_core
    fft_resource_shared #(.N(N), .DATA_W(DATA_W), .NBF(NBF), .GROW(GROW), .TW(TW)) dut (
      .clk, .rst_n, .start, .in_valid, .in_re, .in_im, .in_ready,
      .out_valid, .out_re, .out_im, .out_bin, .ovf);
  end

  longint x_re [FRAMES][N], x_im [FRAMES][N];
  longint e_re [FRAMES][N], e_im [FRAMES][N];   // expected, indexed by bin

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic longint sat(longint v, int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  task automatic reference(int f);
    longint a_re[N], a_im[N];
    int sh;
    sh = TF + 1 - GROW;
    for (int i = 0; i < N; i++) begin a_re[i] = x_re[f][i]; a_im[i] = x_im[f][i]; end
    for (int s = 1; s <= L; s++) begin
      int d = N >> s;
      int w = DATA_W + s * GROW;
      for (int b = 0; b < (1 << (s - 1)); b++) begin
        real th = 2.0 * 3.14159265358979323846 * (brev(b, s - 1) * d) / N;
        longint wr = longint'($floor($cos(th) * (1 << TF) + 0.5));
        longint wi = longint'($floor(-$sin(th) * (1 << TF) + 0.5));
        for (int i = 0; i < d; i++) begin
          int p = b * 2 * d + i, q = p + d;
          longint tr = a_re[q] * wr - a_im[q] * wi;
          longint ti = a_re[q] * wi + a_im[q] * wr;
          longint ar = a_re[p] <<< TF, ai = a_im[p] <<< TF;
          a_re[p] = sat((ar + tr + (64'sd1 <<< (sh - 1))) >>> sh, w);
          a_im[p] = sat((ai + ti + (64'sd1 <<< (sh - 1))) >>> sh, w);
          a_re[q] = sat((ar - tr + (64'sd1 <<< (sh - 1))) >>> sh, w);
          a_im[q] = sat((ai - ti + (64'sd1 <<< (sh - 1))) >>> sh, w);
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      e_re[f][brev(i, L)] = a_re[i];
      e_im[f][brev(i, L)] = a_im[i];
    end
  endtask

  task automatic float_check();
    real scale = (GROW == 0) ? 1.0 / N : 1.0;
    real tol = L + 2.0;
    for (int k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0, dr, di;
      for (int n = 0; n < N; n++) begin
        real th = 2.0 * 3.14159265358979323846 * k * n / N;
        sr += x_re[0][n] * $cos(th) + x_im[0][n] * $sin(th);
        si += x_im[0][n] * $cos(th) - x_re[0][n] * $sin(th);
      end
      dr = sr * scale - e_re[0][k];
      di = si * scale - e_im[0][k];
      checks++;
      if (dr > tol || dr < -tol || di > tol || di < -tol) begin
        failures++;
        if (failures < 10) $display("FLOAT MISMATCH N=%0d bin %0d: dft %f %f fixed %0d %0d", N, k, sr * scale, si * scale, e_re[0][k], e_im[0][k]);
      end
    end
  endtask

  initial begin
    void'($urandom(SEED));
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < N; i++) begin
        if (BINARY) begin
          x_re[f][i] = ($urandom_range(1) != 0) ? longint'(AMP) : -longint'(AMP);
          x_im[f][i] = ($urandom_range(1) != 0) ? longint'(AMP) : -longint'(AMP);
        end else begin
          x_re[f][i] = longint'($urandom_range(2 * AMP)) - longint'(AMP);
          x_im[f][i] = longint'($urandom_range(2 * AMP)) - longint'(AMP);
        end
      end
    for (int f = 0; f < FRAMES; f++) reference(f);
  end

  // ---------------- driver ----------------
  int  sent, cyc, n_gap;
  int  first_acc [FRAMES], last_acc [FRAMES];
  logic want;
  assign in_re    = DATA_W'(x_re[sent / N][sent % N]);
  assign in_im    = DATA_W'(x_im[sent / N][sent % N]);
  assign in_valid = want && (sent < FRAMES * N);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sent <= 0; start <= 1'b0; want <= 1'b1; cyc <= 0; n_gap <= 0;
    end else begin
      cyc <= cyc + 1;
      if (cyc == 15) start <= 1'b1;
      if (in_valid && in_ready) begin
        sent <= sent + 1;
        if (sent % N == 0)     first_acc[sent / N] <= cyc;
        if (sent % N == N - 1) last_acc[sent / N]  <= cyc;
      end
      if (sent >= 2 * N && ($urandom_range(99) < GAP_PCT)) begin
        want <= 1'b0; n_gap <= n_gap + 1;
      end else want <= 1'b1;
    end
  end

  // ---------------- monitor ----------------
  int got, run;
  always @(posedge clk) begin
    if (!rst_n) begin
      got = 0; run = 0; checks = 0; failures = 0; n_ovf = 0; done = 1'b0;
    end else if (!done) begin
      if (!start && in_ready) begin
        checks++; failures++;
        $display("ERROR N=%0d: input taken before start", N);
      end
      if (ovf) n_ovf++;
      if (out_valid) begin
        int f, k;
        f = got / N; k = got % N;
        checks++;
        if (longint'(out_re) != e_re[f][k] || longint'(out_im) != e_im[f][k] || int'(out_bin) != k) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH N=%0d NBF=%0d frame %0d bin %0d (out_bin %0d): got %0d %0d exp %0d %0d",
                     N, NBF, f, k, out_bin, out_re, out_im, e_re[f][k], e_im[f][k]);
        end
        if (k == 0) begin
          checks++;
          if (cyc - last_acc[f] != CK + 2) begin
            failures++;
            $display("LATENCY N=%0d NBF=%0d: bin 0 %0d clocks after the last sample, expected %0d",
                     N, NBF, cyc - last_acc[f], CK + 2);
          end
        end
        run++;
        got++;
        if (got == FRAMES * N) begin
          float_check();
          checks += 3;
          if (first_acc[1] - first_acc[0] != 2 * N + CK) begin
            failures++;
            $display("PERIOD N=%0d NBF=%0d: %0d clocks between frames, expected %0d",
                     N, NBF, first_acc[1] - first_acc[0], 2 * N + CK);
          end
          if (n_gap == 0) begin
            failures++;
            $display("no idle input cycle was exercised");
          end
          if (MUST_OVF && n_ovf == 0) begin
            failures++;
            $display("N=%0d NBF=%0d: no saturation seen", N, NBF);
          end
          done = 1'b1;
        end
      end else if (run != 0) begin
        checks++;
        if (run != N) begin
          failures++;
          $display("N=%0d NBF=%0d: %0d consecutive output clocks, expected %0d", N, NBF, run, N);
        end
        run = 0;
      end
    end
  end
endmodule
