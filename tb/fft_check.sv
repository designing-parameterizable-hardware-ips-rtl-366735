// fft_check -- stimulus generator and bit-accurate checker for fft_hls_ip.
//
// Drives FRAMES random complex frames (plus one trailing frame that flushes the pipeline)
// into the FFT, with amplitude AMP and, after the first frame, random idle cycles on the
// input (GAP_PCT percent). For every frame it computes the expected spectrum independently:
// an in-place radix-2 decimation-in-time FFT on the natural-order frame, whose stage s pairs
// samples N/2**s apart and multiplies the second by W_N^(bitrev(block) * N/2**s), with the
// same fixed-point rules as the hardware (twiddles with TW-2 fractional bits, exact products,
// round-half-up of the TW-1-GROW dropped bits, saturation to the stage width). It compares
// every output word, its bin index, the clocks from the frame's last sample to its first output
// (CONCURRENCY*(log2(N)/CONCURRENCY+1)) and the clock count of the first, gap-free frame (throughput of
// CONCURRENCY/log2(N) samples per clock). Frame 0 is also compared with a floating-point DFT.
// It checks that no input is taken before `start`. Results and event counts are outputs.
module fft_check #(
  parameter int N           = 256,
  parameter int DATA_W      = 16,
  parameter int CONCURRENCY = 8,
  parameter int GROW        = 0,
  parameter int TW          = 16,
  parameter int FRAMES      = 3,
  parameter int AMP         = 4000,
  parameter int GAP_PCT     = 20,
  parameter int SEED        = 1,
  parameter bit BINARY      = 1'b0,   // 1: every component is +AMP or -AMP
  localparam int L          = $clog2(N),
  localparam int OUT_W      = DATA_W + L * GROW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     start,
  output logic                     in_valid,
  output logic signed [DATA_W-1:0] in_re, in_im,
  input  logic                     in_ready,
  input  logic                     out_valid,
  input  logic signed [OUT_W-1:0]  out_re, out_im,
  input  logic [L-1:0]             out_bin,
  input  logic                     ovf,
  output logic                     done,
  output int                       checks,
  output int                       failures,
  output int                       n_ovf,
  output int                       n_gap
);
  localparam int TF = TW - 2;
  localparam int G  = L / CONCURRENCY;

  longint x_re [FRAMES+1][N], x_im [FRAMES+1][N];
  longint e_re [FRAMES][N],   e_im [FRAMES][N];   // expected, in output (bit-reversed) order

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic longint sat(longint v, int w, ref int o);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    if (v > mx) begin o = 1; return mx; end
    if (v < mn) begin o = 1; return mn; end
    return v;
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
        int e = brev(b, s - 1) * d;
        real th = 2.0 * 3.14159265358979323846 * e / N;
        longint wr = longint'($floor($cos(th) * (1 << TF) + 0.5));
        longint wi = longint'($floor(-$sin(th) * (1 << TF) + 0.5));
        for (int i = 0; i < d; i++) begin
          int p = b * 2 * d + i, q = p + d, o = 0;
          longint tr = a_re[q] * wr - a_im[q] * wi;
          longint ti = a_re[q] * wi + a_im[q] * wr;
          longint ar = a_re[p] <<< TF, ai = a_im[p] <<< TF;
          a_re[p] = sat((ar + tr + (64'sd1 <<< (sh - 1))) >>> sh, w, o);
          a_im[p] = sat((ai + ti + (64'sd1 <<< (sh - 1))) >>> sh, w, o);
          a_re[q] = sat((ar - tr + (64'sd1 <<< (sh - 1))) >>> sh, w, o);
          a_im[q] = sat((ai - ti + (64'sd1 <<< (sh - 1))) >>> sh, w, o);
        end
      end
    end
    for (int i = 0; i < N; i++) begin e_re[f][i] = a_re[i]; e_im[f][i] = a_im[i]; end
  endtask

  // Floating-point DFT of frame 0, compared with the hardware's reference result.
  task automatic float_check();
    real scale, tol;
    scale = (GROW == 0) ? 1.0 / N : 1.0;
    tol   = L + 2.0;
    for (int p = 0; p < N; p++) begin
      int k = brev(p, L);
      real sr = 0.0, si = 0.0, dr, di;
      for (int n = 0; n < N; n++) begin
        real th = 2.0 * 3.14159265358979323846 * k * n / N;
        sr += x_re[0][n] * $cos(th) + x_im[0][n] * $sin(th);
        si += x_im[0][n] * $cos(th) - x_re[0][n] * $sin(th);
      end
      dr = sr * scale - e_re[0][p];
      di = si * scale - e_im[0][p];
      checks++;
      if (dr > tol || dr < -tol || di > tol || di < -tol) begin
        failures++;
        if (failures < 10) $display("FLOAT MISMATCH bin %0d: dft %f %f fixed %0d %0d", k, sr * scale, si * scale, e_re[0][p], e_im[0][p]);
      end
    end
  endtask

  initial begin
    void'($urandom(SEED));
    for (int f = 0; f <= FRAMES; f++)
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
  int sent, first_out_cyc, first_acc_cyc, frame0_end_cyc, cyc;
  logic seen_out;
  assign in_re = DATA_W'(x_re[sent / N][sent % N]);
  assign in_im = DATA_W'(x_im[sent / N][sent % N]);

  logic want;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sent <= 0; start <= 1'b0; want <= 1'b1; cyc <= 0; n_gap <= 0;
      first_acc_cyc <= -1; frame0_end_cyc <= -1;
    end else begin
      cyc <= cyc + 1;
      if (cyc == 20) start <= 1'b1;
      if (in_valid && in_ready) begin
        sent <= sent + 1;
        if (sent == 0) first_acc_cyc <= cyc;
        if (sent == N - 1) frame0_end_cyc <= cyc;
      end
      // random idle cycles on the source, from frame 1 on
      if (sent >= N && !(in_valid && !in_ready) && ($urandom_range(99) < GAP_PCT)) begin
        want <= 1'b0; n_gap <= n_gap + 1;
      end else want <= 1'b1;
    end
  end
  assign in_valid = want && (sent < (FRAMES + 1) * N);

  // ---------------- monitor ----------------
  int got;
  always @(posedge clk) begin
    if (!rst_n) begin
      got = 0; checks = 0; failures = 0; n_ovf = 0; done = 1'b0; seen_out = 1'b0;
      first_out_cyc = 0;
    end else begin
      if (!start && in_ready) begin
        checks++; failures++;
        $display("ERROR: input taken before start");
      end
      if (ovf) n_ovf++;
      if (out_valid && got < FRAMES * N) begin
        int f, p;
        f = got / N; p = got % N;
        got++;
        if (!seen_out) begin
          seen_out = 1'b1;
          first_out_cyc = cyc;
        end
        checks++;
        if (longint'(out_re) != e_re[f][p] || longint'(out_im) != e_im[f][p] ||
            int'(out_bin) != brev(p, L)) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH N=%0d C=%0d frame %0d pos %0d bin %0d: got %0d %0d exp %0d %0d",
                     N, CONCURRENCY, f, p, out_bin, out_re, out_im, e_re[f][p], e_im[f][p]);
        end
        if (got == FRAMES * N) begin
          float_check();
          // latency: bin 0 of frame 0 leaves CONCURRENCY*(G+1) clocks after the frame's last
          // sample is taken (each group: one clock to take the sample, G to run its stages)
          checks += 3;
          if (first_out_cyc - frame0_end_cyc != CONCURRENCY * (G + 1)) begin
            failures++;
            $display("LATENCY N=%0d C=%0d: first output %0d clocks after the last sample, expected %0d",
                     N, CONCURRENCY, first_out_cyc - frame0_end_cyc, CONCURRENCY * (G + 1));
          end
          // throughput: gap-free frame 0 takes (N-1)*G clocks from first to last sample
          if (frame0_end_cyc - first_acc_cyc != (N - 1) * G) begin
            failures++;
            $display("THROUGHPUT N=%0d C=%0d: frame took %0d clocks, expected %0d", N, CONCURRENCY, frame0_end_cyc - first_acc_cyc, (N - 1) * G);
          end
          if (n_gap == 0) begin
            failures++;
            $display("no idle input cycle was exercised");
          end
          done = 1'b1;
        end
      end
    end
  end
endmodule
