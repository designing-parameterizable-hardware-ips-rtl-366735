// fft_resource_shared -- memory-based radix-2 FFT: a controller, NBF butterfly units, one
// twiddle look-up table per butterfly and two frame memories used in turn as source and
// destination. This is the low-throughput, low-area template the pipelined core is set against.
//
// A frame of N samples is first written, in natural order, into memory 0. The controller then
// runs the log2(N) stages. In every clock of a stage each of the NBF butterflies takes one pair
// from the source memory and writes its two results to the same addresses of the other memory.
// A stage therefore takes N/(2*NBF) clocks, and the memories swap roles after each stage. Stage s
// works on the pairs (p, p + D), D = N/2**s. Pair number m = 0 .. N/2-1 (butterfly j handles
// m = t*NBF + j in clock t) lies in block b = m / D, so
//     p = 2*D*b + m mod D,  X1 = mem[p],  X0 = mem[p + D],  W = W_N^e,  e = bitrev_{L-1}(b),
//     mem'[p] = X1 + W*X0,  mem'[p + D] = X1 - W*X0.
// These are the same pairs and factors as the pipelined core, and the same butterfly, rounding
// and per-stage saturation, so both produce bit-identical spectra. Because the whole result is
// held in memory, it is read out at bit-reversed addresses and leaves in natural order.
//
// Interface: after `start` has been seen once, `in_ready` is high while the core is loading;
// a sample is taken when `in_valid` is also high. After the N-th sample the core computes for
// log2(N)*N/(2*NBF) clocks and then presents the N bins on N consecutive clocks (`out_valid`
// pulses, `out_bin` = k = 0 .. N-1); bin 0 appears log2(N)*N/(2*NBF) + 2 clocks after the
// frame's last sample is taken. Loading of the next frame starts after the last bin. One frame
// takes 2*N + log2(N)*N/(2*NBF) clocks. `ovf` pulses in a clock in which a butterfly saturated
// (or wrapped) a result. Synchronous active-low reset. The memories are written on the clock
// edge and read combinationally; each needs 2*NBF read and 2*NBF write ports.
//
// The blocks (controller, twiddle LUT, parallel butterflies between two memories that swap after
// every stage) follow the published template; its schedule, addressing, interface and the
// in-order read-out are choices of this implementation.
module fft_resource_shared
  import fxp_pkg::*;
  import fft_pkg::*;
#(
  parameter int          N      = 256,
  parameter int          DATA_W = 16,
  parameter int          NBF    = 1,       // butterfly units working in parallel
  parameter int          GROW   = 0,
  parameter int          TW     = 16,
  parameter round_mode_e RND    = RND_ROUND,
  parameter ovf_mode_e   OVF    = OVF_SAT,
  localparam int         L      = $clog2(N),
  localparam int         OUT_W  = DATA_W + L * GROW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_re, in_im,
  output logic                     in_ready,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_re, out_im,
  output logic [L-1:0]             out_bin,
  output logic                     ovf
);
  localparam int W  = OUT_W;                 // datapath and memory word width
  localparam int TB = L - 1;                 // bits of a pair number
  localparam int NT = N / (2 * NBF);         // clocks per stage
  localparam int TC = (NT <= 2) ? 1 : $clog2(NT);
  localparam int SW = $clog2(L + 1);

  initial begin
    assert (N == (1 << L) && N >= 4) else $error("fft_resource_shared: N must be a power of two >= 4");
    assert (NBF >= 1 && NBF <= N / 2 && (NBF & (NBF - 1)) == 0)
      else $error("fft_resource_shared: NBF must be a power of two <= N/2");
    assert (GROW == 0 || GROW == 1) else $error("fft_resource_shared: GROW must be 0 or 1");
  end

  typedef enum logic [1:0] {LOAD, COMPUTE, UNLOAD} phase_e;

  phase_e        phase;
  logic          running, sel;
  logic [L-1:0]  cnt;                        // sample counter of LOAD and UNLOAD
  logic [TC-1:0] t;                          // clock within a stage
  logic [SW-1:0] stage;                      // 1 .. L

  logic [2*W-1:0] mem0 [N];
  logic [2*W-1:0] mem1 [N];

  assign in_ready = running && phase == LOAD;

  // ---------------- addressing and butterflies ----------------
  logic [L-1:0]         pa [NBF];
  logic [L-1:0]         qa [NBF];
  logic [TB-1:0]        ea [NBF];
  logic signed [W-1:0]  n0_re [NBF], n0_im [NBF], n1_re [NBF], n1_im [NBF];
  logic [NBF-1:0]       bf_ovf;

  for (genvar j = 0; j < NBF; j++) begin : g_bf
    logic [TB-1:0]       m, b;
    logic [L-1:0]        dm;
    logic [2*W-1:0]      w1, w0;
    logic signed [TW-1:0] w_re, w_im;
    logic signed [W-1:0] y0_re, y0_im, y1_re, y1_im;
    logic                o_bf, o_st;

    assign m  = TB'(int'(t) * NBF + j);
    assign dm = L'(1) << (L - int'(stage));
    assign b  = m >> (L - int'(stage));
    always_comb begin
      pa[j] = (L'(b) << (L - int'(stage) + 1)) | (L'(m) & (dm - 1'b1));
      qa[j] = pa[j] | dm;
      ea[j] = '0;
      for (int i = 0; i < TB; i++) ea[j][TB - 1 - i] = b[i];
    end

    assign w1 = sel ? mem1[pa[j]] : mem0[pa[j]];
    assign w0 = sel ? mem1[qa[j]] : mem0[qa[j]];

    // The look-up table holds W_N^e for e = 0 .. N/2-1: the table of the last stage alone.
    fft_twiddle_rom #(.N(N), .FIRST(L), .G(1), .TW(TW)) u_lut (
      .stage(1'b0), .idx(L'(ea[j])), .w_re, .w_im);

    fft_butterfly #(.IW(W), .IF(DATA_W - 1), .OW(W), .OF(DATA_W - 2 + GROW), .TW(TW), .TF(TW - 2),
                    .RND(RND), .OVF(OVF)) u_bf (
      .x0_re(w0[2*W-1:W]), .x0_im(w0[W-1:0]), .x1_re(w1[2*W-1:W]), .x1_im(w1[W-1:0]),
      .w_re, .w_im, .y0_re, .y0_im, .y1_re, .y1_im, .ovf(o_bf));

    // fit the results into the word width of the running stage
    always_comb begin
      n0_re[j] = y0_re; n0_im[j] = y0_im; n1_re[j] = y1_re; n1_im[j] = y1_im; o_st = 1'b0;
      for (int s = 1; s <= L; s++)
        if (int'(stage) == s) begin
          n0_re[j] = W'(fxp_overflow(longint'(y0_re), DATA_W + s * GROW, OVF));
          n0_im[j] = W'(fxp_overflow(longint'(y0_im), DATA_W + s * GROW, OVF));
          n1_re[j] = W'(fxp_overflow(longint'(y1_re), DATA_W + s * GROW, OVF));
          n1_im[j] = W'(fxp_overflow(longint'(y1_im), DATA_W + s * GROW, OVF));
          o_st = fxp_overflows(longint'(y0_re), DATA_W + s * GROW) ||
                 fxp_overflows(longint'(y0_im), DATA_W + s * GROW) ||
                 fxp_overflows(longint'(y1_re), DATA_W + s * GROW) ||
                 fxp_overflows(longint'(y1_im), DATA_W + s * GROW);
        end
    end
    assign bf_ovf[j] = o_bf || o_st;
  end

  // ---------------- memories ----------------
  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      mem0[cnt] <= {W'(in_re), W'(in_im)};
    if (phase == COMPUTE)
      for (int j = 0; j < NBF; j++)
        if (sel) begin
          mem0[pa[j]] <= {n0_re[j], n0_im[j]};
          mem0[qa[j]] <= {n1_re[j], n1_im[j]};
        end else begin
          mem1[pa[j]] <= {n0_re[j], n0_im[j]};
          mem1[qa[j]] <= {n1_re[j], n1_im[j]};
        end
  end

  // ---------------- controller ----------------
  logic [L-1:0]   rd_addr;
  logic [2*W-1:0] rd_word;
  assign rd_addr = L'(bitrev(int'(cnt), L));
  assign rd_word = sel ? mem1[rd_addr] : mem0[rd_addr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      phase     <= LOAD;
      sel       <= 1'b0;
      cnt       <= '0;
      t         <= '0;
      stage     <= SW'(1);
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_bin   <= '0;
      ovf       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      ovf       <= 1'b0;
      if (start) running <= 1'b1;
      case (phase)
        LOAD: if (in_valid && in_ready) begin
          cnt <= cnt + 1'b1;
          if (&cnt) begin
            phase <= COMPUTE;
            sel   <= 1'b0;
            stage <= SW'(1);
            t     <= '0;
          end
        end
        COMPUTE: begin
          ovf <= |bf_ovf;
          t   <= t + 1'b1;
          if (int'(t) == NT - 1) begin
            t     <= '0;
            sel   <= !sel;
            stage <= stage + 1'b1;
            if (int'(stage) == L) phase <= UNLOAD;
          end
        end
        default: begin
          out_valid <= 1'b1;
          out_re    <= rd_word[2*W-1:W];
          out_im    <= rd_word[W-1:0];
          out_bin   <= cnt;
          cnt       <= cnt + 1'b1;
          if (&cnt) phase <= LOAD;
        end
      endcase
    end
  end
endmodule
