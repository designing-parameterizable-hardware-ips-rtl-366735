// fft_hls_ip -- parameterizable N-point radix-2 pipelined FFT with selectable concurrency.
//
// The log2(N) butterfly stages of a single-path delay-feedback FFT are split into CONCURRENCY
// groups ("threads") of log2(N)/CONCURRENCY consecutive stages each (fft_stage_group). Inside a
// group the stages share one butterfly, one memory and one twiddle table and run one after the
// other, one stage per clock; the groups run concurrently. CONCURRENCY = log2(N) is the fully
// pipelined FFT (one sample per clock, a buffer per stage); CONCURRENCY = 1 is the fully
// resource-shared FFT (one butterfly, one memory of N-1 words, one sample per log2(N) clocks).
// Throughput is therefore CONCURRENCY/log2(N) samples per clock.
//
// Interface (streaming, continuous frames):
//   start        -- the core ignores input until it has seen `start` high once after reset.
//   in_valid/in_ready, in_re/in_im -- complex input samples in natural order, frame after frame,
//                   DATA_W bits with DATA_W-1 fractional bits.
//   out_valid, out_re/out_im       -- spectrum samples, OUT_W = DATA_W + log2(N)*GROW bits. The
//                   output of a frame is in bit-reversed order; out_bin gives the frequency index
//                   of each word. With GROW = 0 every stage halves its result, so the output is
//                   X[k]/N in the same Q1.(DATA_W-1) format as the input; with GROW = 1 the
//                   output is X[k] with the input's fractional bits.
//   ovf          -- pulses when a stage had to saturate (or wrap) a result.
// Latency: bin 0 of a frame leaves CONCURRENCY*(log2(N)/CONCURRENCY+1) clocks after the frame's
// last sample is taken (16 clocks at the defaults); the pipeline holds N-1 samples, so the other
// bins leave while the following frame (or padding) streams in.
// Synchronous active-low reset.
//
// SHARED_BF > 0 replaces all of this by the memory-based template (fft_resource_shared) with
// SHARED_BF parallel butterflies, same ports and bit-identical spectra, but frame by frame:
// load N samples, compute, then read the bins out in natural order.
//
// From the published architecture: the stage structure (one buffer of N/2**m samples, one
// butterfly, state information and twiddle factors per stage), merging stages and their
// memories into threads, the 256-point 16-bit size, the start input and rounding (not growth)
// between stages. Choices of this implementation: natural-order input with bit-reversed output,
// the valid/ready handshake, out_bin, reset, CONCURRENCY = 8 as the default.
module fft_hls_ip
  import fxp_pkg::*;
  import fft_pkg::*;
#(
  parameter int          N           = 256,
  parameter int          DATA_W      = 16,
  parameter int          CONCURRENCY = 8,
  parameter int          SHARED_BF   = 0,   // > 0: memory-based template with this many butterflies
  parameter int          GROW        = 0,
  parameter int          TW          = 16,
  parameter round_mode_e RND         = RND_ROUND,
  parameter ovf_mode_e   OVF         = OVF_SAT,
  localparam int         L           = $clog2(N),
  localparam int         OUT_W       = DATA_W + L * GROW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    in_valid,
  input  logic signed [DATA_W-1:0] in_re, in_im,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re, out_im,
  output logic [L-1:0]            out_bin,
  output logic                    ovf
);
  localparam int G = L / CONCURRENCY;     // stages per group

  initial begin
    assert (N == (1 << L) && N >= 4) else $error("fft_hls_ip: N must be a power of two >= 4");
    assert (SHARED_BF > 0 || (CONCURRENCY >= 1 && G * CONCURRENCY == L))
      else $error("fft_hls_ip: CONCURRENCY must divide log2(N) = %0d", L);
  end

  if (SHARED_BF > 0) begin : g_shared
    // Memory-based architecture: all stages on SHARED_BF butterflies between two frame
    // memories; CONCURRENCY is not used. Bins leave in natural order.
    fft_resource_shared #(.N(N), .DATA_W(DATA_W), .NBF(SHARED_BF), .GROW(GROW), .TW(TW),
                          .RND(RND), .OVF(OVF)) u_rs (
      .clk, .rst_n, .start, .in_valid, .in_re, .in_im, .in_ready,
      .out_valid, .out_re, .out_im, .out_bin, .ovf);
  end else begin : g_threads
    logic running;
    always_ff @(posedge clk)
      if (!rst_n)     running <= 1'b0;
      else if (start) running <= 1'b1;

    // Stream between groups c-1 and c; width grows by G*GROW bits per group.
    localparam int MAXW = OUT_W;
    logic                   s_valid [CONCURRENCY+1];
    logic                   s_ready [CONCURRENCY+1];
    logic signed [MAXW-1:0] s_re    [CONCURRENCY+1];
    logic signed [MAXW-1:0] s_im    [CONCURRENCY+1];
    logic [CONCURRENCY-1:0] g_ovf;

    assign s_valid[0] = running && in_valid;
    assign s_re[0]    = MAXW'(in_re);
    assign s_im[0]    = MAXW'(in_im);
    assign in_ready   = running && s_ready[0];
    assign s_ready[CONCURRENCY] = 1'b1;

    for (genvar c = 0; c < CONCURRENCY; c++) begin : g_thread
      localparam int WI = DATA_W + c * G * GROW;
      localparam int WO = DATA_W + (c + 1) * G * GROW;
      logic signed [WO-1:0] o_re, o_im;
      fft_stage_group #(.N(N), .FIRST(c * G + 1), .G(G), .IN_W(DATA_W), .IN_F(DATA_W - 1),
                        .GROW(GROW), .TW(TW), .RND(RND), .OVF(OVF)) u_grp (
        .clk, .rst_n,
        .in_valid(s_valid[c]), .in_re(WI'(s_re[c])), .in_im(WI'(s_im[c])), .in_ready(s_ready[c]),
        .out_valid(s_valid[c+1]), .out_re(o_re), .out_im(o_im), .ovf(g_ovf[c]));
      assign s_re[c+1] = MAXW'(o_re);
      assign s_im[c+1] = MAXW'(o_im);
    end

    // Output position counter; the pipeline emits a frame in bit-reversed order.
    logic [L-1:0] opos;
    always_ff @(posedge clk)
      if (!rst_n)                     opos <= '0;
      else if (s_valid[CONCURRENCY])  opos <= opos + 1'b1;

    assign out_valid = s_valid[CONCURRENCY];
    assign out_re    = OUT_W'(s_re[CONCURRENCY]);
    assign out_im    = OUT_W'(s_im[CONCURRENCY]);
    assign out_bin   = L'(bitrev(int'(opos), L));
    assign ovf       = |g_ovf;

    // Groups with equal G never stall each other.
    for (genvar c = 1; c < CONCURRENCY; c++) begin : g_chk
      property p_no_stall;
        @(posedge clk) disable iff (!rst_n) s_valid[c] |-> s_ready[c];
      endproperty
      a_no_stall: assert property (p_no_stall);
    end
  end
endmodule
