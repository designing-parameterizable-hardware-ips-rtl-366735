// fft_stage_group -- one thread of the pipelined FFT: G consecutive butterfly stages that share
// one butterfly unit, one merged feedback memory and one merged twiddle table.
//
// Each stage is a radix-2 single-path delay-feedback stage. Stage s (span D = N/2**s) sees the
// samples of a frame in natural order. For the first D samples of every 2D-block the incoming
// sample is written into the stage buffer while the value stored there (the lower result of the
// previous block) is passed on. For the next D samples the buffered sample X1 and the incoming
// sample X0 form a butterfly: Y0 = X1 + W*X0 is passed on at once and Y1 = X1 - W*X0 replaces
// X1 in the buffer, to be passed on during the next block. Every stage delays the stream by D
// samples; the whole chain turns a natural-order frame into its spectrum in bit-reversed order.
//
// With G = 1 the group is one fully concurrent stage and accepts a sample every clock. With
// G > 1 the stages are time-multiplexed: a sample is taken in, then stage FIRST+k runs in the
// k-th following clock (one butterfly and one memory access per clock), so the group accepts
// one sample every G clocks. The buffers of the G stages sit in consecutive regions of one
// memory of N/2**(FIRST-1) - N/2**(FIRST-1+G) words.
//
// Fixed point: stage input words of stage s are IN_W + (s-1)*GROW bits with
// IN_F - (s-1)*(1-GROW) fractional bits. GROW = 0 keeps the width and rounds away one bit per
// stage (scaling by 1/2); GROW = 1 widens by one bit per stage. Each stage saturates or wraps
// (OVF) to its own output width; `ovf` pulses when that changed a value.
//
// Interface: valid/ready stream in, valid-only stream out (one-cycle `out_valid` pulses).
// `in_ready` is high when the group is idle or in the last clock of its current sample, so a
// neighbouring group with the same G is never stalled. Output words come G+1 clocks after the
// sample that produces them is accepted, and only once every stage of the group has absorbed
// its first D samples. Synchronous active-low reset.
//
// The per-stage structure and the merging of stages and memories into one thread follow the
// published architecture; the clock-by-clock schedule (one stage per clock, new sample in the
// last clock), decimation in time and the per-stage saturation after a shared butterfly are
// choices of this implementation.
module fft_stage_group
  import fxp_pkg::*;
  import fft_pkg::*;
#(
  parameter int          N     = 256,
  parameter int          FIRST = 1,
  parameter int          G     = 1,
  parameter int          IN_W  = 16,
  parameter int          IN_F  = 15,
  parameter int          GROW  = 0,
  parameter int          TW    = 16,
  parameter round_mode_e RND   = RND_ROUND,
  parameter ovf_mode_e   OVF   = OVF_SAT,
  localparam int         W_I   = IN_W + (FIRST - 1) * GROW,
  localparam int         W_O   = IN_W + (FIRST - 1 + G) * GROW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W_I-1:0] in_re, in_im,
  output logic                  in_ready,
  output logic                  out_valid,
  output logic signed [W_O-1:0] out_re, out_im,
  output logic                  ovf
);
  localparam int L     = $clog2(N);
  localparam int KW    = clog2_min1(G);
  localparam int F_I   = IN_F - (FIRST - 1) * (1 - GROW);
  localparam int BW    = W_O;                               // datapath width of the group
  localparam int DEPTH = buf_base(N, FIRST, G);
  localparam int AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH);

  initial begin
    assert (FIRST >= 1 && G >= 1 && FIRST + G - 1 <= L) else $error("fft_stage_group: bad stage range");
    assert (GROW == 0 || GROW == 1) else $error("fft_stage_group: GROW must be 0 or 1");
  end

  // ---------------- sequencing ----------------
  logic                 busy;
  logic [KW-1:0]        k;
  logic                 cur_v;
  logic signed [BW-1:0] cur_re, cur_im;
  logic                 last, accept;

  assign last     = (int'(k) == G - 1);
  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;

  // ---------------- per-stage state ----------------
  logic         st_half   [G];
  logic [L-1:0] st_ptr    [G];
  logic [L-1:0] st_tw     [G];
  logic         st_primed [G];
  logic [G-1:0] st_adv;

  for (genvar gi = 0; gi < G; gi++) begin : g_ctrl
    assign st_adv[gi] = busy && cur_v && (int'(k) == gi);
    fft_stage_ctrl #(.N(N), .STAGE(FIRST + gi)) u_ctrl (
      .clk, .rst_n, .advance(st_adv[gi]),
      .half(st_half[gi]), .ptr(st_ptr[gi]), .tw(st_tw[gi]), .primed(st_primed[gi]));
  end

  logic         half, primed;
  logic [L-1:0] ptr, twi;
  logic [AW-1:0] addr;
  always_comb begin
    half = 1'b0; primed = 1'b0; ptr = '0; twi = '0; addr = '0;
    for (int i = 0; i < G; i++)
      if (int'(k) == i) begin
        half   = st_half[i];
        primed = st_primed[i];
        ptr    = st_ptr[i];
        twi    = st_tw[i];
        addr   = AW'(buf_base(N, FIRST, i) + int'(ptr));
      end
  end

  // ---------------- shared memory, twiddle table and butterfly ----------------
  logic signed [BW-1:0] rd_re, rd_im, wd_re, wd_im;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [BW-1:0] y0_re, y0_im, y1_re, y1_im;
  logic                 bf_ovf;

  fft_delay_buffer #(.DEPTH(DEPTH), .W(BW)) u_mem (
    .clk, .we(busy && cur_v), .waddr(addr), .wdata_re(wd_re), .wdata_im(wd_im),
    .raddr(addr), .rdata_re(rd_re), .rdata_im(rd_im));

  fft_twiddle_rom #(.N(N), .FIRST(FIRST), .G(G), .TW(TW)) u_rom (
    .stage(k), .idx(twi), .w_re, .w_im);

  // The butterfly is sized for the widest stage of the group; the rounding shift is the same
  // for every stage (TW-1-GROW bits), so one unit serves them all.
  fft_butterfly #(.IW(BW), .IF(F_I), .OW(BW), .OF(F_I - 1 + GROW), .TW(TW), .TF(TW - 2),
                  .RND(RND), .OVF(OVF)) u_bf (
    .x0_re(cur_re), .x0_im(cur_im), .x1_re(rd_re), .x1_im(rd_im), .w_re, .w_im,
    .y0_re, .y0_im, .y1_re, .y1_im, .ovf(bf_ovf));

  // Per-stage overflow manager: fit the results into the output width of the active stage.
  logic signed [BW-1:0] n0_re, n0_im, n1_re, n1_im;
  logic                 n_ovf;
  always_comb begin
    n0_re = y0_re; n0_im = y0_im; n1_re = y1_re; n1_im = y1_im; n_ovf = 1'b0;
    for (int i = 0; i < G; i++)
      if (int'(k) == i) begin
        n0_re = BW'(fxp_overflow(longint'(y0_re), W_I + (i + 1) * GROW, OVF));
        n0_im = BW'(fxp_overflow(longint'(y0_im), W_I + (i + 1) * GROW, OVF));
        n1_re = BW'(fxp_overflow(longint'(y1_re), W_I + (i + 1) * GROW, OVF));
        n1_im = BW'(fxp_overflow(longint'(y1_im), W_I + (i + 1) * GROW, OVF));
        n_ovf = fxp_overflows(longint'(y0_re), W_I + (i + 1) * GROW) ||
                fxp_overflows(longint'(y0_im), W_I + (i + 1) * GROW) ||
                fxp_overflows(longint'(y1_re), W_I + (i + 1) * GROW) ||
                fxp_overflows(longint'(y1_im), W_I + (i + 1) * GROW);
      end
  end

  logic signed [BW-1:0] res_re, res_im;
  always_comb begin
    if (half) begin
      res_re = n0_re;  res_im = n0_im;    // upper butterfly output leaves now
      wd_re  = n1_re;  wd_im  = n1_im;    // lower one waits in the buffer
    end else begin
      res_re = rd_re;  res_im = rd_im;    // stored lower output of the previous block
      wd_re  = cur_re; wd_im  = cur_im;   // first operand waits for its partner
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      k         <= '0;
      cur_v     <= 1'b0;
      cur_re    <= '0;
      cur_im    <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      ovf       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      ovf       <= busy && cur_v && half && (bf_ovf || n_ovf);
      if (busy) begin
        if (last) begin
          out_valid <= cur_v && primed;
          out_re    <= W_O'(res_re);
          out_im    <= W_O'(res_im);
        end else begin
          k      <= k + 1'b1;
          cur_v  <= cur_v && primed;
          cur_re <= res_re;
          cur_im <= res_im;
        end
      end
      if (accept) begin
        busy   <= 1'b1;
        k      <= '0;
        cur_v  <= 1'b1;
        cur_re <= BW'(in_re);
        cur_im <= BW'(in_im);
      end else if (busy && last) begin
        busy <= 1'b0;
      end
    end
  end
endmodule
