// fft_twiddle_rom -- twiddle-factor look-up table of one stage or of a group of merged stages.
//
// Stage s of the pipelined FFT multiplies by W_N^e with e = j * N/2**s, j = 0 .. 2**(s-1)-1,
// so it needs 2**(s-1) distinct factors. This ROM holds the tables of stages FIRST .. FIRST+G-1
// one after the other and is indexed by the stage within the group (`stage`) and by j (`idx`).
// The contents are computed at elaboration (see fft_pkg::twiddle), quantised to TW bits with
// TW-2 fractional bits so that +1.0 is representable. Read is combinational (a small
// LUT-based ROM). A precomputed table per stage follows the published design; computing it at
// elaboration instead of from a generated file, and its 14 fractional bits, are choices made here.
module fft_twiddle_rom
  import fft_pkg::*;
#(
  parameter int N     = 256,
  parameter int FIRST = 1,
  parameter int G     = 8,
  parameter int TW    = 16,
  localparam int L    = $clog2(N),
  localparam int KW   = clog2_min1(G)
) (
  input  logic [KW-1:0]        stage,
  input  logic [L-1:0]         idx,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);
  localparam int TF    = TW - 2;
  localparam int DEPTH = tw_base(FIRST, G);

  typedef logic signed [TW-1:0] tw_t;
  typedef tw_t [DEPTH-1:0]      tw_tab_t;

  function automatic tw_tab_t gen_tab(bit imag);
    tw_tab_t t;
    for (int k = 0; k < G; k++)
      for (int j = 0; j < tw_count(FIRST + k); j++)
        t[tw_base(FIRST, k) + j] = tw_t'(twiddle(N, j * (N >> (FIRST + k)), TF, imag));
    return t;
  endfunction

  localparam tw_tab_t TAB_RE = gen_tab(1'b0);
  localparam tw_tab_t TAB_IM = gen_tab(1'b1);

  localparam int AW = clog2_min1(DEPTH);
  logic [AW-1:0] addr;
  always_comb begin
    addr = '0;
    for (int k = 0; k < G; k++)
      if (int'(stage) == k) addr = AW'(tw_base(FIRST, k) + (int'(idx) % tw_count(FIRST + k)));
    w_re = TAB_RE[addr];
    w_im = TAB_IM[addr];
  end
endmodule
