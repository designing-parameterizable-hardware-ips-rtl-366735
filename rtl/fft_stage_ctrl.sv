// fft_stage_ctrl -- state information of one butterfly stage ("which butterfly runs now").
//
// Stage s of the N-point pipeline sees its input as a stream in natural order, frame after
// frame. A log2(N)-bit counter counts the samples the stage has absorbed (`advance`). From it:
//   half  -- 0 while the sample is the first operand of its butterfly (it is stored, and the
//            buffer's older result leaves), 1 when it is the second operand (butterfly runs);
//   ptr   -- position inside the stage's buffer, counter mod N/2**s;
//   tw    -- twiddle index j: the block number counter >> (log2N - s + 1), bit-reversed over
//            s-1 bits; the stage multiplies by W_N^(j * N/2**s);
//   primed-- high once N/2**s samples have been absorbed: from then on the stage output is valid.
// Synchronous active-low reset clears the counter and `primed`. `ptr` and `tw` are L bits wide
// for every stage so that all stages share one port shape; the unused high bits are constant
// zero (for stage 1 all of `tw`, since that stage only uses W^0, and the top bit of `ptr`).
// A control state per stage follows the published design; its form (one counter) and the
// decimation-in-time twiddle order are choices made here.
module fft_stage_ctrl
  import fft_pkg::*;
#(
  parameter int N     = 256,
  parameter int STAGE = 1,
  localparam int L    = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  output logic         half,
  output logic [L-1:0] ptr,
  output logic [L-1:0] tw,
  output logic         primed
);
  localparam int SH = L - STAGE;             // log2 of the buffer depth
  localparam int D  = 1 << SH;

  logic [L-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (advance) begin
      cnt <= cnt + 1'b1;
      if (int'(cnt) == D - 1) primed <= 1'b1;
    end
  end

  always_comb begin
    half = cnt[SH];
    ptr  = L'(int'(cnt) % D);
    tw   = L'(bitrev(int'(cnt) >> (SH + 1), STAGE - 1));
  end
endmodule
