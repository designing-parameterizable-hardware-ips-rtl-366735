// tb_fft_hls_ip -- end-to-end test of the FFT at every concurrency level and both word modes.
//
// Five FFT instances run side by side, each with its own fft_check driver/checker:
//   256-point, 16-bit, concurrency 8, 4, 2 and 1 (fully pipelined down to fully shared), and
//   64-point, 5-bit input, 6 groups of one stage, words growing by one bit per stage (11-bit out).
// A sixth instance selects the memory-based architecture (SHARED_BF = 2, 64 points, 12 bits)
// and is checked by fft_rs_check the same way, with bins in natural order.
// The 256-point concurrency-2 instance is driven with +-full-scale components so that stages saturate.
// Every output word is compared bit for bit with an independent reference, and latency,
// throughput, the start handshake, idle input cycles and saturation are each required to occur
// and behave. A watchdog ends the run with a failure if any instance does not finish.
module tb_fft_hls_ip;
  import fxp_pkg::*;
  localparam int NI = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [NI];
  int   ck [NI], fl [NI], novf [NI], ngap [NI];

  `define FFT_INST(IDX, NN, DW, CC, GR, AMPL, BIN)                                                \
    logic start_``IDX, iv_``IDX, ir_``IDX, ov_``IDX, of_``IDX;                                 \
    logic signed [DW-1:0] ire_``IDX, iim_``IDX;                                                \
    logic signed [DW+$clog2(NN)*GR-1:0] ore_``IDX, oim_``IDX;                                  \
    logic [$clog2(NN)-1:0] ob_``IDX;                                                           \
    fft_hls_ip #(.N(NN), .DATA_W(DW), .CONCURRENCY(CC), .GROW(GR)) dut_``IDX (                 \
      .clk, .rst_n, .start(start_``IDX), .in_valid(iv_``IDX), .in_re(ire_``IDX),               \
      .in_im(iim_``IDX), .in_ready(ir_``IDX), .out_valid(ov_``IDX), .out_re(ore_``IDX),        \
      .out_im(oim_``IDX), .out_bin(ob_``IDX), .ovf(of_``IDX));                                 \
    fft_check #(.N(NN), .DATA_W(DW), .CONCURRENCY(CC), .GROW(GR), .FRAMES(2), .AMP(AMPL),      \
                .SEED(IDX + 7), .BINARY(BIN)) chk_``IDX (                                    \
      .clk, .rst_n, .start(start_``IDX), .in_valid(iv_``IDX), .in_re(ire_``IDX),               \
      .in_im(iim_``IDX), .in_ready(ir_``IDX), .out_valid(ov_``IDX), .out_re(ore_``IDX),        \
      .out_im(oim_``IDX), .out_bin(ob_``IDX), .ovf(of_``IDX), .done(done[IDX]),                \
      .checks(ck[IDX]), .failures(fl[IDX]), .n_ovf(novf[IDX]), .n_gap(ngap[IDX]));

  `FFT_INST(0, 256, 16, 8, 0, 4000, 0)
  `FFT_INST(1, 256, 16, 4, 0, 4000, 0)
  `FFT_INST(2, 256, 16, 2, 0, 32767, 1)
  `FFT_INST(3, 256, 16, 1, 0, 4000, 0)
  `FFT_INST(4, 64, 5, 6, 1, 15, 1)

  logic rs_done;
  int   rs_ck, rs_fl, rs_ovf;
  fft_rs_check #(.N(64), .DATA_W(12), .NBF(2), .FRAMES(2), .AMP(1500), .SEED(21), .USE_TOP(1'b1)) rs (
    .clk, .rst_n, .done(rs_done), .checks(rs_ck), .failures(rs_fl), .n_ovf(rs_ovf));

  int checks = 0, failures = 0;

  task automatic finish();
    for (int i = 0; i < NI; i++) begin
      checks += ck[i]; failures += fl[i];
      $display("instance %0d: checks %0d failures %0d saturations %0d idle-input cycles %0d",
               i, ck[i], fl[i], novf[i], ngap[i]);
    end
    checks += rs_ck; failures += rs_fl;
    $display("memory-based instance: checks %0d failures %0d", rs_ck, rs_fl);
    // saturation must have happened on the full-scale instance
    checks++;
    if (novf[2] == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    forever begin
      @(posedge clk);
      if (done[0] && done[1] && done[2] && done[3] && done[4] && rs_done) finish();
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("WATCHDOG: simulation did not finish");
    failures++;
    finish();
  end
endmodule
