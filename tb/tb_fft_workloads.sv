// tb_fft_workloads -- the FFT configured for the four application cases it is sized for.
//
//   audio detector : 256 points, 14-bit words, fully shared (1 group, 1 sample per 8 clocks)
//   GPS acquisition: 1024 points, 4-bit words, 2 groups of 5 stages
//   radar front end: 2048 points, 16-bit words, fully pipelined (11 groups)
//   OFDM receiver  : 64 points, 5-bit input growing one bit per stage to 11 bits, pipelined
// Each instance streams two random frames (plus a flushing one) and is checked bit for bit by
// fft_check, with its latency and throughput. The clocks per frame are printed so that they can
// be held against each application's real-time budget.
module tb_fft_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int NI = 4;
  logic done [NI];
  int   ck [NI], fl [NI], novf [NI], ngap [NI];

  `define WL_INST(IDX, NN, DW, CC, GR, AMPL)                                                   \
    logic start_``IDX, iv_``IDX, ir_``IDX, ov_``IDX, of_``IDX;                                 \
    logic signed [DW-1:0] ire_``IDX, iim_``IDX;                                                \
    logic signed [DW+$clog2(NN)*GR-1:0] ore_``IDX, oim_``IDX;                                  \
    logic [$clog2(NN)-1:0] ob_``IDX;                                                           \
    fft_hls_ip #(.N(NN), .DATA_W(DW), .CONCURRENCY(CC), .GROW(GR)) dut_``IDX (                 \
      .clk, .rst_n, .start(start_``IDX), .in_valid(iv_``IDX), .in_re(ire_``IDX),               \
      .in_im(iim_``IDX), .in_ready(ir_``IDX), .out_valid(ov_``IDX), .out_re(ore_``IDX),        \
      .out_im(oim_``IDX), .out_bin(ob_``IDX), .ovf(of_``IDX));                                 \
    fft_check #(.N(NN), .DATA_W(DW), .CONCURRENCY(CC), .GROW(GR), .FRAMES(2), .AMP(AMPL),      \
                .SEED(IDX + 21)) chk_``IDX (                                                   \
      .clk, .rst_n, .start(start_``IDX), .in_valid(iv_``IDX), .in_re(ire_``IDX),               \
      .in_im(iim_``IDX), .in_ready(ir_``IDX), .out_valid(ov_``IDX), .out_re(ore_``IDX),        \
      .out_im(oim_``IDX), .out_bin(ob_``IDX), .ovf(of_``IDX), .done(done[IDX]),                \
      .checks(ck[IDX]), .failures(fl[IDX]), .n_ovf(novf[IDX]), .n_gap(ngap[IDX]));

  `WL_INST(0, 256, 14, 1, 0, 4000)
  `WL_INST(1, 1024, 4, 2, 0, 7)
  `WL_INST(2, 2048, 16, 11, 0, 8000)
  `WL_INST(3, 64, 5, 6, 1, 15)

  localparam string NAME [NI] = '{"audio 256-pt 14-bit", "GPS 1024-pt 4-bit", "radar 2048-pt 16-bit", "OFDM 64-pt 5->11-bit"};
  localparam int CPF [NI] = '{256 * 8, 1024 * 5, 2048, 64};   // clocks per frame

  int checks = 0, failures = 0;
  task automatic finish();
    for (int i = 0; i < NI; i++) begin
      checks += ck[i]; failures += fl[i];
      $display("%s: %0d clocks per frame, checks %0d failures %0d", NAME[i], CPF[i], ck[i], fl[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    forever begin
      @(posedge clk);
      if (done[0] && done[1] && done[2] && done[3]) finish();
    end
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    $display("WATCHDOG: simulation did not finish");
    failures++;
    finish();
  end
endmodule
