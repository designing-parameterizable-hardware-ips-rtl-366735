// tb_fft_resource_shared -- self-checking testbench of the memory-based FFT template.
//
// Runs five fft_resource_shared configurations side by side, each with its own stimulus and
// bit-accurate reference (fft_rs_check): 256 points / 16 bits with one butterfly; 256 points
// with four butterflies, driven at +-full scale so that stages saturate; 64 points / 5 bits
// with one bit of growth per stage (11-bit results) and two butterflies; 16 points / 12 bits
// with eight butterflies, i.e. a whole stage per clock; and 4 points, the smallest size.
// Each checks every output word and bin, latency, frame period and the start gate (see
// fft_rs_check). A watchdog ends the run if any instance stalls.
module tb_fft_resource_shared;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  localparam int NI = 5;
  logic done [NI];
  int   checks [NI], failures [NI], n_ovf [NI];

  fft_rs_check #(.N(256), .DATA_W(16), .NBF(1), .AMP(4000),  .SEED(11)) c0 (
    .clk, .rst_n, .done(done[0]), .checks(checks[0]), .failures(failures[0]), .n_ovf(n_ovf[0]));
  fft_rs_check #(.N(256), .DATA_W(16), .NBF(4), .AMP(32767), .SEED(12), .BINARY(1'b1), .MUST_OVF(1'b1)) c1 (
    .clk, .rst_n, .done(done[1]), .checks(checks[1]), .failures(failures[1]), .n_ovf(n_ovf[1]));
  fft_rs_check #(.N(64),  .DATA_W(5),  .NBF(2), .GROW(1), .AMP(15), .SEED(13), .BINARY(1'b1)) c2 (
    .clk, .rst_n, .done(done[2]), .checks(checks[2]), .failures(failures[2]), .n_ovf(n_ovf[2]));
  fft_rs_check #(.N(16),  .DATA_W(12), .NBF(8), .AMP(2000),  .SEED(14)) c3 (
    .clk, .rst_n, .done(done[3]), .checks(checks[3]), .failures(failures[3]), .n_ovf(n_ovf[3]));
  fft_rs_check #(.N(4),   .DATA_W(8),  .NBF(1), .AMP(100),   .SEED(15)) c4 (
    .clk, .rst_n, .done(done[4]), .checks(checks[4]), .failures(failures[4]), .n_ovf(n_ovf[4]));

  initial begin
    int tc, tf, cyc;
    logic all_done;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      all_done = 1'b1;
      for (int i = 0; i < NI; i++) all_done &= done[i];
    end while (!all_done && cyc < 20000);
    tc = 0; tf = 0;
    for (int i = 0; i < NI; i++) begin
      tc += checks[i];
      tf += failures[i];
    end
    if (!all_done) begin
      tf++;
      $display("WATCHDOG: not all instances finished");
    end
    $display("saturating instance: %0d ovf pulses", n_ovf[1]);
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
