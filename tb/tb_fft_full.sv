// tb_fft_full -- the FFT at its default configuration (256 points, 16-bit words, 8 concurrent
// stage groups, one sample per clock), streaming three random frames plus a flushing frame.
// Every word of the three spectra is compared bit for bit with the independent reference in
// fft_check, frame 0 also with a floating-point DFT, and the latency (16 clocks from the last
// sample of a frame to its bin 0) and throughput (255 clocks for a 256-sample frame) checked.
module tb_fft_full;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, out_valid, ovf, done;
  logic signed [15:0] in_re, in_im, out_re, out_im;
  logic [7:0] out_bin;
  int checks, failures, n_ovf, n_gap;

  fft_hls_ip dut (.clk, .rst_n, .start, .in_valid, .in_re, .in_im, .in_ready, .out_valid,
                  .out_re, .out_im, .out_bin, .ovf);

  fft_check #(.N(256), .DATA_W(16), .CONCURRENCY(8), .GROW(0), .FRAMES(3), .AMP(16000),
              .SEED(3)) chk (
    .clk, .rst_n, .start, .in_valid, .in_re, .in_im, .in_ready, .out_valid, .out_re, .out_im,
    .out_bin, .ovf, .done, .checks, .failures, .n_ovf, .n_gap);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    @(posedge clk);
    $display("saturations %0d, idle input cycles %0d", n_ovf, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
