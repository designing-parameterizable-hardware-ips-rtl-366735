// tb_fft_delay_buffer -- self-checking test of the feedback buffer memory.
//
// A 24-word, 12-bit memory is written and read at random addresses every clock, with random
// write enables, and compared with a model array. The read is combinational, so in the cycle
// of a write to the same address the old word must still be seen; the new one from the next
// cycle on. It is then used as a circular delay line of 7 words: the word read at the pointer
// before each write must be the one written 7 clocks earlier.
module tb_fft_delay_buffer;
  localparam int DEPTH = 24, W = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [4:0] waddr, raddr;
  logic signed [W-1:0] wd_re, wd_im, rd_re, rd_im;

  fft_delay_buffer #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we, .waddr, .wdata_re(wd_re), .wdata_im(wd_im),
                                                .raddr, .rdata_re(rd_re), .rdata_im(rd_im));

  logic [2*W-1:0] model [DEPTH];
  logic           known [DEPTH];
  int checks = 0, failures = 0;

  initial begin : main
    for (int i = 0; i < DEPTH; i++) known[i] = 1'b0;
    we = 1'b0; waddr = '0; raddr = '0; wd_re = '0; wd_im = '0;
    // random access
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we    = ($urandom_range(3) != 0);
      waddr = 5'($urandom_range(DEPTH - 1));
      raddr = (t % 3 == 0) ? waddr : 5'($urandom_range(DEPTH - 1));
      wd_re = W'($urandom); wd_im = W'($urandom);
      #1;
      if (known[raddr]) begin
        checks++;
        if ({rd_re, rd_im} != model[raddr]) begin
          failures++;
          if (failures < 10) $display("FAIL read addr %0d got %h exp %h", raddr, {rd_re, rd_im}, model[raddr]);
        end
      end
      @(posedge clk);
      if (we) begin model[waddr] = {wd_re, wd_im}; known[waddr] = 1'b1; end
    end
    // circular delay line of 7 words in region 10..16
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = 5'(10 + t % 7);
      raddr = waddr;
      wd_re = W'(t); wd_im = W'(-t);
      #1;
      if (t >= 7) begin
        checks++;
        if (rd_re != W'(t - 7) || rd_im != W'(7 - t)) begin
          failures++;
          $display("FAIL delay t=%0d got %0d %0d", t, rd_re, rd_im);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
