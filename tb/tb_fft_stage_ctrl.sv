// tb_fft_stage_ctrl -- self-checking test of the per-stage state information.
//
// Stages 1, 2 and 4 of a 16-point FFT are advanced on random clocks. For the k-th sample a
// stage has absorbed (k counted modulo 16) the expected state is: half = (k / D) odd, with
// D = 16/2**s; ptr = k mod D; twiddle index = the block number k / 2D written backwards over
// s-1 bits (so W_16^(j*D) walks 0, 4, 2, 6, ... for stage 4's 8 blocks in bit-reversed order);
// primed once D samples have been absorbed, and from then on for good.
module tb_fft_stage_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 16;
  localparam int NS = 3;
  localparam int ST [NS] = '{1, 2, 4};
  logic       adv;
  logic       half [NS], primed [NS];
  logic [3:0] ptr [NS], tw [NS];

  for (genvar i = 0; i < NS; i++) begin : g_dut
    fft_stage_ctrl #(.N(N), .STAGE(ST[i])) u (.clk, .rst_n, .advance(adv), .half(half[i]),
                                             .ptr(ptr[i]), .tw(tw[i]), .primed(primed[i]));
  end

  int checks = 0, failures = 0, absorbed = 0;

  // Bit-reversed block number, written out as a table per stage width.
  function automatic int rev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v[i]) r += 1 << (bits - 1 - i);
    return r;
  endfunction

  initial begin : main
    adv = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int i = 0; i < NS; i++) begin
        int d, k;
        d = N >> ST[i];
        k = absorbed % N;
        checks++;
        if (half[i] != ((k / d) % 2 == 1) || int'(ptr[i]) != k % d ||
            int'(tw[i]) != rev(k / (2 * d), ST[i] - 1) || primed[i] != (absorbed >= d)) begin
          failures++;
          if (failures < 10)
            $display("FAIL stage %0d sample %0d: half %0b ptr %0d tw %0d primed %0b", ST[i], absorbed,
                     half[i], ptr[i], tw[i], primed[i]);
        end
      end
      adv = ($urandom_range(2) != 0);
      @(posedge clk);
      if (adv) absorbed++;
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
