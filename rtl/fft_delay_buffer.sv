// fft_delay_buffer -- feedback buffer memory of one stage or of a group of merged stages.
//
// A simple dual-port memory of DEPTH complex words, one write port and one read port, as each
// stage buffer maps to an SRAM with one read and one write port. Used with a circular
// address it behaves as the shift register that delays samples by the stage's span; when
// stages are merged their buffers occupy consecutive regions of one memory. The write is
// registered (at the rising clock edge when `we` is high); the read is asynchronous, so a
// word written in one cycle is read back from the next. The contents are not reset.
// The one-read, one-write port memory per stage follows the published design; the asynchronous
// read and the circular addressing (instead of shifting) are choices made here.
module fft_delay_buffer #(
  parameter int DEPTH = 128,
  parameter int W     = 16,
  localparam int AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata_re, wdata_im,
  input  logic [AW-1:0]       raddr,
  output logic signed [W-1:0] rdata_re, rdata_im
);
  logic [2*W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= {wdata_re, wdata_im};

  assign {rdata_re, rdata_im} = mem[raddr];
endmodule
