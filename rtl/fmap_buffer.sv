// fmap_buffer: feature-map buffer of the convolution accelerator.
//
// Holds, for W output pixels processed side by side, the input values each of
// them needs: K kernel taps times C_in input channels per pixel, i.e. one
// column of the unrolled (im2col) input per pixel lane. It is a simple
// dual-port RAM of TAPS words, each word W signed 8-bit values, one per lane.
// The previous block writes a word per cycle (one tap for all W lanes); the
// controller reads taps 0..T-1 in order and sends each word down the chain of
// computing cores. The same contents can be replayed for several batches of
// kernels.
//
// Timing: write takes effect at the clock edge; read data appears the cycle
// after rd_en (a registered block-RAM read).
//
// The buffer's place and its K x C_in x W organisation follow the design's
// convolution circuit; reading K as the number of taps of one kernel plane and
// the word layout are this design's own.
module fmap_buffer #(
  parameter int unsigned W    = 8,      // pixel lanes
  parameter int unsigned TAPS = 576,    // K * C_in (3x3 kernel, 64 channels)
  localparam int unsigned AW  = $clog2(TAPS)
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic signed [7:0]   wr_data [W],
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr,
  output logic signed [7:0]   rd_data [W]
);

  logic [W*8-1:0] mem [TAPS];
  logic [W*8-1:0] wword, rword;

  always_comb
    for (int w = 0; w < W; w++) wword[w*8 +: 8] = wr_data[w];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wword;
    if (rd_en) rword <= mem[rd_addr];
  end

  always_comb
    for (int w = 0; w < W; w++) rd_data[w] = signed'(rword[w*8 +: 8]);

endmodule
