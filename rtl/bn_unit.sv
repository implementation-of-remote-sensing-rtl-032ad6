// bn_unit: batch-normalisation and ReLU stage of the convolution accelerator.
//
// Takes M 32-bit accumulator sums of one output channel per cycle and applies
// that channel's batch-normalisation parameters in fixed point:
//     y = ReLU( (acc * scale + shift) >>> FRAC ),
// with a 16-bit signed scale and a 32-bit signed shift (the shift is in the
// same Q.FRAC scale as the product). The result is clamped to 0..127 so that
// it can be fed to the next layer as a signed 8-bit activation. The scale and
// shift of up to CH channels sit in a parameter table written through bp_we.
//
// Timing: two pipeline stages (multiply, then add/shift/clamp); out_valid
// follows in_valid two cycles later with the channel and tag carried along.
// One group of M values per cycle.
//
// The M-lane multiply/add/ReLU structure, the scale/shift parameter table and
// the 32- and 16-bit fixed-point formats follow the design. FRAC, the clamp to
// 8 bits and the tag field are this design's own choices.
module bn_unit #(
  parameter int unsigned M    = 8,     // lanes
  parameter int unsigned CH   = 64,    // channels in the parameter table
  parameter int unsigned FRAC = 8,     // fractional bits of scale
  parameter int unsigned TAGW = 16,    // width of the user tag carried along
  localparam int unsigned CW  = $clog2(CH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // parameter table write
  input  logic                 bp_we,
  input  logic [CW-1:0]        bp_ch,
  input  logic signed [15:0]   bp_scale,
  input  logic signed [31:0]   bp_shift,
  // input group
  input  logic                 in_valid,
  input  logic [CW-1:0]        in_ch,
  input  logic [TAGW-1:0]      in_tag,
  input  logic signed [31:0]   in_acc [M],
  // activations
  output logic                 out_valid,
  output logic [CW-1:0]        out_ch,
  output logic [TAGW-1:0]      out_tag,
  output logic signed [7:0]    out_act [M]
);

  logic signed [15:0] scale_t [CH];
  logic signed [31:0] shift_t [CH];

  always_ff @(posedge clk) begin
    if (bp_we) begin
      scale_t[bp_ch] <= bp_scale;
      shift_t[bp_ch] <= bp_shift;
    end
  end

  // stage 1: multiply
  logic                v1;
  logic [CW-1:0]       ch1;
  logic [TAGW-1:0]     tag1;
  logic signed [47:0]  prod1 [M];
  logic signed [31:0]  shift1;

  // stage 2: add, shift, ReLU, clamp
  logic signed [48:0]  biased [M];
  logic signed [48:0]  scaled [M];
  logic signed [7:0]   act [M];

  always_comb begin
    for (int i = 0; i < M; i++) begin
      biased[i] = 49'(prod1[i]) + 49'(shift1);
      scaled[i] = biased[i] >>> FRAC;
      if (scaled[i] <= 0)        act[i] = 8'sd0;
      else if (scaled[i] >= 127) act[i] = 8'sd127;
      else                       act[i] = 8'(scaled[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      ch1       <= '0;
      tag1      <= '0;
      shift1    <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_tag   <= '0;
      for (int i = 0; i < M; i++) begin
        prod1[i]   <= '0;
        out_act[i] <= '0;
      end
    end else begin
      v1     <= in_valid;
      ch1    <= in_ch;
      tag1   <= in_tag;
      shift1 <= shift_t[in_ch];
      for (int i = 0; i < M; i++)
        prod1[i] <= 48'(in_acc[i]) * 48'(scale_t[in_ch]);
      out_valid <= v1;
      out_ch    <= ch1;
      out_tag   <= tag1;
      out_act   <= act;
    end
  end

endmodule
