// max_pool: 2x2, stride-2 max pooling on the accelerator's activation stream.
//
// The accelerator emits, per output channel, groups of M activations that
// belong to M neighbouring pixels of one image row. This block pools them
// over 2x2 windows. Horizontally, lanes 2i and 2i+1 of a group are combined
// at once. Vertically, the first row of a row pair is kept in a row buffer,
// one word of M/2 values per (channel, group). When the same channel and group
// arrive for the second row (row_odd = 1), the block emits the maximum of the
// buffered word and the new horizontal maxima. A group therefore yields M/2
// pooled values every second row.
//
// Interface and timing: in_* is the activation stream (valid, channel, group,
// M values), row_odd tells which row of the pair it belongs to and is sampled
// with each input. out_* follows one cycle after a second-row input, with the
// same channel and group tags. The row buffer has CH*G words; no handshake,
// the block takes one group per cycle like the stream it sits on.
//
// That the convolution output goes through a pooling layer follows the
// design; the pooling type, window, stride and placement after BN/ReLU are
// this design's own choices.
module max_pool #(
  parameter int unsigned M  = 8,     // lanes per input group, even
  parameter int unsigned CH = 64,    // channels
  parameter int unsigned G  = 1,     // groups per channel row (W / M)
  localparam int unsigned CW = $clog2(CH),
  localparam int unsigned RD = CH * G,
  localparam int unsigned RW = (RD > 1) ? $clog2(RD) : 1,
  localparam int unsigned P  = M / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [CW-1:0]       in_ch,
  input  logic [15:0]         in_grp,
  input  logic signed [7:0]   in_act [M],
  input  logic                row_odd,
  output logic                out_valid,
  output logic [CW-1:0]       out_ch,
  output logic [15:0]         out_grp,
  output logic signed [7:0]   out_act [P]
);

  logic [P*8-1:0]    rowbuf [RD];
  logic signed [7:0] hmax [P];
  logic [P*8-1:0]    hword, prev;
  logic [RW-1:0]     addr;

  always_comb begin
    addr = RW'(32'(in_ch) * G + 32'(in_grp));
    prev = rowbuf[addr];
    for (int i = 0; i < P; i++) begin
      hmax[i] = (in_act[2*i] > in_act[2*i+1]) ? in_act[2*i] : in_act[2*i+1];
      hword[i*8 +: 8] = hmax[i];
    end
  end

  always_ff @(posedge clk)
    if (in_valid && !row_odd) rowbuf[addr] <= hword;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_grp   <= '0;
      for (int i = 0; i < P; i++) out_act[i] <= '0;
    end else begin
      out_valid <= in_valid && row_odd;
      if (in_valid && row_odd) begin
        out_ch  <= in_ch;
        out_grp <= in_grp;
        for (int i = 0; i < P; i++)
          out_act[i] <= ($signed(prev[i*8 +: 8]) > hmax[i]) ? $signed(prev[i*8 +: 8]) : hmax[i];
      end
    end
  end

  initial assert (M % 2 == 0) else $error("M must be even");

endmodule
