// conv_core: one computing core of the accelerator's daisy chain.
//
// Core number IDX computes output channel IDX of the current batch for W pixel
// lanes at once: for every tap t it multiplies the W signed 8-bit feature-map
// values by its own 8-bit weight w[t] and adds the products to W 32-bit
// accumulators. When the tap flagged "last" has been added, the W sums are
// copied to the result registers (res) and res_valid pulses; they stay there
// until the next batch finishes, so the next batch can accumulate meanwhile.
//
// Two chains pass through every core, one register per core:
//  - the feature-map chain (f_*): one tap for all lanes per cycle;
//  - the weight chain (w_*): words of WPL weights (WPL consecutive taps of one
//    kernel, tap w_addr*WPL + j in byte j), tagged with a kernel serial
//    number. A core keeps the words whose serial number equals IDX, so in the
//    end core n holds all weights of kernel n. A swap token (w_swap) flips the
//    core's weight banks. Each bank is TAPS/WPL words of WPL bytes.
// The weights are double buffered: the batch in progress reads one bank while
// the weights of the next batch are written into the other. Because both
// chains advance one core per cycle, a swap token sent one cycle ahead of the
// first tap reaches every core one cycle ahead of that tap.
//
// Timing: the *_o outputs are the inputs delayed by one cycle; res_valid rises
// one cycle after the last tap enters the core.
//
// The daisy chain, the serial-number match, the double buffer and the 8-bit
// multiply-accumulate follow the design. Accumulator width, tap-serial
// operation, the load word of WPL weights and the swap token are this
// design's own choices. TAPS must be a multiple of WPL.
module conv_core #(
  parameter int unsigned IDX  = 0,
  parameter int unsigned W    = 8,
  parameter int unsigned TAPS = 576,
  parameter int unsigned KW   = 8,      // width of the kernel serial number
  parameter int unsigned WPL  = 8,      // weights per load word
  localparam int unsigned AW  = $clog2(TAPS),
  localparam int unsigned WD  = TAPS / WPL,                  // bank words
  localparam int unsigned WAW = (WD > 1) ? $clog2(WD) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // feature-map chain
  input  logic                 f_valid_i,
  input  logic                 f_first_i,
  input  logic                 f_last_i,
  input  logic [AW-1:0]        f_tap_i,
  input  logic signed [7:0]    f_data_i [W],
  output logic                 f_valid_o,
  output logic                 f_first_o,
  output logic                 f_last_o,
  output logic [AW-1:0]        f_tap_o,
  output logic signed [7:0]    f_data_o [W],
  // weight chain
  input  logic                 w_valid_i,
  input  logic                 w_swap_i,
  input  logic [KW-1:0]        w_kidx_i,
  input  logic [WAW-1:0]       w_addr_i,
  input  logic [WPL*8-1:0]     w_data_i,
  output logic                 w_valid_o,
  output logic                 w_swap_o,
  output logic [KW-1:0]        w_kidx_o,
  output logic [WAW-1:0]       w_addr_o,
  output logic [WPL*8-1:0]     w_data_o,
  // results
  output logic                 res_valid,
  output logic signed [31:0]   res [W]
);

  logic [WPL*8-1:0]    wmem0 [WD];
  logic [WPL*8-1:0]    wmem1 [WD];
  logic [WPL*8-1:0]    wword;
  logic                bank;            // bank read by the batch in progress
  logic signed [31:0]  acc [W];
  logic signed [7:0]   wt;
  logic signed [31:0]  sum [W];

  // weight of the current tap from the active bank
  always_comb begin
    wword = bank ? wmem1[WAW'(32'(f_tap_i) / WPL)] : wmem0[WAW'(32'(f_tap_i) / WPL)];
    wt    = signed'(wword[(32'(f_tap_i) % WPL) * 8 +: 8]);
  end

  always_comb
    for (int w = 0; w < W; w++)
      sum[w] = (f_first_i ? 32'sd0 : acc[w]) + 32'(f_data_i[w] * wt);

  // weight capture into the idle bank
  wire wr_mine = w_valid_i && (32'(w_kidx_i) == IDX);
  always_ff @(posedge clk) begin
    if (wr_mine && bank)  wmem0[w_addr_i] <= w_data_i;
    if (wr_mine && !bank) wmem1[w_addr_i] <= w_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank      <= 1'b0;
      res_valid <= 1'b0;
      f_valid_o <= 1'b0;
      f_first_o <= 1'b0;
      f_last_o  <= 1'b0;
      f_tap_o   <= '0;
      w_valid_o <= 1'b0;
      w_swap_o  <= 1'b0;
      w_kidx_o  <= '0;
      w_addr_o  <= '0;
      w_data_o  <= '0;
      for (int w = 0; w < W; w++) begin
        acc[w]      <= '0;
        res[w]      <= '0;
        f_data_o[w] <= '0;
      end
    end else begin
      // chain registers
      f_valid_o <= f_valid_i;
      f_first_o <= f_first_i;
      f_last_o  <= f_last_i;
      f_tap_o   <= f_tap_i;
      f_data_o  <= f_data_i;
      w_valid_o <= w_valid_i;
      w_swap_o  <= w_swap_i;
      w_kidx_o  <= w_kidx_i;
      w_addr_o  <= w_addr_i;
      w_data_o  <= w_data_i;
      // bank swap
      if (w_swap_i) bank <= !bank;
      // multiply-accumulate
      res_valid <= 1'b0;
      if (f_valid_i) begin
        acc <= sum;
        if (f_last_i) begin
          res       <= sum;
          res_valid <= 1'b1;
        end
      end
    end
  end

  initial assert (TAPS % WPL == 0) else $error("TAPS must be a multiple of WPL");

  a_swap_alone: assert property (@(posedge clk) disable iff (!rst_n)
    !(w_swap_i && w_valid_i));

endmodule
