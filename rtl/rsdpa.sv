// rsdpa: remote-sensing data processing accelerator (one convolution block).
//
// Computes one convolution layer batch by batch. A batch is N output channels
// for W pixels: every one of the N computing cores (conv_core) holds the
// weights of one kernel and multiplies them, tap by tap, with the W feature-map
// values read from the feature-map buffer (fmap_buffer). Feature-map words and
// weight words both travel down a daisy chain of the cores, one core per
// cycle. When the last core has its sums, a multiplexer feeds them, M values
// at a time, through the batch-normalisation/ReLU unit (bn_unit); its
// activations are spread back over the W pixel lanes (the demultiplexer) and
// written to the result RAM, from which software copies them to DRAM, and are
// also offered on the act_* port, the input of a following convolution block.
// done pulses at the end of the batch: this is the end signal the host waits
// for.
//
// Using the accelerator: write the feature map (fm_*), the weights of the
// first batch (wl_*: words of WPL weights, tagged with the kernel number
// 0..N-1 and the word address; byte j of word a is tap a*WPL + j) and the
// BN parameters (bp_*), then pulse start with the number of taps and the base
// output channel. Start flips the weight banks, so the weights loaded before
// start are used, and weights loaded while the batch runs go to the other bank
// and are used by the next batch (double buffering).
//
// Timing (T taps, G = W/M groups per core): start is taken in the idle state;
// done pulses T + N + N*G + 4 cycles after the start cycle. wl_ready is low
// only in the cycle start is taken (the swap token then uses the chain).
// Loading one batch of weights takes N*TAPS/WPL cycles; with the defaults that
// is 576 cycles, less than a full batch (596), so the next batch's weights
// are always in place by the time the current batch ends.
//
// The chain, the per-core weight capture by serial number, the double buffer,
// the N x W MAC array, the M-lane BN unit, the mux/demux and the result RAM
// follow the design; the sizes (none are given), the width of the weight load
// word, the control sequence and the port protocol are this design's own.
module rsdpa #(
  parameter int unsigned N    = 8,     // computing cores = kernels per batch
  parameter int unsigned W    = 8,     // pixel lanes
  parameter int unsigned M    = 8,     // BN lanes, divides W
  parameter int unsigned TAPS = 576,   // taps per kernel, K * C_in
  parameter int unsigned CH   = 64,    // output channels of a layer
  parameter int unsigned FRAC = 8,
  parameter int unsigned WPL  = 8,     // weights per load word
  localparam int unsigned AW  = $clog2(TAPS),
  localparam int unsigned WD  = TAPS / WPL,
  localparam int unsigned WAW = (WD > 1) ? $clog2(WD) : 1,
  localparam int unsigned TW  = $clog2(TAPS + 1),
  localparam int unsigned CW  = $clog2(CH),
  localparam int unsigned G   = W / M,
  localparam int unsigned RD  = CH * G,             // result RAM words
  localparam int unsigned RW  = $clog2(RD)
) (
  input  logic                clk,
  input  logic                rst_n,
  // feature-map load
  input  logic                fm_we,
  input  logic [AW-1:0]       fm_addr,
  input  logic signed [7:0]   fm_data [W],
  // weight load (enters the daisy chain)
  input  logic                wl_valid,
  input  logic [7:0]          wl_kidx,
  input  logic [WAW-1:0]      wl_addr,
  input  logic [WPL*8-1:0]    wl_data,
  output logic                wl_ready,
  // BN parameter load
  input  logic                bp_we,
  input  logic [CW-1:0]       bp_ch,
  input  logic signed [15:0]  bp_scale,
  input  logic signed [31:0]  bp_shift,
  // batch control
  input  logic                start,
  input  logic [TW-1:0]       ntaps,
  input  logic [CW-1:0]       ch_base,
  output logic                busy,
  output logic                done,
  // activations towards the next block
  output logic                act_valid,
  output logic [CW-1:0]       act_ch,
  output logic [15:0]         act_grp,
  output logic signed [7:0]   act [M],
  // result RAM read port (one cycle latency)
  input  logic [RW-1:0]       rr_addr,
  output logic [M*8-1:0]      rr_data
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_WAIT, S_DRAIN, S_FLUSH} state_e;
  state_e state;

  logic [AW-1:0] tap, last_tap;
  logic [CW-1:0] base_q;
  logic [$clog2(N*G+1)-1:0] drain_i;
  logic [1:0]    flush_i;

  wire take_start = start && (state == S_IDLE);
  assign busy     = (state != S_IDLE);
  assign wl_ready = !take_start;

  // ---------------------------------------------------------------- fmap read
  logic              rd_en;
  logic signed [7:0] fm_rd [W];
  logic              f_v, f_first, f_last;
  logic [AW-1:0]     f_tap;

  assign rd_en = (state == S_RUN);

  fmap_buffer #(.W(W), .TAPS(TAPS)) u_fmap (
    .clk, .wr_en(fm_we), .wr_addr(fm_addr), .wr_data(fm_data),
    .rd_en, .rd_addr(tap), .rd_data(fm_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_v     <= 1'b0;
      f_first <= 1'b0;
      f_last  <= 1'b0;
      f_tap   <= '0;
    end else begin
      f_v     <= rd_en;
      f_first <= rd_en && (tap == '0);
      f_last  <= rd_en && (tap == last_tap);
      f_tap   <= tap;
    end
  end

  // ---------------------------------------------------------------- core chain
  logic              cf_v   [N+1];
  logic              cf_fst [N+1];
  logic              cf_lst [N+1];
  logic [AW-1:0]     cf_tap [N+1];
  logic signed [7:0] cf_d   [N+1][W];
  logic              cw_v   [N+1];
  logic              cw_sw  [N+1];
  logic [7:0]        cw_k   [N+1];
  logic [WAW-1:0]    cw_a   [N+1];
  logic [WPL*8-1:0]  cw_d   [N+1];
  logic              res_v  [N];
  logic signed [31:0] res   [N][W];

  assign cf_v[0]   = f_v;
  assign cf_fst[0] = f_first;
  assign cf_lst[0] = f_last;
  assign cf_tap[0] = f_tap;
  assign cf_d[0]   = fm_rd;
  assign cw_v[0]   = wl_valid && wl_ready;
  assign cw_sw[0]  = take_start;
  assign cw_k[0]   = wl_kidx;
  assign cw_a[0]   = wl_addr;
  assign cw_d[0]   = wl_data;

  for (genvar n = 0; n < N; n++) begin : g_core
    conv_core #(.IDX(n), .W(W), .TAPS(TAPS), .KW(8), .WPL(WPL)) u_core (
      .clk, .rst_n,
      .f_valid_i(cf_v[n]),   .f_first_i(cf_fst[n]),   .f_last_i(cf_lst[n]),
      .f_tap_i(cf_tap[n]),   .f_data_i(cf_d[n]),
      .f_valid_o(cf_v[n+1]), .f_first_o(cf_fst[n+1]), .f_last_o(cf_lst[n+1]),
      .f_tap_o(cf_tap[n+1]), .f_data_o(cf_d[n+1]),
      .w_valid_i(cw_v[n]),   .w_swap_i(cw_sw[n]),     .w_kidx_i(cw_k[n]),
      .w_addr_i(cw_a[n]),    .w_data_i(cw_d[n]),
      .w_valid_o(cw_v[n+1]), .w_swap_o(cw_sw[n+1]),   .w_kidx_o(cw_k[n+1]),
      .w_addr_o(cw_a[n+1]),  .w_data_o(cw_d[n+1]),
      .res_valid(res_v[n]),  .res(res[n])
    );
  end

  // ---------------------------------------------------------------- mux -> BN
  logic               bn_v;
  logic [CW-1:0]      bn_ch;
  logic [15:0]        bn_tag;
  logic signed [31:0] bn_in [M];
  int unsigned        sel_n, sel_g;

  always_comb begin
    sel_n  = 32'(drain_i) / G;
    sel_g  = 32'(drain_i) % G;
    bn_v   = (state == S_DRAIN);
    bn_ch  = base_q + CW'(sel_n);
    bn_tag = 16'(sel_g);
    for (int i = 0; i < M; i++) bn_in[i] = res[sel_n % N][(sel_g * M + i) % W];
  end

  bn_unit #(.M(M), .CH(CH), .FRAC(FRAC), .TAGW(16)) u_bn (
    .clk, .rst_n,
    .bp_we, .bp_ch, .bp_scale, .bp_shift,
    .in_valid(bn_v), .in_ch(bn_ch), .in_tag(bn_tag), .in_acc(bn_in),
    .out_valid(act_valid), .out_ch(act_ch), .out_tag(act_grp), .out_act(act)
  );

  // ---------------------------------------------------------------- demux -> result RAM
  logic [M*8-1:0] res_mem [RD];
  logic [M*8-1:0] act_word;
  logic [RW-1:0]  act_addr;

  always_comb begin
    for (int i = 0; i < M; i++) act_word[i*8 +: 8] = act[i];
    act_addr = RW'(32'(act_ch) * G + 32'(act_grp));
  end

  always_ff @(posedge clk) begin
    if (act_valid) res_mem[act_addr] <= act_word;
    rr_data <= res_mem[rr_addr];
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tap      <= '0;
      last_tap <= '0;
      base_q   <= '0;
      drain_i  <= '0;
      flush_i  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (take_start) begin
          tap      <= '0;
          last_tap <= AW'(ntaps - 1'b1);
          base_q   <= ch_base;
          state    <= S_RUN;
        end
        S_RUN: begin
          tap <= tap + 1'b1;
          if (tap == last_tap) state <= S_WAIT;
        end
        S_WAIT: if (res_v[N-1]) begin
          drain_i <= '0;
          state   <= S_DRAIN;
        end
        S_DRAIN: begin
          drain_i <= drain_i + 1'b1;
          if (32'(drain_i) == N * G - 1) begin
            flush_i <= '0;
            state   <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          flush_i <= flush_i + 1'b1;
          if (flush_i == 2'd1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (W % M == 0) else $error("M must divide W");
    assert (N <= 256)   else $error("kernel serial numbers are 8 bits");
  end

  a_ntaps: assert property (@(posedge clk) disable iff (!rst_n)
    take_start |-> (ntaps != '0) && (32'(ntaps) <= TAPS));

endmodule
