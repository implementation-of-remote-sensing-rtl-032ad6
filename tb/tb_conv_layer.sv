// tb_conv_layer: a real convolution layer on the full-size accelerator.
//
// Runs a 3x3 convolution with 64 input and 64 output channels, the kind of
// layer a detection or classification network is built from. The accelerator
// has its default sizes (8 cores, 8 pixel lanes, 8 BN lanes, 576 taps, 64
// channels). The input tile is 4 rows x 10 columns x 64 channels and the
// output is 2 rows x 8 columns x 64 channels, so each output row takes eight
// batches of eight output channels.
//
// The testbench plays the processing cores. For each output row it writes
// the im2col columns into the feature-map buffer, with tap t = (ky*3 + kx)*64 +
// ci for pixel lane x. It streams each batch's weights while the previous
// batch runs, starts the batch, and after the eighth batch reads all 64
// result words. Every activation is compared with a direct convolution
// (nested loops over ky, kx, ci, not the im2col order) followed by
// fixed-point BN and ReLU. Each batch must end exactly T + N + N*W/M + 4 =
// 596 cycles after its start. The total cycle count and the MAC rate are
// printed: loading a batch's weights (N*T/WPL = 576 cycles) hides behind the
// batch (596 cycles), so the MAC array sets the pace, apart from the feature-map
// reload and result read-back between output rows.
module tb_conv_layer;
  localparam int N = 8, W = 8, M = 8, T = 576, CH = 64, G = W / M, WPL = 8, WD = T / WPL;
  localparam int CI = 64, K = 3, IH = 4, IW = W + K - 1, OH = IH - K + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fm_we, wl_valid, wl_ready, bp_we, start, busy, done, act_valid;
  logic [9:0] fm_addr, ntaps;
  logic [6:0] wl_addr;
  logic signed [7:0] fm_data [W], act [M];
  logic [WPL*8-1:0] wl_data;
  logic [7:0] wl_kidx;
  logic [5:0] bp_ch, ch_base, act_ch, rr_addr;
  logic signed [15:0] bp_scale;
  logic signed [31:0] bp_shift;
  logic [15:0] act_grp;
  logic [M*8-1:0] rr_data;

  rsdpa dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [7:0] img [IH][IW][CI];
  logic signed [7:0] kern [CH][K][K][CI];
  longint sc [CH], sh [CH];

  // direct convolution + BN + ReLU of one output value
  function automatic int model(int co, int oy, int ox);
    longint acc, y;
    acc = 0;
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        for (int ci = 0; ci < CI; ci++)
          acc += longint'(img[oy + ky][ox + kx][ci]) * longint'(kern[co][ky][kx][ci]);
    y = (acc * sc[co] + sh[co]) >>> 8;
    return (y <= 0) ? 0 : (y >= 127) ? 127 : int'(y);
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  // weight loader: streams the N kernels of one batch, WPL taps per word,
  // tap order ky, kx, ci
  int wl_ch0 = -1, wl_i = 0;
  always @(negedge clk) begin
    wl_valid <= 1'b0;
    if (wl_ch0 >= 0 && wl_i < N * WD) begin
      int n, t;
      n = wl_i / WD;
      wl_valid <= 1'b1; wl_kidx <= 8'(n); wl_addr <= 7'(wl_i % WD);
      for (int j = 0; j < WPL; j++) begin
        t = (wl_i % WD) * WPL + j;
        wl_data[j*8 +: 8] <= kern[wl_ch0 + n][t / (K * CI)][(t / CI) % K][t % CI];
      end
    end
  end
  always @(posedge clk) if (wl_valid && wl_ready && wl_ch0 >= 0) wl_i++;

  task automatic load_weights(int ch0);
    wl_i = 0; wl_ch0 = ch0;
  endtask

  task automatic load_row(int oy);
    for (int t = 0; t < T; t++) begin
      @(negedge clk); fm_we = 1; fm_addr = 10'(t);
      for (int x = 0; x < W; x++) fm_data[x] = img[oy + t / (K * CI)][x + (t / CI) % K][t % CI];
    end
    @(negedge clk); fm_we = 0;
  endtask

  int n_zero = 0, n_clamp = 0, n_mid = 0, n_dbuf = 0;

  task automatic run_batch(int ch0, int next_ch0);
    int c0, lat;
    @(negedge clk); start = 1; ntaps = 10'(T); ch_base = 6'(ch0);
    c0 = cyc;
    @(negedge clk); start = 0;
    if (next_ch0 >= 0) load_weights(next_ch0);
    while (!done) begin
      @(negedge clk);
      if (wl_valid && busy) n_dbuf++;
    end
    lat = cyc - c0;
    check(lat == T + N + N * G + 4, $sformatf("batch ch %0d latency %0d", ch0, lat));
    wait (wl_i == N * WD);
  endtask

  initial begin
    int c_start, c_layer;
    fm_we = 0; bp_we = 0; start = 0; ntaps = 0; ch_base = 0; rr_addr = 0;
    fm_addr = 0; bp_ch = 0; bp_scale = 0; bp_shift = 0; wl_kidx = 0; wl_addr = 0; wl_data = 0;
    foreach (fm_data[x]) fm_data[x] = 0;
    foreach (img[y, x, c]) img[y][x][c] = 8'($urandom_range(0, 15)) - 8'sd8;
    foreach (kern[o, y, x, c]) kern[o][y][x][c] = 8'($urandom);
    for (int c = 0; c < CH; c++) begin
      sc[c] = longint'($urandom_range(1, 8)); sh[c] = longint'($urandom_range(0, 40000)) - 20000;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < CH; c++) begin
      @(negedge clk); bp_we = 1; bp_ch = 6'(c); bp_scale = 16'(sc[c]); bp_shift = 32'(sh[c]);
    end
    @(negedge clk); bp_we = 0;

    c_start = cyc;
    for (int oy = 0; oy < OH; oy++) begin
      load_row(oy);
      load_weights(0);
      wait (wl_i == N * WD);
      for (int b = 0; b < CH / N; b++) run_batch(b * N, (b + 1 < CH / N) ? (b + 1) * N : -1);
      // read the whole output row back from the result RAM
      for (int co = 0; co < CH; co++) begin
        bit ok;
        ok = 1;
        @(negedge clk); rr_addr = 6'(co);
        @(negedge clk);
        for (int x = 0; x < W; x++) begin
          int e, g;
          e = model(co, oy, x);
          g = int'($signed(rr_data[x*8 +: 8]));
          if (g != e) begin
            ok = 0;
            $display("  row %0d ch %0d x %0d: got %0d expected %0d", oy, co, x, g, e);
          end
          if (e == 0) n_zero++; else if (e == 127) n_clamp++; else n_mid++;
        end
        check(ok, $sformatf("output row %0d channel %0d", oy, co));
      end
    end
    c_layer = cyc - c_start;

    $display("layer: %0d outputs, %0d MACs in %0d cycles (%0d MACs/cycle of %0d)",
             OH * W * CH, OH * W * CH * T, c_layer, OH * W * CH * T / c_layer, N * W);
    $display("values: zero=%0d clamped=%0d in range=%0d, weight words during batches=%0d",
             n_zero, n_clamp, n_mid, n_dbuf);
    check(n_zero > 0 && n_clamp > 0 && n_mid > 0, "ReLU zero, clamp and in-range values all seen");
    check(n_dbuf > 0, "weights streamed while a batch ran");
    // per row: feature-map load, first weights, eight back-to-back batches, read-back
    check(c_layer <= OH * (2 * T + (CH / N) * (T + N + N * G + 8) + 2 * CH + 16),
          $sformatf("weight loading hidden behind the batches (%0d cycles)", c_layer));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
