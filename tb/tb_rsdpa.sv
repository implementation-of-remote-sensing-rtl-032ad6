// tb_rsdpa: self-checking test of the convolution accelerator.
//
// Runs a layer of 12 output channels in three batches on a reduced
// accelerator (4 cores, 4 lanes, 2 BN lanes, 32 taps, 16 channels, four
// weights per load word). The
// feature map and the first batch's weights are loaded before the first
// start; each later batch's weights are loaded while the previous batch runs
// (double buffering). For every batch the end signal must come exactly
// T + N + N*W/M + 4 cycles after start, every activation on the act port and
// every result-RAM word must match a model of conv + fixed-point BN + ReLU
// computed here, and the weights loaded in parallel must not disturb the batch
// in progress. Different tap counts are used per batch.
module tb_rsdpa;
  localparam int N = 4, W = 4, M = 2, T = 32, CH = 16, G = W / M, WPL = 4, WD = T / WPL;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fm_we, wl_valid, wl_ready, bp_we, start, busy, done, act_valid;
  logic [4:0] fm_addr;
  logic [2:0] wl_addr;
  logic signed [7:0] fm_data [W], act [M];
  logic [WPL*8-1:0] wl_data;
  logic [7:0] wl_kidx;
  logic [3:0] bp_ch, ch_base, act_ch;
  logic signed [15:0] bp_scale;
  logic signed [31:0] bp_shift;
  logic [5:0] ntaps;
  logic [15:0] act_grp;
  logic [4:0] rr_addr;
  logic [M*8-1:0] rr_data;

  rsdpa #(.N(N), .W(W), .M(M), .TAPS(T), .CH(CH), .FRAC(8), .WPL(WPL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [7:0] fm [T][W];
  logic signed [7:0] wt [CH][T];
  longint sc [CH], sh [CH];
  int expect_act [CH][W];

  function automatic int model(int ch, int w, int nt);
    longint acc, y;
    acc = 0;
    for (int t = 0; t < nt; t++) acc += longint'(fm[t][w]) * longint'(wt[ch][t]);
    y = (acc * sc[ch] + sh[ch]) >>> 8;
    return (y <= 0) ? 0 : (y >= 127) ? 127 : int'(y);
  endfunction

  // act port monitor
  int n_act = 0, n_act_bad = 0, n_zero = 0, n_pos = 0;
  always @(posedge clk) if (rst_n && act_valid) begin
    for (int i = 0; i < M; i++) begin
      int w;
      w = int'(act_grp) * M + i;
      if (int'(act[i]) != expect_act[act_ch][w]) n_act_bad++;
      if (act[i] == 0) n_zero++; else n_pos++;
    end
    n_act++;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // weight loader running in the background
  int wl_ch0 = -1, wl_i = 0;
  always @(negedge clk) begin
    wl_valid <= 1'b0;
    if (wl_ch0 >= 0 && wl_i < N * WD) begin
      wl_valid <= 1'b1; wl_kidx <= 8'(wl_i / WD); wl_addr <= 3'(wl_i % WD);
      for (int j = 0; j < WPL; j++) wl_data[j*8 +: 8] <= wt[wl_ch0 + wl_i / WD][(wl_i % WD) * WPL + j];
    end
  end
  always @(posedge clk) if (wl_valid && wl_ready && wl_ch0 >= 0) wl_i++;

  task automatic load_weights(int ch0);
    wl_i = 0; wl_ch0 = ch0;
  endtask

  task automatic run_batch(int ch0, int nt, int next_ch0);
    int c0, lat;
    for (int n = 0; n < N; n++) for (int w = 0; w < W; w++) expect_act[ch0 + n][w] = model(ch0 + n, w, nt);
    @(negedge clk); start = 1; ntaps = 6'(nt); ch_base = 4'(ch0);
    c0 = cyc;
    @(negedge clk); start = 0;
    if (next_ch0 >= 0) load_weights(next_ch0);
    while (!done) @(negedge clk);
    lat = cyc - c0;
    check(lat == nt + N + N * G + 4, $sformatf("batch latency %0d, expected %0d", lat, nt + N + N * G + 4));
    // read back the result RAM
    for (int n = 0; n < N; n++) for (int g = 0; g < G; g++) begin
      bit ok = 1;
      @(negedge clk); rr_addr = 5'((ch0 + n) * G + g);
      @(negedge clk);
      for (int i = 0; i < M; i++)
        if (int'($signed(rr_data[i*8 +: 8])) != expect_act[ch0 + n][g * M + i]) ok = 0;
      check(ok, $sformatf("result RAM ch %0d group %0d", ch0 + n, g));
    end
    wait (wl_i == N * WD);
  endtask

  initial begin
    fm_we = 0; bp_we = 0; start = 0; ntaps = 0; ch_base = 0; rr_addr = 0;
    fm_addr = 0; bp_ch = 0; bp_scale = 0; bp_shift = 0; wl_kidx = 0; wl_addr = 0; wl_data = 0;
    foreach (fm_data[w]) fm_data[w] = 0;
    foreach (fm[t, w]) fm[t][w] = 8'($urandom);
    foreach (wt[c, t]) wt[c][t] = 8'($urandom);
    for (int c = 0; c < CH; c++) begin
      sc[c] = longint'($urandom_range(1, 40)); sh[c] = longint'($urandom_range(0, 40000)) - 20000;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < T; t++) begin
      @(negedge clk); fm_we = 1; fm_addr = 5'(t);
      for (int w = 0; w < W; w++) fm_data[w] = fm[t][w];
    end
    for (int c = 0; c < CH; c++) begin
      @(negedge clk); fm_we = 0; bp_we = 1; bp_ch = 4'(c); bp_scale = 16'(sc[c]); bp_shift = 32'(sh[c]);
    end
    @(negedge clk); bp_we = 0;
    load_weights(0);
    wait (wl_i == N * WD);
    run_batch(0, T, 4);
    run_batch(4, 20, 8);
    run_batch(8, 9, -1);
    check(n_act == 3 * N * G, $sformatf("activation groups %0d", n_act));
    check(n_act_bad == 0, $sformatf("act port mismatches %0d", n_act_bad));
    check(n_zero > 0 && n_pos > 0, "ReLU both zeroed and passed values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
