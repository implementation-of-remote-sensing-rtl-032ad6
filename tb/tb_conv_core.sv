// tb_conv_core: self-checking test of one computing core of the daisy chain.
//
// Core number 2 of a chain (4 lanes, 16 taps, two weights per load word) is
// given weights for kernels 0..3 on the weight chain; it must keep only those of kernel 2. After a swap
// token, a batch of 12 taps is streamed and the 4 sums are checked against a
// model. While that batch runs, the next batch's weights are loaded; they must
// not disturb it, and after the next swap the second batch must use them.
// A third batch with a single tap checks first==last. Every chain output is
// checked to equal its input one cycle earlier.
module tb_conv_core;
  localparam int W = 4, T = 16, ID = 2, WPL = 2, WD = T / WPL;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic f_valid_i, f_first_i, f_last_i, f_valid_o, f_first_o, f_last_o;
  logic [3:0] f_tap_i, f_tap_o;
  logic [2:0] w_addr_i, w_addr_o;
  logic signed [7:0] f_data_i [W], f_data_o [W];
  logic w_valid_i, w_swap_i, w_valid_o, w_swap_o;
  logic [7:0] w_kidx_i, w_kidx_o;
  logic [WPL*8-1:0] w_data_i, w_data_o;
  logic res_valid;
  logic signed [31:0] res [W];

  conv_core #(.IDX(ID), .W(W), .TAPS(T), .KW(8), .WPL(WPL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // chain pass-through check
  logic [67:0] prev_in;
  int n_chain_bad = 0;
  bit have_prev = 0;
  always @(posedge clk) if (rst_n) begin
    logic [67:0] cur_out;
    cur_out = {f_valid_o, f_first_o, f_last_o, f_tap_o, f_data_o[0], f_data_o[1], f_data_o[2], f_data_o[3],
               w_valid_o, w_swap_o, w_kidx_o, w_addr_o, w_data_o};
    if (have_prev && cur_out !== prev_in) n_chain_bad++;
    have_prev = 1;
    prev_in = {f_valid_i, f_first_i, f_last_i, f_tap_i, f_data_i[0], f_data_i[1], f_data_i[2], f_data_i[3],
               w_valid_i, w_swap_i, w_kidx_i, w_addr_i, w_data_i};
  end

  logic signed [7:0] wts [2][4][T];    // [batch][kernel][tap]
  logic signed [7:0] fm  [T][W];

  task automatic idle();
    f_valid_i = 0; f_first_i = 0; f_last_i = 0; w_valid_i = 0; w_swap_i = 0;
  endtask

  task automatic load_weight(int b, int k, int i);
    w_valid_i = 1; w_kidx_i = 8'(k); w_addr_i = 3'(i);
    for (int j = 0; j < WPL; j++) w_data_i[j*8 +: 8] = wts[b][k][i * WPL + j];
  endtask

  // run one batch of nt taps with kernel weights of batch b,
  // optionally loading batch lb's weights at the same time
  task automatic run_batch(int b, int nt, int lb);
    longint exp_s [W];
    int li = 0;
    @(negedge clk); idle(); w_swap_i = 1;
    for (int t = 0; t < nt; t++) begin
      @(negedge clk); idle();
      f_valid_i = 1; f_first_i = (t == 0); f_last_i = (t == nt - 1); f_tap_i = 4'(t);
      for (int w = 0; w < W; w++) f_data_i[w] = fm[t][w];
      if (lb >= 0 && li < 4 * WD) begin load_weight(lb, li / WD, li % WD); li++; end
    end
    @(negedge clk); idle();
    for (int w = 0; w < W; w++) begin
      exp_s[w] = 0;
      for (int t = 0; t < nt; t++) exp_s[w] += longint'(fm[t][w]) * longint'(wts[b][ID][t]);
    end
    check(res_valid, "res_valid one cycle after last tap");
    for (int w = 0; w < W; w++)
      check(longint'(res[w]) == exp_s[w], $sformatf("batch %0d lane %0d: %0d vs %0d", b, w, res[w], exp_s[w]));
    // finish loading the rest of batch lb's weights
    while (lb >= 0 && li < 4 * WD) begin @(negedge clk); idle(); load_weight(lb, li / WD, li % WD); li++; end
    @(negedge clk); idle();
    check(!res_valid, "res_valid is a pulse");
  endtask

  initial begin
    idle(); f_tap_i = 0; w_kidx_i = 0; w_addr_i = 0; w_data_i = 0;
    foreach (f_data_i[w]) f_data_i[w] = 0;
    foreach (wts[b, k, t]) wts[b][k][t] = 8'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    // load batch 0 weights of all four kernels into the idle bank
    for (int i = 0; i < 4 * WD; i++) begin @(negedge clk); idle(); load_weight(0, i / WD, i % WD); end
    foreach (fm[t, w]) fm[t][w] = 8'($urandom);
    run_batch(0, 12, 1);                 // loads batch 1 while running batch 0
    foreach (fm[t, w]) fm[t][w] = 8'($urandom);
    run_batch(1, T, -1);
    foreach (fm[t, w]) fm[t][w] = 8'($urandom);
    run_batch(0, 1, -1);                 // bank flips back to batch 0 weights
    repeat (2) @(negedge clk);
    check(n_chain_bad == 0, $sformatf("chain registers (%0d mismatches)", n_chain_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
