// tb_max_pool: self-checking test of the 2x2 max-pooling block.
//
// A small configuration (4 lanes, 8 channels, 2 groups per channel row) gets
// three row pairs of random activations. Within each row the (channel, group)
// words arrive in a random order, with idle cycles in between, and the order
// differs between the two rows of a pair. Every pooled output is compared with
// a model that keeps the whole image and takes the maximum over each 2x2
// window. Also checked: nothing comes out for first rows, and every window of
// every pair is emitted exactly once.
module tb_max_pool;
  localparam int M = 4, CH = 8, G = 2, P = M / 2, PAIRS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, row_odd, out_valid;
  logic [2:0] in_ch, out_ch;
  logic [15:0] in_grp, out_grp;
  logic signed [7:0] in_act [M], out_act [P];

  max_pool #(.M(M), .CH(CH), .G(G)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [7:0] img [2][CH][G * M];   // [row in pair][channel][pixel]
  int seen [CH][G];
  int n_out = 0, n_bad = 0, n_first_out = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 0; i < P; i++) begin
      int x;
      logic signed [7:0] e;
      x = int'(out_grp) * M + 2 * i;
      e = img[0][out_ch][x];
      if (img[0][out_ch][x + 1] > e) e = img[0][out_ch][x + 1];
      if (img[1][out_ch][x] > e)     e = img[1][out_ch][x];
      if (img[1][out_ch][x + 1] > e) e = img[1][out_ch][x + 1];
      if (out_act[i] != e) n_bad++;
    end
    seen[out_ch][int'(out_grp)]++;
    n_out++;
  end

  task automatic send_row(int r);
    int order [CH * G];
    foreach (order[k]) order[k] = k;
    order.shuffle();
    foreach (order[k]) begin
      @(negedge clk);
      in_valid = 1; row_odd = (r == 1);
      in_ch = 3'(order[k] / G); in_grp = 16'(order[k] % G);
      for (int i = 0; i < M; i++) in_act[i] = img[r][order[k] / G][(order[k] % G) * M + i];
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    in_valid = 0; row_odd = 0; in_ch = 0; in_grp = 0;
    foreach (in_act[i]) in_act[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < PAIRS; p++) begin
      foreach (seen[c, g]) seen[c][g] = 0;
      foreach (img[r, c, x]) img[r][c][x] = 8'($urandom_range(0, 127));
      send_row(0);
      @(negedge clk);
      check(n_out == p * CH * G, "no output for a first row");
      send_row(1);
      repeat (2) @(negedge clk);
      foreach (seen[c, g]) check(seen[c][g] == 1, $sformatf("pair %0d ch %0d group %0d pooled once", p, c, g));
    end
    check(n_bad == 0, $sformatf("pooled values (%0d wrong)", n_bad));
    check(n_out == PAIRS * CH * G, $sformatf("pooled words %0d", n_out));
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
