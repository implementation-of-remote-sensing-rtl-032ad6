// tb_fmap_buffer: self-checking test of the feature-map buffer.
//
// Fills all 576 words with random lane values, then reads them back in a
// random order and checks each word one cycle after the read, and that the
// output holds while rd_en is low. Rewrites some words and reads again.
module tb_fmap_buffer;
  localparam int W = 8, T = 576;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en, rd_en;
  logic [9:0] wr_addr, rd_addr;
  logic signed [7:0] wr_data [W], rd_data [W];

  fmap_buffer #(.W(W), .TAPS(T)) dut (.*);

  int checks = 0, failures = 0;
  logic signed [7:0] model [T][W];

  task automatic wr(int a);
    @(negedge clk); wr_en = 1; wr_addr = 10'(a);
    for (int w = 0; w < W; w++) begin wr_data[w] = 8'($urandom); model[a][w] = wr_data[w]; end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd_check(int a);
    bit ok = 1;
    @(negedge clk); rd_en = 1; rd_addr = 10'(a);
    @(negedge clk); rd_en = 0; rd_addr = 10'($urandom_range(0, T - 1));
    for (int w = 0; w < W; w++) if (rd_data[w] !== model[a][w]) ok = 0;
    @(negedge clk);
    for (int w = 0; w < W; w++) if (rd_data[w] !== model[a][w]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL: word %0d", a); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0;
    foreach (wr_data[w]) wr_data[w] = 0;
    for (int a = 0; a < T; a++) wr(a);
    for (int i = 0; i < 200; i++) rd_check($urandom_range(0, T - 1));
    rd_check(0); rd_check(T - 1);
    for (int i = 0; i < 20; i++) wr($urandom_range(0, T - 1));
    for (int a = 0; a < T; a += 7) rd_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
