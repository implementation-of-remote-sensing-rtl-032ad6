// tb_bn_unit: self-checking test of the batch-normalisation/ReLU unit.
//
// Loads random 16-bit scales and 32-bit shifts for 8 channels, then streams
// 400 random groups of 4 accumulator sums (with gaps) and compares every
// output, two cycles later, with y = clamp((acc*scale + shift) >>> 8, 0, 127)
// computed here in 64-bit arithmetic. Counts how often ReLU zeroed a value and
// how often the top clamp was hit, and requires both and a pass-through case.
module tb_bn_unit;
  localparam int M = 4, CH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bp_we, in_valid, out_valid;
  logic [2:0] bp_ch, in_ch, out_ch;
  logic signed [15:0] bp_scale;
  logic signed [31:0] bp_shift;
  logic [15:0] in_tag, out_tag;
  logic signed [31:0] in_acc [M];
  logic signed [7:0] out_act [M];

  bn_unit #(.M(M), .CH(CH), .FRAC(8), .TAGW(16)) dut (.*);

  int checks = 0, failures = 0, n_zero = 0, n_sat = 0, n_mid = 0;
  longint sc [CH], sh [CH];

  typedef struct { int ch; int tag; longint a [M]; } grp_t;
  grp_t q[$];

  function automatic int ref_act(longint a, int ch);
    longint y;
    y = (a * sc[ch] + sh[ch]) >>> 8;
    if (y <= 0) return 0;
    if (y >= 127) return 127;
    return int'(y);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    grp_t g; bit ok;
    g = q.pop_front();
    ok = (out_ch == 3'(g.ch)) && (out_tag == 16'(g.tag));
    for (int i = 0; i < M; i++) begin
      int r;
      r = ref_act(g.a[i], g.ch);
      if (int'(out_act[i]) != r) ok = 0;
      if (r == 0) n_zero++; else if (r == 127) n_sat++; else n_mid++;
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL: group ch %0d tag %0d", g.ch, g.tag); end
  end

  initial begin
    bp_we = 0; in_valid = 0; bp_ch = 0; bp_scale = 0; bp_shift = 0; in_ch = 0; in_tag = 0;
    foreach (in_acc[i]) in_acc[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < CH; c++) begin
      @(negedge clk); bp_we = 1; bp_ch = 3'(c);
      bp_scale = 16'($urandom_range(0, 2000)) - 16'sd300;
      bp_shift = 32'($urandom_range(0, 40000)) - 32'sd20000;
      sc[c] = longint'(bp_scale); sh[c] = longint'(bp_shift);
    end
    @(negedge clk); bp_we = 0;
    for (int k = 0; k < 400; k++) begin
      grp_t g;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      g.ch = $urandom_range(0, CH - 1); g.tag = $urandom_range(0, 65535);
      in_ch = 3'(g.ch); in_tag = 16'(g.tag);
      for (int i = 0; i < M; i++) begin
        in_acc[i] = 32'($urandom_range(0, 600)) - 32'sd300;
        g.a[i] = longint'(in_acc[i]);
      end
      if (in_valid) q.push_back(g);
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL: outputs missing"); end
    checks++; if (n_zero == 0 || n_sat == 0 || n_mid == 0) begin failures++; $display("FAIL: coverage %0d %0d %0d", n_zero, n_sat, n_mid); end
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
