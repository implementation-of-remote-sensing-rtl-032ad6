// tb_nvme_sq_doorbell: self-checking test of the submission-queue doorbell.
//
// A small queue (8 entries) in a modelled host memory is filled with entries
// whose command id encodes the slot. The host rings the doorbell several
// times, wrapping around the end of the queue; a DMA model grants and answers
// fetches after random delays and checks each fetch address against
// base + slot*64; the parser side takes entries with random back-pressure.
// Checked: every entry arrives once and in order, head/tail/empty track, and
// an out-of-range doorbell value raises db_error and is ignored.
module tb_nvme_sq_doorbell;
  import csrspp_pkg::*;

  localparam int QS = 8;
  localparam logic [63:0] BASE = 64'h0000_1000_0000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic db_we; logic [15:0] db_tail; logic db_error;
  logic fetch_req, fetch_gnt, fetch_rvalid; logic [63:0] fetch_addr;
  nvme_sqe_t fetch_rdata, cmd;
  logic cmd_valid, cmd_ready;
  logic [2:0] sq_head, sq_tail; logic sq_empty;

  nvme_sq_doorbell #(.QSIZE(QS)) dut (.*, .sq_base(BASE));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DMA model
  int pend_slot = -1, delay = 0, n_fetch = 0;
  always @(posedge clk) begin
    fetch_rvalid <= 1'b0;
    if (fetch_req && fetch_gnt) begin
      check(fetch_addr == BASE + 64'(sq_head) * 64, "fetch address");
      pend_slot <= int'(sq_head);
      delay     <= $urandom_range(0, 3);
      n_fetch   <= n_fetch + 1;
    end else if (pend_slot >= 0) begin
      if (delay == 0) begin
        fetch_rvalid <= 1'b1;
        fetch_rdata  <= '0;
        fetch_rdata.opcode <= 8'h02;
        fetch_rdata.cid    <= 16'(16'hA000 + pend_slot);
        pend_slot <= -1;
      end else delay <= delay - 1;
    end
  end
  always_ff @(posedge clk) fetch_gnt <= ($urandom_range(0, 1) == 1);
  always_ff @(posedge clk) cmd_ready <= ($urandom_range(0, 2) != 0);

  // parser side
  int expect_slot = 0, n_rx = 0;
  always @(posedge clk) if (rst_n && cmd_valid && cmd_ready) begin
    check(cmd.cid == 16'(16'hA000 + expect_slot), $sformatf("entry order slot %0d", expect_slot));
    expect_slot <= (expect_slot + 1) % QS;
    n_rx <= n_rx + 1;
  end

  task automatic ring(int t);
    @(negedge clk); db_we = 1; db_tail = 16'(t);
    @(negedge clk); db_we = 0;
  endtask

  initial begin
    db_we = 0; db_tail = 0; fetch_rdata = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    check(sq_empty, "empty after reset");
    ring(5);
    wait (n_rx == 5); repeat (4) @(negedge clk);
    check(sq_head == 3'd5 && sq_empty, "head follows tail 5");
    ring(2);                         // wraps: slots 5,6,7,0,1
    wait (n_rx == 10); repeat (4) @(negedge clk);
    check(sq_head == 3'd2 && sq_tail == 3'd2, "head after wrap");
    @(negedge clk); db_we = 1; db_tail = 16'd9;
    @(posedge clk); #1 check(db_error == 1'b1, "invalid doorbell flagged");
    @(negedge clk); db_we = 0;
    repeat (10) @(negedge clk);
    check(sq_tail == 3'd2 && sq_empty && n_rx == 10, "invalid doorbell ignored");
    ring(7);
    wait (n_rx == 15); repeat (4) @(negedge clk);
    check(n_fetch == 15, "one fetch per entry");
    check(sq_empty, "drained");
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
