// tb_nvme_cq_poster: self-checking test of the completion-queue poster.
//
// A 4-entry completion queue is filled with 20 completions of mixed status
// (success, invalid opcode and the three vendor return codes) while a host
// model consumes the ring slowly, so the ring runs full and wraps five times.
// The host model keeps its own tail and phase: it checks every write address,
// finds new entries only by their phase tag, and compares each entry (command
// id, status code and type, dword 0, queue head and id) with the completion
// that was sent. It then writes the head doorbell after a random delay.
// Also checked: one irq per entry, the phase flips on every wrap, completions
// are refused while the ring is full, and a head value outside the ring is
// rejected with hd_error.
module tb_nvme_cq_poster;
  import csrspp_pkg::*;
  localparam int Q = 4, NCPL = 20;
  localparam logic [63:0] CQB = 64'h0000_0001_0000_0400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, wr_req, wr_gnt, hd_we, hd_error, irq, phase, cq_full;
  cpl_t in_cpl;
  logic [15:0] in_sq_head, in_sqid, hd_head;
  logic [63:0] cq_base, wr_addr;
  nvme_cqe_t wr_data;
  logic [1:0] cq_tail, cq_head;

  nvme_cq_poster #(.QSIZE(Q)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // completions sent, in order
  cpl_t sent [NCPL];
  logic [15:0] sent_hd [NCPL];

  // host memory: the ring, written through the DMA port
  nvme_cqe_t ring [Q];
  int dev_tail = 0, n_irq = 0, n_full = 0, n_refused = 0, n_bad_addr = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_req && wr_gnt) begin
      if (wr_addr != CQB + 64'(dev_tail) * 16) n_bad_addr++;
      ring[dev_tail] <= wr_data;
      dev_tail = (dev_tail + 1) % Q;
    end
    if (irq) n_irq++;
    if (cq_full) n_full++;
    if (in_valid && !in_ready && cq_full) n_refused++;
    if (in_ready && cq_full) begin failures++; $display("FAIL: ready while full"); end
  end
  always_ff @(posedge clk) wr_gnt <= ($urandom_range(0, 2) != 0);

  // host consumer
  int host_head = 0, n_got = 0, n_acked = 0, wraps = 0;
  bit host_phase = 1;
  initial begin
    hd_we = 0; hd_head = 0;
    wait (rst_n);
    while (n_got < NCPL) begin
      @(negedge clk);
      if (ring[host_head].phase == host_phase) begin
        nvme_cqe_t e;
        logic [2:0] sct;
        e = ring[host_head];
        sct = (sent[n_got].status >= 8'hC0) ? 3'd7 : 3'd0;
        check(e.cid == sent[n_got].cid && e.dw0 == sent[n_got].dw0 && e.sqhd == sent_hd[n_got] &&
              e.sqid == 16'd1 && e.status == {4'b0, sct, 8'(sent[n_got].status)} && e.rsvd == 0,
              $sformatf("entry %0d fields", n_got));
        n_got++;
        host_head = (host_head + 1) % Q;
        if (host_head == 0) begin host_phase = !host_phase; wraps++; end
        repeat ($urandom_range(2, 12)) @(negedge clk);
        hd_we = 1; hd_head = 16'(host_head);
        @(negedge clk); hd_we = 0;
        n_acked++;
      end
    end
  end

  initial begin
    cpl_status_e codes [5];
    codes = '{ST_SUCCESS, ST_INVALID_OPC, ST_NOT_STARTED, ST_QUEUE_FULL, ST_LOAD_HEAVY};
    in_valid = 0; in_cpl = '0; in_sq_head = 0; in_sqid = 16'd1; cq_base = CQB;
    foreach (ring[i]) ring[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    check(phase == 1'b1 && cq_tail == 0 && cq_head == 0, "reset state");
    for (int i = 0; i < NCPL; i++) begin
      sent[i].cid = 16'(100 + i);
      sent[i].status = codes[i % 5];
      sent[i].dw0 = $urandom;
      sent_hd[i] = 16'($urandom_range(0, 63));
      @(negedge clk);
      in_valid = 1; in_cpl = sent[i]; in_sq_head = sent_hd[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    wait (n_acked == NCPL);
    repeat (5) @(negedge clk);
    check(n_bad_addr == 0, $sformatf("write addresses (%0d wrong)", n_bad_addr));
    check(n_irq == NCPL, $sformatf("one irq per entry (%0d)", n_irq));
    check(wraps == NCPL / Q, $sformatf("phase wraps %0d", wraps));
    check(n_refused > 0, "completions held back while the ring was full");
    check(cq_head == 2'(host_head) && cq_tail == 2'(dev_tail), "head and tail agree with the host");
    // out-of-range head doorbell
    @(negedge clk); hd_we = 1; hd_head = 16'(Q + 3);
    @(negedge clk); hd_we = 0;
    check(hd_error, "bad head doorbell flagged");
    check(cq_head == 2'(host_head), "bad head doorbell ignored");
    $display("full cycles=%0d refused=%0d wraps=%0d", n_full, n_refused, wraps);
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
