// tb_ipc_handler: self-checking test of the inter-core I/O message handler.
//
// A shared-memory model holds request packets; a flash-translation-layer
// model accepts submissions with random back-pressure and reports each one
// complete after a random delay. Checked: a message with a wrong magic number
// is dropped without any memory read; for packets of 5, 1 and 0 elements every
// element reaches the FTL once, in order, with the packet's opcode, LBA, data
// address and sector count; exactly 1 + 3N words are read; the completion
// interrupt comes only after the FTL has completed all N requests and carries
// N and the opcode.
module tb_ipc_handler;
  import csrspp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic msg_valid, msg_ready, mem_req, mem_gnt, mem_rvalid;
  logic [31:0] msg_magic, msg_addr, mem_addr, mem_rdata;
  logic ftl_valid, ftl_ready, ftl_done, ipi_out, bad_magic, busy;
  ftl_req_t ftl_req;
  logic [15:0] ipi_count; logic [7:0] ipi_opcode;

  ipc_handler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] mem [logic [31:0]];
  int n_reads = 0;

  // memory model: random grant, answer 1..3 cycles later
  logic [31:0] pend_addr; int pend_d = -1;
  always @(posedge clk) begin
    mem_gnt    <= ($urandom_range(0, 2) != 0);
    mem_rvalid <= 1'b0;
    if (mem_req && mem_gnt) begin
      pend_addr <= mem_addr; pend_d <= $urandom_range(0, 2); n_reads <= n_reads + 1;
    end else if (pend_d == 0) begin
      mem_rvalid <= 1'b1;
      mem_rdata  <= mem.exists(pend_addr) ? mem[pend_addr] : 32'hDEAD_BEEF;
      pend_d     <= -1;
    end else if (pend_d > 0) pend_d <= pend_d - 1;
  end

  // FTL model
  ftl_req_t got[$];
  int outstanding = 0, cpl_timer = 0;
  always @(posedge clk) begin
    ftl_ready <= ($urandom_range(0, 1) != 0);
    ftl_done  <= 1'b0;
    if (ftl_valid && ftl_ready) got.push_back(ftl_req);
    if (outstanding > 0 && cpl_timer == 0) begin
      ftl_done <= 1'b1; cpl_timer <= $urandom_range(1, 6);
    end else if (cpl_timer > 0) cpl_timer <= cpl_timer - 1;
    outstanding <= outstanding + ((ftl_valid && ftl_ready) ? 1 : 0)
                               - ((outstanding > 0 && cpl_timer == 0) ? 1 : 0);
    if (ipi_out) check(outstanding == 0, "interrupt only after all completions");
  end

  int n_ipi = 0;
  logic [15:0] last_cnt; logic [7:0] last_opc;
  always_ff @(posedge clk) if (rst_n && ipi_out) begin n_ipi <= n_ipi + 1; last_cnt <= ipi_count; last_opc <= ipi_opcode; end

  task automatic send_msg(logic [31:0] magic, logic [31:0] addr);
    @(negedge clk); msg_valid = 1; msg_magic = magic; msg_addr = addr;
    #1 while (!msg_ready) begin @(negedge clk); #1; end
    @(negedge clk); msg_valid = 0;
  endtask

  task automatic run_packet(logic [31:0] addr, int n, logic [7:0] opc);
    logic [31:0] lba[], pa[], ns[];
    int reads0, ipi0;
    lba = new[n]; pa = new[n]; ns = new[n];
    mem[addr] = {opc, 8'h00, 16'(n)};
    for (int i = 0; i < n; i++) begin
      lba[i] = $urandom; pa[i] = 32'h9000_0000 + 32'(i) * 32'h1000; ns[i] = $urandom_range(1, 64);
      mem[addr + 4 + 12 * i] = lba[i];
      mem[addr + 8 + 12 * i] = pa[i];
      mem[addr + 12 + 12 * i] = ns[i];
    end
    got.delete();
    reads0 = n_reads; ipi0 = n_ipi;
    send_msg(IPC_MAGIC, addr);
    wait (n_ipi == ipi0 + 1);
    @(negedge clk);
    check(got.size() == n, $sformatf("%0d submissions", n));
    for (int i = 0; i < n && i < got.size(); i++)
      check(got[i].opcode == opc && got[i].lba == lba[i] && got[i].paddr == pa[i] && got[i].nsect == ns[i],
            $sformatf("element %0d", i));
    check(n_reads - reads0 == 1 + 3 * n, "memory reads");
    check(last_cnt == 16'(n) && last_opc == opc, "interrupt payload");
  endtask

  int n_bad = 0;
  always_ff @(posedge clk) if (rst_n && bad_magic) n_bad <= n_bad + 1;

  initial begin
    msg_valid = 0; msg_magic = 0; msg_addr = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    send_msg(32'h1234_5678, 32'h8000_0000);
    repeat (10) @(negedge clk);
    check(n_bad == 1 && n_reads == 0 && !busy, $sformatf("bad magic dropped %0d %0d %0d", n_bad, n_reads, busy));
    run_packet(32'h8000_0000, 5, IPC_OP_READ);
    run_packet(32'h8000_4000, 1, IPC_OP_WRITE);
    run_packet(32'h8000_8000, 0, IPC_OP_READ);
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
