// tb_task_scheduler: self-checking test of the task scheduler.
//
// Walks through the admission rules with a queue of 8 and a threshold of 4:
// a task while processing is off is returned; heartbeats report the load and
// the on/off state; with processing on, tasks are queued until the depth
// reaches the threshold and the next one is returned; heavy CPU or memory
// load returns tasks; queued tasks come out in order with their fields; done
// reports become success completions carrying the result, and take priority
// over a pending immediate completion; after "off" tasks are returned again.
module tb_task_scheduler;
  import csrspp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, load_valid, task_valid, task_ready;
  logic done_valid, done_ready, cpl_valid, cpl_ready, lrsdp_on;
  parsed_cmd_t cmd; load_rpt_t load; task_t task_out; cpl_t cpl;
  logic [15:0] done_cid; logic [31:0] done_result;
  logic [3:0] qdepth; logic [31:0] n_accepted, n_returned;

  task_scheduler #(.QDEPTH(8), .QTHRESH(4), .CPU_MAX(80), .MEM_MAX(80)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(cmd_kind_e k, int cid);
    @(negedge clk);
    cmd = '0; cmd.kind = k; cmd.cid = 16'(cid);
    cmd.task_type = 8'(cid); cmd.lba = 64'(cid) << 12; cmd.task_len = 32'(cid * 3);
    cmd_valid = 1;
    #1 while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk); cmd_valid = 0;
  endtask

  task automatic expect_cpl(int cid, cpl_status_e st, logic [31:0] dw0, string what);
    int n = 0;
    #1;
    while (!(cpl_valid && cpl_ready) && n < 50) begin @(negedge clk); #1; n++; end
    check(cpl_valid && cpl.cid == 16'(cid) && cpl.status == st && cpl.dw0 == dw0,
          $sformatf("%s: cid %0d status %0h dw0 %0h", what, cpl.cid, cpl.status, cpl.dw0));
    @(negedge clk);
  endtask

  task automatic set_load(int cpu, int mem);
    @(negedge clk); load_valid = 1; load = '{mem_pct: 8'(mem), cpu_pct: 8'(cpu)};
    @(negedge clk); load_valid = 0;
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; load_valid = 0; load = '0; task_ready = 0;
    done_valid = 0; done_cid = 0; done_result = 0; cpl_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;

    send(CMD_TASK, 1);      expect_cpl(1, ST_NOT_STARTED, 0, "task while off");
    set_load(30, 40);
    send(CMD_HEARTBEAT, 2); expect_cpl(2, ST_SUCCESS, {15'h0, 1'b0, 8'd40, 8'd30}, "heartbeat off");
    send(CMD_LRSDP_ON, 3);  expect_cpl(3, ST_SUCCESS, 0, "on");
    check(lrsdp_on, "processing on");
    send(CMD_HEARTBEAT, 4); expect_cpl(4, ST_SUCCESS, {15'h0, 1'b1, 8'd40, 8'd30}, "heartbeat on");
    for (int i = 10; i < 14; i++) send(CMD_TASK, i);
    repeat (2) @(negedge clk);
    check(qdepth == 4 && !cpl_valid, "four tasks queued, no completion");
    send(CMD_TASK, 14);     expect_cpl(14, ST_QUEUE_FULL, 0, "queue over threshold");
    // drain the queue, checking order and fields
    for (int i = 10; i < 14; i++) begin
      @(negedge clk); task_ready = 1; #1;
      check(task_valid && task_out.cid == 16'(i) && task_out.task_type == 8'(i)
            && task_out.lba == 64'(i) << 12 && task_out.task_len == 32'(i * 3), "task order and fields");
      @(negedge clk); task_ready = 0;
    end
    check(qdepth == 0, "queue empty");
    // done reports become completions
    @(negedge clk); done_valid = 1; done_cid = 16'd11; done_result = 32'hCAFE;
    #1 check(cpl_valid && cpl.cid == 16'd11 && cpl.status == ST_SUCCESS && cpl.dw0 == 32'hCAFE && done_ready, "done completion");
    @(negedge clk); done_valid = 0;
    // heavy load returns tasks
    set_load(95, 10);
    send(CMD_TASK, 20);     expect_cpl(20, ST_LOAD_HEAVY, 0, "cpu heavy");
    set_load(10, 81);
    send(CMD_TASK, 21);     expect_cpl(21, ST_LOAD_HEAVY, 0, "memory heavy");
    set_load(80, 80);
    send(CMD_TASK, 22);
    repeat (2) @(negedge clk);
    check(qdepth == 1 && !cpl_valid, "load at limit still accepted");
    // done report has priority over a pending immediate completion
    cpl_ready = 0;
    send(CMD_HEARTBEAT, 23);
    @(negedge clk); done_valid = 1; done_cid = 16'd22; done_result = 32'h5;
    #1 check(cpl.cid == 16'd22 && cpl.dw0 == 32'h5, "done first");
    cpl_ready = 1;
    @(negedge clk); done_valid = 0;
    expect_cpl(23, ST_SUCCESS, {15'h0, 1'b1, 8'd80, 8'd80}, "pending heartbeat after done");
    send(CMD_LRSDP_OFF, 24); expect_cpl(24, ST_SUCCESS, 0, "off");
    check(!lrsdp_on, "processing off");
    send(CMD_TASK, 25);     expect_cpl(25, ST_NOT_STARTED, 0, "task after off");
    check(n_accepted == 5 && n_returned == 5, $sformatf("counters %0d %0d", n_accepted, n_returned));
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
