// tb_csrspp_top: end-to-end test of the computable-storage SSD logic at its
// default sizes (8 cores, 8 lanes, 576 taps, 64 channels, 64-entry queue).
//
// Models around the top:
//  - host: a 64-entry submission queue in host memory, doorbell writes, a DMA
//    engine that serves fetches after a short delay, a completion queue in
//    host memory that the host scans by phase tag (checking the expected
//    status and result of every command id) before writing the head doorbell;
//  - firmware: takes standard commands with random back-pressure, checks
//    their LBAs and completes them in order; an FTL that accepts block
//    requests and completes them later;
//  - processing cores: periodic load reports, and a task loop that takes a
//    queued task, runs one accelerator batch for it (feature map, weights of
//    the next batch loaded while the current one runs, BN parameters), checks
//    the result RAM against a software model, writes the results to flash
//    through the inter-core message path, and reports the task done with a
//    checksum of its activations as result.
// The command sequence makes every mechanism happen: task while off, on/off,
// heartbeat, unknown vendor opcode, standard reads, queue over threshold,
// heavy load, a wrong magic number, an out-of-range doorbell, the queue
// wrapping, the completion queue wrapping and running full while the host
// stops reading it, weights loaded during a batch, ReLU zeroing and clamping,
// 2x2 max pooling over pairs of batches. Each is
// counted and a mechanism that never happened is a failure.
module tb_csrspp_top;
  import csrspp_pkg::*;

  localparam int N = 8, W = 8, M = 8, T = 576, CH = 64, QS = 64, WPL = 8, WD = T / WPL;
  localparam logic [63:0] SQB = 64'h0000_0002_0000_0000;
  localparam logic [63:0] CQB = 64'h0000_0002_0001_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT ports
  logic db_we, db_error, fetch_req, fetch_gnt, fetch_rvalid, sq_empty;
  logic [15:0] db_tail; logic [63:0] fetch_addr; nvme_sqe_t fetch_rdata;
  logic cqw_req, cqw_gnt, cq_hd_we, cq_hd_error, cq_irq, cq_full; logic [63:0] cqw_addr; nvme_cqe_t cqw_data;
  logic [15:0] cq_hd_head; logic fw_cpl_valid, fw_cpl_ready; cpl_t fw_cpl;
  logic [5:0] sq_tail, cq_tail, cq_head; logic cq_phase;
  logic fw_valid, fw_ready; parsed_cmd_t fw_cmd;
  logic load_valid; load_rpt_t load; logic task_valid, task_ready; task_t task_out;
  logic done_valid, done_ready, lrsdp_on; logic [15:0] done_cid; logic [31:0] done_result;
  logic [4:0] task_qdepth; logic [31:0] tasks_accepted, tasks_returned;
  logic msg_valid, msg_ready, mem_req, mem_gnt, mem_rvalid; logic [31:0] msg_magic, msg_addr, mem_addr, mem_rdata;
  logic ftl_valid, ftl_ready, ftl_done, ipi_out, ipc_bad_magic, ipc_busy; ftl_req_t ftl_req;
  logic [15:0] ipi_count; logic [7:0] ipi_opcode;
  logic fm_we, wl_valid, wl_ready, bp_we, acc_start, acc_busy, acc_done, act_valid;
  logic pool_row_odd, pool_valid; logic [5:0] pool_ch; logic [15:0] pool_grp; logic signed [7:0] pool_act [M/2];
  logic [9:0] fm_addr; logic [6:0] wl_addr; logic signed [7:0] fm_data [W], act [M]; logic [WPL*8-1:0] wl_data;
  logic [7:0] wl_kidx; logic [5:0] bp_ch, acc_ch_base, act_ch; logic signed [15:0] bp_scale; logic signed [31:0] bp_shift;
  logic [9:0] acc_ntaps; logic [15:0] act_grp; logic [5:0] rr_addr; logic [M*8-1:0] rr_data;

  csrspp_top dut (.*, .sq_base(SQB), .cq_base(CQB));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------------------------------------------------------- host
  nvme_sqe_t sq [QS];
  int sq_tail_i = 0, n_cmds = 0;
  cpl_status_e exp_st [int];
  logic [31:0] exp_dw0 [int];
  bit exp_dw0_known [int];
  int n_cpl = 0;

  // mechanism counters
  int c_not_started = 0, c_qfull = 0, c_heavy = 0, c_badopc = 0, c_fw = 0, c_hb = 0;
  int c_task_ok = 0, c_bad_magic = 0, c_db_err = 0, c_wrap = 0, c_dbuf = 0, c_zero = 0, c_clamp = 0;
  int c_batch = 0, c_ipc = 0, c_irq = 0, c_cq_wrap = 0, c_cq_full = 0, c_cq_bad = 0;

  function automatic nvme_sqe_t mk(logic [7:0] opc, int cid, int arg);
    nvme_sqe_t e;
    e = '0;
    e.opcode = opc; e.cid = 16'(cid); e.nsid = 32'd1;
    e.cdw10 = 32'(arg * 8); e.cdw11 = 32'h0;
    e.cdw12 = 32'(arg); e.cdw13 = 32'(arg * 512);
    e.prp1  = 64'h0000_0003_0000_0000 + 64'(cid) * 4096;
    return e;
  endfunction

  task automatic push_cmd(nvme_sqe_t e);
    sq[sq_tail_i] = e;
    sq_tail_i = (sq_tail_i + 1) % QS;
    if (sq_tail_i == 0) c_wrap++;
    n_cmds++;
  endtask

  task automatic ring();
    @(negedge clk); db_we = 1; db_tail = 16'(sq_tail_i);
    @(negedge clk); db_we = 0;
  endtask

  task automatic expect_cmd(int cid, cpl_status_e st, logic [31:0] dw0, bit known);
    exp_st[cid] = st; exp_dw0[cid] = dw0; exp_dw0_known[cid] = known;
  endtask

  task automatic wait_cpl(int n);
    int t0;
    t0 = cyc;
    while (n_cpl < n && cyc - t0 < 200000) @(negedge clk);
  endtask

  // DMA engine
  int dma_slot = -1, dma_d = 0;
  always_ff @(posedge clk) begin
    fetch_gnt    <= 1'b1;
    fetch_rvalid <= 1'b0;
    if (fetch_req && fetch_gnt) begin
      dma_slot <= int'((fetch_addr - SQB) / 64); dma_d <= 2;
    end else if (dma_slot >= 0) begin
      if (dma_d == 0) begin fetch_rvalid <= 1'b1; fetch_rdata <= sq[dma_slot]; dma_slot <= -1; end
      else dma_d <= dma_d - 1;
    end
  end

  // completion checker
  // host completion queue: the device writes entries into host memory, the
  // host finds new ones by their phase tag and writes the head doorbell
  nvme_cqe_t cq_mem [QS];
  int cq_dev_tail = 0, cq_host_head = 0;
  bit cq_host_phase = 1, cq_pause = 0;
  always @(posedge clk) if (rst_n) begin
    if (cqw_req && cqw_gnt) begin
      if (cqw_addr != CQB + 64'(cq_dev_tail) * 16) c_cq_bad++;
      cq_mem[cq_dev_tail] <= cqw_data;
      cq_dev_tail = (cq_dev_tail + 1) % QS;
    end
    if (cq_irq) c_irq++;
    if (cq_full) c_cq_full++;
  end
  always_ff @(posedge clk) cqw_gnt <= ($urandom_range(0, 3) != 0);

  initial begin
    cq_hd_we = 0; cq_hd_head = 0;
    forever begin
      @(negedge clk);
      cq_hd_we = 0;
      if (rst_n && !cq_pause && cq_mem[cq_host_head].phase == cq_host_phase) begin
        consume(cq_mem[cq_host_head]);
        cq_host_head = (cq_host_head + 1) % QS;
        if (cq_host_head == 0) begin cq_host_phase = !cq_host_phase; c_cq_wrap++; end
        cq_hd_we = 1; cq_hd_head = 16'(cq_host_head);
      end
    end
  end

  task automatic consume(nvme_cqe_t e);
    int cid;
    cpl_t cq_cpl;
    cid = int'(e.cid);
    cq_cpl.cid = e.cid; cq_cpl.status = cpl_status_e'(e.status[7:0]); cq_cpl.dw0 = e.dw0;
    check(e.status[14:8] == ((e.status[7:0] >= 8'hC0) ? 7'd7 : 7'd0) && e.sqid == 16'd1 && 32'(e.sqhd) < QS,
          $sformatf("cid %0d entry status type, queue id and head", cid));
    if (!exp_st.exists(cid)) check(0, $sformatf("unexpected completion cid %0d", cid));
    else begin
      check(cq_cpl.status == exp_st[cid], $sformatf("cid %0d status %0h expected %0h", cid, cq_cpl.status, exp_st[cid]));
      if (exp_dw0_known[cid]) check(cq_cpl.dw0 == exp_dw0[cid], $sformatf("cid %0d dw0 %0h expected %0h", cid, cq_cpl.dw0, exp_dw0[cid]));
      unique case (cq_cpl.status)
        ST_NOT_STARTED: c_not_started++;
        ST_QUEUE_FULL:  c_qfull++;
        ST_LOAD_HEAVY:  c_heavy++;
        ST_INVALID_OPC: c_badopc++;
        default: ;
      endcase
      exp_st.delete(cid);
    end
    n_cpl++;
  endtask
  always_ff @(posedge clk) if (rst_n && db_error) c_db_err++;

  // firmware: standard commands
  cpl_t fw_q[$];
  always_ff @(posedge clk) fw_ready <= ($urandom_range(0, 1) != 0);
  always @(posedge clk) if (rst_n && fw_valid && fw_ready) begin
    check(fw_cmd.kind == CMD_IO_READ && fw_cmd.lba == 64'(fw_cmd.cid) * 8, "standard read forwarded with its LBA");
    c_fw++;
    expect_cmd(int'(fw_cmd.cid), ST_SUCCESS, 32'(fw_cmd.lba), 1);
    fw_q.push_back('{cid: fw_cmd.cid, status: ST_SUCCESS, dw0: 32'(fw_cmd.lba)});
  end
  // the firmware completes standard commands in order, after a while
  always @(posedge clk) if (rst_n && fw_cpl_valid && fw_cpl_ready) void'(fw_q.pop_front());
  always @(negedge clk) begin
    fw_cpl_valid = (fw_q.size() > 0);
    fw_cpl = (fw_q.size() > 0) ? fw_q[0] : '0;
  end

  // ---------------------------------------------------------------- FTL and DRAM models
  logic [31:0] dram [logic [31:0]];
  int ftl_out = 0, ftl_t = 0;
  ftl_req_t ftl_got[$];
  always_ff @(posedge clk) begin
    ftl_ready <= ($urandom_range(0, 1) != 0);
    ftl_done  <= 1'b0;
    if (ftl_valid && ftl_ready) ftl_got.push_back(ftl_req);
    if (ftl_out > 0 && ftl_t == 0) begin ftl_done <= 1'b1; ftl_t <= $urandom_range(2, 8); end
    else if (ftl_t > 0) ftl_t <= ftl_t - 1;
    ftl_out <= ftl_out + ((ftl_valid && ftl_ready) ? 1 : 0) - ((ftl_out > 0 && ftl_t == 0) ? 1 : 0);
  end
  logic [31:0] m_pend; int m_d = -1;
  always_ff @(posedge clk) begin
    mem_gnt <= 1'b1; mem_rvalid <= 1'b0;
    if (mem_req && mem_gnt) begin m_pend <= mem_addr; m_d <= 3; end
    else if (m_d == 0) begin
      mem_rvalid <= 1'b1; mem_rdata <= dram.exists(m_pend) ? dram[m_pend] : 32'h0; m_d <= -1;
    end else if (m_d > 0) m_d <= m_d - 1;
  end
  always_ff @(posedge clk) if (rst_n && ipc_bad_magic) c_bad_magic++;

  // ---------------------------------------------------------------- accelerator data
  logic signed [7:0] fm [T][W];
  longint sc [CH], sh [CH];

  function automatic logic signed [7:0] wt(int ch, int t);
    return 8'((ch * 131 + t * 71 + ch * t * 13) % 251 - 125);
  endfunction

  function automatic int model(int ch, int w, int nt);
    longint acc, y;
    acc = 0;
    for (int t = 0; t < nt; t++) acc += longint'(fm[t][w]) * longint'(wt(ch, t));
    y = (acc * sc[ch] + sh[ch]) >>> 8;
    return (y <= 0) ? 0 : (y >= 127) ? 127 : int'(y);
  endfunction

  // background weight loader: loads N kernels starting at channel wl_ch0
  int wl_ch0 = -1, wl_i = 0;
  always @(negedge clk) begin
    wl_valid <= 1'b0;
    if (wl_ch0 >= 0 && wl_i < N * WD) begin
      wl_valid <= 1'b1; wl_kidx <= 8'(wl_i / WD); wl_addr <= 7'(wl_i % WD);
      for (int j = 0; j < WPL; j++) wl_data[j*8 +: 8] <= wt(wl_ch0 + wl_i / WD, (wl_i % WD) * WPL + j);
    end
  end
  always @(posedge clk) if (wl_valid && wl_ready && wl_ch0 >= 0) begin
    wl_i++;
    if (acc_busy) c_dbuf++;
  end

  // ---------------------------------------------------------------- pooling
  // every CH/N batches cover all channels of one output row; rows alternate
  // between first and second row of a pooling pair; the
  // model keeps the horizontal maxima of first rows per channel and checks
  // the pooled words against the activation stream it observed
  logic signed [7:0] pool_lb [CH][M/2];
  logic signed [7:0] pool_exp [$][M/2];
  bit pool_have [CH];                     // first row of this channel seen
  bit pool_chk [$];
  int c_pool = 0, c_pool_bad = 0;
  int pool_nst = 0;
  always @(posedge clk) begin
    if (!rst_n) pool_row_odd <= 1'b0;
    else if (acc_start && !acc_busy) begin
      pool_row_odd <= ((pool_nst / (CH / N)) % 2 == 1);   // one row = all 64 channels
      pool_nst++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (act_valid) begin
      logic signed [7:0] h [M/2];
      for (int i = 0; i < M / 2; i++) h[i] = (act[2*i] > act[2*i+1]) ? act[2*i] : act[2*i+1];
      if (!pool_row_odd) begin pool_lb[act_ch] = h; pool_have[act_ch] = 1; end
      else begin
        for (int i = 0; i < M / 2; i++) if (pool_lb[act_ch][i] > h[i]) h[i] = pool_lb[act_ch][i];
        pool_exp.push_back(h);
        pool_chk.push_back(pool_have[act_ch]);
      end
    end
    if (pool_valid) begin
      if (pool_exp.size() == 0) c_pool_bad++;
      else begin
        if (pool_chk[0]) begin
          if (pool_act != pool_exp[0]) c_pool_bad++;
          c_pool++;
        end
        void'(pool_exp.pop_front());
        void'(pool_chk.pop_front());
      end
    end
  end

  // ---------------------------------------------------------------- processing cores
  int next_ch0 = 0;
  int task_ntaps [int];      // expected task results, by cid
  logic [31:0] task_sum [int];

  // compute the expected checksum of the batch a task will run
  function automatic logic [31:0] batch_sum(int ch0, int nt);
    logic [31:0] s = 0;
    for (int n = 0; n < N; n++) for (int w = 0; w < W; w++) s += 32'(model(ch0 + n, w, nt));
    return s;
  endfunction

  task automatic run_task(task_t tk);
    int ch0, nt, lat, c0;
    logic [31:0] s;
    bit ok;
    ch0 = next_ch0;
    nt  = (tk.cid == 16'd10) ? T : 20 + int'(tk.task_type);
    // weights of this batch must be complete before start
    while (wl_i < N * WD) @(negedge clk);
    @(negedge clk); acc_start = 1; acc_ntaps = 10'(nt); acc_ch_base = 6'(ch0);
    c0 = cyc;
    @(negedge clk); acc_start = 0;
    next_ch0 = (ch0 + N) % CH;
    wl_i = 0; wl_ch0 = next_ch0;           // preload the next batch during this one
    while (!acc_done) @(negedge clk);
    lat = cyc - c0;
    check(lat == nt + N + N * (W / M) + 4, $sformatf("batch latency %0d", lat));
    c_batch++;
    // read back and check the result RAM
    s = 0; ok = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk); rr_addr = 6'(ch0 + n);
      @(negedge clk);
      for (int w = 0; w < W; w++) begin
        int a, e;
        a = int'($signed(rr_data[w*8 +: 8]));
        e = model(ch0 + n, w, nt);
        if (a != e) ok = 0;
        if (e == 0) c_zero++; else if (e == 127) c_clamp++;
        s += 32'(a);
      end
    end
    check(ok, $sformatf("result RAM of task %0d", tk.cid));
    // write the results to flash through the inter-core path
    begin
      logic [31:0] pb;
      int n_el;
      pb = 32'h4000_0000 + 32'(tk.cid) * 32'h100;
      n_el = 2;
      dram[pb] = {IPC_OP_WRITE, 8'h0, 16'(n_el)};
      for (int i = 0; i < n_el; i++) begin
        dram[pb + 4 + 12 * i]  = tk.lba[31:0] + 32'(i);
        dram[pb + 8 + 12 * i]  = 32'h5000_0000 + 32'(i) * 512;
        dram[pb + 12 + 12 * i] = 32'd1;
      end
      ftl_got.delete();
      @(negedge clk); msg_valid = 1; msg_magic = IPC_MAGIC; msg_addr = pb;
      #1 while (!msg_ready) begin @(negedge clk); #1; end
      @(negedge clk); msg_valid = 0;
      while (!ipi_out) @(negedge clk);
      check(ipi_count == 16'(n_el) && ftl_got.size() == n_el && ftl_out == 0, "inter-core write completed");
      for (int i = 0; i < n_el && i < ftl_got.size(); i++)
        check(ftl_got[i].lba == tk.lba[31:0] + 32'(i) && ftl_got[i].opcode == IPC_OP_WRITE, "FTL request");
      c_ipc++;
    end
    // report done
    @(negedge clk); done_valid = 1; done_cid = tk.cid; done_result = s;
    #1 while (!done_ready) begin @(negedge clk); #1; end
    @(negedge clk); done_valid = 0;
    c_task_ok++;
  endtask

  bit lrsdp_run = 0;
  initial begin
    task_t tk;
    task_ready = 0;
    forever begin
      @(negedge clk);
      if (lrsdp_run && task_valid) begin
        tk = task_out;
        task_ready = 1; @(negedge clk); task_ready = 0;
        run_task(tk);
      end
    end
  end

  task automatic report_load(int cpu, int mem);
    @(negedge clk); load_valid = 1; load = '{mem_pct: 8'(mem), cpu_pct: 8'(cpu)};
    @(negedge clk); load_valid = 0;
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    int base_cpl, ch;
    db_we = 0; db_tail = 0; load_valid = 0; load = '0; done_valid = 0; done_cid = 0; done_result = 0;
    msg_valid = 0; msg_magic = 0; msg_addr = 0;
    fm_we = 0; fm_addr = 0; bp_we = 0; bp_ch = 0; bp_scale = 0; bp_shift = 0;
    acc_start = 0; acc_ntaps = 0; acc_ch_base = 0; rr_addr = 0;
    foreach (fm_data[w]) fm_data[w] = 0;
    foreach (sq[i]) sq[i] = '0;
    foreach (cq_mem[i]) cq_mem[i] = '0;
    foreach (pool_lb[c, i]) pool_lb[c][i] = '0;
    foreach (pool_have[c]) pool_have[c] = 0;
    foreach (fm[t, w]) fm[t][w] = 8'($urandom);
    for (int c = 0; c < CH; c++) begin
      sc[c] = (c % 2 == 0) ? 1 : longint'($urandom_range(1, 30));
      sh[c] = longint'($urandom_range(0, 40000)) - 20000;
    end
    repeat (4) @(negedge clk); rst_n = 1;

    // load the feature map, BN parameters and first batch weights
    for (int t = 0; t < T; t++) begin
      @(negedge clk); fm_we = 1; fm_addr = 10'(t);
      for (int w = 0; w < W; w++) fm_data[w] = fm[t][w];
    end
    @(negedge clk); fm_we = 0;
    for (int c = 0; c < CH; c++) begin
      @(negedge clk); bp_we = 1; bp_ch = 6'(c); bp_scale = 16'(sc[c]); bp_shift = 32'(sh[c]);
    end
    @(negedge clk); bp_we = 0;
    wl_i = 0; wl_ch0 = 0;
    report_load(20, 30);

    // 1: task while off, on, heartbeat, unknown vendor opcode, a standard read
    push_cmd(mk(OPC_TASK, 1, 0));        expect_cmd(1, ST_NOT_STARTED, 0, 1);
    push_cmd(mk(OPC_LRSDP_ON, 2, 0));    expect_cmd(2, ST_SUCCESS, 0, 1);
    push_cmd(mk(OPC_HEARTBEAT, 3, 0));   expect_cmd(3, ST_SUCCESS, {15'h0, 1'b1, 8'd30, 8'd20}, 1);
    push_cmd(mk(8'h9A, 4, 0));           expect_cmd(4, ST_INVALID_OPC, 0, 1);
    push_cmd(mk(OPC_READ, 5, 5));
    ring();
    wait_cpl(5);
    c_hb++;
    // 2: thirteen tasks while the processing side is not taking any
    for (int i = 0; i < 13; i++) begin
      int cid;
      cid = 10 + i;
      push_cmd(mk(OPC_TASK, cid, 100 + i));
      if (i < 12) begin
        ch = (i * N) % CH;
        expect_cmd(cid, ST_SUCCESS, 0, 0);   // result checked below
        task_ntaps[cid] = (cid == 10) ? T : 20 + (100 + i) % 256;
        task_sum[cid] = batch_sum(ch, task_ntaps[cid]);
        exp_dw0[cid] = task_sum[cid]; exp_dw0_known[cid] = 1;
      end else expect_cmd(cid, ST_QUEUE_FULL, 0, 1);
    end
    base_cpl = n_cpl;
    ring();
    wait_cpl(base_cpl + 1);                  // the pushed-back task
    check(task_qdepth == 5'd12, $sformatf("queue depth %0d", task_qdepth));
    // 3: an out-of-range doorbell and a message with a wrong magic number
    @(negedge clk); db_we = 1; db_tail = 16'd100;
    @(negedge clk); db_we = 0;
    @(negedge clk); msg_valid = 1; msg_magic = 32'hBAD0_BAD0; msg_addr = 32'h4000_0000;
    @(negedge clk); msg_valid = 0;
    // 4: let the processing cores work through the queue
    lrsdp_run = 1;
    wait_cpl(base_cpl + 13);
    // 5: heavy load, then normal load again
    report_load(95, 30);
    push_cmd(mk(OPC_TASK, 30, 3));       expect_cmd(30, ST_LOAD_HEAVY, 0, 1);
    ring();
    wait_cpl(n_cmds);
    report_load(10, 10);
    push_cmd(mk(OPC_TASK, 31, 7));
    expect_cmd(31, ST_SUCCESS, batch_sum(next_ch0, 27), 1);
    ring();
    wait_cpl(n_cmds);
    // 6: off, then a task is returned again
    push_cmd(mk(OPC_LRSDP_OFF, 40, 0));  expect_cmd(40, ST_SUCCESS, 0, 1);
    push_cmd(mk(OPC_TASK, 41, 0));       expect_cmd(41, ST_NOT_STARTED, 0, 1);
    // 7: standard reads until the queue wraps around
    //    with the host not reading completions, so the completion queue fills
    cq_pause = 1;
    while (n_cmds < QS + 6) push_cmd(mk(OPC_READ, 100 + n_cmds, 100 + n_cmds));
    ring();
    while (!sq_empty) @(negedge clk);
    repeat (20) @(negedge clk);
    while (n_cmds < QS + 26) push_cmd(mk(OPC_READ, 100 + n_cmds, 100 + n_cmds));
    ring();
    for (int i = 0; i < 20000 && c_cq_full == 0; i++) @(negedge clk);
    repeat (50) @(negedge clk);
    cq_pause = 0;
    wait_cpl(n_cmds);
    repeat (10) @(negedge clk);

    check(n_cpl == n_cmds, $sformatf("all %0d commands completed (%0d)", n_cmds, n_cpl));
    check(exp_st.size() == 0, "no completion missing");
    check(tasks_accepted == 13 && tasks_returned == 4, $sformatf("scheduler counters %0d %0d", tasks_accepted, tasks_returned));
    check(sq_empty && !lrsdp_on, "idle at the end");
    $display("mechanisms: not_started=%0d queue_full=%0d load_heavy=%0d bad_opcode=%0d fw_reads=%0d heartbeat=%0d",
             c_not_started, c_qfull, c_heavy, c_badopc, c_fw, c_hb);
    $display("            tasks_done=%0d batches=%0d ipc_writes=%0d bad_magic=%0d doorbell_errors=%0d queue_wraps=%0d",
             c_task_ok, c_batch, c_ipc, c_bad_magic, c_db_err, c_wrap);
    $display("            weights_loaded_during_batch=%0d relu_zero=%0d clamp_127=%0d", c_dbuf, c_zero, c_clamp);
    $display("            cq_interrupts=%0d cq_wraps=%0d cq_full_cycles=%0d pooled=%0d", c_irq, c_cq_wrap, c_cq_full, c_pool);
    check(c_not_started > 0, "task returned while off");
    check(c_qfull > 0, "task returned on queue depth");
    check(c_heavy > 0, "task returned on heavy load");
    check(c_badopc > 0, "unknown vendor opcode");
    check(c_fw > 0, "standard command forwarded");
    check(c_hb > 0, "heartbeat");
    check(c_task_ok == 13 && c_batch == 13 && c_ipc == 13, "tasks processed");
    check(c_bad_magic == 1, "wrong magic dropped");
    check(c_db_err == 1, "out-of-range doorbell");
    check(c_wrap > 0, "submission queue wrapped");
    check(c_dbuf > 0, "weights double buffered");
    check(c_zero > 0 && c_clamp > 0, "ReLU zero and clamp");
    check(c_cq_bad == 0, $sformatf("completion entry addresses (%0d wrong)", c_cq_bad));
    check(c_irq == n_cmds, $sformatf("one interrupt per completion (%0d)", c_irq));
    check(c_cq_wrap > 0, "completion queue wrapped (phase flip)");
    check(c_cq_full > 0, "completion queue ran full");
    check(32'(sq_tail) == sq_tail_i && 32'(cq_tail) == cq_dev_tail && 32'(cq_head) == cq_host_head &&
          cq_phase == cq_host_phase, "queue pointers and phase agree with the host");
    check(c_pool > 0 && c_pool_bad == 0, $sformatf("pooled words %0d, wrong %0d", c_pool, c_pool_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
