// task_scheduler: admission control for compute tasks sent to the storage device.
//
// The host sends vendor commands to turn the in-storage processing system on
// or off, to ask for its load (heartbeat) and to deliver compute tasks. The
// processing side reports its CPU and memory usage periodically (load_valid).
// For a compute task the scheduler first checks that processing is switched
// on; if not, the task is returned to the host at once. Otherwise it looks at
// the waiting-queue depth and at the last load report: if the depth has reached
// QTHRESH, or CPU or memory usage is above its limit, the task is also returned
// to the host, which then runs it itself or retries later. Otherwise the task
// is put in the waiting queue, from which the processing side takes it. A
// queued task is completed to the host when the processing side reports it
// done (done_valid).
//
// Timing: one command is taken per cycle while no immediate completion is
// pending; its completion (if any) is offered from the next cycle. Done reports
// have priority over immediate completions on the single completion port.
//
// The decision rule (off -> return; depth over threshold or heavy load ->
// return; else enqueue) is the one the design specifies. The queue size,
// threshold, load limits, status codes and the choice to leave queued tasks
// deliverable after an "off" command are this design's own.
module task_scheduler
  import csrspp_pkg::*;
#(
  parameter int unsigned QDEPTH  = 16,   // waiting-queue entries
  parameter int unsigned QTHRESH = 12,   // depth at which tasks are pushed back
  parameter int unsigned CPU_MAX = 80,   // percent; above this the load is heavy
  parameter int unsigned MEM_MAX = 80    // percent
) (
  input  logic        clk,
  input  logic        rst_n,
  // commands from the parser
  input  logic        cmd_valid,
  input  parsed_cmd_t cmd,
  output logic        cmd_ready,
  // periodic load report from the processing side
  input  logic        load_valid,
  input  load_rpt_t   load,
  // waiting queue towards the processing side
  output logic        task_valid,
  output task_t       task_out,
  input  logic        task_ready,
  // task finished by the processing side
  input  logic        done_valid,
  input  logic [15:0] done_cid,
  input  logic [31:0] done_result,
  output logic        done_ready,
  // completions to the host
  output logic        cpl_valid,
  output cpl_t        cpl,
  input  logic        cpl_ready,
  // state
  output logic        lrsdp_on,
  output logic [$clog2(QDEPTH+1)-1:0] qdepth,
  output logic [31:0] n_accepted,
  output logic [31:0] n_returned
);

  load_rpt_t load_q;
  logic      imm_pend;
  cpl_t      imm_cpl;

  // ---------------------------------------------------------------- decision
  logic   heavy, q_over, push;
  cpl_t   dec_cpl;
  logic   dec_has_cpl;
  task_t  new_task;

  assign heavy = (32'(load_q.cpu_pct) > CPU_MAX) || (32'(load_q.mem_pct) > MEM_MAX);
  assign q_over = (32'(qdepth) >= QTHRESH);

  always_comb begin
    new_task = '{cid: cmd.cid, task_type: cmd.task_type, task_arg: cmd.task_arg,
                 lba: cmd.lba, task_len: cmd.task_len};
    dec_cpl     = '{cid: cmd.cid, status: ST_SUCCESS, dw0: 32'h0};
    dec_has_cpl = 1'b1;
    push        = 1'b0;
    unique case (cmd.kind)
      CMD_HEARTBEAT: dec_cpl.dw0 = {15'h0, lrsdp_on, load_q};
      CMD_LRSDP_OFF, CMD_LRSDP_ON: ;
      CMD_TASK: begin
        if (!lrsdp_on)   dec_cpl.status = ST_NOT_STARTED;
        else if (q_over) dec_cpl.status = ST_QUEUE_FULL;
        else if (heavy)  dec_cpl.status = ST_LOAD_HEAVY;
        else begin
          push        = 1'b1;
          dec_has_cpl = 1'b0;
        end
      end
      default: dec_cpl.status = ST_INVALID_OPC;
    endcase
  end

  wire take = cmd_valid && cmd_ready;
  assign cmd_ready = !imm_pend;

  // ---------------------------------------------------------------- queue
  logic q_wr_ready;
  sync_fifo #(.WIDTH($bits(task_t)), .DEPTH(QDEPTH)) u_waitq (
    .clk, .rst_n,
    .wr_valid (take && push),
    .wr_data  (new_task),
    .wr_ready (q_wr_ready),
    .rd_valid (task_valid),
    .rd_data  (task_out),
    .rd_ready (task_ready),
    .count    (qdepth)
  );

  // ---------------------------------------------------------------- completions
  always_comb begin
    if (done_valid) begin
      cpl_valid = 1'b1;
      cpl       = '{cid: done_cid, status: ST_SUCCESS, dw0: done_result};
    end else begin
      cpl_valid = imm_pend;
      cpl       = imm_cpl;
    end
  end
  assign done_ready = cpl_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lrsdp_on   <= 1'b0;
      load_q     <= '0;
      imm_pend   <= 1'b0;
      imm_cpl    <= '0;
      n_accepted <= '0;
      n_returned <= '0;
    end else begin
      if (load_valid) load_q <= load;
      if (imm_pend && cpl_ready && !done_valid) imm_pend <= 1'b0;
      if (take) begin
        if (cmd.kind == CMD_LRSDP_ON)  lrsdp_on <= 1'b1;
        if (cmd.kind == CMD_LRSDP_OFF) lrsdp_on <= 1'b0;
        if (dec_has_cpl) begin
          imm_pend <= 1'b1;
          imm_cpl  <= dec_cpl;
        end
        if (cmd.kind == CMD_TASK) begin
          if (push) n_accepted <= n_accepted + 1;
          else      n_returned <= n_returned + 1;
        end
      end
    end
  end

  // the threshold keeps the queue from ever being full when a task is pushed
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    take && push |-> q_wr_ready);

endmodule
