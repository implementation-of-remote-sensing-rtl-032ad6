// csrspp_top: the FPGA logic of a computable-storage SSD for remote-sensing data.
//
// The SSD does the image processing itself instead of shipping raw data to the
// host. Three groups of logic sit side by side:
//
//  1. Command front end. The host rings the submission-queue doorbell
//     (nvme_sq_doorbell), the entries are fetched through the NVMe DMA engine
//     and decoded (nvme_cmd_parser). Standard read/write commands leave on the
//     fw_* port for the flash firmware. The vendor commands for the in-storage
//     processing system go to the task scheduler (task_scheduler), which
//     switches processing on and off, answers heartbeats and either queues a
//     compute task for the processing cores (task_* port) or hands it back to
//     the host. Completions of the scheduler, of the firmware (standard I/O)
//     and of unknown vendor commands are merged, in that priority, tagged with
//     the current submission-queue head and written into the host's
//     completion queue (nvme_cq_poster), which raises the host interrupt.
//  2. Inter-core block I/O (ipc_handler): the Linux cores' block driver asks
//     the firmware to read or write flash through a short message plus a
//     request packet in shared DRAM; the handler checks it, feeds the requests
//     to the FTL queue and interrupts back when they are done.
//  3. The convolution accelerator (rsdpa) that the processing cores drive to
//     run the CNN layers of detection and classification tasks; its result RAM
//     is read back by them and the end signal (acc_done) ends a batch. Its
//     activation stream also passes through a 2x2 max-pooling block (max_pool)
//     whose output (pool_*) goes on towards a following block.
//
// Everything the design takes from elsewhere is outside this module and
// reached through ports: the PCIe block and NVMe DMA engine, the ARM cores
// (firmware with its FTL, and Linux with the application manager), the
// interrupt controller, the DRAM controller, the flash controllers and the
// NAND chips. The split into these three groups and the processing that each
// does follow the design; the port protocols are this design's own.
//
// Timing: all logic is on one clock with an active-low asynchronous reset.
module csrspp_top
  import csrspp_pkg::*;
#(
  parameter int unsigned SQ_SIZE  = 64,
  parameter int unsigned CQ_SIZE  = 64,
  parameter int unsigned QDEPTH   = 16,
  parameter int unsigned QTHRESH  = 12,
  parameter int unsigned CPU_MAX  = 80,
  parameter int unsigned MEM_MAX  = 80,
  parameter int unsigned N        = 8,
  parameter int unsigned W        = 8,
  parameter int unsigned M        = 8,
  parameter int unsigned TAPS     = 576,
  parameter int unsigned CH       = 64,
  parameter int unsigned FRAC     = 8,
  parameter int unsigned WPL      = 8,
  localparam int unsigned SQW     = $clog2(SQ_SIZE),
  localparam int unsigned CQW     = $clog2(CQ_SIZE),
  localparam int unsigned WAW     = (TAPS / WPL > 1) ? $clog2(TAPS / WPL) : 1,
  localparam int unsigned AW      = $clog2(TAPS),
  localparam int unsigned TW      = $clog2(TAPS + 1),
  localparam int unsigned CW      = $clog2(CH),
  localparam int unsigned RW      = $clog2(CH * (W / M))
) (
  input  logic                clk,
  input  logic                rst_n,
  // ---- host side: doorbell, command fetch, completions
  input  logic                db_we,
  input  logic [15:0]         db_tail,
  output logic                db_error,
  input  logic [63:0]         sq_base,
  output logic                fetch_req,
  output logic [63:0]         fetch_addr,
  input  logic                fetch_gnt,
  input  logic                fetch_rvalid,
  input  nvme_sqe_t           fetch_rdata,
  output logic                sq_empty,
  output logic [SQW-1:0]      sq_tail,
  input  logic [63:0]         cq_base,
  output logic                cqw_req,
  output logic [63:0]         cqw_addr,
  output nvme_cqe_t           cqw_data,
  input  logic                cqw_gnt,
  input  logic                cq_hd_we,
  input  logic [15:0]         cq_hd_head,
  output logic                cq_hd_error,
  output logic                cq_irq,
  output logic                cq_full,
  output logic [CQW-1:0]      cq_tail,
  output logic [CQW-1:0]      cq_head,
  output logic                cq_phase,
  // ---- standard commands to the flash firmware, and their completions
  output logic                fw_valid,
  output parsed_cmd_t         fw_cmd,
  input  logic                fw_ready,
  input  logic                fw_cpl_valid,
  input  cpl_t                fw_cpl,
  output logic                fw_cpl_ready,
  // ---- processing cores: load reports, task queue, task done
  input  logic                load_valid,
  input  load_rpt_t           load,
  output logic                task_valid,
  output task_t               task_out,
  input  logic                task_ready,
  input  logic                done_valid,
  input  logic [15:0]         done_cid,
  input  logic [31:0]         done_result,
  output logic                done_ready,
  output logic                lrsdp_on,
  output logic [$clog2(QDEPTH+1)-1:0] task_qdepth,
  output logic [31:0]         tasks_accepted,
  output logic [31:0]         tasks_returned,
  // ---- inter-core block I/O
  input  logic                msg_valid,
  input  logic [31:0]         msg_magic,
  input  logic [31:0]         msg_addr,
  output logic                msg_ready,
  output logic                mem_req,
  output logic [31:0]         mem_addr,
  input  logic                mem_gnt,
  input  logic                mem_rvalid,
  input  logic [31:0]         mem_rdata,
  output logic                ftl_valid,
  output ftl_req_t            ftl_req,
  input  logic                ftl_ready,
  input  logic                ftl_done,
  output logic                ipi_out,
  output logic [15:0]         ipi_count,
  output logic [7:0]          ipi_opcode,
  output logic                ipc_bad_magic,
  output logic                ipc_busy,
  // ---- convolution accelerator
  input  logic                fm_we,
  input  logic [AW-1:0]       fm_addr,
  input  logic signed [7:0]   fm_data [W],
  input  logic                wl_valid,
  input  logic [7:0]          wl_kidx,
  input  logic [WAW-1:0]      wl_addr,
  input  logic [WPL*8-1:0]    wl_data,
  output logic                wl_ready,
  input  logic                bp_we,
  input  logic [CW-1:0]       bp_ch,
  input  logic signed [15:0]  bp_scale,
  input  logic signed [31:0]  bp_shift,
  input  logic                acc_start,
  input  logic [TW-1:0]       acc_ntaps,
  input  logic [CW-1:0]       acc_ch_base,
  output logic                acc_busy,
  output logic                acc_done,
  output logic                act_valid,
  output logic [CW-1:0]       act_ch,
  output logic [15:0]         act_grp,
  output logic signed [7:0]   act [M],
  input  logic [RW-1:0]       rr_addr,
  output logic [M*8-1:0]      rr_data,
  // ---- pooling of the activation stream
  input  logic                pool_row_odd,
  output logic                pool_valid,
  output logic [CW-1:0]       pool_ch,
  output logic [15:0]         pool_grp,
  output logic signed [7:0]   pool_act [M/2]
);

  // ------------------------------------------------------------ command front end
  logic      sq_cmd_valid, sq_cmd_ready;
  nvme_sqe_t sq_cmd;
  logic [SQW-1:0] sq_head;

  nvme_sq_doorbell #(.QSIZE(SQ_SIZE)) u_sq (
    .clk, .rst_n,
    .db_we, .db_tail, .db_error, .sq_base,
    .fetch_req, .fetch_addr, .fetch_gnt, .fetch_rvalid, .fetch_rdata,
    .cmd_valid(sq_cmd_valid), .cmd(sq_cmd), .cmd_ready(sq_cmd_ready),
    .sq_head, .sq_tail, .sq_empty
  );

  logic        sch_valid, sch_ready, err_valid, err_ready;
  parsed_cmd_t sch_cmd;
  cpl_t        err_cpl;

  nvme_cmd_parser u_parser (
    .clk, .rst_n,
    .in_valid(sq_cmd_valid), .in_sqe(sq_cmd), .in_ready(sq_cmd_ready),
    .fw_valid, .fw_cmd, .fw_ready,
    .sch_valid, .sch_cmd, .sch_ready,
    .err_valid, .err_cpl, .err_ready
  );

  logic        s_cpl_valid, s_cpl_ready;
  cpl_t        s_cpl;

  task_scheduler #(.QDEPTH(QDEPTH), .QTHRESH(QTHRESH), .CPU_MAX(CPU_MAX), .MEM_MAX(MEM_MAX)) u_sched (
    .clk, .rst_n,
    .cmd_valid(sch_valid), .cmd(sch_cmd), .cmd_ready(sch_ready),
    .load_valid, .load,
    .task_valid, .task_out, .task_ready,
    .done_valid, .done_cid, .done_result, .done_ready,
    .cpl_valid(s_cpl_valid), .cpl(s_cpl), .cpl_ready(s_cpl_ready),
    .lrsdp_on, .qdepth(task_qdepth), .n_accepted(tasks_accepted), .n_returned(tasks_returned)
  );

  // completion merge: scheduler first, then firmware, then unknown-opcode errors
  logic m_valid, m_ready;
  cpl_t m_cpl;

  always_comb begin
    m_valid      = s_cpl_valid || fw_cpl_valid || err_valid;
    m_cpl        = s_cpl_valid ? s_cpl : fw_cpl_valid ? fw_cpl : err_cpl;
    s_cpl_ready  = m_ready;
    fw_cpl_ready = m_ready && !s_cpl_valid;
    err_ready    = m_ready && !s_cpl_valid && !fw_cpl_valid;
  end

  // one I/O queue pair, submission queue id 1
  nvme_cq_poster #(.QSIZE(CQ_SIZE)) u_cq (
    .clk, .rst_n,
    .in_valid(m_valid), .in_cpl(m_cpl), .in_sq_head(16'(sq_head)), .in_sqid(16'd1), .in_ready(m_ready),
    .cq_base,
    .wr_req(cqw_req), .wr_addr(cqw_addr), .wr_data(cqw_data), .wr_gnt(cqw_gnt),
    .hd_we(cq_hd_we), .hd_head(cq_hd_head), .hd_error(cq_hd_error),
    .irq(cq_irq), .cq_tail, .cq_head, .phase(cq_phase), .cq_full
  );

  // ------------------------------------------------------------ inter-core block I/O
  ipc_handler u_ipc (
    .clk, .rst_n,
    .msg_valid, .msg_magic, .msg_addr, .msg_ready,
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ftl_valid, .ftl_req, .ftl_ready, .ftl_done,
    .ipi_out, .ipi_count, .ipi_opcode,
    .bad_magic(ipc_bad_magic), .busy(ipc_busy)
  );

  // ------------------------------------------------------------ accelerator
  rsdpa #(.N(N), .W(W), .M(M), .TAPS(TAPS), .CH(CH), .FRAC(FRAC), .WPL(WPL)) u_rsdpa (
    .clk, .rst_n,
    .fm_we, .fm_addr, .fm_data,
    .wl_valid, .wl_kidx, .wl_addr, .wl_data, .wl_ready,
    .bp_we, .bp_ch, .bp_scale, .bp_shift,
    .start(acc_start), .ntaps(acc_ntaps), .ch_base(acc_ch_base),
    .busy(acc_busy), .done(acc_done),
    .act_valid, .act_ch, .act_grp, .act,
    .rr_addr, .rr_data
  );

  max_pool #(.M(M), .CH(CH), .G(W / M)) u_pool (
    .clk, .rst_n,
    .in_valid(act_valid), .in_ch(act_ch), .in_grp(act_grp), .in_act(act), .row_odd(pool_row_odd),
    .out_valid(pool_valid), .out_ch(pool_ch), .out_grp(pool_grp), .out_act(pool_act)
  );

endmodule
