// csrspp_pkg: types and constants shared by the computable-storage SSD front end
// (submission-queue doorbell, NVMe command parser, task scheduler), the inter-core
// I/O message handler and the convolution accelerator.
//
// The 64-byte NVMe submission-queue entry is laid out as eight 8-byte rows:
// opcode, flags, command id and namespace id in the first row, a reserved row,
// the metadata pointer, two PRP entries and three reserved rows, the last of
// which hold command dwords 10..15. Byte 0 of the entry sits in bits [7:0]
// (NVMe is little-endian), so the packed struct lists the fields from the top
// byte down. Command dwords 10 and 11 carry the starting LBA of read/write
// commands; dwords 12..15 are free for the vendor commands defined here.
//
// The NVMe standard reserves opcodes from 0x80 up for vendors. The four
// vendor opcodes below (heartbeat, processing off, processing on, compute task
// delivery) are this design's own numbering; so are the completion status codes.
// The completion-queue entry follows the NVMe layout.
package csrspp_pkg;

  // ---------------------------------------------------------------- NVMe entry
  typedef struct packed {
    logic [31:0] cdw15;
    logic [31:0] cdw14;
    logic [31:0] cdw13;
    logic [31:0] cdw12;
    logic [31:0] cdw11;     // LBA[63:32] in read/write commands
    logic [31:0] cdw10;     // LBA[31:0] in read/write commands
    logic [63:0] prp2;
    logic [63:0] prp1;
    logic [63:0] mptr;
    logic [63:0] rsvd;      // command dwords 2..3
    logic [31:0] nsid;
    logic [15:0] cid;
    logic [7:0]  flags;
    logic [7:0]  opcode;
  } nvme_sqe_t;             // 512 bits = 64 B

  localparam int unsigned SQE_BYTES = 64;

  // NVM command set opcodes that the parser recognises by name
  localparam logic [7:0] OPC_FLUSH = 8'h00;
  localparam logic [7:0] OPC_WRITE = 8'h01;
  localparam logic [7:0] OPC_READ  = 8'h02;

  // Vendor opcodes (>= 0x80) added for the in-storage processing system
  localparam logic [7:0] OPC_VENDOR_BASE = 8'h80;
  localparam logic [7:0] OPC_HEARTBEAT   = 8'h81;
  localparam logic [7:0] OPC_LRSDP_OFF   = 8'h82;
  localparam logic [7:0] OPC_LRSDP_ON    = 8'h83;
  localparam logic [7:0] OPC_TASK        = 8'h84;

  typedef enum logic [2:0] {
    CMD_IO_READ,
    CMD_IO_WRITE,
    CMD_IO_OTHER,       // any other standard command: handled by the firmware path
    CMD_HEARTBEAT,
    CMD_LRSDP_OFF,
    CMD_LRSDP_ON,
    CMD_TASK,
    CMD_VENDOR_UNKNOWN  // reserved vendor opcode with no meaning here
  } cmd_kind_e;

  // Parsed command as handed from the parser to the firmware path or the scheduler
  typedef struct packed {
    cmd_kind_e   kind;
    logic [7:0]  opcode;
    logic [15:0] cid;
    logic [31:0] nsid;
    logic [63:0] lba;       // cdw11:cdw10
    logic [63:0] prp1;
    logic [63:0] prp2;
    logic [7:0]  task_type; // cdw12[7:0] of a compute task
    logic [23:0] task_arg;  // cdw12[31:8]
    logic [31:0] task_len;  // cdw13: amount of data the task works on
  } parsed_cmd_t;

  // Compute task as queued for the in-storage processing side
  typedef struct packed {
    logic [15:0] cid;
    logic [7:0]  task_type;
    logic [23:0] task_arg;
    logic [63:0] lba;
    logic [31:0] task_len;
  } task_t;

  // ---------------------------------------------------------------- completions
  typedef enum logic [7:0] {
    ST_SUCCESS      = 8'h00,
    ST_INVALID_OPC  = 8'h01,
    ST_NOT_STARTED  = 8'hC0,  // processing system is off: task goes back to the host
    ST_QUEUE_FULL   = 8'hC1,  // waiting queue above threshold: task goes back
    ST_LOAD_HEAVY   = 8'hC2   // reported load too high: task goes back
  } cpl_status_e;

  typedef struct packed {
    logic [15:0]  cid;
    cpl_status_e  status;
    logic [31:0]  dw0;      // command specific result (heartbeat: load report)
  } cpl_t;

  // 16-byte completion-queue entry as written to host memory, dword 0 in
  // bits [31:0]. The 15-bit status field is {DNR, M, CRD[1:0], SCT[2:0],
  // SC[7:0]}; the vendor status codes above are posted with status code type 7
  // (vendor specific), the others with type 0 (generic).
  localparam int unsigned CQE_BYTES = 16;
  typedef struct packed {
    logic [14:0] status;
    logic        phase;
    logic [15:0] cid;
    logic [15:0] sqid;
    logic [15:0] sqhd;
    logic [31:0] rsvd;
    logic [31:0] dw0;
  } nvme_cqe_t;

  // Load report sent periodically by the processing cores
  typedef struct packed {
    logic [7:0] mem_pct;   // memory usage, percent
    logic [7:0] cpu_pct;   // CPU usage, percent
  } load_rpt_t;

  // ---------------------------------------------------------------- inter-core
  // Short message written to the firmware core's data register with the IPI
  localparam logic [31:0] IPC_MAGIC = 32'h4C52_5344;

  // One element of the request array in the long message (packet B)
  typedef struct packed {
    logic [7:0]  opcode;     // taken from the packet header
    logic [31:0] lba;
    logic [31:0] paddr;      // DRAM address of the data
    logic [31:0] nsect;      // number of sectors
  } ftl_req_t;

  localparam logic [7:0] IPC_OP_READ  = 8'h01;
  localparam logic [7:0] IPC_OP_WRITE = 8'h02;

endpackage
