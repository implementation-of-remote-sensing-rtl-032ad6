// nvme_cmd_parser: decodes a 64-byte NVMe submission-queue entry and routes it.
//
// The entry's fields are taken apart (opcode, flags, command id, namespace id,
// PRP entries, starting LBA from command dwords 10/11, task fields from dwords
// 12/13) and the command is classified. Standard read, write and other NVM
// commands go to the firmware port, where the flash translation layer serves
// them as on an ordinary SSD. Opcodes from 0x80 up are vendor commands: the
// four defined ones (heartbeat, processing off, processing on, compute task)
// go to the scheduler port; any other vendor opcode is completed at once with
// an invalid-opcode status on the error port.
//
// Timing: a one-entry registered stage. An entry is accepted when in_valid and
// in_ready are both high; the parsed command appears on exactly one output
// port in the next cycle and is held there until that port's ready is high.
// Throughput is one command per cycle when the outputs are always ready.
//
// The field layout and the 0x80 vendor boundary follow the NVMe format the
// design uses; the vendor opcode numbers and where task fields sit in dwords
// 12/13 are this design's own choices (see csrspp_pkg).
module nvme_cmd_parser
  import csrspp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // raw entry in
  input  logic        in_valid,
  input  nvme_sqe_t   in_sqe,
  output logic        in_ready,
  // standard commands to the firmware / FTL path
  output logic        fw_valid,
  output parsed_cmd_t fw_cmd,
  input  logic        fw_ready,
  // vendor processing commands to the task scheduler
  output logic        sch_valid,
  output parsed_cmd_t sch_cmd,
  input  logic        sch_ready,
  // unknown vendor opcode: completed at once
  output logic        err_valid,
  output cpl_t        err_cpl,
  input  logic        err_ready
);

  parsed_cmd_t pc_d, pc_q;
  logic        full;

  function automatic cmd_kind_e classify(logic [7:0] opc);
    if (opc >= OPC_VENDOR_BASE) begin
      unique case (opc)
        OPC_HEARTBEAT: return CMD_HEARTBEAT;
        OPC_LRSDP_OFF: return CMD_LRSDP_OFF;
        OPC_LRSDP_ON:  return CMD_LRSDP_ON;
        OPC_TASK:      return CMD_TASK;
        default:       return CMD_VENDOR_UNKNOWN;
      endcase
    end else begin
      unique case (opc)
        OPC_READ:  return CMD_IO_READ;
        OPC_WRITE: return CMD_IO_WRITE;
        default:   return CMD_IO_OTHER;
      endcase
    end
  endfunction

  always_comb begin
    pc_d.kind      = classify(in_sqe.opcode);
    pc_d.opcode    = in_sqe.opcode;
    pc_d.cid       = in_sqe.cid;
    pc_d.nsid      = in_sqe.nsid;
    pc_d.lba       = {in_sqe.cdw11, in_sqe.cdw10};
    pc_d.prp1      = in_sqe.prp1;
    pc_d.prp2      = in_sqe.prp2;
    pc_d.task_type = in_sqe.cdw12[7:0];
    pc_d.task_arg  = in_sqe.cdw12[31:8];
    pc_d.task_len  = in_sqe.cdw13;
  end

  logic to_fw, to_sch, to_err, out_taken;
  always_comb begin
    to_fw  = full && (pc_q.kind inside {CMD_IO_READ, CMD_IO_WRITE, CMD_IO_OTHER});
    to_sch = full && (pc_q.kind inside {CMD_HEARTBEAT, CMD_LRSDP_OFF, CMD_LRSDP_ON, CMD_TASK});
    to_err = full && (pc_q.kind == CMD_VENDOR_UNKNOWN);
    out_taken = (to_fw && fw_ready) || (to_sch && sch_ready) || (to_err && err_ready);
  end

  assign in_ready  = !full || out_taken;
  assign fw_valid  = to_fw;
  assign sch_valid = to_sch;
  assign err_valid = to_err;
  assign fw_cmd    = pc_q;
  assign sch_cmd   = pc_q;
  assign err_cpl   = '{cid: pc_q.cid, status: ST_INVALID_OPC, dw0: 32'h0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      pc_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        full <= 1'b1;
        pc_q <= pc_d;
      end else if (out_taken) begin
        full <= 1'b0;
      end
    end
  end

  a_one_port: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({fw_valid, sch_valid, err_valid}));

endmodule
