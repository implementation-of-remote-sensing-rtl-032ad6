// tb_nvme_cmd_parser: self-checking test of the NVMe command parser.
//
// Sends 300 random submission entries (standard read/write/other opcodes, the
// four vendor processing opcodes and unknown vendor opcodes) with random
// back-pressure on all three outputs. A reference model built from byte
// offsets of the 64-byte entry (not from the packed struct) predicts the
// kind, the output port and every field; results are compared in order.
module tb_nvme_cmd_parser;
  import csrspp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  nvme_sqe_t in_sqe;
  logic fw_valid, fw_ready, sch_valid, sch_ready, err_valid, err_ready;
  parsed_cmd_t fw_cmd, sch_cmd;
  cpl_t err_cpl;

  nvme_cmd_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [511:0] raw; int port; cmd_kind_e kind; } exp_t;
  exp_t q[$];

  function automatic logic [7:0] byte_at(logic [511:0] r, int b);
    return r[b*8 +: 8];
  endfunction
  function automatic logic [31:0] dw_at(logic [511:0] r, int d);
    return r[d*32 +: 32];
  endfunction

  int n_sent = 0, n_got = 0, n_kind[8];
  always_ff @(posedge clk) begin
    fw_ready  <= ($urandom_range(0, 3) != 0);
    sch_ready <= ($urandom_range(0, 3) != 0);
    err_ready <= ($urandom_range(0, 1) != 0);
  end

  task automatic compare(int port, parsed_cmd_t pc, cpl_t ec);
    exp_t e;
    e = q.pop_front();
    check(port == e.port, $sformatf("port for opcode %02x", byte_at(e.raw, 0)));
    if (port == 2) begin
      check(ec.cid == {byte_at(e.raw, 3), byte_at(e.raw, 2)} && ec.status == ST_INVALID_OPC, "error completion");
    end else begin
      check(pc.kind == e.kind, "kind");
      check(pc.opcode == byte_at(e.raw, 0), "opcode");
      check(pc.cid == {byte_at(e.raw, 3), byte_at(e.raw, 2)}, "cid");
      check(pc.nsid == dw_at(e.raw, 1), "nsid");
      check(pc.prp1 == {dw_at(e.raw, 7), dw_at(e.raw, 6)}, "prp1");
      check(pc.prp2 == {dw_at(e.raw, 9), dw_at(e.raw, 8)}, "prp2");
      check(pc.lba == {dw_at(e.raw, 11), dw_at(e.raw, 10)}, "lba from cdw10/11");
      check(pc.task_type == byte_at(e.raw, 48) && pc.task_len == dw_at(e.raw, 13), "task fields");
    end
    n_kind[int'(e.kind)]++;
    n_got++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (fw_valid && fw_ready)   compare(0, fw_cmd, '0);
    if (sch_valid && sch_ready) compare(1, sch_cmd, '0);
    if (err_valid && err_ready) compare(2, '0, err_cpl);
  end

  initial begin
    logic [511:0] r; logic [7:0] opc; exp_t e; int sel;
    in_valid = 0; in_sqe = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    while (n_sent < 300) begin
      for (int i = 0; i < 16; i++) r[i*32 +: 32] = $urandom;
      sel = $urandom_range(0, 7);
      case (sel)
        0: opc = 8'h02; 1: opc = 8'h01; 2: opc = 8'h00;
        3: opc = 8'h81; 4: opc = 8'h82; 5: opc = 8'h83; 6: opc = 8'h84;
        default: opc = 8'h85 + 8'($urandom_range(0, 122));
      endcase
      r[7:0] = opc;
      e.raw = r;
      case (opc)
        8'h02: begin e.kind = CMD_IO_READ;  e.port = 0; end
        8'h01: begin e.kind = CMD_IO_WRITE; e.port = 0; end
        8'h00: begin e.kind = CMD_IO_OTHER; e.port = 0; end
        8'h81: begin e.kind = CMD_HEARTBEAT; e.port = 1; end
        8'h82: begin e.kind = CMD_LRSDP_OFF; e.port = 1; end
        8'h83: begin e.kind = CMD_LRSDP_ON;  e.port = 1; end
        8'h84: begin e.kind = CMD_TASK;      e.port = 1; end
        default: begin e.kind = CMD_VENDOR_UNKNOWN; e.port = 2; end
      endcase
      in_valid = ($urandom_range(0, 4) != 0);
      in_sqe   = nvme_sqe_t'(r);
      #1;
      if (in_valid && in_ready) begin q.push_back(e); n_sent++; end
      @(negedge clk);
    end
    in_valid = 0;
    wait (n_got == 300);
    repeat (2) @(negedge clk);
    check(q.size() == 0, "nothing left over");
    for (int k = 0; k < 8; k++) check(n_kind[k] > 0, $sformatf("kind %0d seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
