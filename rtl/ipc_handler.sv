// ipc_handler: firmware-side receiver of inter-core block I/O messages.
//
// The cores that run the in-storage Linux share the SSD's DRAM with the cores
// that run the flash firmware; a Linux block driver reads and writes flash by
// messaging the firmware. The data register that travels with an
// inter-processor interrupt is short, so the message (packet A) holds only a
// magic number and the DRAM address of the real request (packet B). This
// block checks the magic number and drops the message if it does not match.
// Otherwise it reads packet B over a 32-bit memory port: a header word with
// the opcode in bits [31:24] and the element count N in bits [15:0], then N
// elements of three words each: LBA, DRAM data address, sector count. Each
// element is submitted to the flash translation layer's I/O queue in turn.
// When the FTL has reported all N requests complete, the block raises an
// interrupt back to the Linux side (ipi_out, with N and the opcode).
//
// Timing: one message at a time (msg_ready is high only when idle). Memory
// reads are one-at-a-time request/grant then response; an FTL submission is a
// valid/ready handshake; FTL completions (ftl_done) may arrive in any cycle
// after a submission, including while later elements are still being read.
// For N elements the block spends 1 + 3N memory reads.
//
// The magic check, the address-indirect packet, the element contents, the
// one-by-one submission and the completion interrupt follow the design. The
// magic value, word layout and header encoding are this design's own choices.
module ipc_handler
  import csrspp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // packet A: data register contents delivered with the interrupt
  input  logic        msg_valid,
  input  logic [31:0] msg_magic,
  input  logic [31:0] msg_addr,
  output logic        msg_ready,
  // shared-DRAM read port
  output logic        mem_req,
  output logic [31:0] mem_addr,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  // FTL I/O queue
  output logic        ftl_valid,
  output ftl_req_t    ftl_req,
  input  logic        ftl_ready,
  input  logic        ftl_done,
  // completion interrupt to the Linux core
  output logic        ipi_out,
  output logic [15:0] ipi_count,
  output logic [7:0]  ipi_opcode,
  // status
  output logic        bad_magic,
  output logic        busy
);

  typedef enum logic [2:0] {S_IDLE, S_RREQ, S_RWAIT, S_SUBMIT, S_WAITCPL, S_IPI} state_e;
  state_e state;

  logic [31:0] rd_addr;
  logic [7:0]  opcode;
  logic [15:0] n_elem, n_sub, n_cpl;
  logic [1:0]  word;         // 0 = header, 1..3 = element words
  logic [31:0] e_lba, e_paddr;

  assign msg_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign mem_req   = (state == S_RREQ);
  assign mem_addr  = rd_addr;
  assign ftl_valid = (state == S_SUBMIT);
  assign ipi_out   = (state == S_IPI);
  assign ipi_count = n_elem;
  assign ipi_opcode = opcode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_addr   <= '0;
      opcode    <= '0;
      n_elem    <= '0;
      n_sub     <= '0;
      n_cpl     <= '0;
      word      <= '0;
      e_lba     <= '0;
      e_paddr   <= '0;
      ftl_req   <= '0;
      bad_magic <= 1'b0;
    end else begin
      bad_magic <= 1'b0;
      if (ftl_done && state != S_IDLE) n_cpl <= n_cpl + 1'b1;
      unique case (state)
        S_IDLE: if (msg_valid) begin
          if (msg_magic == IPC_MAGIC) begin
            rd_addr <= msg_addr;
            word    <= 2'd0;
            n_sub   <= '0;
            n_cpl   <= '0;
            state   <= S_RREQ;
          end else begin
            bad_magic <= 1'b1;
          end
        end
        S_RREQ: if (mem_gnt) state <= S_RWAIT;
        S_RWAIT: if (mem_rvalid) begin
          rd_addr <= rd_addr + 32'd4;
          unique case (word)
            2'd0: begin
              opcode <= mem_rdata[31:24];
              n_elem <= mem_rdata[15:0];
              word   <= 2'd1;
              state  <= (mem_rdata[15:0] == 16'd0) ? S_WAITCPL : S_RREQ;
            end
            2'd1: begin e_lba   <= mem_rdata; word <= 2'd2; state <= S_RREQ; end
            2'd2: begin e_paddr <= mem_rdata; word <= 2'd3; state <= S_RREQ; end
            default: begin
              ftl_req <= '{opcode: opcode, lba: e_lba, paddr: e_paddr, nsect: mem_rdata};
              word    <= 2'd1;
              state   <= S_SUBMIT;
            end
          endcase
        end
        S_SUBMIT: if (ftl_ready) begin
          n_sub <= n_sub + 1'b1;
          state <= (n_sub + 1'b1 == n_elem) ? S_WAITCPL : S_RREQ;
        end
        S_WAITCPL: if (n_cpl == n_elem) state <= S_IPI;
        S_IPI: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ftl_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ftl_valid && !ftl_ready |=> ftl_valid && $stable(ftl_req));

endmodule
