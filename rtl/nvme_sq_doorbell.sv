// nvme_sq_doorbell: submission-queue tail doorbell and command fetch sequencer.
//
// The host places 64-byte commands in a circular submission queue in its memory
// and then writes the new tail index to the queue's doorbell register. This
// block holds that tail, keeps the head index of the next command to fetch and,
// while head != tail, asks the DMA engine for the entry at
// SQ_BASE + head*64. The entry that comes back is handed on to the command
// parser with a valid/ready handshake, and the head advances when the parser
// takes it. The current head is exported for completion entries.
//
// Timing: one fetch is outstanding at a time. A fetch request is a one-cycle
// valid/ready handshake; the entry may return any number of cycles later.
// A doorbell value at or above the queue size is ignored and flagged
// (db_error pulses), the NVMe rule for an invalid doorbell write.
//
// The doorbell mechanism and the tail pointer follow the NVMe protocol as the
// design describes it; the single queue, one-outstanding-fetch policy and the
// port protocol are this design's choices. The DMA engine itself is outside.
module nvme_sq_doorbell
  import csrspp_pkg::*;
#(
  parameter int unsigned QSIZE = 64            // entries in the submission queue
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host doorbell write
  input  logic                     db_we,
  input  logic [15:0]              db_tail,
  output logic                     db_error,
  // queue base address in host memory
  input  logic [63:0]              sq_base,
  // fetch request to the DMA engine
  output logic                     fetch_req,
  output logic [63:0]              fetch_addr,
  input  logic                     fetch_gnt,
  // fetched entry
  input  logic                     fetch_rvalid,
  input  nvme_sqe_t                fetch_rdata,
  // entry to the command parser
  output logic                     cmd_valid,
  output nvme_sqe_t                cmd,
  input  logic                     cmd_ready,
  // state
  output logic [$clog2(QSIZE)-1:0] sq_head,
  output logic [$clog2(QSIZE)-1:0] sq_tail,
  output logic                     sq_empty
);

  localparam int unsigned PW = $clog2(QSIZE);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_HOLD} state_e;
  state_e state;

  logic [PW-1:0] head, tail;

  assign sq_head  = head;
  assign sq_tail  = tail;
  assign sq_empty = (head == tail);

  assign fetch_req  = (state == S_REQ);
  assign fetch_addr = sq_base + 64'(head) * 64'(SQE_BYTES);
  assign cmd_valid  = (state == S_HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      head     <= '0;
      tail     <= '0;
      db_error <= 1'b0;
      cmd      <= '0;
    end else begin
      db_error <= 1'b0;
      if (db_we) begin
        if (32'(db_tail) < QSIZE) tail <= PW'(db_tail);
        else                      db_error <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (head != tail) state <= S_REQ;
        S_REQ:  if (fetch_gnt) state <= S_WAIT;
        S_WAIT: if (fetch_rvalid) begin
                  cmd   <= fetch_rdata;
                  state <= S_HOLD;
                end
        S_HOLD: if (cmd_ready) begin
                  head  <= (32'(head) == QSIZE - 1) ? '0 : head + 1'b1;
                  state <= S_IDLE;
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the entry offered to the parser stays put until it is taken
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
