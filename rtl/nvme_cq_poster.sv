// nvme_cq_poster: completion-queue side of the NVMe front end.
//
// Turns completions (command id, status, dword 0, plus the submission-queue
// head and id) into 16-byte NVMe completion entries and writes them into the
// circular completion queue in host memory at cq_base + tail*16. After each
// entry has been written it raises irq for one cycle, the request for the
// host interrupt. The entry carries a phase tag that is 1 on the first pass
// through the ring and flips every time the tail wraps, so the host can tell
// new entries from old ones without reading a device register. The host
// reports how far it has consumed by writing the completion-queue head
// doorbell (hd_we/hd_head). The ring is full when the tail is one entry behind
// the head; then no completion is accepted until the host frees an entry. A
// head value outside the ring is ignored and pulses hd_error.
//
// Status mapping: the 8-bit status code goes into SC; codes 0xC0 and up are
// vendor codes and get status code type 7, the rest type 0 (generic).
//
// Interface and timing: completions enter through a valid/ready handshake
// (in_ready is high when no entry is waiting to be written and the ring is not
// full). The entry is then offered on wr_req/wr_addr/wr_data until wr_gnt,
// the memory-write port of the DMA engine; one entry is handled at a time.
// irq pulses in the cycle after the grant.
//
// The completion queue as the device-to-host pipe follows the design; the
// entry layout, phase tag and head doorbell are those of the NVMe standard,
// and the one-entry buffering and the status mapping are this design's own.
module nvme_cq_poster
  import csrspp_pkg::*;
#(
  parameter int unsigned QSIZE = 64,
  localparam int unsigned QW   = $clog2(QSIZE)
) (
  input  logic          clk,
  input  logic          rst_n,
  // completions
  input  logic          in_valid,
  input  cpl_t          in_cpl,
  input  logic [15:0]   in_sq_head,
  input  logic [15:0]   in_sqid,
  output logic          in_ready,
  // queue base in host memory
  input  logic [63:0]   cq_base,
  // entry write through the DMA engine
  output logic          wr_req,
  output logic [63:0]   wr_addr,
  output nvme_cqe_t     wr_data,
  input  logic          wr_gnt,
  // host head doorbell
  input  logic          hd_we,
  input  logic [15:0]   hd_head,
  output logic          hd_error,
  // interrupt request and state
  output logic          irq,
  output logic [QW-1:0] cq_tail,
  output logic [QW-1:0] cq_head,
  output logic          phase,
  output logic          cq_full
);

  logic pend;

  wire [QW-1:0] tail_nx = (32'(cq_tail) == QSIZE - 1) ? '0 : cq_tail + 1'b1;
  assign cq_full  = (tail_nx == cq_head);
  assign in_ready = !pend && !cq_full;
  assign wr_req   = pend;
  assign wr_addr  = cq_base + 64'(cq_tail) * CQE_BYTES;

  wire vendor = (in_cpl.status >= 8'hC0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      wr_data  <= '0;
      cq_tail  <= '0;
      cq_head  <= '0;
      phase    <= 1'b1;
      irq      <= 1'b0;
      hd_error <= 1'b0;
    end else begin
      irq      <= 1'b0;
      hd_error <= 1'b0;
      if (in_valid && in_ready) begin
        wr_data <= '{status: {4'b0, vendor ? 3'd7 : 3'd0, 8'(in_cpl.status)},
                     phase: phase, cid: in_cpl.cid, sqid: in_sqid,
                     sqhd: in_sq_head, rsvd: 32'h0, dw0: in_cpl.dw0};
        pend    <= 1'b1;
      end
      if (pend && wr_gnt) begin
        pend    <= 1'b0;
        cq_tail <= tail_nx;
        if (32'(cq_tail) == QSIZE - 1) phase <= !phase;
        irq     <= 1'b1;
      end
      if (hd_we) begin
        if (32'(hd_head) < QSIZE) cq_head <= QW'(hd_head);
        else                      hd_error <= 1'b1;
      end
    end
  end

  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    wr_req && !wr_gnt |=> wr_req && $stable(wr_data) && $stable(wr_addr));

endmodule
