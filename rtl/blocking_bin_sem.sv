// blocking_bin_sem: blocking binary semaphore.
//
// A binary lock whose losers are queued instead of spinning. A thread writes
// its id into the request register and then reads Lock_own, as with the spin
// lock. In the cycle after the write the control logic either makes it the
// owner (lock free) or puts its id into the request queue (lock held); the
// access routine then suspends the thread. Writing the owner's id into the
// Release register frees the lock and starts the ready thread scheduler,
// which takes queued ids out of the request queue and sends each, as a wake
// event, to the central ready-to-run queues. A woken thread asks for the lock
// again, as the document's access routine prescribes.
//
// The ready thread scheduler releases one queued id per release when
// WAKE_ALL = 0 (a queuing semaphore) or every id queued at the time of the
// release when WAKE_ALL = 1 (sleep / wake-up of all waiters). Wake events
// leave through a valid/ready handshake, one per accepted cycle.
//
// Interface: memory-mapped slave (sem_pkg::bus_req_t), offsets R_RQST (W),
// R_LOCK_OWN (R), R_RELEASE (W), R_STATUS (R: bit 31 queue overflow, sticky
// and cleared by the read; low bits queue level). wake_valid / wake_tid /
// wake_ready carry the wake events.
//
// From the document: the request/owner/release protocol, owner update or
// queueing one cycle after the request, queue depth as a design-time
// parameter, wake-up through ready-to-run queues on release. This design's
// choices: depth default 16; id 0 means "free"; a request from the current
// owner is ignored; the queue does not look for ids it already holds; a
// request arriving while the queue is full is dropped and sets the overflow
// flag.
module blocking_bin_sem
  import sem_pkg::*;
#(
  parameter int unsigned QDEPTH   = 16,
  parameter bit          WAKE_ALL = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output data_t    rdata,
  output tid_t     owner,
  output logic     wake_valid,
  output tid_t     wake_tid,
  input  logic     wake_ready,
  output logic     overflow
);
  localparam int unsigned LW = $clog2(QDEPTH + 1);

  typedef enum logic [1:0] {OP_NONE, OP_RQST, OP_REL} op_e;

  op_e           op_q;
  tid_t          tid_q;
  logic          q_push, q_pop, q_full, q_empty;
  tid_t          q_head;
  logic [LW-1:0] q_level;
  logic [LW-1:0] wake_left;   // queued ids still to be handed out
  logic          st_rd;

  assign st_rd = req.cs && !req.we && req.addr == R_STATUS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q  <= OP_NONE;
      tid_q <= TID_NONE;
    end else if (req.cs && req.we && req.addr == R_RQST) begin
      op_q  <= OP_RQST;
      tid_q <= req.wdata[TID_W-1:0];
    end else if (req.cs && req.we && req.addr == R_RELEASE) begin
      op_q  <= OP_REL;
      tid_q <= req.wdata[TID_W-1:0];
    end else begin
      op_q  <= OP_NONE;
    end
  end

  // Lock control: grant when free, otherwise queue the request.
  logic do_grant, do_release;
  assign do_grant   = op_q == OP_RQST && tid_q != TID_NONE && owner == TID_NONE;
  assign do_release = op_q == OP_REL && tid_q == owner && owner != TID_NONE;
  assign q_push     = op_q == OP_RQST && tid_q != TID_NONE && owner != TID_NONE
                      && tid_q != owner && !q_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner    <= TID_NONE;
      overflow <= 1'b0;
    end else begin
      if (do_grant)   owner <= tid_q;
      if (do_release) owner <= TID_NONE;
      if (st_rd) overflow <= 1'b0;
      if (op_q == OP_RQST && tid_q != TID_NONE && owner != TID_NONE
          && tid_q != owner && q_full)
        overflow <= 1'b1;
    end
  end

  tid_fifo #(.WIDTH(TID_W), .DEPTH(QDEPTH)) u_queue (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (q_push),
    .push_data (tid_q),
    .pop       (q_pop),
    .pop_data  (q_head),
    .full      (q_full),
    .empty     (q_empty),
    .level     (q_level)
  );

  // Ready thread scheduler: hand out queued ids after a release.
  assign wake_valid = wake_left != '0 && !q_empty;
  assign wake_tid   = q_head;
  assign q_pop      = wake_valid && wake_ready;

  logic [LW-1:0] wake_inc;
  assign wake_inc = (wake_left < q_level) ? wake_left + 1'b1 : q_level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wake_left <= '0;
    end else if (do_release && !q_empty) begin
      wake_left <= (WAKE_ALL ? q_level : wake_inc) - LW'(q_pop);
    end else if (q_pop) begin
      wake_left <= wake_left - 1'b1;
    end else if (q_empty) begin
      wake_left <= '0;
    end
  end

  always_comb begin
    rdata = '0;
    if (req.cs && !req.we) begin
      unique case (req.addr)
        R_LOCK_OWN: rdata[TID_W-1:0] = owner;
        R_STATUS:   rdata = {overflow, {(DATA_W-1-LW){1'b0}}, q_level};
        default:    ;
      endcase
    end
  end

  a_wake_stable: assert property (@(posedge clk) disable iff (!rst_n)
    wake_valid && !wake_ready |=> wake_valid && $stable(wake_tid))
    else $error("blocking_bin_sem: wake event dropped before it was taken");
endmodule
