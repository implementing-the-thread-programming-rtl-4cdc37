// sys_sched: central interface and scheduling framework for the blocking
// semaphores.
//
// Every blocking semaphore signals a wake event (a thread id that may be
// rescheduled) on a valid/ready port. This block takes at most one event per
// cycle from its NSRC inputs, round-robin, and copies the id into one of two
// global ready-to-run queues: the CPU ready queue for software threads and
// the hardware thread ready queue for hardware threads (id bit TID_W-1 set).
// A non-empty CPU queue raises the interrupt, so the operating system's
// service routine reads one queue instead of polling every semaphore; a
// non-empty hardware queue is shown to the hardware threads directly, so
// waking a hardware thread costs the CPU no context switch.
//
// Interface: src_valid / src_tid / src_ready per semaphore; a memory-mapped
// slave (sem_pkg::bus_req_t) with R_CPU_READY (R: bit 31 valid, low bits id;
// the read pops the entry), R_HW_READY (the same for the hardware thread
// queue, for hardware threads that fetch their ids over the bus) and
// R_SCHED_ST (R: CPU queue level in bits 15:0, hardware queue level in bits
// 31:16); cpu_irq; hw_valid / hw_tid / hw_pop for hardware threads wired to
// the queue directly (first word fall through). A bus read and hw_pop in the
// same cycle remove a single entry.
//
// Timing: an accepted event is in its queue one cycle later; a source is
// refused only when its target queue is full.
//
// From the document: the two ready-to-run queues, the interrupt towards the
// CPU, the split of hardware and software threads. This design's choices:
// round-robin selection, the id bit that tells the thread kinds apart,
// queue depth 16, one event per cycle.
module sys_sched
  import sem_pkg::*;
#(
  parameter int unsigned NSRC   = 4,
  parameter int unsigned QDEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src_valid,
  input  tid_t            src_tid [NSRC],
  output logic [NSRC-1:0] src_ready,
  input  bus_req_t        req,
  output data_t           rdata,
  output logic            cpu_irq,
  output logic            hw_valid,
  output tid_t            hw_tid,
  input  logic            hw_pop
);
  localparam int unsigned SW = (NSRC > 1) ? $clog2(NSRC) : 1;
  localparam int unsigned LW = $clog2(QDEPTH + 1);

  logic [SW-1:0] rr_ptr;     // source with the highest priority this cycle
  logic          sel_found;
  logic [SW-1:0] sel;
  tid_t          sel_tid;
  logic          sel_hw;

  logic          cpu_push, cpu_pop, cpu_full, cpu_empty;
  logic          hwq_push, hwq_pop, hwq_full, hwq_empty;
  tid_t          cpu_head;
  logic [LW-1:0] cpu_level, hw_level;

  // Round-robin pick among the sources whose target queue has room.
  always_comb begin
    sel_found = 1'b0;
    sel       = '0;
    for (int k = NSRC - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(rr_ptr) + k) % NSRC;
      if (src_valid[idx] &&
          !(is_hw_thread(src_tid[idx]) ? hwq_full : cpu_full)) begin
        sel_found = 1'b1;
        sel       = SW'(idx);
      end
    end
  end

  assign sel_tid  = src_tid[sel];
  assign sel_hw   = is_hw_thread(sel_tid);
  assign cpu_push = sel_found && !sel_hw;
  assign hwq_push = sel_found && sel_hw;

  always_comb begin
    src_ready = '0;
    if (sel_found) src_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rr_ptr <= '0;
    else if (sel_found) rr_ptr <= (sel == SW'(NSRC - 1)) ? '0 : sel + 1'b1;
  end

  tid_fifo #(.WIDTH(TID_W), .DEPTH(QDEPTH)) u_cpu_ready (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (cpu_push),
    .push_data (sel_tid),
    .pop       (cpu_pop),
    .pop_data  (cpu_head),
    .full      (cpu_full),
    .empty     (cpu_empty),
    .level     (cpu_level)
  );

  tid_fifo #(.WIDTH(TID_W), .DEPTH(QDEPTH)) u_hw_ready (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (hwq_push),
    .push_data (sel_tid),
    .pop       (hwq_pop),
    .pop_data  (hw_tid),
    .full      (hwq_full),
    .empty     (hwq_empty),
    .level     (hw_level)
  );

  assign hw_valid = !hwq_empty;
  assign cpu_irq  = !cpu_empty;
  assign cpu_pop  = req.cs && !req.we && req.addr == R_CPU_READY && !cpu_empty;
  assign hwq_pop  = (hw_pop || (req.cs && !req.we && req.addr == R_HW_READY)) && !hwq_empty;

  always_comb begin
    rdata = '0;
    if (req.cs && !req.we) begin
      unique case (req.addr)
        R_CPU_READY: begin
          rdata[DATA_W-1]  = !cpu_empty;
          rdata[TID_W-1:0] = cpu_empty ? TID_NONE : cpu_head;
        end
        R_HW_READY: begin
          rdata[DATA_W-1]  = !hwq_empty;
          rdata[TID_W-1:0] = hwq_empty ? TID_NONE : hw_tid;
        end
        R_SCHED_ST: begin
          rdata[15:0]  = 16'(cpu_level);
          rdata[31:16] = 16'(hw_level);
        end
        default: ;
      endcase
    end
  end

  a_ready_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(src_ready))
    else $error("sys_sched: more than one source accepted in a cycle");
  a_ready_valid: assert property (@(posedge clk) disable iff (!rst_n) (src_ready & ~src_valid) == '0)
    else $error("sys_sched: event accepted from an idle source");
endmodule
