// blocking_cnt_sem: blocking counting semaphore.
//
// A counting semaphore (count_sem: count register, Rqst_num, grant, Rel_num
// and the protecting spin lock) extended with a suspend queue and a resume
// thread scheduler. A thread takes the spin lock, writes Rqst_num and reads
// grant. With grant = 1 it keeps running. With grant = 0 it writes its own
// id into the thread_id register before releasing the spin lock; the core
// queues that id together with the last requested number, which it keeps
// latched, and the thread is suspended. (The request-number register drawn
// as req_reg in the block diagram is Rqst_num here.) Only a release of resources (a Rel_num write) makes
// the scheduler look at the queue:
//
//   POL_FIT  every queued thread whose request fits in the resources now
//            available is woken, oldest first, while a running budget lasts
//            (the budget starts at the count after the release and drops by
//            each woken thread's request);
//   POL_ALL  every queued thread is woken, and the requested-number queue is
//            not built.
//
// Woken threads get no resources from the core: they take the spin lock and
// ask again, as with the blocking binary semaphore. Wake events leave through
// a registered valid/ready port towards the ready-to-run queues.
//
// Queue: entries are kept in arrival order in a shift queue, so an entry
// taken from the middle closes the gap in one cycle. One entry can be added
// and one removed per cycle.
//
// Interface: memory-mapped slave, offsets of count_sem plus R_THREAD_ID (W: id
// to suspend) and R_STATUS (R: bit 31 overflow, sticky and cleared by the
// read; low bits queue level). Timing: queueing happens in the cycle after
// the thread_id write; the scan starts two cycles after the Rel_num write
// (one for the count update, one to take the new count as the budget) and
// hands out at most one id per cycle.
//
// From the document: the registers, the protocol, the two policies and the
// queue of requested numbers that only the first policy needs. This design's
// choices: the budget rule, oldest-first order, depth default 16, dropping a
// suspend request when the queue is full (overflow flag).
module blocking_cnt_sem
  import sem_pkg::*;
#(
  parameter int unsigned    QDEPTH = 16,
  parameter resume_policy_e POLICY = POL_FIT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output data_t    rdata,
  output cnt_t     count,
  output logic     grant,
  output tid_t     lock_owner,
  output logic     wake_valid,
  output tid_t     wake_tid,
  input  logic     wake_ready,
  output logic     overflow
);
  localparam int unsigned LW = $clog2(QDEPTH + 1);
  localparam int unsigned IW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  data_t cs_rdata;

  count_sem u_count (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (req),
    .rdata      (cs_rdata),
    .count      (count),
    .grant      (grant),
    .lock_owner (lock_owner)
  );

  // Latches of this core's own writes.
  logic susp_q;        // thread_id register written last cycle
  tid_t susp_tid_q;
  cnt_t last_num;      // requested number kept for the next suspend
  logic rel_q, rel_d;  // Rel_num written one / two cycles ago
  cnt_t rel_num_q, rel_num_d;
  logic st_rd;

  assign st_rd = req.cs && !req.we && req.addr == R_STATUS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      susp_q     <= 1'b0;
      susp_tid_q <= TID_NONE;
      last_num   <= '0;
      rel_q      <= 1'b0;
      rel_d      <= 1'b0;
      rel_num_q  <= '0;
      rel_num_d  <= '0;
    end else begin
      susp_q <= req.cs && req.we && req.addr == R_THREAD_ID;
      rel_q  <= req.cs && req.we && req.addr == R_REL_NUM;
      rel_d  <= rel_q;
      rel_num_d <= rel_num_q;
      if (req.cs && req.we && req.addr == R_THREAD_ID) susp_tid_q <= req.wdata[TID_W-1:0];
      if (req.cs && req.we && req.addr == R_RQST_NUM) last_num <= req.wdata[CNT_W-1:0];
      if (req.cs && req.we && req.addr == R_REL_NUM)  rel_num_q <= req.wdata[CNT_W-1:0];
    end
  end

  // Suspend queue: thread ids, plus requested numbers under POL_FIT.
  tid_t          q_tid [QDEPTH];
  cnt_t          q_num [QDEPTH];
  logic [LW-1:0] q_cnt;

  // Resume thread scheduler state.
  logic  sched_on;
  cnt_t  budget;
  logic  sel_found;
  logic [IW-1:0] sel_idx;
  logic  take;     // move the selected entry into the wake output register

  always_comb begin
    sel_found = 1'b0;
    sel_idx   = '0;
    for (int i = QDEPTH - 1; i >= 0; i--) begin
      if (LW'(i) < q_cnt && (POLICY == POL_ALL || q_num[i] <= budget)) begin
        sel_found = 1'b1;
        sel_idx   = IW'(i);
      end
    end
  end

  assign take = sched_on && sel_found && (!wake_valid || wake_ready);

  // Next queue contents: remove the taken entry, then append a suspend.
  tid_t          n_tid [QDEPTH];
  cnt_t          n_num [QDEPTH];
  logic [LW-1:0] n_cnt;
  logic          push_drop;

  always_comb begin
    n_tid     = q_tid;
    n_num     = q_num;
    n_cnt     = q_cnt;
    push_drop = 1'b0;
    if (take) begin
      for (int i = 0; i < QDEPTH - 1; i++) begin
        if (IW'(i) >= sel_idx) begin
          n_tid[i] = q_tid[i+1];
          n_num[i] = q_num[i+1];
        end
      end
      n_cnt = q_cnt - 1'b1;
    end
    if (susp_q && susp_tid_q != TID_NONE) begin
      if (n_cnt < LW'(QDEPTH)) begin
        n_tid[n_cnt[IW-1:0]] = susp_tid_q;
        n_num[n_cnt[IW-1:0]] = last_num;
        n_cnt = n_cnt + 1'b1;
      end else begin
        push_drop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt    <= '0;
      overflow <= 1'b0;
    end else begin
      q_cnt <= n_cnt;
      if (st_rd)     overflow <= 1'b0;
      if (push_drop) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    q_tid <= n_tid;
  end

  generate
    if (POLICY == POL_FIT) begin : g_num_queue
      always_ff @(posedge clk) q_num <= n_num;
    end else begin : g_no_num_queue
      always_comb for (int i = 0; i < QDEPTH; i++) q_num[i] = '0;
    end
  endgenerate

  // Budget and scan control.
  cnt_t           b_next;
  logic [CNT_W:0] b_sum;

  always_comb begin
    b_next = budget;
    if (take && POLICY == POL_FIT) b_next = budget - q_num[sel_idx];
    b_sum = {1'b0, b_next} + {1'b0, rel_num_d};
    if (rel_d) b_next = sched_on ? (b_sum[CNT_W] ? '1 : b_sum[CNT_W-1:0]) : count;
    if (b_next > count) b_next = count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sched_on <= 1'b0;
      budget   <= '0;
    end else begin
      budget <= b_next;
      if (rel_d && n_cnt != '0) sched_on <= 1'b1;
      else if (sched_on && !sel_found) sched_on <= 1'b0;
    end
  end

  // Registered wake output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wake_valid <= 1'b0;
      wake_tid   <= TID_NONE;
    end else if (take) begin
      wake_valid <= 1'b1;
      wake_tid   <= q_tid[sel_idx];
    end else if (wake_ready) begin
      wake_valid <= 1'b0;
    end
  end

  always_comb begin
    rdata = cs_rdata;
    if (st_rd) rdata = {overflow, {(DATA_W-1-LW){1'b0}}, q_cnt};
  end

  a_wake_stable: assert property (@(posedge clk) disable iff (!rst_n)
    wake_valid && !wake_ready |=> wake_valid && $stable(wake_tid))
    else $error("blocking_cnt_sem: wake event dropped before it was taken");
endmodule
