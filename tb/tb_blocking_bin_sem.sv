// tb_blocking_bin_sem: self-checking test of the blocking binary semaphore.
// Two instances with a 4-entry request queue: one hands out one queued
// thread per release, the other every queued thread. Directed cases cover
// the one-cycle grant latency, queueing behind a held lock, queue overflow
// and its clear-on-read flag, wake-event back-pressure and re-requests by a
// woken thread. Random traffic is then compared with a model of owner,
// request queue and the expected order of wake events.
module tb_blocking_bin_sem;
  import sem_pkg::*;
  localparam int unsigned D = 4;
  logic     clk = 1'b0, rst_n = 1'b0;
  bus_req_t req, req0, req1;
  data_t    rdata0, rdata1;
  tid_t     owner0, owner1, wtid0, wtid1;
  logic     wv0, wv1, wr0, wr1, ovf0, ovf1;
  int       sel = 0;
  int checks = 0, failures = 0;

  assign req0 = (sel == 0) ? req : '0;
  assign req1 = (sel == 1) ? req : '0;

  blocking_bin_sem #(.QDEPTH(D), .WAKE_ALL(1'b0)) dut0 (
    .clk, .rst_n, .req(req0), .rdata(rdata0), .owner(owner0),
    .wake_valid(wv0), .wake_tid(wtid0), .wake_ready(wr0), .overflow(ovf0));
  blocking_bin_sem #(.QDEPTH(D), .WAKE_ALL(1'b1)) dut1 (
    .clk, .rst_n, .req(req1), .rdata(rdata1), .owner(owner1),
    .wake_valid(wv1), .wake_tid(wtid1), .wake_ready(wr1), .overflow(ovf1));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // observed wake events of each instance
  tid_t seen0 [$], seen1 [$];
  always @(posedge clk) begin
    if (rst_n && wv0 && wr0) seen0.push_back(wtid0);
    if (rst_n && wv1 && wr1) seen1.push_back(wtid1);
  end

  task automatic bus(input bit we, input reg_off_t a, input data_t d, output data_t rd);
    @(negedge clk);
    req = '{cs: 1'b1, we: we, addr: a, wdata: d};
    #1 rd = (sel == 0) ? rdata0 : rdata1;
    @(posedge clk);
    #1 req.cs = 1'b0;
  endtask

  task automatic wr(reg_off_t a, data_t d);
    data_t dummy;
    bus(1'b1, a, d, dummy);
  endtask

  task automatic rd(reg_off_t a, output data_t d);
    bus(1'b0, a, '0, d);
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  data_t v;
  tid_t  m_owner;
  tid_t  m_q [$];
  tid_t  m_wake [$];
  int    n_ovf;
  initial begin
    req = '0;
    wr0 = 1'b1;
    wr1 = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(1);

    // ---- one thread per release ----
    sel = 0;
    wr(R_RQST, 1);
    check(owner0 == 0, "no grant in the latch cycle");
    idle(1);
    check(owner0 == 1, "grant one cycle after the request");
    wr(R_RQST, 2);
    wr(R_RQST, 3);
    wr(R_RQST, 4);
    wr(R_RQST, 1);          // the owner asking again is not queued
    idle(1);
    rd(R_STATUS, v);
    check(v[DATA_W-1] == 0 && v[7:0] == 3, "three requests queued");
    rd(R_LOCK_OWN, v);
    check(v == 1, "owner kept while others queue");
    wr(R_RQST, 5);
    wr(R_RQST, 6);          // queue full: dropped
    idle(1);
    check(ovf0 == 1'b1, "overflow flagged");
    rd(R_STATUS, v);
    check(v[DATA_W-1] == 1 && v[7:0] == 4, "status shows overflow and full queue");
    rd(R_STATUS, v);
    check(v[DATA_W-1] == 0, "overflow cleared by the read");

    // release with back-pressure on the wake port
    wr0 = 1'b0;
    wr(R_RELEASE, 1);
    idle(1);
    check(owner0 == 0, "release frees the lock");
    idle(3);
    check(wv0 && wtid0 == 2, "wake event for the oldest waiter held");
    wr0 = 1'b1;
    idle(4);
    check(seen0.size() == 1 && seen0[0] == 2, "exactly one thread woken");
    rd(R_STATUS, v);
    check(v[7:0] == 3, "queue shrank by one");
    // the woken thread asks again and gets the lock
    wr(R_RQST, 2);
    idle(1);
    check(owner0 == 2, "woken thread takes the lock");
    wr(R_RELEASE, 2);
    idle(3);
    check(seen0.size() == 2 && seen0[1] == 3, "second release wakes the next waiter");
    wr(R_RQST, 3);
    idle(1);
    wr(R_RELEASE, 3);
    idle(2);
    wr(R_RQST, 4);
    idle(1);
    wr(R_RELEASE, 4);
    idle(2);
    wr(R_RQST, 5);
    idle(1);
    wr(R_RELEASE, 5);
    idle(3);
    check(seen0.size() == 4 && seen0[3] == 5, "waiters woken in arrival order");
    rd(R_STATUS, v);
    check(v[7:0] == 0, "queue empty");

    // ---- every thread per release ----
    sel = 1;
    wr(R_RQST, 8'h81);
    wr(R_RQST, 8'h02);
    wr(R_RQST, 8'h83);
    wr(R_RQST, 8'h04);
    idle(1);
    check(owner1 == 8'h81, "first requester owns");
    wr(R_RELEASE, 8'h81);
    idle(6);
    check(seen1.size() == 3, "all three waiters woken by one release");
    if (seen1.size() == 3)
      check(seen1[0] == 8'h02 && seen1[1] == 8'h83 && seen1[2] == 8'h04, "wake-all order");
    check(owner1 == 0, "lock free after wake-all release");

    // ---- random traffic on both ----
    for (int inst = 0; inst < 2; inst++) begin
      sel = inst;
      seen0.delete();
      seen1.delete();
      m_owner = 0;
      m_q.delete();
      m_wake.delete();
      n_ovf = 0;
      for (int i = 0; i < 1500; i++) begin
        tid_t t;
        t = tid_t'($urandom_range(1, 7));
        if ($urandom_range(0, 2) != 0) begin
          wr(R_RQST, t);
          if (m_owner == 0) m_owner = t;
          else if (t != m_owner) begin
            if (m_q.size() < D) m_q.push_back(t);
            else n_ovf++;
          end
        end else begin
          if ($urandom_range(0, 3) != 0 && m_owner != 0) t = m_owner;
          wr(R_RELEASE, t);
          if (t == m_owner && m_owner != 0) begin
            m_owner = 0;
            if (inst == 0) begin
              if (m_q.size() > 0) m_wake.push_back(m_q.pop_front());
            end else begin
              while (m_q.size() > 0) m_wake.push_back(m_q.pop_front());
            end
          end
        end
        idle(inst == 0 ? 2 : D + 2);
        check((inst == 0 ? owner0 : owner1) == m_owner, "random owner");
      end
      idle(10);
      if (inst == 0) check(seen0 == m_wake, "random wake sequence, wake one");
      else           check(seen1 == m_wake, "random wake sequence, wake all");
      check(n_ovf > 0, "overflow reached in random traffic");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
