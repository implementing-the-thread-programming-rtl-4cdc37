// tb_blocking_cnt_sem: self-checking test of the blocking counting semaphore.
// Two instances with a 4-entry suspend queue, one per resume policy. The
// directed part follows the document's protocol (spin lock, Rqst_num, grant,
// the thread_id register on denial, spin lock release) and checks which suspended threads a
// release wakes: only those that fit under POL_FIT, all of them under
// POL_ALL, oldest first. It also covers queue overflow and the start of the
// scan two cycles after the release. Random traffic with random wake
// back-pressure is compared with a model of count, queue and wake order.
module tb_blocking_cnt_sem;
  import sem_pkg::*;
  localparam int unsigned D = 4;
  logic     clk = 1'b0, rst_n = 1'b0;
  bus_req_t req, req0, req1;
  data_t    rdata0, rdata1;
  cnt_t     count0, count1;
  logic     grant0, grant1;
  tid_t     lo0, lo1, wtid0, wtid1;
  logic     wv0, wv1, wr0, wr1, ovf0, ovf1;
  int       sel = 0;
  int checks = 0, failures = 0;

  assign req0 = (sel == 0) ? req : '0;
  assign req1 = (sel == 1) ? req : '0;

  blocking_cnt_sem #(.QDEPTH(D), .POLICY(POL_FIT)) dut0 (
    .clk, .rst_n, .req(req0), .rdata(rdata0), .count(count0), .grant(grant0),
    .lock_owner(lo0), .wake_valid(wv0), .wake_tid(wtid0), .wake_ready(wr0),
    .overflow(ovf0));
  blocking_cnt_sem #(.QDEPTH(D), .POLICY(POL_ALL)) dut1 (
    .clk, .rst_n, .req(req1), .rdata(rdata1), .count(count1), .grant(grant1),
    .lock_owner(lo1), .wake_valid(wv1), .wake_tid(wtid1), .wake_ready(wr1),
    .overflow(ovf1));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // The access routine of a thread: spin lock, request, check, suspend.
  task automatic acquire(tid_t t, int n, output bit granted);
    data_t v;
    wr(R_RQST, t);
    idle(1);
    rd(R_LOCK_OWN, v);
    check(v == data_t'(t), "spin lock obtained");
    wr(R_RQST_NUM, n);
    idle(1);
    rd(R_GRANT, v);
    granted = v[0];
    if (!granted) wr(R_THREAD_ID, t);
    wr(R_RELEASE, t);
    idle(1);
  endtask

  typedef struct {tid_t t; int n;} entry_t;

  data_t  v;
  bit     g;
  int     m_count;
  entry_t m_q [$];
  tid_t   m_wake [$];
  int     n_ovf;
  initial begin
    req = '0;
    wr0 = 1'b1;
    wr1 = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(1);

    // ---- POL_FIT ----
    sel = 0;
    wr(R_MAX_COUNT, 5);
    idle(1);
    acquire(1, 3, g); check(g == 1 && count0 == 2, "thread 1 granted 3 of 5");
    acquire(2, 4, g); check(g == 0, "thread 2 denied");
    acquire(3, 1, g); check(g == 1 && count0 == 1, "thread 3 granted 1");
    acquire(4, 2, g); check(g == 0, "thread 4 denied");
    acquire(5, 6, g); check(g == 0, "thread 5 denied");
    rd(R_STATUS, v);
    check(v[7:0] == 3, "three threads suspended");
    idle(5);
    check(seen0.size() == 0, "no wake without a release");

    wr(R_REL_NUM, 1);      // count 2: only thread 4 (needs 2) fits
    check(!wv0, "no wake in the release latch cycle");
    idle(1);
    check(!wv0 && count0 == 2, "count updated, scan not yet started");
    idle(1);
    check(!wv0, "scan takes the new count as budget");
    idle(1);
    check(wv0 && wtid0 == 4, "thread 4 woken three cycles after the release");
    idle(4);
    check(seen0.size() == 1 && seen0[0] == 4, "only the fitting thread woken");
    acquire(4, 2, g); check(g == 1 && count0 == 0, "woken thread 4 granted");
    wr(R_REL_NUM, 5);      // budget 5: thread 2 (4) fits, thread 5 (6) not
    idle(8);
    check(seen0.size() == 2 && seen0[1] == 2, "thread 2 woken, thread 5 kept");
    rd(R_STATUS, v);
    check(v[7:0] == 1, "thread 5 still queued");
    wr(R_REL_NUM, 1);      // count 6 fits thread 5
    idle(8);
    check(seen0.size() == 3 && seen0[2] == 5, "thread 5 woken");

    // overflow
    wr(R_MAX_COUNT, 0);
    for (int i = 0; i < D + 1; i++) begin
      acquire(tid_t'(10 + i), 1, g);
    end
    check(ovf0, "overflow flagged when the suspend queue is full");
    rd(R_STATUS, v);
    check(v[DATA_W-1] && v[7:0] == D, "status shows overflow, full queue");
    rd(R_STATUS, v);
    check(!v[DATA_W-1], "overflow cleared by the read");
    wr(R_REL_NUM, 2);      // two of the four 1-resource waiters fit
    idle(10);
    check(seen0.size() == 5 && seen0[3] == 10 && seen0[4] == 11, "budget wakes two oldest");
    wr(R_REL_NUM, 2);
    idle(10);
    check(seen0.size() == 7 && seen0[6] == 13, "remaining waiters woken");

    // ---- POL_ALL ----
    sel = 1;
    wr(R_MAX_COUNT, 2);
    idle(1);
    acquire(1, 2, g); check(g == 1, "all: thread 1 granted");
    acquire(8'h82, 1, g); check(g == 0, "all: thread 82 denied");
    acquire(3, 5, g); check(g == 0, "all: thread 3 denied");
    acquire(8'h84, 9, g); check(g == 0, "all: thread 84 denied");
    wr(R_REL_NUM, 1);
    idle(10);
    check(seen1.size() == 3, "one release wakes every waiter");
    if (seen1.size() == 3)
      check(seen1[0] == 8'h82 && seen1[1] == 3 && seen1[2] == 8'h84, "wake-all order");

    // ---- random traffic ----
    for (int inst = 0; inst < 2; inst++) begin
      sel = inst;
      wr(R_MAX_COUNT, 8);
      idle(1);
      seen0.delete();
      seen1.delete();
      m_count = 8;
      m_q.delete();
      m_wake.delete();
      n_ovf = 0;
      for (int i = 0; i < 800; i++) begin
        tid_t t;
        int   n;
        t = tid_t'($urandom_range(1, 255));
        n = $urandom_range(1, 6);
        if ($urandom_range(0, 1) == 0) begin
          acquire(t, n, g);
          check(g == (n <= m_count), "random grant");
          if (n <= m_count) m_count -= n;
          else if (m_q.size() < D) m_q.push_back('{t, n});
          else n_ovf++;
        end else begin
          wr(R_REL_NUM, n);
          m_count += n;
          if (m_q.size() > 0) begin
            if (inst == 1) begin
              while (m_q.size() > 0) m_wake.push_back(m_q.pop_front().t);
            end else begin
              int budget, k;
              budget = m_count;
              k = 0;
              while (k < m_q.size()) begin
                if (m_q[k].n <= budget) begin
                  budget -= m_q[k].n;
                  m_wake.push_back(m_q[k].t);
                  m_q.delete(k);
                end else k++;
              end
            end
          end
        end
        // random back-pressure on the wake port while the scan runs
        for (int c = 0; c < 4 * D + 6; c++) begin
          @(negedge clk);
          wr0 = $urandom_range(0, 1);
          wr1 = $urandom_range(0, 1);
        end
        @(negedge clk);
        wr0 = 1'b1;
        wr1 = 1'b1;
        idle(D + 3);
        check((inst == 0 ? count0 : count1) == cnt_t'(m_count), "random count");
      end
      if (inst == 0) check(seen0 == m_wake, "random wake sequence, POL_FIT");
      else           check(seen1 == m_wake, "random wake sequence, POL_ALL");
      if (inst == 0) check(n_ovf > 0, "overflow reached in random traffic");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
