// tb_hthread_sync_top: end-to-end test of the synchronization subsystem at
// its default size (4 spin locks, 2 counting, 4 blocking binary and 2
// blocking counting semaphores, 16-entry queues).
//
// Phase 1 drives the corner cases through the single bus port: a full
// request queue (overflow flag), and 32 wake events aimed at the 16-entry CPU
// ready queue, so that the framework has to hold a semaphore back until the
// operating-system side reads the queue.
//
// Phase 2 runs four software and four hardware threads as concurrent
// processes sharing the bus one access per cycle. Each thread repeatedly
// takes and gives back a randomly chosen spin lock, counting semaphore,
// blocking binary or blocking counting semaphore using the document's access
// routines, sleeping when a blocking semaphore makes it wait. An interrupt
// handler empties the CPU ready queue and a hardware dispatcher the hardware
// thread ready queue, waking the sleeping threads. The testbench checks
// mutual exclusion, that resource counts are never exceeded, that every
// thread finishes, and that every mechanism occurred at least once. The
// built-in hardware test thread competes for spin lock 0 throughout phase 2,
// so the bus arbiter is exercised as well.
module tb_hthread_sync_top;
  import sem_pkg::*;
  localparam int unsigned ADDR_W = 12;
  localparam int unsigned NTH    = 8;
  localparam int unsigned ITER   = 25;
  // unit numbers at the default parameters
  localparam int U_SPIN0 = 0, U_CSEM0 = 4, U_BBIN0 = 6, U_BCNT0 = 10, U_SCHED = 12;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              bus_cs, bus_we;
  logic [ADDR_W-1:0] bus_addr;
  logic [DATA_W-1:0] bus_wdata, bus_rdata;
  logic              bus_gnt, hwt_run;
  logic [15:0]       hwt_delay;
  logic [31:0]       hwt_acquired, hwt_retries;
  logic              cpu_irq, hw_rdy_valid, hw_rdy_pop;
  logic [TID_W-1:0]  hw_rdy_tid;
  logic [5:0]        queue_overflow;
  int checks = 0, failures = 0;

  hthread_sync_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("            test thread acquisitions %0d retries %0d, cycles waiting for the bus %0d",
             hwt_acquired, hwt_retries, n_bus_wait);
    check(hwt_acquired > 0,  "mechanism: hardware test thread request / check / release");
    check(n_bus_wait > 0,    "mechanism: bus arbitration between CPU and hardware thread");
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

  // ---------------- shared bus, one access per cycle ----------------
  bit bus_busy = 1'b0;

  task automatic bus(input bit we, input int unit, input reg_off_t r, input data_t d,
                     output data_t rd);
    @(negedge clk);
    while (bus_busy) @(negedge clk);
    bus_busy  = 1'b1;
    bus_cs    = 1'b1;
    bus_we    = we;
    bus_addr  = {unit[ADDR_W-REG_W-1:0], r};
    bus_wdata = d;
    forever begin
      #1;
      if (bus_gnt) break;
      n_bus_wait++;
      @(negedge clk);
    end
    rd = bus_rdata;
    @(posedge clk);
    #1;
    bus_cs   = 1'b0;
    bus_busy = 1'b0;
  endtask

  task automatic wr(int unit, reg_off_t r, data_t d);
    data_t dummy;
    bus(1'b1, unit, r, d, dummy);
  endtask

  task automatic rd(int unit, reg_off_t r, output data_t d);
    bus(1'b0, unit, r, '0, d);
  endtask

  // ---------------- mechanism counters ----------------
  int n_spin_grant, n_spin_retry, n_cnt_grant, n_cnt_deny, n_grant_clear;
  int n_bb_grant, n_bb_queued, n_bc_grant, n_bc_suspend;
  int n_bus_wait;
  int n_cpu_wake, n_hw_wake, n_stall, n_overflow, n_sleep_timeout;

  always @(posedge clk) begin
    if (rst_n) begin
      if ((dut.u_sched.src_valid & ~dut.u_sched.src_ready) != '0) n_stall++;
    end
  end

  // ---------------- wake-up delivery ----------------
  bit woken [256];
  bit dispatch_on = 1'b0;

  // interrupt service routine: empty the CPU ready queue
  initial begin
    data_t v;
    forever begin
      @(posedge clk);
      if (dispatch_on && cpu_irq) begin
        rd(U_SCHED, R_CPU_READY, v);
        if (v[DATA_W-1]) begin
          check(!is_hw_thread(v[TID_W-1:0]), "CPU queue holds only software ids");
          woken[v[TID_W-1:0]] = 1'b1;
          n_cpu_wake++;
        end
      end
    end
  end

  // hardware side: take ids from the hardware thread ready queue
  initial begin
    hw_rdy_pop = 1'b0;
    forever begin
      @(negedge clk);
      hw_rdy_pop = dispatch_on && hw_rdy_valid;
      if (hw_rdy_pop) begin
        check(is_hw_thread(hw_rdy_tid), "hardware queue holds only hardware ids");
        woken[hw_rdy_tid] = 1'b1;
        n_hw_wake++;
      end
    end
  end

  task automatic sleep_until_woken(tid_t t);
    int c;
    c = 0;
    while (!woken[t] && c < 3000) begin
      @(posedge clk);
      c++;
    end
    if (!woken[t]) n_sleep_timeout++;
    woken[t] = 1'b0;
  endtask

  // ---------------- access routines ----------------
  task automatic gap(tid_t t);
    // software threads reach the bus far less often than hardware threads
    if (!is_hw_thread(t)) repeat (6) @(posedge clk);
  endtask

  task automatic spin_acquire(int unit, tid_t t);
    data_t v;
    forever begin
      wr(unit, R_RQST, t);
      gap(t);
      @(posedge clk);
      rd(unit, R_LOCK_OWN, v);
      if (v[TID_W-1:0] == t) break;
      n_spin_retry++;
      gap(t);
    end
  endtask

  task automatic spin_release(int unit, tid_t t);
    wr(unit, R_RELEASE, t);
    gap(t);
  endtask

  // counting semaphore (spin lock protected request); returns the grant
  task automatic cnt_try(int unit, tid_t t, int n, bit suspend, output bit g);
    data_t v;
    spin_acquire(unit, t);
    wr(unit, R_RQST_NUM, n);
    @(posedge clk);
    rd(unit, R_GRANT, v);
    g = v[0];
    if (g) begin
      rd(unit, R_GRANT, v);
      if (v[0] == 1'b0) n_grant_clear++;
    end
    if (!g && suspend) wr(unit, R_THREAD_ID, t);
    spin_release(unit, t);
  endtask

  task automatic bb_acquire(int unit, tid_t t);
    data_t v;
    forever begin
      wr(unit, R_RQST, t);
      gap(t);
      @(posedge clk);
      rd(unit, R_LOCK_OWN, v);
      if (v[TID_W-1:0] == t) break;
      n_bb_queued++;
      sleep_until_woken(t);
    end
  endtask

  // ---------------- invariants ----------------
  int spin_holder [4];
  int bb_holder [4];
  int csem_used [2], bcnt_used [2];
  localparam int CSEM_N = 3, BCNT_N = 4;

  task automatic thread(tid_t t);
    for (int it = 0; it < ITER; it++) begin
      int kind, u, n, hold;
      bit g;
      kind = $urandom_range(0, 3);
      hold = $urandom_range(1, 15);
      case (kind)
        0: begin
          u = $urandom_range(0, 1);
          spin_acquire(U_SPIN0 + u, t);
          check(spin_holder[u] == 0, "spin lock mutual exclusion");
          spin_holder[u] = t;
          n_spin_grant++;
          repeat (hold) @(posedge clk);
          spin_holder[u] = 0;
          spin_release(U_SPIN0 + u, t);
        end
        1: begin
          u = 0;
          n = $urandom_range(1, 2);
          do begin
            cnt_try(U_CSEM0 + u, t, n, 1'b0, g);
            if (!g) begin
              n_cnt_deny++;
              repeat (10) @(posedge clk);
            end
          end while (!g);
          n_cnt_grant++;
          csem_used[u] += n;
          check(csem_used[u] <= CSEM_N, "counting semaphore never over-allocates");
          repeat (hold) @(posedge clk);
          csem_used[u] -= n;
          wr(U_CSEM0 + u, R_REL_NUM, n);
          gap(t);
        end
        2: begin
          u = $urandom_range(0, 1);
          bb_acquire(U_BBIN0 + u, t);
          check(bb_holder[u] == 0, "blocking binary mutual exclusion");
          bb_holder[u] = t;
          n_bb_grant++;
          repeat (hold) @(posedge clk);
          bb_holder[u] = 0;
          wr(U_BBIN0 + u, R_RELEASE, t);
          gap(t);
        end
        default: begin
          u = 0;
          n = $urandom_range(1, 3);
          forever begin
            cnt_try(U_BCNT0 + u, t, n, 1'b1, g);
            if (g) break;
            n_bc_suspend++;
            sleep_until_woken(t);
          end
          n_bc_grant++;
          bcnt_used[u] += n;
          check(bcnt_used[u] <= BCNT_N, "blocking counting semaphore never over-allocates");
          repeat (hold) @(posedge clk);
          bcnt_used[u] -= n;
          wr(U_BCNT0 + u, R_REL_NUM, n);
          gap(t);
        end
      endcase
    end
  endtask

  // ---------------- test sequence ----------------
  data_t v;
  int    done;
  bit    g;
  initial begin
    bus_cs = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    hwt_run = 1'b0; hwt_delay = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // Phase 1a: overflow of a blocking binary request queue (unit 9)
    wr(U_BBIN0 + 3, R_RQST, 8'h70);
    for (int i = 0; i < 17; i++) wr(U_BBIN0 + 3, R_RQST, 8'h50 + i);
    repeat (2) @(posedge clk);
    check(queue_overflow[3], "request queue overflow flagged");
    rd(U_BBIN0 + 3, R_STATUS, v);
    check(v[DATA_W-1] && v[7:0] == 16, "status: full queue with overflow");
    if (v[DATA_W-1]) n_overflow++;
    // release: one wake for 8'h50 goes to the CPU queue
    wr(U_BBIN0 + 3, R_RELEASE, 8'h70);
    repeat (3) @(posedge clk);
    check(cpu_irq, "wake of a software thread raises the interrupt");
    rd(U_SCHED, R_CPU_READY, v);
    check(v[DATA_W-1] && v[7:0] == 8'h50, "oldest waiter handed to the CPU queue");

    // Phase 1b: 32 wake events for a 16-entry CPU ready queue
    for (int k = 0; k < 2; k++) begin
      wr(U_BCNT0 + k, R_MAX_COUNT, 0);
      for (int i = 0; i < 16; i++) begin
        cnt_try(U_BCNT0 + k, tid_t'(8'h20 + 16 * k + i), 1, 1'b1, g);
        check(!g, "empty pool denies");
      end
    end
    wr(U_BCNT0, R_REL_NUM, 16);
    wr(U_BCNT0 + 1, R_REL_NUM, 16);
    repeat (60) @(posedge clk);
    rd(U_SCHED, R_SCHED_ST, v);
    check(v[15:0] == 16, "CPU ready queue full");
    check(n_stall > 0, "framework held a semaphore back");
    dispatch_on = 1'b1;
    repeat (200) @(posedge clk);
    check(n_cpu_wake == 32, "all 32 wake events delivered once the queue drained");
    rd(U_SCHED, R_SCHED_ST, v);
    check(v == 0, "ready queues empty");
    for (int i = 0; i < 256; i++) woken[i] = 1'b0;

    // Phase 2: concurrent threads
    wr(U_CSEM0, R_MAX_COUNT, CSEM_N);
    wr(U_BCNT0, R_MAX_COUNT, BCNT_N);
    n_cpu_wake = 0;
    for (int u = 0; u < 4; u++) begin spin_holder[u] = 0; bb_holder[u] = 0; end
    csem_used = '{0, 0};
    bcnt_used = '{0, 0};
    done = 0;
    // the hardware test thread competes for spin lock 0 meanwhile
    hwt_delay = 16'd40;
    hwt_run   = 1'b1;
    for (int i = 0; i < NTH; i++) begin
      automatic tid_t t = (i < NTH / 2) ? tid_t'(i + 1) : tid_t'(8'h80 | (i - NTH / 2 + 1));
      fork
        begin
          thread(t);
          done++;
        end
      join_none
    end
    wait (done == NTH);
    hwt_run = 1'b0;
    repeat (80) @(posedge clk);
    check(done == NTH, "every thread finished");
    rd(U_CSEM0, R_MAX_COUNT, v);
    check(v == CSEM_N, "counting semaphore back to its full count");
    rd(U_BCNT0, R_MAX_COUNT, v);
    check(v == BCNT_N, "blocking counting semaphore back to its full count");
    for (int u = 0; u < 2; u++) begin
      rd(U_SPIN0 + u, R_LOCK_OWN, v);
      check(v == 0, "spin locks free at the end");
      rd(U_BBIN0 + u, R_LOCK_OWN, v);
      check(v == 0, "blocking locks free at the end");
    end

    $display("mechanisms: spin grant %0d retry %0d | count grant %0d deny %0d clear %0d",
             n_spin_grant, n_spin_retry, n_cnt_grant, n_cnt_deny, n_grant_clear);
    $display("            blocking bin grant %0d queued %0d | blocking count grant %0d suspend %0d",
             n_bb_grant, n_bb_queued, n_bc_grant, n_bc_suspend);
    $display("            cpu wakes %0d hw wakes %0d stall cycles %0d overflow %0d sleep timeouts %0d",
             n_cpu_wake, n_hw_wake, n_stall, n_overflow, n_sleep_timeout);
    check(n_spin_grant > 0,  "mechanism: spin lock grant");
    check(n_spin_retry > 0,  "mechanism: spin lock busy-wait retry");
    check(n_cnt_grant > 0,   "mechanism: counting grant");
    check(n_cnt_deny > 0,    "mechanism: counting denial");
    check(n_grant_clear > 0, "mechanism: grant clear on read");
    check(n_bb_queued > 0,   "mechanism: blocking binary queueing");
    check(n_bc_suspend > 0,  "mechanism: blocking counting suspend");
    check(n_cpu_wake > 0,    "mechanism: software thread woken through the CPU queue");
    check(n_hw_wake > 0,     "mechanism: hardware thread woken through its queue");
    check(n_stall > 0,       "mechanism: ready queue back-pressure");
    check(n_overflow > 0,    "mechanism: request queue overflow");

    $display("            test thread acquisitions %0d retries %0d, cycles waiting for the bus %0d",
             hwt_acquired, hwt_retries, n_bus_wait);
    check(hwt_acquired > 0,  "mechanism: hardware test thread request / check / release");
    check(n_bus_wait > 0,    "mechanism: bus arbitration between CPU and hardware thread");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
