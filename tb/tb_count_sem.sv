// tb_count_sem: self-checking test of the spin lock counting semaphore.
// Directed cases: count load, a grant that empties the pool exactly, a denied
// request, clear-on-read of the grant flag, release without the spin lock,
// saturation on release, the one-cycle decision latency and the embedded
// spin lock. Then random load / request / release traffic against a model.
module tb_count_sem;
  import sem_pkg::*;
  logic     clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  data_t    rdata;
  cnt_t     count;
  logic     grant;
  tid_t     lock_owner;
  int checks = 0, failures = 0;

  count_sem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic bus(input bit we, input reg_off_t a, input data_t d, output data_t rd);
    @(negedge clk);
    req = '{cs: 1'b1, we: we, addr: a, wdata: d};
    #1 rd = rdata;
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
  int    m_count;
  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(1);

    wr(R_MAX_COUNT, 10);
    idle(1);
    rd(R_MAX_COUNT, v);
    check(v == 10, "count loaded");

    // protecting spin lock
    wr(R_RQST, 3);
    idle(1);
    rd(R_LOCK_OWN, v);
    check(v == 3, "spin lock taken");

    // request 4 of 10: decision in the cycle after the latch
    wr(R_RQST_NUM, 4);
    check(grant == 1'b0 && count == 10, "no decision in the latch cycle");
    idle(1);
    check(grant == 1'b1 && count == 6, "granted one cycle after the request");
    rd(R_GRANT, v);
    check(v == 1, "grant reads 1");
    rd(R_GRANT, v);
    check(v == 0, "grant cleared by the read");

    // request more than available
    wr(R_RQST_NUM, 7);
    idle(1);
    rd(R_GRANT, v);
    check(v == 0, "insufficient resources: grant 0");
    check(count == 6, "count unchanged on denial");

    // request exactly what is left
    wr(R_RQST_NUM, 6);
    idle(1);
    rd(R_GRANT, v);
    check(v == 1 && count == 0, "exact request granted, pool empty");
    wr(R_RELEASE, 3);
    idle(1);
    check(lock_owner == 0, "spin lock released");

    // release without the spin lock
    wr(R_REL_NUM, 5);
    idle(1);
    rd(R_MAX_COUNT, v);
    check(v == 5, "release adds to the count");

    // saturation
    wr(R_MAX_COUNT, 16'hFFFE);
    wr(R_REL_NUM, 5);
    idle(1);
    check(count == 16'hFFFF, "release saturates");

    // random traffic
    wr(R_MAX_COUNT, 20);
    m_count = 20;
    idle(1);
    for (int i = 0; i < 3000; i++) begin
      int unsigned op, n;
      op = $urandom_range(0, 9);
      n  = $urandom_range(0, 12);
      if (op < 5) begin
        wr(R_RQST_NUM, n);
        idle(1);
        rd(R_GRANT, v);
        check(v == data_t'(n <= m_count), "random grant");
        if (n <= m_count) m_count -= n;
      end else if (op < 9) begin
        wr(R_REL_NUM, n);
        m_count += n;
        idle(1);
      end else begin
        n = $urandom_range(0, 30);
        wr(R_MAX_COUNT, n);
        m_count = n;
        idle(1);
      end
      check(count == cnt_t'(m_count), "random count");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
