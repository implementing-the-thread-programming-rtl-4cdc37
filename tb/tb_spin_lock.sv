// tb_spin_lock: self-checking test of the binary spin lock.
// Directed cases (free lock, held lock, wrong releaser, back-to-back
// requests, one-cycle control latency) followed by random request / release
// traffic from several thread ids compared with a reference model.
module tb_spin_lock;
  import sem_pkg::*;
  logic     clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  data_t    rdata;
  tid_t     owner;
  int checks = 0, failures = 0;

  spin_lock dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // One bus cycle; rd returns the read data sampled in that cycle.
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
  tid_t  m_owner;
  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(1);
    rd(R_LOCK_OWN, v);
    check(v == 0, "free after reset");

    // request on a free lock: owner changes on the edge after the latch edge
    wr(R_RQST, 5);
    check(owner == 0, "owner not yet updated in the latch cycle");
    idle(1);
    check(owner == 5, "owner updated one cycle after the request");
    rd(R_LOCK_OWN, v);
    check(v == 5, "Lock_own reads the new owner");

    // request on a held lock is not accepted
    wr(R_RQST, 7);
    idle(2);
    rd(R_LOCK_OWN, v);
    check(v == 5, "held lock keeps its owner");

    // a release carrying another id does nothing
    wr(R_RELEASE, 7);
    idle(2);
    check(owner == 5, "release by non-owner ignored");

    wr(R_RELEASE, 5);
    idle(2);
    rd(R_LOCK_OWN, v);
    check(v == 0, "release frees the lock");

    // two requests in consecutive cycles: the first one wins
    wr(R_RQST, 9);
    wr(R_RQST, 11);
    idle(2);
    check(owner == 9, "first of back-to-back requests wins");
    wr(R_RELEASE, 9);
    idle(2);

    // random traffic against a model
    m_owner = 0;
    for (int i = 0; i < 2000; i++) begin
      tid_t t;
      bit   is_req;
      t = tid_t'($urandom_range(1, 6));
      is_req = $urandom_range(0, 1);
      if (is_req) begin
        wr(R_RQST, t);
        if (m_owner == 0) m_owner = t;
      end else begin
        wr(R_RELEASE, t);
        if (m_owner == t) m_owner = 0;
      end
      idle(1);
      rd(R_LOCK_OWN, v);
      check(v == data_t'(m_owner), "random owner matches model");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
