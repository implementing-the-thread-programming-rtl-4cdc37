// tb_hw_test_thread: self-checking test of the hardware test thread.
// The testbench plays the bus and the spin lock: it grants the bus at
// random, answers owner reads from its own lock model, and can hold the lock
// for another thread. It checks the order and addresses of the accesses
// (request, one idle cycle, owner read, release), the busy-wait retry while
// the lock is taken, the delay loop length between sequences, the counters
// and the stop on run low. With the bus always granted one sequence must take
// exactly four cycles plus the delay.
module tb_hw_test_thread;
  import sem_pkg::*;
  localparam int unsigned ADDR_W = 12;
  localparam tid_t        TID    = 8'h85;
  localparam int unsigned UNIT   = 3;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              run, cs, we, gnt;
  logic [15:0]       delay;
  logic [ADDR_W-1:0] addr;
  data_t             wdata, rdata;
  logic [31:0]       acquired, retries;
  int checks = 0, failures = 0;

  hw_test_thread #(.TID(TID), .LOCK_UNIT(UNIT), .ADDR_W(ADDR_W)) dut (.*);

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

  // bus and lock model
  bit   random_gnt = 1'b0;
  tid_t lock_owner = 0;
  bit   other_holds = 1'b0;
  int   cyc = 0, last_rqst = -1, last_rel = -1, n_acq = 0, n_retry = 0;
  int   period [$];
  typedef enum {E_RQST, E_CHECK, E_REL} ev_e;
  ev_e  expect_next = E_RQST;

  always_comb begin
    gnt   = cs && (!random_gnt || ($urandom_range(0, 2) != 0));
    rdata = (cs && !we && addr[3:0] == R_LOCK_OWN) ? data_t'(lock_owner) : '0;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && cs && gnt) begin
      check(addr[ADDR_W-1:4] == UNIT, "access goes to the configured unit");
      case (addr[3:0])
        R_RQST: begin
          check(we && wdata[7:0] == TID, "request writes the thread id");
          check(expect_next == E_RQST, "request comes when expected");
          if (last_rqst >= 0 && last_rel >= 0 && last_rel > last_rqst)
            period.push_back(cyc - last_rqst);
          last_rqst = cyc;
          if (lock_owner == 0 && !other_holds) lock_owner = TID;
          expect_next = E_CHECK;
        end
        R_LOCK_OWN: begin
          check(!we, "owner check is a read");
          check(expect_next == E_CHECK, "check follows the request");
          check(cyc - last_rqst >= 2, "check waits a cycle for the lock logic");
          if (lock_owner == TID) expect_next = E_REL;
          else begin
            expect_next = E_RQST;
            n_retry++;
          end
        end
        R_RELEASE: begin
          check(we && wdata[7:0] == TID, "release writes the thread id");
          check(expect_next == E_REL, "release only after a successful check");
          lock_owner = 0;
          last_rel = cyc;
          n_acq++;
          expect_next = E_RQST;
        end
        default: check(1'b0, "unexpected register");
      endcase
    end
  end

  initial begin
    run = 1'b0;
    delay = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(!cs && acquired == 0, "idle while run is low");

    // bus always granted: period is delay + 4
    for (int k = 0; k < 4; k++) begin
      int d;
      d = (k == 0) ? 0 : 3 * k;
      @(negedge clk);
      delay = 16'(d);
      run = 1'b1;
      period.delete();
      repeat (200) @(posedge clk);
      @(negedge clk);
      run = 1'b0;
      repeat (d + 10) @(posedge clk);
      check(!cs, "stops after run drops");
      check(period.size() > 5, "several sequences completed");
      foreach (period[i]) check(period[i] == d + 4, "sequence period is delay + 4 cycles");
      last_rqst = -1;
      last_rel = -1;
    end
    check(acquired == 32'(n_acq), "acquired counter");

    // lock held by another thread: busy-wait retries, no release
    @(negedge clk);
    other_holds = 1'b1;
    lock_owner = 8'h22;
    delay = 16'd2;
    run = 1'b1;
    repeat (100) @(posedge clk);
    check(retries > 10 && retries == 32'(n_retry), "retries counted while the lock is taken");
    @(negedge clk);
    other_holds = 1'b0;
    lock_owner = 0;
    // random bus grants
    random_gnt = 1'b1;
    repeat (1000) @(posedge clk);
    @(negedge clk);
    run = 1'b0;
    repeat (30) @(posedge clk);
    check(acquired == 32'(n_acq) && retries == 32'(n_retry), "counters under random grants");
    check(n_acq > 50, "progress under random grants");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
