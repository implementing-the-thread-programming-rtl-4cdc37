// tb_sys_sched: self-checking test of the ready-queue framework.
// Three wake-event sources feed the block. A directed part checks the
// round-robin order when all sources are busy, the interrupt, the pop on a
// CPU ready queue read and the bus read of the hardware thread queue. A random part sends events with hardware and
// software ids from all sources under random queue drain rates; every id
// must come out of the right queue, in the order it was accepted, exactly
// once, and sources must be held back while their target queue is full.
module tb_sys_sched;
  import sem_pkg::*;
  localparam int unsigned N = 3, D = 4;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] src_valid, src_ready;
  tid_t         src_tid [N];
  bus_req_t     req;
  data_t        rdata;
  logic         cpu_irq, hw_valid, hw_pop;
  tid_t         hw_tid;
  int checks = 0, failures = 0;

  sys_sched #(.NSRC(N), .QDEPTH(D)) dut (.*);

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

  // accepted events, in order, per destination
  tid_t exp_cpu [$], exp_hw [$];
  int   grant_src [$];
  int   n_stall = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < N; s++) begin
        if (src_valid[s] && src_ready[s]) begin
          if (is_hw_thread(src_tid[s])) exp_hw.push_back(src_tid[s]);
          else                          exp_cpu.push_back(src_tid[s]);
          grant_src.push_back(s);
        end
      end
      if (src_valid != '0 && src_ready == '0) n_stall++;
    end
  end

  task automatic cpu_read(output data_t d);
    @(negedge clk);
    req = '{cs: 1'b1, we: 1'b0, addr: R_CPU_READY, wdata: '0};
    #1 d = rdata;
    @(posedge clk);
    #1 req.cs = 1'b0;
  endtask

  data_t v;
  int    sent [N];
  initial begin
    req = '0;
    src_valid = '0;
    hw_pop = 1'b0;
    for (int s = 0; s < N; s++) src_tid[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!cpu_irq && !hw_valid, "queues empty after reset");

    // round robin: three software events at once, three times over
    for (int s = 0; s < N; s++) begin
      src_valid[s] = 1'b1;
      src_tid[s]   = tid_t'(s + 1);
    end
    @(posedge clk);
    #1;
    check(cpu_irq, "interrupt once the CPU queue holds an id");
    @(negedge clk);
    src_valid = '0;
    @(negedge clk);
    check(grant_src.size() == 1 && grant_src[0] == 0, "source 0 first");
    cpu_read(v);
    check(v[DATA_W-1] && v[7:0] == 1, "CPU ready queue returns the id");
    void'(exp_cpu.pop_front());
    @(negedge clk);
    check(!cpu_irq, "interrupt drops when the queue is emptied");
    // all three busy for six cycles
    grant_src.delete();
    for (int s = 0; s < N; s++) begin
      src_tid[s]   = tid_t'(8'h80 | (s * 16 + 15));
      src_valid[s] = 1'b1;
    end
    fork
      begin
        for (int c = 0; c < 6; c++) begin
          @(posedge clk);
          #1;
          for (int s = 0; s < N; s++) if (src_ready[s]) src_tid[s] = tid_t'(8'h80 | (s * 16 + c));
        end
        src_valid = '0;
      end
      begin
        repeat (7) begin
          @(negedge clk);
          hw_pop = 1'b1;
        end
        @(negedge clk);
        hw_pop = 1'b0;
      end
    join
    check(grant_src.size() == 6, "one event per cycle");
    for (int k = 0; k < grant_src.size(); k++)
      check(grant_src[k] == (k + 1) % N, "round-robin order");
    // one more hardware event, fetched over the bus this time
    @(negedge clk);
    src_tid[0]   = 8'hC7;
    src_valid[0] = 1'b1;
    @(posedge clk);
    #1 src_valid[0] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(hw_valid && hw_tid == 8'hC7, "hardware event queued");
    req = '{cs: 1'b1, we: 1'b0, addr: R_HW_READY, wdata: '0};
    #1 check(rdata[DATA_W-1] && rdata[7:0] == 8'hC7, "hardware queue readable over the bus");
    @(posedge clk);
    #1 req.cs = 1'b0;
    check(!hw_valid, "bus read popped the hardware queue");
    req = '{cs: 1'b1, we: 1'b0, addr: R_HW_READY, wdata: '0};
    #1 check(!rdata[DATA_W-1], "empty hardware queue reads invalid");
    @(posedge clk);
    #1 req.cs = 1'b0;
    repeat (6) @(posedge clk);
    check(exp_cpu.size() == 0 && !cpu_irq, "hardware ids never reach the CPU queue");
    exp_hw.delete();
    check(!hw_valid, "hardware queue drained by the pops");

    // random traffic
    for (int s = 0; s < N; s++) sent[s] = 0;
    fork
      // sources
      for (int s0 = 0; s0 < N; s0++) begin
        automatic int s = s0;
        fork
          for (int e = 0; e < 300; e++) begin
            @(negedge clk);
            src_tid[s]   = tid_t'({$urandom_range(0, 1), 7'($urandom_range(1, 127))});
            src_valid[s] = 1'b1;
            do @(posedge clk); while (!src_ready[s]);
            #1 src_valid[s] = 1'b0;
            sent[s]++;
            repeat ($urandom_range(0, 3)) @(posedge clk);
          end
        join_none
      end
      // CPU side: reads at random
      begin
        for (int c = 0; c < 6000; c++) begin
          if ($urandom_range(0, 2) == 0) begin
            // sample and compare before the edge that pops the entry
            @(negedge clk);
            req = '{cs: 1'b1, we: 1'b0, addr: R_CPU_READY, wdata: '0};
            #1 v = rdata;
            if (v[DATA_W-1]) begin
              check(exp_cpu.size() > 0 && v[7:0] == exp_cpu[0], "CPU queue order");
              if (exp_cpu.size() > 0) void'(exp_cpu.pop_front());
            end else begin
              check(exp_cpu.size() == 0, "empty read only when nothing is queued");
            end
            @(posedge clk);
            #1 req.cs = 1'b0;
          end else @(posedge clk);
        end
      end
      // hardware side: pops at random
      begin
        for (int c = 0; c < 6000; c++) begin
          @(negedge clk);
          hw_pop = hw_valid && ($urandom_range(0, 2) == 0);
          if (hw_pop) begin
            check(exp_hw.size() > 0 && hw_tid == exp_hw[0], "hardware queue order");
            if (exp_hw.size() > 0) void'(exp_hw.pop_front());
          end
        end
        @(negedge clk);
        hw_pop = 1'b0;
      end
    join
    for (int s = 0; s < N; s++) check(sent[s] == 300, "every source delivered all events");
    check(exp_cpu.size() == 0 && exp_hw.size() == 0, "nothing left behind");
    check(n_stall > 0, "back-pressure from a full queue happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
