// tb_hw_sw_contention: hardware and software threads competing for one
// binary spin lock.
//
// The built-in hardware test thread and a software thread (modelled here on
// the CPU port) both run request / owner check / release on spin lock 0. The
// software thread leaves eight idle cycles after each of its bus accesses, so
// that on its own it is about seven times slower than the hardware thread,
// the speed ratio measured on the document's hardware. For a series of
// hardware delay-loop lengths the testbench counts the lock acquisitions of
// both threads over a fixed window and prints the hardware/software ratio
// and the total normalised to what the hardware thread achieves alone.
// Checks: the speed ratio alone, hardware dominance at zero delay, a ratio
// that falls as the delay grows, and a total that never exceeds the
// uncontended hardware rate by more than the software thread can add.
module tb_hw_sw_contention;
  import sem_pkg::*;
  localparam int unsigned ADDR_W = 12;
  localparam int          WINDOW = 6000;
  localparam int          SW_GAP = 8;
  localparam tid_t        SW_TID = 8'h05;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              bus_cs, bus_we, bus_gnt, hwt_run;
  logic [ADDR_W-1:0] bus_addr;
  logic [DATA_W-1:0] bus_wdata, bus_rdata;
  logic [15:0]       hwt_delay;
  logic [31:0]       hwt_acquired, hwt_retries;
  logic              cpu_irq, hw_rdy_valid, hw_rdy_pop;
  logic [TID_W-1:0]  hw_rdy_tid;
  logic [5:0]        queue_overflow;
  int checks = 0, failures = 0;

  hthread_sync_top dut (.*);

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

  task automatic bus(input bit we, input reg_off_t r, input data_t d, output data_t rd);
    @(negedge clk);
    bus_cs    = 1'b1;
    bus_we    = we;
    bus_addr  = {8'd0, r};
    bus_wdata = d;
    forever begin
      #1;
      if (bus_gnt) break;
      @(negedge clk);
    end
    rd = bus_rdata;
    @(posedge clk);
    #1 bus_cs = 1'b0;
    repeat ($urandom_range(SW_GAP - 4, SW_GAP + 4)) @(posedge clk);
  endtask

  // software thread: request / check / release while sw_run is set
  bit sw_run = 1'b0;
  int sw_acq = 0;
  initial begin
    data_t v;
    forever begin
      @(posedge clk);
      while (sw_run) begin
        bus(1'b1, R_RQST, SW_TID, v);
        bus(1'b0, R_LOCK_OWN, '0, v);
        if (v[TID_W-1:0] == SW_TID) begin
          bus(1'b1, R_RELEASE, SW_TID, v);
          sw_acq++;
        end
      end
    end
  end

  int hw0, sw0, max_hw, sw_alone;
  real ratio [5], norm [5];
  int delays [5] = '{0, 2, 4, 8, 16};

  task automatic window(bit hw, bit sw, int d, output int hw_n, output int sw_n);
    int h0, s0;
    @(negedge clk);
    hwt_delay = 16'(d);
    h0 = hwt_acquired;
    s0 = sw_acq;
    hwt_run = hw;
    sw_run  = sw;
    repeat (WINDOW) @(posedge clk);
    @(negedge clk);
    hw_n = hwt_acquired - h0;
    sw_n = sw_acq - s0;
    hwt_run = 1'b0;
    sw_run  = 1'b0;
    repeat (60) @(posedge clk);
  endtask

  initial begin
    int h, s;
    bus_cs = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    hwt_run = 1'b0; hwt_delay = '0; hw_rdy_pop = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    window(1'b1, 1'b0, 0, max_hw, s);
    window(1'b0, 1'b1, 0, h, sw_alone);
    $display("uncontended: hardware %0d, software %0d acquisitions in %0d cycles",
             max_hw, sw_alone, WINDOW);
    check(max_hw > 0 && sw_alone > 0, "both threads progress alone");
    check(real'(max_hw) / sw_alone > 6.0 && real'(max_hw) / sw_alone < 8.0,
          "hardware thread about seven times faster alone");

    $display("delay  hw   sw   hw/sw   (hw+sw)/max_hw");
    for (int k = 0; k < 5; k++) begin
      window(1'b1, 1'b1, delays[k], h, s);
      ratio[k] = (s == 0) ? 1.0e9 : real'(h) / s;
      norm[k]  = real'(h + s) / max_hw;
      if (s == 0) $display("%5d %4d %4d     inf %8.3f", delays[k], h, s, norm[k]);
      else        $display("%5d %4d %4d %7.3f %8.3f", delays[k], h, s, ratio[k], norm[k]);
      check(h > 0, "hardware thread progresses under contention");
      check(norm[k] <= 1.0 + real'(sw_alone) / max_hw + 0.01, "total bounded by the two rates");
    end
    check(ratio[0] > 1.0, "hardware thread dominates at zero delay");
    for (int k = 1; k < 5; k++) check(ratio[k] <= ratio[k-1], "ratio falls as the delay grows");
    check(ratio[4] < ratio[0], "delay loop rebalances the competition");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
