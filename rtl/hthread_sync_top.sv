// hthread_sync_top: hardware synchronization subsystem for hybrid CPU/FPGA
// multithreading.
//
// Software threads on the CPU and hardware threads in the FPGA reach the
// same memory-mapped registers and use the same access routines: write a
// thread id or a number into a register, then read a status register back.
// Behind one bus port sit NUM_SPIN binary spin locks, NUM_CSEM spin lock counting
// semaphores, NUM_BBIN blocking binary semaphores, NUM_BCNT blocking counting
// semaphores and the scheduling framework that collects the wake events of
// all blocking semaphores into a CPU ready queue (with interrupt) and a
// hardware thread ready queue. A hardware test thread (hw_test_thread), the
// one the document uses to measure hardware/software contention, competes
// with the CPU for spin lock HWT_UNIT through a two-master arbiter (bus_arb)
// in front of the cores; it is idle while hwt_run is low.
//
// Address map (word addresses): bus_addr[ADDR_W-1:4] selects a core,
// bus_addr[3:0] is the register offset inside it (sem_pkg). Cores are
// numbered spin locks first, then counting, blocking binary, blocking
// counting semaphores, and the scheduling framework last. A bus access takes
// the one cycle in which bus_gnt is high; read data is valid in that cycle.
//
// Ports: the CPU master port (bus_cs/we/addr/wdata held until bus_gnt,
// bus_rdata), the test thread's run / delay inputs and counters, cpu_irq,
// the hardware thread ready queue head (hw_rdy_valid, hw_rdy_tid, popped by
// hw_rdy_pop) and the overflow flags of the blocking semaphores.
//
// The numbers of cores, the address map and the bus port are this design's
// choices: the document shows a row of semaphores on a shared system bus
// without fixing how many or where. The bus itself (a CoreConnect bus in the
// document's system) lies outside this block.
module hthread_sync_top
  import sem_pkg::*;
#(
  parameter int unsigned    NUM_SPIN    = 4,
  parameter int unsigned    NUM_CSEM    = 2,
  parameter int unsigned    NUM_BBIN    = 4,
  parameter int unsigned    NUM_BCNT    = 2,
  parameter int unsigned    SEM_QDEPTH  = 16,
  parameter int unsigned    RDY_QDEPTH  = 16,
  parameter bit             BB_WAKE_ALL = 1'b0,
  parameter resume_policy_e BC_POLICY   = POL_FIT,
  parameter int unsigned    ADDR_W      = 12,
  parameter tid_t           HWT_TID     = 8'h81,
  parameter int unsigned    HWT_UNIT    = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU bus master: hold cs until gnt; the access happens in the gnt cycle
  input  logic              bus_cs,
  input  logic              bus_we,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [DATA_W-1:0] bus_wdata,
  output logic              bus_gnt,
  output logic [DATA_W-1:0] bus_rdata,
  // hardware test thread: run, delay loop length, statistics
  input  logic              hwt_run,
  input  logic [15:0]       hwt_delay,
  output logic [31:0]       hwt_acquired,
  output logic [31:0]       hwt_retries,
  // event signalling
  output logic              cpu_irq,
  output logic              hw_rdy_valid,
  output logic [TID_W-1:0]  hw_rdy_tid,
  input  logic              hw_rdy_pop,
  // sticky queue-overflow flags of the blocking semaphores
  output logic [NUM_BBIN+NUM_BCNT-1:0] queue_overflow
);
  localparam int unsigned NBLK   = NUM_BBIN + NUM_BCNT;
  localparam int unsigned BASE_C = NUM_SPIN;
  localparam int unsigned BASE_B = BASE_C + NUM_CSEM;
  localparam int unsigned BASE_K = BASE_B + NUM_BBIN;
  localparam int unsigned BASE_S = BASE_K + NUM_BCNT;
  localparam int unsigned NUNIT  = BASE_S + 1;
  localparam int unsigned UW     = ADDR_W - REG_W;

  initial begin
    assert (NUNIT <= 2 ** UW) else $fatal(1, "address space too small for the cores");
    assert (NBLK > 0) else $fatal(1, "the framework needs at least one blocking semaphore");
  end

  // Two bus masters, the CPU and the hardware test thread, share the port.
  logic              s_cs, s_we;
  logic [ADDR_W-1:0] s_addr;
  data_t             s_wdata, s_rdata;
  logic              h_cs, h_we;
  logic [ADDR_W-1:0] h_addr;
  data_t             h_wdata;
  logic [1:0]        gnt;
  logic [ADDR_W-1:0] m_addr  [2];
  data_t             m_wdata [2];

  assign m_addr  = '{bus_addr, h_addr};
  assign m_wdata = '{bus_wdata, h_wdata};

  bus_arb #(.ADDR_W(ADDR_W)) u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .m_cs    ({h_cs, bus_cs}),
    .m_we    ({h_we, bus_we}),
    .m_addr  (m_addr),
    .m_wdata (m_wdata),
    .m_gnt   (gnt),
    .s_cs    (s_cs),
    .s_we    (s_we),
    .s_addr  (s_addr),
    .s_wdata (s_wdata)
  );

  assign bus_gnt   = gnt[0];
  assign bus_rdata = s_rdata;

  hw_test_thread #(.TID(HWT_TID), .LOCK_UNIT(HWT_UNIT), .ADDR_W(ADDR_W)) u_hwt (
    .clk      (clk),
    .rst_n    (rst_n),
    .run      (hwt_run),
    .delay    (hwt_delay),
    .cs       (h_cs),
    .we       (h_we),
    .addr     (h_addr),
    .wdata    (h_wdata),
    .gnt      (gnt[1]),
    .rdata    (s_rdata),
    .acquired (hwt_acquired),
    .retries  (hwt_retries)
  );

  logic [UW-1:0] unit;
  assign unit = s_addr[ADDR_W-1:REG_W];

  bus_req_t ureq  [NUNIT];
  data_t    urdat [NUNIT];

  always_comb begin
    for (int u = 0; u < NUNIT; u++) begin
      ureq[u].cs    = s_cs && unit == UW'(u);
      ureq[u].we    = s_we;
      ureq[u].addr  = s_addr[REG_W-1:0];
      ureq[u].wdata = s_wdata;
    end
  end

  always_comb begin
    s_rdata = '0;
    for (int u = 0; u < NUNIT; u++) s_rdata |= urdat[u];
  end

  // Wake events from the blocking semaphores to the framework.
  logic [NBLK-1:0] wk_valid, wk_ready;
  tid_t            wk_tid [NBLK];

  for (genvar i = 0; i < NUM_SPIN; i++) begin : g_spin
    spin_lock u_sem (
      .clk (clk), .rst_n (rst_n), .req (ureq[i]), .rdata (urdat[i]), .owner ()
    );
  end

  for (genvar i = 0; i < NUM_CSEM; i++) begin : g_csem
    count_sem u_sem (
      .clk (clk), .rst_n (rst_n), .req (ureq[BASE_C+i]), .rdata (urdat[BASE_C+i]),
      .count (), .grant (), .lock_owner ()
    );
  end

  for (genvar i = 0; i < NUM_BBIN; i++) begin : g_bbin
    blocking_bin_sem #(.QDEPTH(SEM_QDEPTH), .WAKE_ALL(BB_WAKE_ALL)) u_sem (
      .clk (clk), .rst_n (rst_n), .req (ureq[BASE_B+i]), .rdata (urdat[BASE_B+i]),
      .owner (), .wake_valid (wk_valid[i]), .wake_tid (wk_tid[i]),
      .wake_ready (wk_ready[i]), .overflow (queue_overflow[i])
    );
  end

  for (genvar i = 0; i < NUM_BCNT; i++) begin : g_bcnt
    blocking_cnt_sem #(.QDEPTH(SEM_QDEPTH), .POLICY(BC_POLICY)) u_sem (
      .clk (clk), .rst_n (rst_n), .req (ureq[BASE_K+i]), .rdata (urdat[BASE_K+i]),
      .count (), .grant (), .lock_owner (),
      .wake_valid (wk_valid[NUM_BBIN+i]), .wake_tid (wk_tid[NUM_BBIN+i]),
      .wake_ready (wk_ready[NUM_BBIN+i]), .overflow (queue_overflow[NUM_BBIN+i])
    );
  end

  sys_sched #(.NSRC(NBLK), .QDEPTH(RDY_QDEPTH)) u_sched (
    .clk       (clk),
    .rst_n     (rst_n),
    .src_valid (wk_valid),
    .src_tid   (wk_tid),
    .src_ready (wk_ready),
    .req       (ureq[BASE_S]),
    .rdata     (urdat[BASE_S]),
    .cpu_irq   (cpu_irq),
    .hw_valid  (hw_rdy_valid),
    .hw_tid    (hw_rdy_tid),
    .hw_pop    (hw_rdy_pop)
  );
endmodule
