// sem_pkg: types and constants shared by the hybrid thread synchronization
// cores.
//
// Every semaphore core is a small memory-mapped slave. A bus access lasts one
// clock cycle and is described by bus_req_t: a select, a write strobe, a word
// offset inside the core and the write data. Read data is returned
// combinationally in the same cycle. The register offsets below are the map
// of every core; the document names the registers but gives no addresses, so
// the offsets, the 32-bit data bus, the 8-bit thread id and the rule that id 0
// means "no owner" are this design's choices.
//
// Thread ids: the most significant id bit tells a hardware thread (1) from a
// software thread (0). Wake events use it to pick the CPU or the hardware
// thread ready-to-run queue.
package sem_pkg;

  localparam int unsigned DATA_W = 32;   // width of the memory-mapped data bus
  localparam int unsigned TID_W  = 8;    // width of a thread id
  localparam int unsigned CNT_W  = 16;   // width of a resource count
  localparam int unsigned REG_W  = 4;    // word offset width inside one core

  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [REG_W-1:0]  reg_off_t;

  // Reserved id: an owner register holding it means the lock is free.
  localparam tid_t TID_NONE = '0;

  // One bus access, valid for one cycle while cs is high.
  typedef struct packed {
    logic     cs;      // core selected this cycle
    logic     we;      // 1 = write, 0 = read
    reg_off_t addr;    // word offset inside the core
    data_t    wdata;   // write data
  } bus_req_t;

  // Register offsets shared by all semaphore cores.
  localparam reg_off_t R_RQST      = 4'h0;  // W: thread id requesting the lock
  localparam reg_off_t R_LOCK_OWN  = 4'h1;  // R: current lock owner, 0 when free
  localparam reg_off_t R_RELEASE   = 4'h2;  // W: thread id releasing the lock
  localparam reg_off_t R_MAX_COUNT = 4'h3;  // W: load count, R: current count
  localparam reg_off_t R_RQST_NUM  = 4'h4;  // W: number of resources requested
  localparam reg_off_t R_GRANT     = 4'h5;  // R: grant flag, cleared by the read
  localparam reg_off_t R_REL_NUM   = 4'h6;  // W: number of resources released
  localparam reg_off_t R_THREAD_ID = 4'h7;  // W: thread id to suspend (blocking counting)
  localparam reg_off_t R_STATUS    = 4'h8;  // R: queue level and overflow flag

  // Registers of the ready-queue framework.
  localparam reg_off_t R_CPU_READY = 4'h0;  // R: pop one id from the CPU ready queue
  localparam reg_off_t R_SCHED_ST  = 4'h1;  // R: queue levels
  localparam reg_off_t R_HW_READY  = 4'h2;  // R: pop one id from the hardware thread ready queue

  // Resume policies of the blocking counting semaphore.
  //   POL_FIT: wake queued threads whose request fits in the resources now
  //            available (fewer-resource requests first to fit), keeping a
  //            per-entry copy of the requested number.
  //   POL_ALL: wake every queued thread; no requested numbers are stored.
  typedef enum logic {POL_FIT = 1'b0, POL_ALL = 1'b1} resume_policy_e;

  function automatic logic is_hw_thread(tid_t t);
    return t[TID_W-1];
  endfunction

endpackage
