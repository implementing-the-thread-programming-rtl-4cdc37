// spin_lock: binary spin lock semaphore.
//
// A thread asks for the lock by writing its thread id into the Rqst register,
// then reads Lock_own back and compares it with its own id. If the lock was
// free the control logic has made it the owner; if the lock was held nothing
// changed and the thread tries again. It frees the lock by writing its id
// into the Release register. No read-modify-write bus cycle is needed: the
// decision is made inside the core.
//
// Timing (as the document describes it): a written value is latched at the end
// of the bus cycle and the control logic acts on it in the next cycle, so the
// owner register changes on the clock edge after the edge that latched Rqst.
// A read in the cycle right after the write still sees the old owner; the
// access routine reads Lock_own at least one cycle later.
//
// Interface: one memory-mapped slave port (sem_pkg::bus_req_t in, read data
// out, combinational). Offsets R_RQST (W), R_LOCK_OWN (R), R_RELEASE (W);
// other offsets are ignored so that the core can sit inside a larger
// semaphore. owner is also brought out as a port.
//
// This design's choices: thread id 0 means "free" and a request carrying it is
// ignored; a release is honoured only if it carries the owner's id; a request
// from the current owner leaves it the owner.
module spin_lock
  import sem_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output data_t    rdata,
  output tid_t     owner
);
  typedef enum logic [1:0] {OP_NONE, OP_RQST, OP_REL} op_e;

  op_e  op_q;     // latched bus write waiting for the control logic
  tid_t tid_q;    // Rqst / Release register contents

  // Bus side: latch the written register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q  <= OP_NONE;
      tid_q <= TID_NONE;
    end else if (req.cs && req.we && req.addr == R_RQST) begin
      op_q  <= OP_RQST;
      tid_q <= req.wdata[TID_W-1:0];
    end else if (req.cs && req.we && req.addr == R_RELEASE) begin
      op_q  <= OP_REL;
      tid_q <= req.wdata[TID_W-1:0];
    end else begin
      op_q  <= OP_NONE;
    end
  end

  // Spin lock control: conditionally accept the latched request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner <= TID_NONE;
    end else begin
      unique case (op_q)
        OP_RQST: if (owner == TID_NONE) owner <= tid_q;
        OP_REL:  if (owner == tid_q)    owner <= TID_NONE;
        default: ;
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    if (req.cs && !req.we && req.addr == R_LOCK_OWN) rdata[TID_W-1:0] = owner;
  end
endmodule
