// hw_test_thread: hardware thread that exercises a binary spin lock.
//
// While run is high it repeats the sequence of the document's access test:
// write its thread id into the lock's request register, wait one cycle for
// the lock's control logic, read the owner register, and, if it now owns the
// lock, write its id into the release register. A failed check repeats the
// request (busy wait). Before every request, first or repeated, it counts
// down a delay loop of delay cycles, which sets how hard the thread competes
// with other threads for the lock. acquired counts completed request / check
// / release sequences, retries the checks that found the lock taken.
//
// Interface: a bus master that holds cs (with we, addr, wdata) until gnt,
// and reads rdata in the cycle of gnt. Without contention one sequence takes
// four bus cycles plus the delay.
//
// From the document: the test sequence and the delay loop. The state machine,
// the delay before retries as well as before new sequences, and the counters
// are this design's choices.
module hw_test_thread
  import sem_pkg::*;
#(
  parameter tid_t        TID       = 8'h81,
  parameter int unsigned LOCK_UNIT = 0,
  parameter int unsigned ADDR_W    = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [15:0]       delay,
  output logic              cs,
  output logic              we,
  output logic [ADDR_W-1:0] addr,
  output data_t             wdata,
  input  logic              gnt,
  input  data_t             rdata,
  output logic [31:0]       acquired,
  output logic [31:0]       retries
);
  typedef enum logic [2:0] {S_IDLE, S_DELAY, S_RQST, S_WAIT, S_CHECK, S_REL} state_e;

  localparam logic [ADDR_W-REG_W-1:0] UNIT = (ADDR_W - REG_W)'(LOCK_UNIT);

  state_e      state;
  logic [15:0] cnt;

  always_comb begin
    cs    = 1'b0;
    we    = 1'b0;
    addr  = {UNIT, R_RQST};
    wdata = DATA_W'(TID);
    unique case (state)
      S_RQST:  begin cs = 1'b1; we = 1'b1; addr = {UNIT, R_RQST};     end
      S_CHECK: begin cs = 1'b1; we = 1'b0; addr = {UNIT, R_LOCK_OWN}; end
      S_REL:   begin cs = 1'b1; we = 1'b1; addr = {UNIT, R_RELEASE};  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      acquired <= '0;
      retries  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (run) begin
          state <= (delay == '0) ? S_RQST : S_DELAY;
          cnt   <= delay;
        end
        S_DELAY: begin
          cnt <= cnt - 1'b1;
          if (cnt <= 16'd1) state <= S_RQST;
        end
        S_RQST:  if (gnt) state <= S_WAIT;
        S_WAIT:  state <= S_CHECK;
        S_CHECK: if (gnt) begin
          if (rdata[TID_W-1:0] == TID) state <= S_REL;
          else begin
            state   <= (delay == '0) ? S_RQST : S_DELAY;
            cnt     <= delay;
            retries <= retries + 1'b1;
          end
        end
        S_REL: if (gnt) begin
          acquired <= acquired + 1'b1;
          if (!run)             state <= S_IDLE;
          else if (delay == '0) state <= S_RQST;
          else begin
            state <= S_DELAY;
            cnt   <= delay;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
