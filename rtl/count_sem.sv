// count_sem: spin lock counting semaphore.
//
// A pool of identical resources guarded by a count register. A thread first
// takes the embedded binary spin lock (offsets R_RQST, R_LOCK_OWN, R_RELEASE),
// which protects the request/check pair that follows: it writes the number of
// resources it wants into Rqst_num and reads the grant register. The control
// logic subtracts the request from the count in the cycle after the write;
// if the result is not negative the grant flag becomes 1 and the difference is
// loaded into the count, otherwise the grant flag stays 0 and the count is
// kept. Reading the grant register clears it back to 0. Resources are returned
// by writing a number into Rel_num, without the spin lock. The operating
// system loads the count through Max_count at start-up, and may reload it at
// any time.
//
// Timing: every write is latched at the end of its bus cycle and acted on in
// the next cycle, so the grant flag is valid from the second cycle after the
// Rqst_num write and holds until it is read.
//
// This design's choices: reading Max_count returns the current count; a
// release that would pass the largest count the register holds saturates; a
// grant read in the same edge as a new grant decision loses to the decision.
module count_sem
  import sem_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output data_t    rdata,
  output cnt_t     count,
  output logic     grant,
  output tid_t     lock_owner
);
  typedef enum logic [1:0] {OP_NONE, OP_LOAD, OP_RQST, OP_REL} op_e;

  op_e   op_q;
  cnt_t  num_q;      // Rqst_num / Rel_num / Max_count write latch
  data_t lock_rdata;
  logic  grant_rd;

  spin_lock u_lock (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (req),
    .rdata (lock_rdata),
    .owner (lock_owner)
  );

  assign grant_rd = req.cs && !req.we && req.addr == R_GRANT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q  <= OP_NONE;
      num_q <= '0;
    end else begin
      op_q <= OP_NONE;
      if (req.cs && req.we) begin
        num_q <= req.wdata[CNT_W-1:0];
        unique case (req.addr)
          R_MAX_COUNT: op_q <= OP_LOAD;
          R_RQST_NUM:  op_q <= OP_RQST;
          R_REL_NUM:   op_q <= OP_REL;
          default:     op_q <= OP_NONE;
        endcase
      end
    end
  end

  // Counting semaphore control logic.
  logic [CNT_W:0] sum;
  assign sum = {1'b0, count} + {1'b0, num_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      grant <= 1'b0;
    end else begin
      if (grant_rd) grant <= 1'b0;
      unique case (op_q)
        OP_LOAD: count <= num_q;
        OP_RQST: begin
          if (num_q <= count) begin
            count <= count - num_q;
            grant <= 1'b1;
          end else begin
            grant <= 1'b0;
          end
        end
        OP_REL:  count <= sum[CNT_W] ? '1 : sum[CNT_W-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    rdata = lock_rdata;
    if (req.cs && !req.we) begin
      unique case (req.addr)
        R_MAX_COUNT: rdata = DATA_W'(count);
        R_GRANT:     rdata = DATA_W'(grant);
        default:     ;
      endcase
    end
  end

endmodule
