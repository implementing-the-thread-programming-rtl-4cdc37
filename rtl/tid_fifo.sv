// tid_fifo: first-in first-out queue of thread ids.
//
// Used as the request queue of the blocking binary semaphore (threads
// suspended on the lock, in arrival order) and as the CPU and hardware-thread
// ready-to-run queues of the scheduling framework. The document asks for such
// queues and leaves their depth as a design-time parameter; the depth default
// of 16 and the first-word-fall-through read are this design's choices.
//
// Interface: push/push_data enqueue at the clock edge when not full; pop
// dequeues when not empty, head is always visible on pop_data. Push and pop
// in the same cycle are both honoured, also on a full queue. level counts the
// stored entries. A push while full (without a pop) or a pop while empty is
// ignored and flagged by an assertion.
module tid_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           push_data,
  input  logic                       pop,
  output logic [WIDTH-1:0]           pop_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign full     = (level == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty    = (level == '0);
  assign do_push  = push && (!full || pop);
  assign do_pop   = pop && !empty;
  assign pop_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full || pop)
    else $error("tid_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("tid_fifo: pop while empty");
endmodule
