// tb_tid_fifo: self-checking test of the thread-id FIFO.
// Random pushes and pops, including both in one cycle and attempts on a full
// or empty queue, are compared against a queue model kept in the testbench.
// Checks head data, level, full and empty every cycle.
module tb_tid_fifo;
  localparam int unsigned W = 8, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  logic [W-1:0] push_data, pop_data;
  logic [$clog2(D+1)-1:0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  tid_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  int n_full = 0, n_both = 0;
  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(level == model.size(), "level");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(pop_data == model[0], "head data");
      // bias the traffic so the queue regularly fills and drains
      push      = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 70 : 30));
      pop       = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 30 : 70)) && !empty;
      if (push && full && !pop) push = 1'b0;
      push_data = W'($urandom);
      if (full && push) n_full++;
      if (push && pop) n_both++;
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    check(n_both > 0, "push and pop in one cycle exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
