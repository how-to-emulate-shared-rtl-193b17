// tb_sync_fifo: random pushes and pops against a queue model. Checks the head
// value, empty, full and count every cycle, for a 4-entry queue of bytes.
// Pushes are only made when the queue is not full (as every sender does).
module tb_sync_fifo;
  localparam int unsigned DEPTH = 4;
  logic clk = 1'b0, rst_n;
  logic push, pop, empty, full;
  logic [7:0] din, head;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(32'(count) == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      if (model.size() > 0) check(head == model[0], $sformatf("head %h vs %h", head, model[0]));
      // phases of mostly-push and mostly-pop to reach both ends
      push = !full && ($urandom_range(99) < ((cyc / 200) % 2 != 0 ? 30 : 70));
      pop  = !empty && ($urandom_range(99) < ((cyc / 200) % 2 != 0 ? 70 : 30));
      din  = 8'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      #1;
    end
    push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
