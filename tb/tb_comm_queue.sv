// tb_comm_queue: self-checking test of the communication queue.
// Pushes random items with random pop back-pressure and compares every popped
// item with a reference queue; fills the queue to its full 512-item default
// capacity to check that push_ready drops exactly at DEPTH; checks the
// one-cycle push latency (an item pushed into an empty queue is visible at the
// head in the next cycle).
module tb_comm_queue;
  import desc_pkg::*;

  localparam int unsigned DEPTH = COMMQ_DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       push_valid, push_ready, out_valid, out_ready;
  comm_item_t push_item, out_item;
  logic [$clog2(DEPTH):0] count;

  comm_queue dut (.*);

  int checks = 0, failures = 0;
  comm_item_t model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic comm_item_t rand_item();
    comm_item_t it;
    it.id = ID_W'($urandom); it.fwd = 1'($urandom); it.fp = 1'($urandom); it.data = $urandom;
    return it;
  endfunction

  // Reference check on every pop.
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    comm_item_t exp;
    exp = model.pop_front();
    check(out_item == exp, $sformatf("pop %h expected %h", out_item, exp));
  end
  always @(posedge clk) if (rst_n && push_valid && push_ready) model.push_back(push_item);

  initial begin
    push_valid = 0; out_ready = 0; push_item = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && push_ready && count == 0, "empty after reset");
    // latency: push one item, visible next cycle
    push_item = rand_item(); push_valid = 1;
    @(negedge clk);
    push_valid = 0;
    check(out_valid && out_item == model[0], "item visible one cycle after push");
    // fill to full
    push_valid = 1;
    while (push_ready) begin push_item = rand_item(); @(negedge clk); end
    push_valid = 0;
    check(count == DEPTH, $sformatf("full at %0d items (count %0d)", DEPTH, count));
    check(model.size() == DEPTH, "model holds DEPTH items when full");
    // drain all
    out_ready = 1;
    while (out_valid) @(negedge clk);
    out_ready = 0;
    check(count == 0, "empty after drain");
    // random traffic
    for (int c = 0; c < 4000; c++) begin
      push_valid = ($urandom % 3) != 0;
      push_item  = rand_item();
      out_ready  = ($urandom % 2) != 0;
      @(negedge clk);
    end
    push_valid = 0; out_ready = 1;
    while (out_valid) @(negedge clk);
    check(model.size() == 0, "all items popped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
