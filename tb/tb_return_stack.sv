// tb_return_stack: self-checking test of the return address stack.
// Random pushes and pops are compared against a queue model of a stack that
// keeps the newest DEPTH entries; overflow and empty are checked as well.
module tb_return_stack;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned ADDR_W = 30;
  localparam int unsigned IDX_W = 12;

  logic clk = 1'b0, rst;
  logic push, pop, empty, overflow;
  logic [ADDR_W-1:0] push_addr, top_addr;
  logic [IDX_W-1:0]  push_idx, top_idx;
  int checks = 0, failures = 0;
  logic [ADDR_W+IDX_W-1:0] q [$];
  bit exp_ovf;

  return_stack #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (empty !== (q.size() == 0)) begin
      failures++; $display("FAIL empty %0b size %0d", empty, q.size());
    end
    if (q.size() != 0) begin
      checks++;
      if ({top_addr, top_idx} !== q[$]) begin
        failures++; $display("FAIL top %h %h expected %h", top_addr, top_idx, q[$]);
      end
    end
    checks++;
    if (overflow !== exp_ovf) begin
      failures++; $display("FAIL overflow %0b", overflow);
    end
  endtask

  task automatic do_op(input bit do_push);
    @(negedge clk);
    push = do_push; pop = !do_push;
    push_addr = ADDR_W'($urandom); push_idx = IDX_W'($urandom);
    @(posedge clk);
    if (do_push) begin
      q.push_back({push_addr, push_idx});
      if (q.size() > DEPTH) begin void'(q.pop_front()); exp_ovf = 1; end
    end else if (q.size() != 0) begin
      void'(q.pop_back());
    end
    #1 compare();
  endtask

  initial begin
    rst = 1; push = 0; pop = 0; push_addr = '0; push_idx = '0; exp_ovf = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 compare();
    // nested calls and returns within the depth
    for (int k = 0; k < 400; k++) do_op(($urandom_range(99) < 55) || q.size() == 0);
    // drain, then pop an empty stack
    while (q.size() != 0) do_op(0);
    do_op(0);
    // overflow: DEPTH + 5 pushes, the oldest 5 are lost
    for (int k = 0; k < DEPTH + 5; k++) do_op(1);
    for (int k = 0; k < DEPTH; k++) do_op(0);
    do_op(0);
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
