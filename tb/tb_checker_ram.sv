// tb_checker_ram: self-checking test of the checker table memory.
// Fills a small table with random words, reads every entry back in random
// order and compares with a copy kept in the testbench, checking the
// one-cycle read latency and read-before-write behaviour on a collision.
module tb_checker_ram;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned WIDTH = 30;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  checker_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] got, input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = WIDTH'($urandom); model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 200; k++) begin
      int a = $urandom_range(DEPTH - 1);
      rd_addr = AW'(a);
      @(posedge clk); #1;
      check(rd_data, model[a], $sformatf("read %0d", a));
      @(negedge clk);
    end
    // read and write the same entry in one cycle: old word first, new next
    rd_addr = 5; wr_addr = 5; wr_en = 1; wr_data = ~model[5];
    @(posedge clk); #1;
    check(rd_data, model[5], "read-before-write old");
    @(negedge clk); wr_en = 0; model[5] = ~model[5];
    @(posedge clk); #1;
    check(rd_data, model[5], "read-before-write new");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
