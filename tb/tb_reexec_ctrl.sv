// tb_reexec_ctrl: checks that `reexecute` follows an error by exactly DIST
// cycles (the faulty instruction travelling from decode to memory), that
// `busy` covers the cycles in between, and that nothing happens otherwise.
module tb_reexec_ctrl;
  localparam int unsigned DIST = 2;
  logic clk = 1'b0, rst, error, busy, reexecute;
  int checks = 0, failures = 0;
  int last_err = -100, cyc = 0;

  reexec_ctrl #(.DIST(DIST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: error accepted when not within DIST cycles of the last one
  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      #1;
      checks++;
      if (reexecute !== (cyc - last_err == DIST)) begin
        failures++; $display("FAIL reexecute at %0d (error at %0d)", cyc, last_err);
      end
      checks++;
      if (busy !== (cyc - last_err >= 1 && cyc - last_err <= DIST)) begin
        failures++; $display("FAIL busy at %0d", cyc);
      end
    end
  end

  initial begin
    rst = 1; error = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      // the checker never raises an error while busy
      error = !busy && ($urandom_range(3) == 0);
      if (error) last_err = cyc;
    end
    @(negedge clk) error = 0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
