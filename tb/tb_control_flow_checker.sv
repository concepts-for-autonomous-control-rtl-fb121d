// tb_control_flow_checker: self-checking test of the complete checker unit
// (tables, checker core, return stack, re-execution controller).
// The tables of the test program are loaded through the load port. A walker
// presents the (PC_n, PC_n+1) pairs of the program, corrupting a successor
// now and then. After every detected error the testbench expects
// `reexecute` exactly two cycles later, feeds wrong-path pairs meanwhile
// (which must not be checked), then one empty decode slot, and then the
// corrected pair, as the pipeline would after annulling and refetching.
module tb_control_flow_checker;
  import cfc_pkg::*;
  import cfc_prog_pkg::*;

  localparam int unsigned ENTRIES = 4096;
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic clk = 1'b0, rst;
  logic cfg_we;
  logic [IDX_W-1:0] cfg_idx, cfg_next, cupc;
  logic [AW-1:0] cfg_sadr, cfg_jadr, pc_n, pc_n1;
  cfi_flags_t cfg_flags;
  logic pc_n_valid, pc_n1_valid, reexecute, active, error, stack_overflow;
  cfc_event_t events;

  int checks = 0, failures = 0, n_err = 0, n_reexec = 0;
  int n_ev [9];

  control_flow_checker #(.ENTRIES(ENTRIES), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [AW-1:0] pc, correct, n1;
    bit act, tk;
    int c109, c206, nxt, r;
    cfc_event_t exp;

    foreach (n_ev[b]) n_ev[b] = 0;
    rst = 1; cfg_we = 0; cfg_idx = '0; cfg_next = '0; cfg_sadr = '0; cfg_jadr = '0; cfg_flags = '0;
    pc_n = '0; pc_n1 = '0; pc_n_valid = 0; pc_n1_valid = 0;
    for (int i = 0; i < NUM_ENTRIES; i++) begin
      logic [AW-1:0] s, j; cfi_flags_t f;
      @(negedge clk);
      get_entry(i, s, j, nxt, f);
      cfg_we = 1; cfg_idx = IDX_W'(i); cfg_sadr = s; cfg_jadr = j; cfg_next = IDX_W'(nxt); cfg_flags = f;
    end
    @(negedge clk) cfg_we = 0;
    @(negedge clk) rst = 0;

    pc = START_PC; act = 0; c109 = 0; c206 = 0;
    for (int step = 0; step < 3000; step++) begin
      @(negedge clk);
      pc_n_valid = 1; pc_n1_valid = 1;
      if (kind_of(pc) == K_BRANCH) begin
        tk = (pc == 30'h109) ? (c109 % 3 != 2) : (c206 % 2 == 0);
        correct = tk ? target_of(pc) : pc + 1;
      end else begin
        correct = target_of(pc);
      end
      r = $urandom_range(99);
      n1 = (r < 8 && act && !is_start(pc) && !is_end(pc)) ? correct ^ AW'(1 << $urandom_range(9)) : correct;
      pc_n = pc; pc_n1 = n1;
      exp = expected_event(act, pc, n1);
      #1;
      checks++;
      if (events !== exp) begin
        failures++;
        $display("FAIL step %0d: pc_n=%h pc_n1=%h events=%b expected %b", step, pc_n, pc_n1, events, exp);
      end
      chk(reexecute === 1'b0, "reexecute outside recovery");
      for (int b = 0; b < 9; b++) if (exp[b]) n_ev[b]++;
      if (exp.error) begin
        n_err++;
        // two wrong-path slots: no checking, re-execution in the second
        for (int k = 1; k <= 2; k++) begin
          @(negedge clk);
          pc_n = n1 + AW'(k - 1); pc_n1 = n1 + AW'(k);
          #1;
          chk(events === '0, $sformatf("wrong path slot %0d checked", k));
          chk(reexecute === (k == 2), $sformatf("reexecute timing, slot %0d", k));
        end
        n_reexec++;
        // annulled decode slot
        @(negedge clk);
        pc_n_valid = 0; pc_n1 = pc;
        #1 chk(events === '0 && reexecute === 1'b0, "annulled slot");
        continue;                                   // same pc again
      end
      if (exp.activate) act = 1;
      if (exp.deactivate) act = 0;
      if (pc == 30'h109) c109++;
      if (pc == 30'h206) c206++;
      pc = n1;
    end
    @(negedge clk) pc_n_valid = 0;
    @(posedge clk) #1;
    chk(active === act, "active flag at end");
    chk(stack_overflow === 1'b0, "no stack overflow");
    for (int b = 0; b < 9; b++) chk(n_ev[b] != 0, $sformatf("event bit %0d never seen", b));
    chk(n_reexec == n_err && n_err > 0, "re-executions");
    $display("errors %0d, re-executions %0d, event counts bit 0..8: %p", n_err, n_reexec, n_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
