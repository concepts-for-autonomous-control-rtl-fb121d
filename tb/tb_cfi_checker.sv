// tb_cfi_checker: self-checking test of the checker core.
// A walker executes the test program of cfc_prog_pkg and presents each
// (PC_n, PC_n+1) pair to the checker. Now and then the successor is
// corrupted by flipping one address bit; the walker then expects an error
// (unless the corrupted address happens to be the other legal successor of a
// branch, or checking is off) and presents the correct pair again, as a
// re-execution would. Idle cycles and `hold` cycles must produce nothing.
// The expected event of every pair comes from the program description, not
// from the checker tables. The tables are served from arrays indexed by
// CUPC, which behaves like the synchronous RAMs of the real unit.
module tb_cfi_checker;
  import cfc_pkg::*;
  import cfc_prog_pkg::*;

  localparam int unsigned IDX_W = 12;

  logic clk = 1'b0, rst;
  logic [AW-1:0] pc_n, pc_n1, sadr, jadr, st_push_addr, st_top_addr;
  logic pc_n_valid, pc_n1_valid, hold;
  logic [IDX_W-1:0] ctrl_next, cupc_nxt, cupc, st_push_idx, st_top_idx;
  cfi_flags_t ctrl_flags;
  logic st_push, st_pop, st_empty, active, error, st_ovf;
  cfc_event_t events;

  logic [AW-1:0]    t_s [8], t_j [8];
  logic [IDX_W-1:0] t_n [8];
  cfi_flags_t       t_f [8];

  int checks = 0, failures = 0;
  int n_ev [9];

  cfi_checker #(.ADDR_W(AW), .IDX_W(IDX_W), .EN_RET_STACK(1'b1)) dut (.*);
  return_stack #(.DEPTH(32), .ADDR_W(AW), .IDX_W(IDX_W)) u_stack (
    .clk, .rst, .push(st_push), .push_addr(st_push_addr), .push_idx(st_push_idx),
    .pop(st_pop), .empty(st_empty), .top_addr(st_top_addr), .top_idx(st_top_idx),
    .overflow(st_ovf));

  assign sadr       = t_s[cupc[2:0]];
  assign jadr       = t_j[cupc[2:0]];
  assign ctrl_next  = t_n[cupc[2:0]];
  assign ctrl_flags = t_f[cupc[2:0]];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_event(input cfc_event_t exp, input string what);
    checks++;
    if (events !== exp || error !== exp.error) begin
      failures++;
      $display("FAIL %s: pc_n=%h pc_n1=%h events=%b expected %b", what, pc_n, pc_n1, events, exp);
    end
    for (int b = 0; b < 9; b++) if (exp[b]) n_ev[b]++;
  endtask

  initial begin
    logic [AW-1:0] pc, correct, n1;
    bit act, tk;
    int c109, c206, nxt, r;
    cfc_event_t exp;

    for (int i = 0; i < 8; i++) begin
      logic [AW-1:0] s, j; cfi_flags_t f;
      get_entry(i < NUM_ENTRIES ? i : NUM_ENTRIES - 1, s, j, nxt, f);
      t_s[i] = s; t_j[i] = j; t_n[i] = IDX_W'(nxt); t_f[i] = f;
    end
    foreach (n_ev[b]) n_ev[b] = 0;
    rst = 1; pc_n = '0; pc_n1 = '0; pc_n_valid = 0; pc_n1_valid = 0; hold = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    pc = START_PC; act = 0; c109 = 0; c206 = 0;
    for (int step = 0; step < 3000; step++) begin
      @(negedge clk);
      r = $urandom_range(99);
      if (r < 5) begin                       // idle decode stage
        pc_n_valid = 0; pc_n1_valid = 1; hold = 0;
        pc_n = AW'($urandom); pc_n1 = AW'($urandom);
        #1 expect_event('0, "invalid");
        continue;
      end
      if (r < 10) begin                      // re-execution pending
        pc_n_valid = 1; pc_n1_valid = 1; hold = 1;
        pc_n = pc; pc_n1 = AW'($urandom);
        #1 expect_event('0, "hold");
        continue;
      end
      hold = 0; pc_n_valid = 1; pc_n1_valid = 1;
      if (kind_of(pc) == K_BRANCH) begin
        tk = (pc == 30'h109) ? (c109 % 3 != 2) : (c206 % 2 == 0);
        correct = tk ? target_of(pc) : pc + 1;
      end else begin
        correct = target_of(pc);
      end
      n1 = (r < 25 && !is_start(pc) && !is_end(pc)) ? correct ^ AW'(1 << $urandom_range(5)) : correct;
      pc_n = pc; pc_n1 = n1;
      exp = expected_event(act, pc, n1);
      #1 expect_event(exp, $sformatf("step %0d", step));
      if (exp.error || (!act && n1 != correct)) continue;  // pair is replayed
      if (exp.activate) act = 1;
      if (exp.deactivate) act = 0;
      if (pc == 30'h109) c109++;
      if (pc == 30'h206) c206++;
      pc = n1;
    end
    @(negedge clk) pc_n_valid = 0;
    // every kind of outcome must have been seen
    for (int b = 0; b < 9; b++) begin
      checks++;
      if (n_ev[b] == 0) begin failures++; $display("FAIL event bit %0d never seen", b); end
    end
    $display("event counts, bit 0 (error) to bit 8 (seq_ok): %p", n_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
