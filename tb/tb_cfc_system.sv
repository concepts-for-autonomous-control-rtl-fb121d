// tb_cfc_system: end-to-end test of the pipeline with the control flow
// checker, at the top's default parameters.
//
// A behavioural model of the host CPU's front end answers, for the address
// in the fetch stage, whether the instruction there jumps or branches and
// where to (the test program of cfc_prog_pkg, entered from address 0 through
// unchecked straight-line code). Branch outcomes depend only on how often
// the branch has retired, so a re-executed branch decides the same way.
// Fault injection: the first fetch of each of six instructions in checked
// code (a plain instruction, a call, a branch, a jump, a branch in the
// subroutine and the return) produces a corrupted successor address, as a
// soft error in the fetched instruction would.
//
// Checks:
//  - the retired PC stream equals the fault-free program path, computed
//    separately; no wrong-path instruction is ever retired;
//  - exactly one error and one re-execution per injected fault, the
//    re-execution two cycles after the error;
//  - the cost of a correction is exactly four retire slots and there is
//    no cost without faults (cycles = retired + 4 * corrections);
//  - every checker mechanism (sequential check, jump, taken and not-taken
//    branch, call, return, activation, deactivation, error, re-execution,
//    annulment) happened at least once.
module tb_cfc_system;
  import cfc_pkg::*;
  import cfc_prog_pkg::*;

  localparam int unsigned IDX_W = 12;        // log2 of the default 4096 entries
  localparam int unsigned N_RETIRE = 1500;   // instructions to retire
  localparam int unsigned N_SITES = 6;
  localparam logic [AW-1:0] SITES [N_SITES] =
    '{30'h103, 30'h105, 30'h109, 30'h10A, 30'h206, 30'h207};
  localparam logic [AW-1:0] FAULT_MASK = 30'h800;

  logic clk = 1'b0, rst;
  logic cfg_we;
  logic [IDX_W-1:0] cfg_idx, cfg_next, cupc;
  logic [AW-1:0] cfg_sadr, cfg_jadr, fetch_pc, jump_addr, branch_addr, decode_pc, retire_pc;
  cfi_flags_t cfg_flags;
  logic jump_valid, branch_taken, decode_valid, retire_valid, annul;
  logic cf_error, chk_active, stack_overflow;
  cfc_event_t chk_events;

  cfc_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ev [9];
  int n_annul = 0, n_annulled = 0, n_faults = 0, n_retired = 0;
  int cyc = 0, first_retire = -1, last_retire = -1, err_cycle = -100;
  bit armed [N_SITES];
  int ret109 = 0, ret206 = 0;              // retired branch instances
  logic [AW-1:0] golden [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // branch rule shared by the CPU model and the golden path
  function automatic bit taken(logic [AW-1:0] a, int n109, int n206);
    return (a == 30'h109) ? (n109 % 3 != 2) : (n206 % 2 == 0);
  endfunction

  // ---- front-end model of the host CPU --------------------------------
  always_comb begin
    logic [AW-1:0] good;
    kind_e k;
    k = kind_of(fetch_pc);
    jump_valid   = 1'b0;
    branch_taken = 1'b0;
    jump_addr    = '0;
    branch_addr  = target_of(fetch_pc);
    good         = fetch_pc + 1;
    if (k == K_JUMP || k == K_CALL || k == K_RET) begin
      jump_valid = 1'b1; jump_addr = target_of(fetch_pc); good = jump_addr;
    end else if (k == K_BRANCH) begin
      branch_taken = taken(fetch_pc, ret109, ret206);
      if (branch_taken) good = branch_addr;
    end
    for (int s = 0; s < N_SITES; s++) begin
      if (armed[s] && fetch_pc == SITES[s]) begin
        jump_valid   = 1'b1;               // corrupted successor
        jump_addr    = good ^ FAULT_MASK;
        branch_taken = 1'b0;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      for (int s = 0; s < N_SITES; s++)
        if (armed[s] && fetch_pc == SITES[s]) begin armed[s] <= 1'b0; n_faults++; end
      if (retire_valid) begin
        if (retire_pc == 30'h109) ret109++;
        if (retire_pc == 30'h206) ret206++;
      end
    end
  end

  // ---- monitors --------------------------------------------------------
  always @(posedge clk) begin
    if (!rst) begin
      for (int b = 0; b < 9; b++) if (chk_events[b]) n_ev[b]++;
      if (cf_error) err_cycle = cyc;
      if (annul) begin
        n_annul++;
        chk(cyc - err_cycle == 2, $sformatf("annul %0d cycles after the error", cyc - err_cycle));
        n_annulled += 4;                   // fetch, decode, execute, memory
      end
      if (retire_valid) begin
        if (first_retire < 0) first_retire = cyc;
        last_retire = cyc;
        checks++;
        if (golden.size() == 0 || retire_pc !== golden[0]) begin
          failures++;
          $display("FAIL retired %h, expected %h (instruction %0d)", retire_pc,
                   (golden.size() != 0) ? golden[0] : '0, n_retired);
        end
        if (golden.size() != 0) void'(golden.pop_front());
        n_retired++;
      end
    end
  end

  initial begin
    logic [AW-1:0] p, q, s, j;
    int g109, g206, nxt;
    cfi_flags_t f;
    foreach (n_ev[b]) n_ev[b] = 0;
    foreach (armed[s]) armed[s] = 1'b1;
    // fault-free program path from the reset address 0
    p = '0; g109 = 0; g206 = 0;
    for (int i = 0; i < N_RETIRE; i++) begin
      golden.push_back(p);
      case (kind_of(p))
        K_SEQ:    p = p + 1;
        K_BRANCH: begin
          q = p;
          p = taken(q, g109, g206) ? target_of(q) : q + 1;
          if (q == 30'h109) g109++; else g206++;
        end
        default:  p = target_of(p);
      endcase
    end
    // load the checker tables while the system is in reset
    rst = 1; cfg_we = 0; cfg_idx = '0; cfg_next = '0; cfg_sadr = '0; cfg_jadr = '0; cfg_flags = '0;
    for (int i = 0; i < NUM_ENTRIES; i++) begin
      @(negedge clk);
      get_entry(i, s, j, nxt, f);
      cfg_we = 1; cfg_idx = IDX_W'(i); cfg_sadr = s; cfg_jadr = j; cfg_next = IDX_W'(nxt); cfg_flags = f;
    end
    @(negedge clk) cfg_we = 0;
    @(negedge clk) rst = 0;
    wait (n_retired == N_RETIRE);
    @(negedge clk);
    chk(n_faults == N_SITES, $sformatf("faults injected %0d", n_faults));
    chk(n_ev[0] == N_SITES, $sformatf("errors detected %0d, expected %0d", n_ev[0], N_SITES));
    chk(n_annul == N_SITES, $sformatf("re-executions %0d", n_annul));
    chk(last_retire - first_retire + 1 == N_RETIRE + 4 * n_annul,
        $sformatf("cycles %0d for %0d instructions and %0d corrections",
                  last_retire - first_retire + 1, N_RETIRE, n_annul));
    chk(stack_overflow === 1'b0, "no stack overflow");
    for (int b = 0; b < 9; b++) chk(n_ev[b] != 0, $sformatf("checker event bit %0d never happened", b));
    chk(n_annulled != 0, "annulment");
    $display("retired %0d in %0d cycles; errors %0d, re-executions %0d, annulled %0d",
             n_retired, last_retire - first_retire + 1, n_ev[0], n_annul, n_annulled);
    $display("checks seq %0d jump %0d br-taken %0d br-not-taken %0d call %0d ret %0d activate %0d deactivate %0d",
             n_ev[8], n_ev[7], n_ev[6], n_ev[5], n_ev[4], n_ev[3], n_ev[2], n_ev[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
