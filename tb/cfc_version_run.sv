// cfc_version_run: runs the test program on one configuration of
// cfc_system (table size and checker version) and reports its own check
// counts; used by tb_cfc_versions.
//
// Version A (no return stack) cannot check calls and returns, so it gets the
// tables a program analyzer would produce for it: checking is switched off
// at the call (0x105) and on again at the instruction after it (0x106), and
// the subroutine runs unchecked. Versions B and C get the full tables.
// With re-execution (C), six faults are injected and must all be corrected
// with the retired stream unchanged. Without it (A, B) the program first
// runs fault-free with no error, then one jump is corrupted: exactly one
// error must be reported and nothing may be annulled.
module cfc_version_run
  import cfc_pkg::*;
  import cfc_prog_pkg::*;
#(
  parameter int unsigned ENTRIES      = 512,
  parameter bit          EN_RET_STACK = 1'b1,
  parameter bit          EN_REEXEC    = 1'b1,
  parameter int unsigned N_RETIRE     = 800
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam logic [AW-1:0] FAULT_MASK = 30'h800;
  localparam int unsigned N_SITES = 6;
  localparam logic [AW-1:0] SITES [N_SITES] =
    '{30'h10A, 30'h103, 30'h105, 30'h109, 30'h206, 30'h207};

  logic rst, cfg_we;
  logic [IDX_W-1:0] cfg_idx, cfg_next, cupc;
  logic [AW-1:0] cfg_sadr, cfg_jadr, fetch_pc, jump_addr, branch_addr, decode_pc, retire_pc;
  cfi_flags_t cfg_flags;
  logic jump_valid, branch_taken, decode_valid, retire_valid, annul;
  logic cf_error, chk_active, stack_overflow;
  cfc_event_t chk_events;

  cfc_system #(.ENTRIES(ENTRIES), .EN_RET_STACK(EN_RET_STACK), .EN_REEXEC(EN_REEXEC)) dut (.*);

  bit armed [N_SITES];
  int n_err = 0, n_annul = 0, n_retired = 0, ret109 = 0, ret206 = 0, n_faults = 0;
  int n_ev [9];
  logic [AW-1:0] golden [$];

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%0d entries, stack %0b, reexec %0b] %s",
                                          ENTRIES, EN_RET_STACK, EN_REEXEC, what); end
  endtask

  function automatic bit taken(logic [AW-1:0] a, int n109, int n206);
    return (a == 30'h109) ? (n109 % 3 != 2) : (n206 % 2 == 0);
  endfunction

  // version A tables: checking is off across the call
  task automatic entry_a(input int i, output logic [AW-1:0] sadr, output logic [AW-1:0] jadr,
                         output int nxt, output cfi_flags_t fl);
    fl = '0; jadr = '0; nxt = 0;
    case (i)
      0: begin sadr = 30'h100; nxt = 1; fl.chk_start = 1; end
      1: begin sadr = 30'h105; nxt = 2; fl.chk_end = 1; end
      2: begin sadr = 30'h106; nxt = 3; fl.chk_start = 1; end
      3: begin sadr = 30'h109; jadr = 30'h102; nxt = 1; fl.is_branch = 1; end
      4: begin sadr = 30'h10A; jadr = 30'h110; nxt = 5; end
      default: begin sadr = 30'h114; nxt = 0; fl.chk_end = 1; end
    endcase
  endtask

  always_comb begin
    logic [AW-1:0] good;
    kind_e k;
    k = kind_of(fetch_pc);
    jump_valid = 1'b0; branch_taken = 1'b0; jump_addr = '0;
    branch_addr = target_of(fetch_pc);
    good = fetch_pc + 1;
    if (k == K_JUMP || k == K_CALL || k == K_RET) begin
      jump_valid = 1'b1; jump_addr = target_of(fetch_pc); good = jump_addr;
    end else if (k == K_BRANCH) begin
      branch_taken = taken(fetch_pc, ret109, ret206);
      if (branch_taken) good = branch_addr;
    end
    for (int s = 0; s < N_SITES; s++)
      if (armed[s] && fetch_pc == SITES[s]) begin
        jump_valid = 1'b1; jump_addr = good ^ FAULT_MASK; branch_taken = 1'b0;
      end
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int s = 0; s < N_SITES; s++)
        if (armed[s] && fetch_pc == SITES[s]) begin armed[s] <= 1'b0; n_faults++; end
      for (int b = 0; b < 9; b++) if (chk_events[b]) n_ev[b]++;
      if (cf_error) n_err++;
      if (annul) n_annul++;
      if (retire_valid) begin
        if (retire_pc == 30'h109) ret109++;
        if (retire_pc == 30'h206) ret206++;
        if (n_retired < N_RETIRE) begin
          chk(golden.size() != 0 && retire_pc == golden[0], $sformatf("retired %h", retire_pc));
          if (golden.size() != 0) void'(golden.pop_front());
        end
        n_retired++;
      end
    end
  end

  initial begin
    logic [AW-1:0] p, q, s, j;
    int g109, g206, nxt, n_entries;
    cfi_flags_t f;
    checks = 0; failures = 0; done = 0;
    foreach (n_ev[b]) n_ev[b] = 0;
    foreach (armed[k]) armed[k] = 1'b0;
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
    rst = 1; cfg_we = 0; cfg_idx = '0; cfg_next = '0; cfg_sadr = '0; cfg_jadr = '0; cfg_flags = '0;
    n_entries = EN_RET_STACK ? NUM_ENTRIES : 6;
    for (int i = 0; i < n_entries; i++) begin
      @(negedge clk);
      if (EN_RET_STACK) get_entry(i, s, j, nxt, f); else entry_a(i, s, j, nxt, f);
      cfg_we = 1; cfg_idx = IDX_W'(i); cfg_sadr = s; cfg_jadr = j; cfg_next = IDX_W'(nxt); cfg_flags = f;
    end
    @(negedge clk) cfg_we = 0;
    @(negedge clk) rst = 0;
    if (EN_REEXEC) begin
      foreach (armed[k]) armed[k] = 1'b1;
      wait (n_retired == N_RETIRE);
      @(negedge clk);
      chk(n_faults == N_SITES && n_err == N_SITES && n_annul == N_SITES,
          $sformatf("faults %0d errors %0d re-executions %0d", n_faults, n_err, n_annul));
    end else begin
      wait (n_retired == N_RETIRE);
      @(negedge clk);
      chk(n_err == 0 && n_annul == 0, $sformatf("fault-free run: errors %0d", n_err));
      armed[0] = 1'b1;                       // corrupt the next jump at 0x10A
      wait (n_faults == 1);
      repeat (6) @(negedge clk);
      chk(n_err == 1 && n_annul == 0, $sformatf("one fault: errors %0d re-executions %0d", n_err, n_annul));
    end
    chk(n_ev[2] != 0 && n_ev[1] != 0, "activation and deactivation");
    chk(n_ev[6] != 0 && n_ev[5] != 0 && n_ev[7] != 0, "branches and jumps checked");
    chk(EN_RET_STACK ? (n_ev[4] != 0 && n_ev[3] != 0) : (n_ev[4] == 0 && n_ev[3] == 0),
        "calls and returns checked only with the return stack");
    $display("[%0d entries, stack %0b, reexec %0b] errors %0d re-executions %0d checks %0d calls %0d",
             ENTRIES, EN_RET_STACK, EN_REEXEC, n_err, n_annul, n_ev[8], n_ev[4]);
    done = 1;
  end
endmodule
