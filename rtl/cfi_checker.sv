// cfi_checker: comparators, checker program counter (CUPC) and control of
// the control flow checker.
//
// Every cycle in which the decode stage holds an instruction (PC_n) and the
// fetch stage holds its successor (PC_n+1), the checker decides whether the
// pair is legal:
//   comparator b  PC_n == sAdrRam[CUPC]  : the instruction is the next CFI
//   comparator a  PC_n+1 == PC_n + 1     : sequential successor
//   comparator c  PC_n+1 == jAdrRam[CUPC]: jump, branch or call target
// A return is checked against the top of the return stack instead of
// jAdrRam. A non-CFI instruction must be followed by PC_n + 1; a jump or a
// call by its target; a branch by its target (CUPC <- ctrlRam next index) or
// by PC_n + 1 (CUPC <- CUPC + 1). A call pushes PC_n + 1 and CUPC + 1; a
// return resumes at the CUPC saved with its return address.
// Entries flagged "checking start" or "checking end" switch checking on or
// off when PC_n reaches their address; while off, only a start entry at
// CUPC is looked for and nothing is checked. Marker instructions are not
// checked themselves.
//
// Interface and timing: the table words (sadr, jadr, ctrl_next, ctrl_flags)
// are those of entry CUPC; the module drives cupc_nxt as the read address
// of the synchronous checker RAMs, so the next entry is present one cycle
// after a CFI is checked. `error` is a one-cycle pulse in the cycle the
// faulty pair is seen; CUPC, the active flag and the stack are then left
// unchanged so the faulty instruction can be checked again when it is
// re-executed. While `hold` is high (re-execution pending) nothing is
// checked.
// The comparators, the CUPC with its increment, the ctrlRam transitions and
// the start/end flags follow the paper. The resume index on the stack,
// not checking marker instructions, and holding state on an error are this
// design's choices.
module cfi_checker
  import cfc_pkg::*;
#(
  parameter int unsigned ADDR_W       = 30,
  parameter int unsigned IDX_W        = 12,
  parameter bit          EN_RET_STACK = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  // program counter taps
  input  logic [ADDR_W-1:0] pc_n,        // decode-stage PC
  input  logic              pc_n_valid,
  input  logic [ADDR_W-1:0] pc_n1,       // fetch-stage PC
  input  logic              pc_n1_valid,
  input  logic              hold,        // re-execution pending
  // checker table entry CUPC
  input  logic [ADDR_W-1:0] sadr,
  input  logic [ADDR_W-1:0] jadr,
  input  logic [IDX_W-1:0]  ctrl_next,
  input  cfi_flags_t        ctrl_flags,
  output logic [IDX_W-1:0]  cupc_nxt,    // read address of the tables
  output logic [IDX_W-1:0]  cupc,
  // return stack
  output logic              st_push,
  output logic [ADDR_W-1:0] st_push_addr,
  output logic [IDX_W-1:0]  st_push_idx,
  output logic              st_pop,
  input  logic              st_empty,
  input  logic [ADDR_W-1:0] st_top_addr,
  input  logic [IDX_W-1:0]  st_top_idx,
  // status
  output logic              active,
  output logic              error,
  output cfc_event_t        events
);

  logic              check;
  logic              hit_b, seq_a, tgt_c, ret_ok;
  logic [ADDR_W-1:0] pc_inc;
  logic [IDX_W-1:0]  cupc_inc;
  logic              active_nxt;

  assign check    = pc_n_valid && pc_n1_valid && !hold;
  assign pc_inc   = pc_n + 1'b1;
  assign cupc_inc = cupc + 1'b1;
  assign hit_b    = (pc_n == sadr);
  assign seq_a    = (pc_n1 == pc_inc);
  assign tgt_c    = (pc_n1 == jadr);
  assign ret_ok   = !st_empty && (pc_n1 == st_top_addr);

  assign st_push_addr = pc_inc;
  assign st_push_idx  = cupc_inc;

  always_comb begin
    cupc_nxt   = cupc;
    active_nxt = active;
    events     = '0;
    st_push    = 1'b0;
    st_pop     = 1'b0;
    if (check) begin
      if (!active) begin
        if (hit_b && ctrl_flags.chk_start) begin
          active_nxt      = 1'b1;
          cupc_nxt        = ctrl_next;
          events.activate = 1'b1;
        end
      end else if (hit_b && ctrl_flags.chk_end) begin
        active_nxt        = 1'b0;
        cupc_nxt          = ctrl_next;
        events.deactivate = 1'b1;
      end else if (hit_b && ctrl_flags.chk_start) begin
        cupc_nxt = ctrl_next;                    // already checking
      end else if (hit_b && ctrl_flags.is_return && EN_RET_STACK) begin
        if (ret_ok) begin
          st_pop        = 1'b1;
          cupc_nxt      = st_top_idx;
          events.ret_ok = 1'b1;
        end else begin
          events.error = 1'b1;
        end
      end else if (hit_b && ctrl_flags.is_call && EN_RET_STACK) begin
        if (tgt_c) begin
          st_push        = 1'b1;
          cupc_nxt       = ctrl_next;
          events.call_ok = 1'b1;
        end else begin
          events.error = 1'b1;
        end
      end else if (hit_b && ctrl_flags.is_branch) begin
        if (tgt_c) begin
          cupc_nxt        = ctrl_next;
          events.br_taken = 1'b1;
        end else if (seq_a) begin
          cupc_nxt            = cupc_inc;
          events.br_not_taken = 1'b1;
        end else begin
          events.error = 1'b1;
        end
      end else if (hit_b) begin
        if (tgt_c) begin
          cupc_nxt       = ctrl_next;
          events.jump_ok = 1'b1;
        end else begin
          events.error = 1'b1;
        end
      end else if (seq_a) begin
        events.seq_ok = 1'b1;
      end else begin
        events.error = 1'b1;
      end
    end
  end

  assign error = events.error;

  always_ff @(posedge clk) begin
    if (rst) begin
      cupc   <= '0;
      active <= 1'b0;
    end else begin
      cupc   <= cupc_nxt;
      active <= active_nxt;
    end
  end

  // At most one outcome per checked instruction.
  a_one_event : assert property (@(posedge clk) disable iff (rst) $onehot0(events));

endmodule
