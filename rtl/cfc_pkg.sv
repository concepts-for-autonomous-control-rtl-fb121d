// cfc_pkg: types and constants shared by the control flow checker.
//
// The checker verifies, for every instruction leaving the decode stage, that
// the address fetched after it is a legal successor. The legal successors of
// each direct control flow instruction (CFI) come from three tables built at
// compile time: the CFI address (sAdrRam), its target (jAdrRam) and a control
// word (ctrlRam) holding the index of the next CFI to watch plus flags.
// The flag set (branch, call, return, checking start, checking end) follows
// the description of the control RAM; its bit order and encoding are this
// design's own choice.
package cfc_pkg;

  // Flags of one ctrlRam entry. All zero means an unconditional direct jump.
  typedef struct packed {
    logic chk_start;  // entry marks the address where checking is switched on
    logic chk_end;    // entry marks the address where checking is switched off
    logic is_branch;  // conditional branch: target or fall-through are legal
    logic is_call;    // call: target is checked, return address is pushed
    logic is_return;  // return: target is checked against the return stack
  } cfi_flags_t;

  localparam int unsigned FLAGS_W = $bits(cfi_flags_t);

  // One pulse per checked instruction, for error counting and observation.
  typedef struct packed {
    logic seq_ok;       // non-CFI instruction followed by PC+1 (comparator a)
    logic jump_ok;      // direct jump reached its target (comparator c)
    logic br_taken;     // branch went to its target
    logic br_not_taken; // branch fell through to PC+1
    logic call_ok;      // call reached its target, return address pushed
    logic ret_ok;       // return went to the address on top of the stack
    logic activate;     // checking start address reached
    logic deactivate;   // checking end address reached
    logic error;        // control flow error detected
  } cfc_event_t;

endpackage
