// cfc_system: a pipeline PC path with the autonomous control flow checker
// attached between its first stages.
//
// The checker reads PC_n from the decode stage and PC_n+1 from the fetch
// stage of pc_pipeline. When it finds an illegal successor it flags
// `cf_error`; two cycles later, when the faulty instruction is in the memory
// stage, it asserts `annul`, the pipeline loops the memory-stage PC back
// into its PC generation and discards every younger instruction. The
// instruction is then fetched and checked again; a transient fault thus
// costs a few cycles and changes no architectural state, and nothing is
// slowed down while no fault occurs.
//
// What the host CPU decides is brought out as ports: the fetch address goes
// to the instruction memory, and the jump/branch inputs report the control
// flow of the instruction in the fetch stage. `retire_pc`/`retire_valid`
// give the instructions that reach the write stage. The table load port
// and the status outputs of the checker are passed through.
// Defaults: 30-bit word addresses (32-bit byte addresses of SPARC),
// 4096-entry checker tables, 32-entry return stack, full version C.
// Placing the checker between fetch and decode, its two PC taps and the
// loop-back of the memory-stage PC follow the paper; the host CPU is not
// part of this design, and its decoder and branch unit are replaced by the
// jump/branch ports, which is this design's choice.
module cfc_system
  import cfc_pkg::*;
#(
  parameter int unsigned       ENTRIES      = 4096,
  parameter int unsigned       ADDR_W       = 30,
  parameter int unsigned       STACK_DEPTH  = 32,
  parameter bit                EN_RET_STACK = 1'b1,
  parameter bit                EN_REEXEC    = 1'b1,
  parameter logic [ADDR_W-1:0] RESET_PC     = '0,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst,
  // checker table load port
  input  logic              cfg_we,
  input  logic [IDX_W-1:0]  cfg_idx,
  input  logic [ADDR_W-1:0] cfg_sadr,
  input  logic [ADDR_W-1:0] cfg_jadr,
  input  logic [IDX_W-1:0]  cfg_next,
  input  cfi_flags_t        cfg_flags,
  // host CPU: instruction fetch and control flow of the fetched instruction
  output logic [ADDR_W-1:0] fetch_pc,
  input  logic              jump_valid,
  input  logic [ADDR_W-1:0] jump_addr,
  input  logic              branch_taken,
  input  logic [ADDR_W-1:0] branch_addr,
  output logic [ADDR_W-1:0] decode_pc,
  output logic              decode_valid,
  output logic [ADDR_W-1:0] retire_pc,
  output logic              retire_valid,
  output logic              annul,
  // checker status
  output logic              cf_error,
  output logic              chk_active,
  output cfc_event_t        chk_events,
  output logic              stack_overflow,
  output logic [IDX_W-1:0]  cupc
);

  logic              fetch_valid;

  pc_pipeline #(.ADDR_W(ADDR_W), .RESET_PC(RESET_PC)) u_pipe (
    .clk, .rst,
    .jump_valid, .jump_addr, .branch_taken, .branch_addr,
    .reexecute(annul),
    .fetch_pc, .fetch_valid, .decode_pc, .decode_valid,
    .execute_pc(), .execute_valid(), .memory_pc(), .memory_valid(),
    .write_pc(retire_pc), .write_valid(retire_valid));

  control_flow_checker #(
    .ENTRIES(ENTRIES), .ADDR_W(ADDR_W), .STACK_DEPTH(STACK_DEPTH),
    .EN_RET_STACK(EN_RET_STACK), .EN_REEXEC(EN_REEXEC), .REEXEC_DIST(2)
  ) u_cfc (
    .clk, .rst,
    .cfg_we, .cfg_idx, .cfg_sadr, .cfg_jadr, .cfg_next, .cfg_flags,
    .pc_n(decode_pc), .pc_n_valid(decode_valid),
    .pc_n1(fetch_pc), .pc_n1_valid(fetch_valid),
    .reexecute(annul),
    .active(chk_active), .error(cf_error), .events(chk_events),
    .stack_overflow, .cupc);

endmodule
