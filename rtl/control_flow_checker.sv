// control_flow_checker: the autonomous control flow checker unit.
//
// It watches two program counter values of the host pipeline, PC_n of the
// decode stage and PC_n+1 of the fetch stage, and tells whether PC_n+1 is a
// legal successor of PC_n according to tables extracted from the compiled
// program. The program itself is not changed and the pipeline is not slowed
// down: each check takes the single cycle in which the pair is visible.
//
// Inside: three checker RAMs of ENTRIES words, one entry per direct CFI in
// ascending address order (sAdrRam: CFI address, jAdrRam: target,
// ctrlRam: next CUPC and flags), the cfi_checker with its CUPC and the
// comparators a, b and c, a return stack for calls and returns, and the
// re-execution controller.
// The paper's three versions are selected by parameters:
//   version A  EN_RET_STACK=0 EN_REEXEC=0  direct jumps and branches only
//   version B  EN_RET_STACK=1 EN_REEXEC=0  plus 32-entry return stack
//   version C  EN_RET_STACK=1 EN_REEXEC=1  plus correction by re-execution
// The default is the full version C with 4096-entry tables, the largest
// size the paper reports.
//
// Interface: the cfg_* port writes one entry into all three tables (table
// loading is a port here; the paper loads them with the FPGA bitstream).
// `reexecute` asks the CPU to load its memory-stage PC into the PC
// generation and to annul the instructions in fetch to memory; it comes
// REEXEC_DIST cycles after `error`. In version A/B `reexecute` stays low and
// `error` is only reported.
module control_flow_checker
  import cfc_pkg::*;
#(
  parameter int unsigned ENTRIES      = 4096,
  parameter int unsigned ADDR_W       = 30,
  parameter int unsigned STACK_DEPTH  = 32,
  parameter bit          EN_RET_STACK = 1'b1,
  parameter bit          EN_REEXEC    = 1'b1,
  parameter int unsigned REEXEC_DIST  = 2,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst,
  // table load port
  input  logic              cfg_we,
  input  logic [IDX_W-1:0]  cfg_idx,
  input  logic [ADDR_W-1:0] cfg_sadr,
  input  logic [ADDR_W-1:0] cfg_jadr,
  input  logic [IDX_W-1:0]  cfg_next,
  input  cfi_flags_t        cfg_flags,
  // program counter taps
  input  logic [ADDR_W-1:0] pc_n,
  input  logic              pc_n_valid,
  input  logic [ADDR_W-1:0] pc_n1,
  input  logic              pc_n1_valid,
  // to the CPU
  output logic              reexecute,
  // status
  output logic              active,
  output logic              error,
  output cfc_event_t        events,
  output logic              stack_overflow,
  output logic [IDX_W-1:0]  cupc
);

  localparam int unsigned CTRL_W = IDX_W + FLAGS_W;

  logic [IDX_W-1:0]  rd_idx;
  logic [ADDR_W-1:0] sadr, jadr;
  logic [CTRL_W-1:0] ctrl_word;
  cfi_flags_t        ctrl_flags;
  logic [IDX_W-1:0]  ctrl_next;

  checker_ram #(.DEPTH(ENTRIES), .WIDTH(ADDR_W)) u_sadr_ram (
    .clk, .wr_en(cfg_we), .wr_addr(cfg_idx), .wr_data(cfg_sadr),
    .rd_addr(rd_idx), .rd_data(sadr));

  checker_ram #(.DEPTH(ENTRIES), .WIDTH(ADDR_W)) u_jadr_ram (
    .clk, .wr_en(cfg_we), .wr_addr(cfg_idx), .wr_data(cfg_jadr),
    .rd_addr(rd_idx), .rd_data(jadr));

  checker_ram #(.DEPTH(ENTRIES), .WIDTH(CTRL_W)) u_ctrl_ram (
    .clk, .wr_en(cfg_we), .wr_addr(cfg_idx), .wr_data({cfg_next, cfg_flags}),
    .rd_addr(rd_idx), .rd_data(ctrl_word));

  assign {ctrl_next, ctrl_flags} = ctrl_word;

  logic              st_push, st_pop, st_empty;
  logic [ADDR_W-1:0] st_push_addr, st_top_addr;
  logic [IDX_W-1:0]  st_push_idx, st_top_idx;
  logic              hold;

  cfi_checker #(.ADDR_W(ADDR_W), .IDX_W(IDX_W), .EN_RET_STACK(EN_RET_STACK)) u_checker (
    .clk, .rst,
    .pc_n, .pc_n_valid, .pc_n1, .pc_n1_valid, .hold,
    .sadr, .jadr, .ctrl_next, .ctrl_flags,
    .cupc_nxt(rd_idx), .cupc,
    .st_push, .st_push_addr, .st_push_idx, .st_pop,
    .st_empty, .st_top_addr, .st_top_idx,
    .active, .error, .events);

  if (EN_RET_STACK) begin : g_stack
    return_stack #(.DEPTH(STACK_DEPTH), .ADDR_W(ADDR_W), .IDX_W(IDX_W)) u_stack (
      .clk, .rst,
      .push(st_push), .push_addr(st_push_addr), .push_idx(st_push_idx),
      .pop(st_pop), .empty(st_empty), .top_addr(st_top_addr), .top_idx(st_top_idx),
      .overflow(stack_overflow));
  end else begin : g_no_stack
    assign st_empty       = 1'b1;
    assign st_top_addr    = '0;
    assign st_top_idx     = '0;
    assign stack_overflow = 1'b0;
  end

  if (EN_REEXEC) begin : g_reexec
    reexec_ctrl #(.DIST(REEXEC_DIST)) u_reexec (
      .clk, .rst, .error, .busy(hold), .reexecute);
  end else begin : g_no_reexec
    assign hold      = 1'b0;
    assign reexecute = 1'b0;
  end

endmodule
