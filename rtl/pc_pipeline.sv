// pc_pipeline: program counter path of a five-stage integer pipeline
// (fetch, decode, execute, memory, write) with the paths a control flow
// checker needs.
//
// The PC generation selects the next fetch address from, in priority order:
// the memory-stage PC looped back on `reexecute`, a jump address, a taken
// branch address, or the fetch PC plus one word. Each stage register holds
// a PC and a valid bit. On `reexecute` the instructions in fetch, decode,
// execute and memory are annulled (their valid bits cleared on the way to
// the next stage), so none of them reaches the write stage, and fetching
// restarts at the memory-stage PC.
// Taps for the checker: PC_n+1 = fetch PC, PC_n = decode PC. The fetch
// stage is refilled every cycle, so fetch_valid is 1 out of reset; it is
// kept as a port so a front end with fetch bubbles can drive the same tap.
//
// Timing: one instruction per cycle, no stalls. jump_*/branch_* describe the
// instruction in the fetch stage and are sampled in the same cycle, so its
// successor is fetched in the next cycle (an ideal, delay-slot-free
// front end). The stage names, the taps and the loop-back of the memory PC
// follow the paper's pipeline figure; resolving control flow in the fetch
// stage and the absence of delay slots and stalls simplify the SPARC
// pipeline and are this design's choices. Addresses are word addresses.
module pc_pipeline #(
  parameter int unsigned       ADDR_W   = 30,
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic              clk,
  input  logic              rst,
  // control flow of the instruction in the fetch stage
  input  logic              jump_valid,
  input  logic [ADDR_W-1:0] jump_addr,
  input  logic              branch_taken,
  input  logic [ADDR_W-1:0] branch_addr,
  // from the checker
  input  logic              reexecute,
  // stage PCs
  output logic [ADDR_W-1:0] fetch_pc,
  output logic              fetch_valid,
  output logic [ADDR_W-1:0] decode_pc,
  output logic              decode_valid,
  output logic [ADDR_W-1:0] execute_pc,
  output logic              execute_valid,
  output logic [ADDR_W-1:0] memory_pc,
  output logic              memory_valid,
  output logic [ADDR_W-1:0] write_pc,
  output logic              write_valid
);

  logic [ADDR_W-1:0] next_pc;

  always_comb begin
    if (reexecute)         next_pc = memory_pc;
    else if (jump_valid)   next_pc = jump_addr;
    else if (branch_taken) next_pc = branch_addr;
    else                   next_pc = fetch_pc + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fetch_pc      <= RESET_PC;
      fetch_valid   <= 1'b1;
      decode_valid  <= 1'b0;
      execute_valid <= 1'b0;
      memory_valid  <= 1'b0;
      write_valid   <= 1'b0;
      decode_pc     <= '0;
      execute_pc    <= '0;
      memory_pc     <= '0;
      write_pc      <= '0;
    end else begin
      fetch_pc      <= next_pc;
      fetch_valid   <= 1'b1;
      decode_pc     <= fetch_pc;
      decode_valid  <= fetch_valid   && !reexecute;
      execute_pc    <= decode_pc;
      execute_valid <= decode_valid  && !reexecute;
      memory_pc     <= execute_pc;
      memory_valid  <= execute_valid && !reexecute;
      write_pc      <= memory_pc;
      write_valid   <= memory_valid  && !reexecute;
    end
  end

  // The loop-back address must belong to a live instruction.
  a_reexec_valid : assert property (@(posedge clk) disable iff (rst) reexecute |-> memory_valid);

endmodule
