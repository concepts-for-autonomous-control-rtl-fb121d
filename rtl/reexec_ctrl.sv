// reexec_ctrl: correction of a faulty control flow instruction by
// re-execution.
//
// The checker sees a faulty instruction while it is in the decode stage,
// before it has changed any CPU state. This block follows that instruction
// down the pipeline with a shift register and, when it reaches the memory
// stage (DIST stages after decode), raises `reexecute` for one cycle. The
// CPU then loads the memory-stage PC, i.e. the address of the faulty
// instruction, into the PC generation, and annuls the instructions in the
// fetch, decode, execute and memory stages, so nothing fetched along the
// wrong path is written back and the instruction is fetched again.
// `busy` is high from the cycle after the error up to and including the
// cycle of `reexecute`; the checker does not check while it is high, because the
// instructions it would see are the ones about to be annulled.
// Looping back the memory-stage PC and annulling after the memory stage
// follow the paper; waiting until the faulty instruction itself is in
// the memory stage, and a pipeline that does not stall, are this design's
// choices.
module reexec_ctrl #(
  parameter int unsigned DIST = 2   // stages from decode to memory
) (
  input  logic clk,
  input  logic rst,
  input  logic error,      // checker error pulse (faulty instruction in decode)
  output logic busy,       // re-execution pending
  output logic reexecute   // loop back memory PC and annul, one cycle
);

  logic [DIST-1:0] track_q;   // bit i: faulty instruction i+1 stages past decode

  always_ff @(posedge clk) begin
    if (rst) track_q <= '0;
    else     track_q <= (track_q << 1) | DIST'(error && !busy);
  end

  assign reexecute = track_q[DIST-1];
  assign busy      = |track_q;

  // The checker holds while busy, so a second error cannot arrive meanwhile.
  a_no_error_while_busy : assert property (@(posedge clk) disable iff (rst) busy |-> !error);

endmodule
