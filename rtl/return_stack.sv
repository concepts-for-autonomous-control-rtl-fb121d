// return_stack: hardware stack of return addresses for checking returns.
//
// On a checked call the checker pushes the address the subroutine must
// return to, together with the CUPC value (checker table index) at which
// checking resumes in the caller. On a checked return the top entry is
// compared with the address actually fetched and then popped. The top entry
// is read combinationally from a register array.
// The stack and its depth of 32 entries follow the paper. Storing the
// resume CUPC, and the overflow policy, are this design's choices: when a
// push finds the stack full the oldest entry is lost (circular buffer) and
// the sticky `overflow` flag is set, so a deep return later finds the stack
// empty (`empty` high) and the checker reports it as an error.
// Push and pop in the same cycle are not used by the checker; if both are
// high, pop wins and push is ignored.
module return_stack #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned ADDR_W = 30,
  parameter int unsigned IDX_W  = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              push,
  input  logic [ADDR_W-1:0] push_addr,
  input  logic [IDX_W-1:0]  push_idx,
  input  logic              pop,
  output logic              empty,
  output logic [ADDR_W-1:0] top_addr,
  output logic [IDX_W-1:0]  top_idx,
  output logic              overflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0] addr_q [DEPTH];
  logic [IDX_W-1:0]  idx_q  [DEPTH];
  logic [PW-1:0]     sp_q;     // slot of the next push
  logic [PW:0]       cnt_q;    // valid entries, saturates at DEPTH

  logic [PW-1:0] top_slot;
  assign top_slot = (sp_q == '0) ? PW'(DEPTH - 1) : sp_q - 1'b1;
  assign empty    = (cnt_q == '0);
  assign top_addr = addr_q[top_slot];
  assign top_idx  = idx_q[top_slot];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp_q     <= '0;
      cnt_q    <= '0;
      overflow <= 1'b0;
    end else if (pop) begin
      if (!empty) begin
        sp_q  <= top_slot;
        cnt_q <= cnt_q - 1'b1;
      end
    end else if (push) begin
      addr_q[sp_q] <= push_addr;
      idx_q[sp_q]  <= push_idx;
      sp_q         <= (sp_q == PW'(DEPTH - 1)) ? '0 : sp_q + 1'b1;
      if (cnt_q == (PW+1)'(DEPTH)) overflow <= 1'b1;
      else                         cnt_q    <= cnt_q + 1'b1;
    end
  end

endmodule
