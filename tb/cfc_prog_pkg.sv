// cfc_prog_pkg: test program shared by the checker testbenches.
//
// A small program in word addresses, with its checker tables written out as
// a program analyzer would produce them (one entry per direct CFI or
// checking marker, ascending address order):
//   0x100..0x104  main, checking starts at 0x100       entry 0  start
//   0x105         call 0x200                            entry 1  call
//   0x106..0x108  main loop body
//   0x109         branch to 0x102                       entry 2  branch
//   0x10A         jump to 0x110                         entry 3  jump
//   0x110..0x113  main tail
//   0x114         checking ends here                    entry 4  end
//   0x115         jump 0x300 (unchecked code)
//   0x300..0x304  unchecked code
//   0x305         jump 0x100 (unchecked)
//   0x200..0x205  subroutine loop body
//   0x206         branch to 0x200                       entry 5  branch
//   0x207         return (to 0x106)                     entry 6  return
package cfc_prog_pkg;
  import cfc_pkg::*;

  localparam int unsigned AW = 30;
  localparam int unsigned NUM_ENTRIES = 7;
  localparam logic [AW-1:0] START_PC = 30'h100;
  localparam logic [AW-1:0] RET_ADDR = 30'h106;

  typedef enum logic [2:0] {K_SEQ, K_JUMP, K_BRANCH, K_CALL, K_RET} kind_e;

  function automatic kind_e kind_of(logic [AW-1:0] a);
    case (a)
      30'h105:                   return K_CALL;
      30'h109, 30'h206:          return K_BRANCH;
      30'h10A, 30'h115, 30'h305: return K_JUMP;
      30'h207:                   return K_RET;
      default:                   return K_SEQ;
    endcase
  endfunction

  function automatic logic [AW-1:0] target_of(logic [AW-1:0] a);
    case (a)
      30'h105: return 30'h200;
      30'h109: return 30'h102;
      30'h10A: return 30'h110;
      30'h115: return 30'h300;
      30'h305: return 30'h100;
      30'h206: return 30'h200;
      30'h207: return RET_ADDR;
      default: return a + 1;
    endcase
  endfunction

  function automatic bit is_start(logic [AW-1:0] a); return a == 30'h100; endfunction
  function automatic bit is_end(logic [AW-1:0] a);   return a == 30'h114; endfunction

  // checker table entry i: {sadr, jadr, next index, flags}
  task automatic get_entry(input int i, output logic [AW-1:0] sadr, output logic [AW-1:0] jadr,
                           output int nxt, output cfi_flags_t fl);
    fl = '0; jadr = '0; nxt = 0;
    case (i)
      0: begin sadr = 30'h100; nxt = 1; fl.chk_start = 1; end
      1: begin sadr = 30'h105; jadr = 30'h200; nxt = 5; fl.is_call = 1; end
      2: begin sadr = 30'h109; jadr = 30'h102; nxt = 1; fl.is_branch = 1; end
      3: begin sadr = 30'h10A; jadr = 30'h110; nxt = 4; end
      4: begin sadr = 30'h114; nxt = 0; fl.chk_end = 1; end
      5: begin sadr = 30'h206; jadr = 30'h200; nxt = 5; fl.is_branch = 1; end
      default: begin sadr = 30'h207; fl.is_return = 1; end
    endcase
  endtask

  // Is n a legal successor of a (for checked code)?
  function automatic bit legal(logic [AW-1:0] a, logic [AW-1:0] n);
    case (kind_of(a))
      K_SEQ:    return n == a + 1;
      K_BRANCH: return n == a + 1 || n == target_of(a);
      default:  return n == target_of(a);
    endcase
  endfunction

  // Expected checker event for the legal pair (a, n) with checking on/off.
  function automatic cfc_event_t expected_event(bit active, logic [AW-1:0] a, logic [AW-1:0] n);
    cfc_event_t e = '0;
    if (!active) begin
      e.activate = is_start(a);
    end else if (is_end(a)) begin
      e.deactivate = 1;
    end else if (is_start(a)) begin
      e = '0;
    end else if (!legal(a, n)) begin
      e.error = 1;
    end else begin
      case (kind_of(a))
        K_SEQ:    e.seq_ok = 1;
        K_JUMP:   e.jump_ok = 1;
        K_CALL:   e.call_ok = 1;
        K_RET:    e.ret_ok = 1;
        default:  if (n == target_of(a)) e.br_taken = 1; else e.br_not_taken = 1;
      endcase
    end
    return e;
  endfunction
endpackage
