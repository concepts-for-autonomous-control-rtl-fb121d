// tb_pc_pipeline: self-checking test of the PC path.
// Random jumps, taken branches and re-execution requests are applied; a
// reference model (queues of PCs and valid bits per stage) predicts every
// stage register, the PC generation priority and the annulment of fetch to
// memory on re-execution, and that nothing annulled reaches the write stage.
module tb_pc_pipeline;
  localparam int unsigned ADDR_W = 30;
  localparam logic [ADDR_W-1:0] RST_PC = 30'h40;

  logic clk = 1'b0, rst;
  logic jump_valid, branch_taken, reexecute;
  logic [ADDR_W-1:0] jump_addr, branch_addr;
  logic [ADDR_W-1:0] fetch_pc, decode_pc, execute_pc, memory_pc, write_pc;
  logic fetch_valid, decode_valid, execute_valid, memory_valid, write_valid;
  int checks = 0, failures = 0, n_reexec = 0, n_annulled = 0;

  logic [ADDR_W-1:0] m_pc [5];
  logic              m_v  [5];

  pc_pipeline #(.ADDR_W(ADDR_W), .RESET_PC(RST_PC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [ADDR_W-1:0] pc, input logic v, input int s);
    checks++;
    if (v !== m_v[s] || (v && pc !== m_pc[s])) begin
      failures++;
      $display("FAIL stage %0d: pc=%h v=%0b expected pc=%h v=%0b", s, pc, v, m_pc[s], m_v[s]);
    end
  endtask

  initial begin
    logic [ADDR_W-1:0] nxt;
    rst = 1; jump_valid = 0; branch_taken = 0; reexecute = 0; jump_addr = '0; branch_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    m_pc[0] = RST_PC; m_v[0] = 1;
    for (int s = 1; s < 5; s++) begin m_pc[s] = '0; m_v[s] = 0; end
    for (int k = 0; k < 2000; k++) begin
      int r = $urandom_range(99);
      jump_valid   = (r < 15);
      branch_taken = ($urandom_range(99) < 20);
      jump_addr    = ADDR_W'($urandom);
      branch_addr  = ADDR_W'($urandom);
      reexecute    = m_v[3] && ($urandom_range(99) < 8);
      if (reexecute) nxt = m_pc[3];
      else if (jump_valid) nxt = jump_addr;
      else if (branch_taken) nxt = branch_addr;
      else nxt = m_pc[0] + 1;
      @(posedge clk);
      if (reexecute) begin
        n_reexec++;
        for (int s = 0; s < 4; s++) if (m_v[s]) n_annulled++;
      end
      for (int s = 4; s > 0; s--) begin
        m_pc[s] = m_pc[s-1];
        m_v[s]  = m_v[s-1] && !reexecute;
      end
      m_pc[0] = nxt; m_v[0] = 1;
      #1;
      cmp(fetch_pc, fetch_valid, 0);
      cmp(decode_pc, decode_valid, 1);
      cmp(execute_pc, execute_valid, 2);
      cmp(memory_pc, memory_valid, 3);
      cmp(write_pc, write_valid, 4);
      @(negedge clk);
    end
    checks++;
    if (n_reexec == 0) begin failures++; $display("FAIL no re-execution exercised"); end
    $display("re-executions %0d, instructions annulled %0d", n_reexec, n_annulled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
