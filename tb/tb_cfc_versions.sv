// tb_cfc_versions: the checker versions and table sizes of the evaluation,
// run on the test program: version A with 512 entries, version B with 1024,
// version C with 2048 (version C with 4096 is the end-to-end test).
module tb_cfc_versions;
  logic clk = 1'b0;
  logic done_a, done_b, done_c;
  int ca, fa, cb, fb, cc, fc;
  int checks, failures;

  always #5 clk = ~clk;

  cfc_version_run #(.ENTRIES(512),  .EN_RET_STACK(1'b0), .EN_REEXEC(1'b0)) u_a (.clk, .done(done_a), .checks(ca), .failures(fa));
  cfc_version_run #(.ENTRIES(1024), .EN_RET_STACK(1'b1), .EN_REEXEC(1'b0)) u_b (.clk, .done(done_b), .checks(cb), .failures(fb));
  cfc_version_run #(.ENTRIES(2048), .EN_RET_STACK(1'b1), .EN_REEXEC(1'b1)) u_c (.clk, .done(done_c), .checks(cc), .failures(fc));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b && done_c);
    checks = ca + cb + cc;
    failures = fa + fb + fc;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
