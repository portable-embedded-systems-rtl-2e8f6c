// tb_gf_root: for random g with T(g) = 0 and both trace values t, checks that
// the root unit returns z with z^2 + z = g and T(z) = t, compares it with a
// half-trace reference, and checks the 42-cycle latency.
module tb_gf_root;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, t = 0;
  elem_t g, z;
  logic busy, done;
  int checks = 0, failures = 0;

  gf_root dut (.clk, .rst_n, .start, .g, .t, .busy, .done, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(elem_t gv, logic tv);
    int cyc;
    fe_t exp;
    exp = fsolve(gv, tv);
    g = gv; t = tv; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks += 4;
    if (z !== exp) begin failures++; $display("g=%h t=%0d got %h exp %h", gv, tv, z, exp); end
    if ((fsq(z) ^ z) !== gv) begin failures++; $display("not a root"); end
    if (ftrace(z) !== tv) begin failures++; $display("wrong trace"); end
    if (cyc != 42) begin failures++; $display("latency %0d, expected 42", cyc); end
  endtask

  initial begin
    fe_t gv;
    g = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run('0, 1'b0);
    run('0, 1'b1);
    for (int i = 0; i < 12; i++) begin
      gv = rnd();
      if (ftrace(gv)) gv = gv ^ fe_t'(1);   // T(1) = 1 for odd k
      run(gv, 1'(i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
