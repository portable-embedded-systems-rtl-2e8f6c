// tb_gf_mult: checks the digit-serial multiplier against a bit-serial
// reference product for random and corner-case operands, checks the 43-cycle
// latency and that a new multiplication can start in the done cycle.
module tb_gf_mult;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  elem_t a, b, z;
  logic busy, done;
  int checks = 0, failures = 0;

  gf_mult dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(elem_t x, elem_t y);
    int cyc;
    fe_t exp;
    exp = fmul(x, y);
    a = x; b = y; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks += 2;
    if (z !== exp) begin failures++; $display("product mismatch a=%h b=%h got %h exp %h", x, y, z, exp); end
    if (cyc != 43) begin failures++; $display("latency %0d, expected 43", cyc); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run('1, '1);
    run(elem_t'(1), rnd());
    run(rnd(), elem_t'(1));
    run(elem_t'(1) << 162, elem_t'(1) << 162);
    run('0, rnd());
    for (int i = 0; i < 40; i++) run(rnd(), rnd());
    // back-to-back: second start in the done cycle
    begin
      fe_t e1, e2, x1, y1, x2, y2;
      x1 = rnd(); y1 = rnd(); x2 = rnd(); y2 = rnd();
      e1 = fmul(x1, y1); e2 = fmul(x2, y2);
      a = x1; b = y1; start = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1; end
      checks++; if (z !== e1) failures++;
      a = x2; b = y2; start = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1; end
      checks++; if (z !== e2) begin failures++; $display("back-to-back mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
