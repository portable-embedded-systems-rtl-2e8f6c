// tb_gf_div: checks the Brunner divider for inversions and divisions against
// Fermat-inversion references, including divisor 1 and divisors with the top
// coefficient set, and checks the 327-cycle latency.
module tb_gf_div;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, divide = 0;
  elem_t a, b, q;
  logic busy, done;
  int checks = 0, failures = 0;

  gf_div dut (.clk, .rst_n, .start, .divide, .a, .b, .busy, .done, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic dv, elem_t x, elem_t y);
    int cyc;
    fe_t exp;
    exp = dv ? fdiv(x, y) : finv(y);
    a = x; b = y; divide = dv; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks += 2;
    if (q !== exp) begin failures++; $display("div=%0d a=%h b=%h got %h exp %h", dv, x, y, q, exp); end
    if (cyc != 327) begin failures++; $display("latency %0d, expected 327", cyc); end
  endtask

  initial begin
    a = '0; b = '1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run(0, '0, elem_t'(1));
    run(1, rnd(), elem_t'(1));
    run(0, '0, '1);
    run(0, '0, elem_t'(1) << 162);
    run(1, elem_t'(1), elem_t'(2));
    for (int i = 0; i < 10; i++) run(0, '0, rnd() | elem_t'(1));
    for (int i = 0; i < 10; i++) run(1, rnd(), rnd() | elem_t'(4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
