// tb_gf_trace_mult: checks T(a*b) from the trace-of-product unit against the
// trace of the reference product, for random operands and for single-term
// operands x^i * x^j at the exponents where the trace is 1.
module tb_gf_trace_mult;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0;
  elem_t a, b;
  logic t;
  int checks = 0, failures = 0;

  gf_trace_mult dut (.a, .b, .t);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(elem_t x, elem_t y);
    logic e;
    a = x; b = y;
    @(posedge clk);
    e = ftrace(fmul(x, y));
    checks++;
    if (t !== e) begin failures++; $display("a=%h b=%h got %0d exp %0d", x, y, t, e); end
  endtask

  initial begin
    int ex [8] = '{0, 157, 163, 313, 314, 317, 319, 323};
    for (int i = 0; i < 60; i++) chk(rnd(), rnd());
    foreach (ex[n]) begin
      int i = (ex[n] > 162) ? 162 : ex[n];
      chk(elem_t'(1) << i, elem_t'(1) << (ex[n] - i));
    end
    chk(elem_t'(1) << 160, elem_t'(1) << 160);   // x^320 cancels
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
