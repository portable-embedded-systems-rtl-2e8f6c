// tb_gf_divx: checks division by x: multiplying the result by x must give the
// operand back, and the result must equal a * x^-1 from the reference.
module tb_gf_divx;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0;
  elem_t a, y;
  fe_t xinv;
  int checks = 0, failures = 0;

  gf_divx dut (.a, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xinv = finv(fe_t'(2));
    for (int i = 0; i < 100; i++) begin
      a = (i == 0) ? elem_t'(1) : (i == 1) ? '1 : rnd();
      @(posedge clk);
      checks += 2;
      if (fmul(y, fe_t'(2)) !== a) begin failures++; $display("a=%h got %h", a, y); end
      if (y !== fmul(a, xinv)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
