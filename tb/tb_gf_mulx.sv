// tb_gf_mulx: checks multiplication by x against the reference multiplier,
// with and without the x^163 term appearing.
module tb_gf_mulx;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0;
  elem_t a, y;
  int checks = 0, failures = 0;

  gf_mulx dut (.a, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      a = (i == 0) ? (elem_t'(1) << 162) : (i == 1) ? '1 : rnd();
      @(posedge clk);
      checks++;
      if (y !== fmul(a, fe_t'(2))) begin failures++; $display("a=%h got %h", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
