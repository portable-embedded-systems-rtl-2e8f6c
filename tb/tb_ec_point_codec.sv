// tb_ec_point_codec: for random subgroup points, the collapsed word must be
// x with bit 0 replaced by T(y/x), and uncollapsing it must give back x and
// T(y/x).
module tb_ec_point_codec;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0;
  elem_t x_in, word_out, word_in, x_out;
  logic tr_in, tr_out;
  int checks = 0, failures = 0;

  ec_point_codec dut (.x_in, .tr_in, .word_out, .word_in, .x_out, .tr_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t p;
    fe_t w;
    for (int i = 0; i < 12; i++) begin
      p = rand_point();
      w = collapse(p);
      x_in = p.x; tr_in = ftrace(fdiv(p.y, p.x)); word_in = w;
      @(posedge clk);
      checks += 3;
      if (word_out !== w) begin failures++; $display("collapse mismatch"); end
      if (x_out !== p.x) begin failures++; $display("x mismatch %h vs %h", x_out, p.x); end
      if (tr_out !== tr_in) begin failures++; $display("trace mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
