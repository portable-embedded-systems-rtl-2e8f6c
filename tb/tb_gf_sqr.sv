// tb_gf_sqr: checks the squarer against the reference product a*a for random
// operands, and checks the input dependencies of every output bit: output 10
// must depend on inputs 5, 83, 85, 161 and 162, and over all outputs there must
// be 80 with two inputs, 79 with three, 2 with four and 2 with five.
module tb_gf_sqr;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0;
  elem_t a, y;
  int checks = 0, failures = 0;
  int deps [K];
  int hist [8];

  gf_sqr dut (.a, .y);

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
      a = (i == 0) ? '1 : rnd();
      @(posedge clk);
      checks++;
      if (y !== fsq(a)) begin failures++; $display("a=%h got %h exp %h", a, y, fsq(a)); end
    end
    foreach (deps[j]) deps[j] = 0;
    for (int i = 0; i < K; i++) begin
      a = elem_t'(1) << i;
      @(posedge clk);
      for (int j = 0; j < K; j++) if (y[j]) deps[j]++;
      checks++;
      if (y[10] !== (i == 5 || i == 83 || i == 85 || i == 161 || i == 162)) begin
        failures++; $display("output 10 dependency on input %0d wrong", i);
      end
    end
    foreach (hist[h]) hist[h] = 0;
    foreach (deps[j]) if (deps[j] < 8) hist[deps[j]]++;
    checks++;
    if (hist[2] != 80 || hist[3] != 79 || hist[4] != 2 || hist[5] != 2) begin
      failures++; $display("dependency histogram %0d %0d %0d %0d", hist[2], hist[3], hist[4], hist[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
