// Testbench of r_injection: all eight input combinations, each checked
// against the rule "equal bits pass, differing bits give r".
module tb_r_injection;
  logic clk = 1'b0;
  logic t_i, t_next, r, o;
  int checks = 0, failures = 0;

  r_injection dut (.t_i, .t_next, .r, .o);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {t_i, t_next, r} = 3'(v);
      @(posedge clk);
      checks++;
      if (o !== ((t_i == t_next) ? t_i : r)) begin
        failures++;
        $display("FAIL t_i=%b t_next=%b r=%b o=%b", t_i, t_next, r, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
