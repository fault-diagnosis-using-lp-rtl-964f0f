// Testbench of space_compactor at its default 16 -> 8 and at 13 -> 4:
// every output must be the parity of the inputs congruent to it, counted
// by stepping through the inputs of each output group separately.
module tb_space_compactor;
  logic clk = 1'b0;
  logic [15:0] d16;
  logic [7:0]  y8;
  logic [12:0] d13;
  logic [3:0]  y4;
  int checks = 0, failures = 0;

  space_compactor dut_a (.d(d16), .y(y8));
  space_compactor #(.NUM_IN(13), .NUM_OUT(4)) dut_b (.d(d13), .y(y4));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      bit p;
      d16 = 16'($urandom);
      d13 = 13'($urandom);
      @(posedge clk);
      for (int j = 0; j < 8; j++) begin
        p = 0;
        for (int i = j; i < 16; i += 8) p ^= d16[i];
        checks++;
        if (y8[j] !== p) begin failures++; $display("FAIL 16->8 bit %0d", j); end
      end
      for (int j = 0; j < 4; j++) begin
        p = 0;
        for (int i = j; i < 13; i += 4) p ^= d13[i];
        checks++;
        if (y4[j] !== p) begin failures++; $display("FAIL 13->4 bit %0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
