// Testbench of fail_memory (g=16 entries, index 6 bits, signature 8 bits):
// random writes are logged in order until the memory is full; later writes
// are dropped and set overflow; count/full follow; clear empties it; all
// entries read back as written.
module tb_fail_memory;
  localparam int W = 8, G = 16;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr = 1'b0;
  logic [5:0] wr_index, rd_index;
  logic [W-1:0] wr_sig, rd_sig;
  logic [3:0] rd_addr;
  logic [4:0] count;
  logic full, overflow;
  logic [13:0] model [$];
  int checks = 0, failures = 0;
  bit exp_ovf;

  fail_memory dut (.clk, .rst_n, .clear, .wr, .wr_index, .wr_sig, .rd_addr,
                   .rd_index, .rd_sig, .count, .full, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (count !== 5'(model.size()) || full !== (model.size() == G) || overflow !== exp_ovf) begin
      failures++;
      $display("FAIL count=%0d full=%b overflow=%b, expected %0d %b %b",
               count, full, overflow, model.size(), model.size() == G, exp_ovf);
    end
    for (int a = 0; a < model.size(); a++) begin
      rd_addr = 4'(a);
      #1;
      checks++;
      if ({rd_index, rd_sig} !== model[a]) begin
        failures++;
        $display("FAIL entry %0d: %h expected %h", a, {rd_index, rd_sig}, model[a]);
      end
    end
  endtask

  initial begin
    rd_addr = '0; wr_index = '0; wr_sig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      model.delete();
      exp_ovf = 0;
      check_state();
      for (int t = 0; t < 30 + 10 * round; t++) begin
        @(negedge clk);
        wr = ($urandom_range(0, 2) != 0);
        wr_index = 6'($urandom);
        wr_sig = W'($urandom);
        if (wr) begin
          if (model.size() < G) model.push_back({wr_index, wr_sig});
          else exp_ovf = 1;
        end
        @(negedge clk);
        wr = 1'b0;
        check_state();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
