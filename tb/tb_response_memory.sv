// Testbench of response_memory (h=64 words of 8 bits): fill with random
// words, read every address back, overwrite some and read again.
module tb_response_memory;
  localparam int W = 8, H = 64;
  logic clk = 1'b0, we = 1'b0;
  logic [5:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [H];
  int checks = 0, failures = 0;

  response_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < H; a++) begin
      raddr = 6'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL address %0d: %h expected %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    raddr = '0;
    for (int a = 0; a < H; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    read_all();
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); waddr = 6'($urandom); wdata = W'($urandom);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
