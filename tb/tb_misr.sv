// Testbench of misr (8 bits, x^8+x^6+x^5+x^4+1). Each block of n=8 patterns
// feeds m=8 random response vectors per pattern, with random idle clocks
// (en=0) in between. The signature is checked against the linear
// superposition S_B = sum over i of H^(n-i) s_i, H = L^m, where s_i is the
// signature of pattern i alone from the all-zero state. clear must return
// the register to zero before every block.
module tb_misr;
  import bisd_ref_pkg::*;
  localparam int W = 8, M = 8, NP = 8;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [W-1:0] d, sig;
  int checks = 0, failures = 0;
  logic [W-1:0] resp [NP][M];

  misr #(.WIDTH(W), .TAPS(8'hB8)) dut (.clk, .rst_n, .clear, .en, .d, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] s_i, sb;
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 50; b++) begin
      // reference
      sb = '0;
      for (int i = 0; i < NP; i++) begin
        s_i = '0;
        for (int k = 0; k < M; k++) begin
          resp[i][k] = W'($urandom);
          s_i = misr_next(s_i, 64'(resp[i][k]), 64'hB8, W);
        end
        for (int k = 0; k < M * (NP - 1 - i); k++) s_i = misr_next(s_i, 64'd0, 64'hB8, W);
        sb ^= s_i;
      end
      // clear, with data present, must give zero
      @(negedge clk);
      clear = 1'b1; en = 1'b1; d = W'($urandom);
      @(negedge clk);
      clear = 1'b0; en = 1'b0;
      checks++;
      if (sig !== '0) begin failures++; $display("FAIL clear"); end
      for (int i = 0; i < NP; i++)
        for (int k = 0; k < M; k++) begin
          while ($urandom_range(0, 3) == 0) begin
            en = 1'b0; d = W'($urandom);
            @(negedge clk);
          end
          en = 1'b1; d = resp[i][k];
          @(negedge clk);
        end
      en = 1'b0;
      checks++;
      if (64'(sig) !== sb) begin
        failures++;
        $display("FAIL block %0d: signature %h expected %h", b, sig, sb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
