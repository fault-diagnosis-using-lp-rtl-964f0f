// Testbench of lp_lfsr driven through the four steps by hand. Each output
// pattern is compared with the reference stream computed from whole LFSR
// states (bisd_ref_pkg::tpg_model); after every four steps the LFSR state
// must equal the ordinary LFSR successor, and T(i) must repeat only after
// 255 steps (maximal length of the 8-bit polynomial).
module tb_lp_lfsr;
  import bisd_ref_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  logic en1, en2, sel1, sel2;
  logic [W-1:0] o, state;
  int checks = 0, failures = 0;
  tpg_model ref_m;
  logic [63:0] expq, first;
  int period;

  lp_lfsr #(.WIDTH(W), .TAPS(8'hB8), .SEED(8'h01)) dut (
    .clk, .rst_n, .init, .en1, .en2, .sel1, .sel2, .o, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_m = new(W, 64'hB8, 64'h01);
    {en1, en2, sel1, sel2} = 4'b00_11;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expq   = 64'h01;
    period = 0;
    for (int i = 0; i < 300; i++) begin
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        case (s)
          0: {en1, en2, sel1, sel2} = 4'b10_11;
          1: {en1, en2, sel1, sel2} = 4'b00_10;
          2: {en1, en2, sel1, sel2} = 4'b01_11;
          default: {en1, en2, sel1, sel2} = 4'b00_01;
        endcase
        #1;
        checks++;
        if (64'(o) !== ref_m.next_pattern()) begin
          failures++;
          $display("FAIL pattern %0d step %0d: o=%h", i, s + 1, o);
        end
      end
      @(posedge clk);
      #1;
      expq = lfsr_next(expq, 64'hB8, W);
      checks++;
      if (64'(state) !== expq) begin
        failures++;
        $display("FAIL state after pattern %0d: %h expected %h", i, state, expq);
      end
      if (i == 0) first = expq;
      else if (period == 0 && 64'(state) == first) period = i;
    end
    checks++;
    if (period != 255) begin
      failures++;
      $display("FAIL period %0d", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
