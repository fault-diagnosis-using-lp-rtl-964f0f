// Testbench of lp_tpg_fsm: en1en2/sel1sel2 must follow the four-step table
// 10/11, 00/10, 01/11, 00/01 one step per clock while test_en=1, start at
// step 1, hold (enables low) while test_en=0, and restart on init.
module tb_lp_tpg_fsm;
  import bisd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, test_en = 1'b0;
  logic en1, en2, sel1, sel2;
  tpg_step_e step;
  int checks = 0, failures = 0;
  int exp_step;

  lp_tpg_fsm dut (.clk, .rst_n, .init, .test_en, .en1, .en2, .sel1, .sel2, .step);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] table_row(int s);
    case (s)
      0: return 4'b10_11;
      1: return 4'b00_10;
      2: return 4'b01_11;
      default: return 4'b00_01;
    endcase
  endfunction

  task automatic check(logic [3:0] expv, string what);
    checks++;
    if ({en1, en2, sel1, sel2} !== expv) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, {en1, en2, sel1, sel2}, expv);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    exp_step = 0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      test_en = ($urandom_range(0, 3) != 0);
      init    = ($urandom_range(0, 40) == 0);
      #1;
      if (test_en) check(table_row(exp_step), "step");
      else         check(4'b00_11, "idle");
      @(posedge clk);
      if (init) exp_step = 0;
      else if (test_en) exp_step = (exp_step + 1) % 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
