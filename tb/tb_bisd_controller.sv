// Testbench of bisd_controller with m=3 cells per chain, n=4 patterns per
// block and h=5 blocks. The MISR signature is a random stand-in and the
// expected word is made to match it or not per block, from a random pass
// list. Checked over three sessions:
// - start to done takes n*h*(m+1) + m + h clocks;
// - (n*h+1)*m shift clocks, the first m without MISR enable; n*h capture
//   clocks; n*m MISR clocks between two consecutive MISR clears;
// - one check per block, with block indices 0..h-1 in order, a fail-memory
//   write exactly when signature and expected word differ;
// - tpg_init and fm_clear only on start, tpg_en through the whole session.
module tb_bisd_controller;
  import bisd_pkg::*;
  localparam int M = 3, NP = 4, H = 5;
  localparam int TOTAL = NP * H;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic tpg_init, tpg_en, scan_en, capture, misr_en, misr_clear, fm_clear, fm_wr;
  logic busy, done;
  logic [7:0] signature, expected;
  logic [2:0] rm_addr, fm_index;
  bisd_state_e state;
  bit pass_blk [H];
  int checks = 0, failures = 0;

  bisd_controller #(.CHAIN_LEN(M), .BLOCK_PATTERNS(NP), .NUM_BLOCKS(H), .WIDTH(8)) dut (
    .clk, .rst_n, .start, .tpg_init, .tpg_en, .scan_en, .capture,
    .misr_en, .misr_clear, .signature, .rm_addr, .expected,
    .fm_clear, .fm_wr, .fm_index, .busy, .done, .state);

  always #5 clk = ~clk;
  always_comb expected = pass_blk[rm_addr] ? signature : (signature ^ 8'h5A);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    int cyc, n_shift, n_cap, n_misr, n_check, n_wr, n_wr_exp, misr_since_clear, first_misr;
    int bad_misr_run, bad_init, bad_en, bad_idx;
    signature = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int sess = 0; sess < 3; sess++) begin
      foreach (pass_blk[b]) pass_blk[b] = ($urandom_range(0, 1) == 1);
      @(negedge clk);
      start = 1'b1;
      #1;
      expect_eq(int'(tpg_init && fm_clear && misr_clear), 1, "init on start");
      @(negedge clk);
      start = 1'b0;
      cyc = 0; n_shift = 0; n_cap = 0; n_misr = 0; n_check = 0; n_wr = 0; n_wr_exp = 0;
      misr_since_clear = 0; first_misr = -1; bad_misr_run = 0; bad_init = 0; bad_en = 0;
      bad_idx = 0;
      while (!done && cyc < 10000) begin
        signature = 8'($urandom);
        #1;
        cyc++;
        if (!tpg_en || !busy) bad_en++;
        if (tpg_init || fm_clear) bad_init++;
        if (scan_en) n_shift++;
        if (capture) n_cap++;
        if (misr_en) begin
          n_misr++;
          misr_since_clear++;
          if (first_misr < 0) first_misr = n_shift;
        end
        if (misr_clear) begin
          if (misr_since_clear != NP * M) bad_misr_run++;
          misr_since_clear = 0;
          if (fm_index != 3'(n_check) || rm_addr != 3'(n_check)) bad_idx++;
          n_check++;
          if (signature != expected) n_wr_exp++;
        end
        if (fm_wr) begin
          n_wr++;
          if (!misr_clear) bad_idx++;
        end
        @(negedge clk);
      end
      expect_eq(cyc, TOTAL * (M + 1) + M + H, "session clocks");
      expect_eq(n_shift, (TOTAL + 1) * M, "shift clocks");
      expect_eq(first_misr, M + 1, "first MISR clock after the first load");
      expect_eq(n_cap, TOTAL, "capture clocks");
      expect_eq(n_misr, TOTAL * M, "MISR clocks");
      expect_eq(n_check, H, "checks");
      expect_eq(bad_misr_run, 0, "MISR clocks per block");
      expect_eq(n_wr, n_wr_exp, "fail writes");
      expect_eq(bad_init + bad_en + bad_idx, 0, "control during session");
      expect_eq(int'(done && !busy), 1, "done");
      repeat (3) @(negedge clk);
      expect_eq(int'(done && !tpg_en && !scan_en), 1, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
