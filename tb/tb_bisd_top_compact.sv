// End-to-end testbench of bisd_top with the space compactor folding the 8
// scan chains onto a 4-bit MISR (x^4+x^3+1): blocks of 4 patterns, h=16
// blocks, fail memory of g=4 entries. Otherwise as the default-size
// testbench: a stand-in circuit under test, reference signatures loaded
// into the response memory, three sessions (fault free, rare stuck-at-0,
// conditional stuck-at-1; with only 64 patterns the rare fault may stay
// unexcited), the downloaded fail memory compared entry by
// entry, the session length checked, and each mechanism counted.
module tb_bisd_top_compact;
  import bisd_pkg::*;
  import bisd_ref_pkg::*;
  localparam int W = 8, M = 8, MW = 4, H = 16, G = 4;
  localparam int CELLS = W * M, IW = $clog2(H), FW = $clog2(G);
  localparam int TOTAL = MW * H;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  bisd_state_e ctrl_state;
  tpg_step_e tpg_step;
  logic [W-1:0] tpg_lfsr;
  logic [CELLS-1:0] cut_stimulus, cut_response;
  logic rm_we = 1'b0;
  logic [IW-1:0] rm_waddr = '0;
  logic [MW-1:0] rm_wdata = '0;
  logic [FW-1:0] fm_raddr = '0;
  logic [IW-1:0] fm_rindex;
  logic [MW-1:0] fm_rsig;
  logic [FW:0] fm_count;
  logic fm_full, fm_overflow;
  int fault = 0;
  int checks = 0, failures = 0;

  bisd_top #(.MISR_WIDTH(MW), .NUM_BLOCKS(H), .FAIL_DEPTH(G), .MISR_TAPS(4'hC)) dut (
    .clk, .rst_n, .start, .busy, .done, .ctrl_state, .tpg_step, .tpg_lfsr,
    .cut_stimulus, .cut_response,
    .rm_we, .rm_waddr, .rm_wdata,
    .fm_raddr, .fm_rindex, .fm_rsig, .fm_count, .fm_full, .fm_overflow);

  always_comb cut_response = CELLS'(cut_model(64'(cut_stimulus), CELLS, fault));

  always #5 clk = ~clk;

  initial begin
    repeat (4 * (TOTAL * (M + 1) + M + H) + 2 * H + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_step[4];
  int n_inject = 0, n_capture = 0, n_check = 0, n_logged = 0, n_full = 0, n_overflow = 0;
  logic [FW:0] prev_count = '0;
  always @(posedge clk) if (rst_n) begin
    if (busy) n_step[int'(tpg_step)]++;
    if (busy && (tpg_step == STEP2 || tpg_step == STEP4) && dut.pattern != tpg_lfsr) n_inject++;
    if (ctrl_state == S_CAPTURE) n_capture++;
    if (ctrl_state == S_CHECK) n_check++;
    if (fm_count > prev_count) n_logged++;
    prev_count <= fm_count;
  end

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, want);
    end
  endtask

  logic [63:0] good[$], bad[$];

  initial begin
    int cyc, nf, k;
    session_sigs(W, M, MW, H, 64'hB8, 64'h01, 64'hC, 0, good);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < H; b++) begin
      @(negedge clk);
      rm_we = 1'b1; rm_waddr = IW'(b); rm_wdata = MW'(good[b]);
    end
    @(negedge clk);
    rm_we = 1'b0;
    for (int f = 0; f < 3; f++) begin
      fault = f;
      session_sigs(W, M, MW, H, 64'hB8, 64'h01, 64'hC, f, bad);
      nf = 0;
      foreach (bad[b]) if (bad[b] != good[b]) nf++;
      $display("fault %0d: %0d of %0d blocks fail", f, nf, H);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      expect_eq(cyc, TOTAL * (M + 1) + M + H + 1, "clocks from start to done");
      expect_eq(fm_count, (nf < G) ? nf : G, "fail count");
      expect_eq(fm_full, nf >= G, "fail memory full");
      expect_eq(fm_overflow, nf > G, "fail memory overflow");
      if (fm_full) n_full++;
      if (fm_overflow) n_overflow++;
      k = 0;
      foreach (bad[b]) if (bad[b] != good[b] && k < G) begin
        fm_raddr = FW'(k);
        #1;
        expect_eq(fm_rindex, b, "logged block index");
        expect_eq(fm_rsig, bad[b], "logged signature");
        k++;
      end
      if (f == 1) begin
        checks++;
        if (nf >= G) begin
          failures++;
          $display("FAIL rare fault should fail fewer than g blocks");
        end
      end
    end
    $display("mechanisms: steps %0d/%0d/%0d/%0d, injected patterns %0d, captures %0d, checks %0d, logged %0d, full %0d, overflow %0d",
             n_step[0], n_step[1], n_step[2], n_step[3], n_inject, n_capture, n_check,
             n_logged, n_full, n_overflow);
    for (int s = 0; s < 4; s++) expect_eq(n_step[s] > 0, 1, "LP-TPG step seen");
    expect_eq(n_inject > 0, 1, "R-injection changed a bit");
    expect_eq(n_capture, 3 * TOTAL, "captures");
    expect_eq(n_check, 3 * H, "signature checks");
    expect_eq(n_logged > 0, 1, "mismatch logged");
    expect_eq(n_full > 0, 1, "fail memory full");
    expect_eq(n_overflow > 0, 1, "fail memory overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
