// Diagnosis from the downloaded fail memory, with bisd_top at its default
// sizes (8-bit LP-TPG, 8 chains of 8 cells, n=8, h=64, g=16).
//
// The hardware only logs {block, signature}; the diagnosis runs off chip.
// This testbench plays that off-chip part to show that the log is enough:
// for every candidate fault f (each of the stand-in circuit's internal nodes
// stuck-at-0 and stuck-at-1, unconditionally) it computes, per pattern i of
// a block, the error signature e_i of f from the all-zero MISR state and
// d_i = H^(n-i) e_i, and asks whether some subset of the d_i XORs to
// S_B xor S_B^f (observed). If so, f explains block B under some condition.
// evidence(f) counts the logged blocks f explains; ties are broken by the
// number of passing blocks (before the fail memory filled) in which the
// unconditional f also gives the correct signature. Two sessions: the
// conditional stuck-at-1 on node g[3] (active only when cell 10 = 1) and
// the rare stuck-at-0. The injected fault must explain every logged block
// and be ranked first (alone or tied).
module tb_bisd_diagnosis;
  import bisd_pkg::*;
  import bisd_ref_pkg::*;
  localparam int W = 8, M = 8, MW = 8, H = 64, G = 16;
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

  bisd_top dut (
    .clk, .rst_n, .start, .busy, .done, .ctrl_state, .tpg_step, .tpg_lfsr,
    .cut_stimulus, .cut_response,
    .rm_we, .rm_waddr, .rm_wdata,
    .fm_raddr, .fm_rindex, .fm_rsig, .fm_count, .fm_full, .fm_overflow);

  always_comb cut_response = CELLS'(cut_model(64'(cut_stimulus), CELLS, fault));

  always #5 clk = ~clk;

  initial begin
    repeat (3 * (TOTAL * (M + 1) + M + H) + 2 * H + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] good[$], stims[$];

  // H^(n-1-i) e_i for every pattern of the session under candidate f
  function automatic void contributions(int f, ref logic [63:0] d[$]);
    logic [63:0] eps, comp, e;
    d.delete();
    for (int p = 0; p < TOTAL; p++) begin
      eps = cut_model(stims[p], CELLS, 0) ^ cut_model(stims[p], CELLS, f);
      e = '0;
      for (int k = 0; k < M; k++) begin
        comp = '0;
        for (int c = 0; c < W; c++) comp[c % MW] ^= eps[c*M + M - 1 - k];
        e = misr_next(e, comp, 64'hB8, MW);
      end
      for (int k = 0; k < M * (MW - 1 - (p % MW)); k++) e = misr_next(e, 64'd0, 64'hB8, MW);
      d.push_back(e);
    end
  endfunction

  function automatic bit solvable(ref logic [63:0] d[$], input int b, input logic [63:0] target);
    for (int sel = 0; sel < (1 << MW); sel++) begin
      logic [63:0] x = '0;
      for (int i = 0; i < MW; i++) if (sel[i]) x ^= d[b*MW + i];
      if (x == target) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic diagnose(int injected, int truth);
    logic [63:0] bad[$], d[$];
    int          nlog, last_blk, ev[int], agree[int], best_ev, best_ag;
    bit          logged[H];
    logic [63:0] obs[H];
    fault = injected;
    session_run(W, M, MW, H, 64'hB8, 64'h01, 64'hB8, injected, bad, stims);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    nlog = int'(fm_count);
    expect_true(nlog > 0, "something logged");
    foreach (logged[b]) logged[b] = 1'b0;
    last_blk = H - 1;
    for (int k = 0; k < nlog; k++) begin
      fm_raddr = FW'(k);
      #1;
      logged[fm_rindex] = 1'b1;
      obs[fm_rindex]    = 64'(fm_rsig);
      expect_true(64'(fm_rsig) == bad[fm_rindex], "logged signature matches reference");
      if (fm_full) last_blk = int'(fm_rindex);
    end
    // evidence and tie-break for every candidate
    best_ev = -1;
    best_ag = -1;
    for (int f = 100; f < 126; f++) begin
      contributions(f, d);
      ev[f] = 0;
      agree[f] = 0;
      for (int b = 0; b < H; b++) begin
        if (logged[b]) begin
          if (solvable(d, b, good[b] ^ obs[b])) ev[f]++;
        end else if (b < last_blk) begin
          logic [63:0] x = '0;
          for (int i = 0; i < MW; i++) x ^= d[b*MW + i];
          if (x == 0) agree[f]++;
        end
      end
      if (ev[f] > best_ev || (ev[f] == best_ev && agree[f] > best_ag)) begin
        best_ev = ev[f];
        best_ag = agree[f];
      end
    end
    $display("injected fault %0d: %0d blocks logged; candidate %0d has evidence %0d, tie-break %0d; best %0d/%0d",
             injected, nlog, truth, ev[truth], agree[truth], best_ev, best_ag);
    for (int f = 100; f < 126; f++)
      if (ev[f] == best_ev) $display("  top candidate %0d: evidence %0d, tie-break %0d", f, ev[f], agree[f]);
    expect_true(ev[truth] == nlog, "injected fault explains every logged block");
    expect_true(ev[truth] == best_ev && agree[truth] == best_ag, "injected fault ranked first");
  endtask

  initial begin
    session_run(W, M, MW, H, 64'hB8, 64'h01, 64'hB8, 0, good, stims);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < H; b++) begin
      @(negedge clk);
      rm_we = 1'b1; rm_waddr = IW'(b); rm_wdata = MW'(good[b]);
    end
    @(negedge clk);
    rm_we = 1'b0;
    diagnose(2, 107);  // conditional g[3] stuck-at-1
    diagnose(1, 124);  // rare node stuck-at-0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
