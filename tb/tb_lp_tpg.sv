// Testbench of lp_tpg (LP-LFSR plus FSM), 8 bits.
// - Every clock with test_en=1 the output must equal the reference stream.
// - Every fourth pattern must be the ordinary LFSR sequence T(i).
// - init must restart the stream at the seed and step 1.
// - Switching activity: the average number of output bit transitions per
//   clock must be lower than for an ordinary LFSR producing one state per
//   clock; both averages and peaks are printed.
module tb_lp_tpg;
  import bisd_pkg::*;
  import bisd_ref_pkg::*;
  localparam int W = 8;
  localparam int N = 4000;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, test_en = 1'b0;
  logic [W-1:0] o, lfsr_state;
  tpg_step_e step;
  int checks = 0, failures = 0;
  tpg_model ref_m;
  logic [63:0] prev_lp, prev_nl, nl, ti;
  int sum_lp, sum_nl, peak_lp, peak_nl, tr;

  lp_tpg #(.WIDTH(W)) dut (.clk, .rst_n, .init, .test_en, .o, .step, .lfsr_state);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles, bit measure);
    for (int c = 0; c < cycles; c++) begin
      logic [63:0] e;
      #1;
      e = ref_m.next_pattern();
      checks++;
      if (64'(o) !== e) begin
        failures++;
        $display("FAIL clock %0d step %0d: o=%h expected %h", c, step, o, e);
      end
      if (c % 4 == 0) begin
        checks++;
        if (64'(o) !== ti) begin
          failures++;
          $display("FAIL T(i) at clock %0d: %h expected %h", c, o, ti);
        end
        ti = lfsr_next(ti, 64'hB8, W);
      end
      if (measure && c > 0) begin
        tr = transitions(64'(o), prev_lp);
        sum_lp += tr;
        if (tr > peak_lp) peak_lp = tr;
        tr = transitions(nl, prev_nl);
        sum_nl += tr;
        if (tr > peak_nl) peak_nl = tr;
      end
      prev_lp = 64'(o);
      prev_nl = nl;
      nl = lfsr_next(nl, 64'hB8, W);
      @(negedge clk);
    end
  endtask

  initial begin
    ref_m = new(W, 64'hB8, 64'h01);
    sum_lp = 0; sum_nl = 0; peak_lp = 0; peak_nl = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    test_en = 1'b1;
    ti = 64'h01;
    nl = 64'h01;
    run(N, 1'b1);
    checks++;
    if (sum_lp >= sum_nl) begin
      failures++;
      $display("FAIL LP-TPG transitions %0d not below LFSR %0d", sum_lp, sum_nl);
    end
    $display("transitions per clock: LP-TPG avg %0.3f peak %0d, LFSR avg %0.3f peak %0d",
             real'(sum_lp) / (N - 1), peak_lp, real'(sum_nl) / (N - 1), peak_nl);
    // restart with init in the middle of a pattern group
    @(negedge clk);
    init = 1'b1;
    @(posedge clk);
    #1 init = 1'b0;
    @(negedge clk);
    ref_m.restart();
    ti = 64'h01;
    nl = 64'h01;
    // the clock with init=1 produced no checked pattern; the FSM restarted
    run(64, 1'b0);
    // test_en low: both halves idle, output holds the exact LFSR state
    test_en = 1'b0;
    #1;
    prev_lp = 64'(o);
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (64'(o) !== prev_lp || 64'(o) !== 64'(lfsr_state)) begin
        failures++;
        $display("FAIL output changed while test_en=0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
