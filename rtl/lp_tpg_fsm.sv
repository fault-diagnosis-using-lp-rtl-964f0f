// Control FSM of the low-power test pattern generator (LP-TPG).
//
// Walks through four steps, one per clock, while test_en=1:
//   step 1: en1en2=10 sel1sel2=11   (pattern T(i); first LFSR half shifts)
//   step 2: en1en2=00 sel1sel2=10   (T(k1); second half shows injected bits)
//   step 3: en1en2=01 sel1sel2=11   (T(k2); second LFSR half shifts)
//   step 4: en1en2=00 sel1sel2=01   (T(k3); first half shows injected bits)
// and then returns to step 1 for T(i+1). The encoding of the steps and the
// order follow the LP-TPG description; the FSM is independent of LFSR size
// and polynomial.
// When test_en=0 the FSM waits in step 1 with both enables low (the LFSR is
// idle) and both selects high, so the first cycle with test_en=1 is step 1.
// init returns it to step 1 synchronously (own choice, used to restart a
// test session). en and sel are decoded combinationally from the state and
// test_en; they change right after the clock edge.
module lp_tpg_fsm
  import bisd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,    // asynchronous, active low
  input  logic      init,     // synchronous restart at step 1
  input  logic      test_en,
  output logic      en1,
  output logic      en2,
  output logic      sel1,
  output logic      sel2,
  output tpg_step_e step
);

  tpg_step_e state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state_q <= STEP1;
    else if (init)     state_q <= STEP1;
    else if (test_en) begin
      unique case (state_q)
        STEP1: state_q <= STEP2;
        STEP2: state_q <= STEP3;
        STEP3: state_q <= STEP4;
        STEP4: state_q <= STEP1;
      endcase
    end
  end

  always_comb begin
    en1  = 1'b0;
    en2  = 1'b0;
    sel1 = 1'b1;
    sel2 = 1'b1;
    if (test_en) begin
      unique case (state_q)
        STEP1: begin en1 = 1'b1;                end
        STEP2: begin              sel2 = 1'b0;  end
        STEP3: begin en2 = 1'b1;                end
        STEP4: begin              sel1 = 1'b0;  end
      endcase
    end
    step = state_q;
  end

  // The two LFSR halves are never enabled together.
  a_non_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(en1 && en2));

endmodule
