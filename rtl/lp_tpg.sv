// Low-power test pattern generator (LP-TPG).
//
// The LP-LFSR datapath and its control FSM. While test_en=1 it delivers one
// pattern per clock on o: T(i), T(k1), T(k2), T(k3), T(i+1), ... The three
// intermediate patterns between two consecutive LFSR states change only part
// of the bits at a time, and bits that differ between T(i) and T(i+1) are
// replaced by a random bit in the injected halves, which cuts the number of
// transitions seen by the circuit inputs while keeping T(i) themselves the
// ordinary LFSR sequence. With WIDTH=8 this is the 8-bit generator of the
// LP-TPG description; TAPS and SEED are own choices (see lp_lfsr).
// init (synchronous) restarts the sequence at SEED and step 1.
module lp_tpg
  import bisd_pkg::*;
#(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'hB8,
  parameter logic [WIDTH-1:0] SEED  = 8'h01
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             test_en,
  output logic [WIDTH-1:0] o,
  output tpg_step_e        step,
  output logic [WIDTH-1:0] lfsr_state  // LFSR stages, for observation
);
  logic en1, en2, sel1, sel2;

  lp_tpg_fsm u_fsm (
    .clk, .rst_n, .init, .test_en,
    .en1, .en2, .sel1, .sel2, .step
  );

  lp_lfsr #(.WIDTH(WIDTH), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .init,
    .en1, .en2, .sel1, .sel2,
    .o, .state(lfsr_state)
  );

endmodule
