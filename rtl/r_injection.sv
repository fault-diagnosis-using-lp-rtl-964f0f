// R-injection cell of the low-power test pattern generator.
//
// Taps one bit of the present LFSR state (t_i) and the same bit of the next
// state (t_next). An AND gate and an OR gate both see the two bits, and a 2:1
// multiplexer steered by the random bit r picks the OR output when r=1 and the
// AND output when r=0. When the two bits agree both gates carry that value, so
// it passes unchanged; when they differ the cell outputs r. This gate-level
// structure (one AND, one OR, one 2:1 MUX) is the one the LP-TPG is built from.
// Purely combinational, no timing of its own.
module r_injection (
  input  logic t_i,     // bit of the present pattern T(i)
  input  logic t_next,  // same bit of the next pattern T(i+1)
  input  logic r,       // random bit
  output logic o        // injected bit
);
  logic and_o, or_o;

  always_comb begin
    and_o = t_i & t_next;
    or_o  = t_i | t_next;
    o     = r ? or_o : and_o;
  end

endmodule
