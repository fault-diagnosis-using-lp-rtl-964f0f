// Multiple input signature register (MISR).
//
// A type-I (external XOR) LFSR of WIDTH stages with one data input per stage:
// on each clock with en=1, s'[0] = (XOR of the tapped stages) ^ d[0] and
// s'[k] = s[k-1] ^ d[k]. The next state is linear in state and data,
// s' = L*s ^ d, with L the feedback matrix of the generator polynomial, so a
// signature obtained from the all-zero state is the XOR superposition of the
// contributions of each pattern (S_B = sum of H^(n-i) s_i with H = L^m for m
// clocks per pattern). clear (synchronous, priority over en) resets the
// register to all zero, which the controller does after every intermediate
// signature. The polynomial (TAPS, default x^8+x^6+x^5+x^4+1) is an own
// choice.
module misr #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'hB8  // bit k set: stage k+1 feeds back
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous, active low
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);
  logic [WIDTH-1:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     s <= '0;
    else if (clear) s <= '0;
    else if (en)    s <= {s[WIDTH-2:0], ^(s & TAPS)} ^ d;
  end

  assign sig = s;

endmodule
