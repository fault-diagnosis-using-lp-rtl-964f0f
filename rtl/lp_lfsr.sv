// Low-power LFSR datapath (LP-LFSR) of the LP-TPG.
//
// An external-XOR (Fibonacci) LFSR of WIDTH stages q[0..WIDTH-1] (output O1
// is q[0]) whose two halves are clocked by separate enables. With en1=1 the
// first half shifts (q[0] takes the feedback of the whole present state) and
// the storage flip-flop st keeps the old q[WIDTH/2-1], the bit that would have
// moved into the second half. With en2=1 the second half shifts, taking st
// into q[WIDTH/2]. One en1 step followed by one en2 step therefore moves the
// LFSR exactly one ordinary state forward, T(i) -> T(i+1).
//
// Every stage has an R-injection cell that compares the stage's bit in T(i)
// and T(i+1). Because an LFSR shifts, those two bits sit in adjacent stages:
// - second half, while only the first half has shifted (state [A(i+1)|B(i)]):
//   T(i) bit = q[k], T(i+1) bit = q[k-1] (st for the first stage of the half);
// - first half, after both halves shifted (state T(i+1)):
//   T(i+1) bit = q[k], T(i) bit = q[k+1] (st for the last stage of the half).
// sel1 (sel2) = 1 sends the exact first (second) half to the outputs, 0 the
// injected bits. Outputs are combinational from the flip-flops and selects.
//
// The split LFSR, the storage flip-flop, the injection cells and the muxes
// follow the LP-TPG description. Own choices: the polynomial (TAPS, default
// x^8+x^6+x^5+x^4+1, primitive), the seed, and the random bit R, taken as the
// feedback XOR of the present state. en1 and en2 must not be high together.
module lp_lfsr #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'hB8,  // bit k set: stage k+1 feeds back
  parameter logic [WIDTH-1:0] SEED  = 8'h01
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous, active low: load SEED
  input  logic             init,   // synchronous reload of SEED
  input  logic             en1,    // shift first half
  input  logic             en2,    // shift second half
  input  logic             sel1,   // 1: exact first half, 0: injected
  input  logic             sel2,   // 1: exact second half, 0: injected
  output logic [WIDTH-1:0] o,      // o[k] is output O(k+1)
  output logic [WIDTH-1:0] state   // LFSR stages, for observation
);
  localparam int unsigned HALF = WIDTH / 2;

  logic [WIDTH-1:0] q;
  logic             st;
  logic             fb;
  logic [WIDTH-1:0] t_now, t_nxt, inj;

  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= SEED;
      st <= 1'b0;
    end else if (init) begin
      q  <= SEED;
      st <= 1'b0;
    end else begin
      if (en1) begin
        q[HALF-1:0] <= {q[HALF-2:0], fb};
        st          <= q[HALF-1];
      end
      if (en2) begin
        q[WIDTH-1:HALF] <= {q[WIDTH-2:HALF], st};
      end
    end
  end

  // Present/next bit pairs of each stage, see the header.
  always_comb begin
    for (int k = 0; k < HALF; k++) begin
      t_nxt[k] = q[k];
      t_now[k] = (k == HALF - 1) ? st : q[k+1];
    end
    for (int k = HALF; k < WIDTH; k++) begin
      t_now[k] = q[k];
      t_nxt[k] = (k == HALF) ? st : q[k-1];
    end
  end

  for (genvar k = 0; k < WIDTH; k++) begin : g_inj
    r_injection u_inj (.t_i(t_now[k]), .t_next(t_nxt[k]), .r(fb), .o(inj[k]));
  end

  assign o[HALF-1:0]     = sel1 ? q[HALF-1:0]     : inj[HALF-1:0];
  assign o[WIDTH-1:HALF] = sel2 ? q[WIDTH-1:HALF] : inj[WIDTH-1:HALF];
  assign state           = q;

  a_halves: assert property (@(posedge clk) disable iff (!rst_n) !(en1 && en2));

endmodule
