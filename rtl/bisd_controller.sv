// BIST controller with the built-in self-diagnosis extension.
//
// Runs one test session of NUM_BLOCKS (h) blocks of BLOCK_PATTERNS (n)
// patterns through scan chains of CHAIN_LEN (m) cells:
//   S_SHIFT   m clocks, scan_en=1: the chains take the next pattern from the
//             pattern generator and unload the previous response into the
//             MISR (misr_en=1 unless there is no response yet);
//   S_CHECK   after the n-th response of a block has entered the MISR: the
//             signature is compared with the expected word rm_addr of the
//             response memory; on a mismatch fm_wr writes the block index
//             (with the MISR signature, wired to the fail memory directly)
//             into the fail memory; the MISR is cleared;
//   S_CAPTURE one clock, capture=1: the chains capture the circuit response.
// After the last pattern a final shift unloads its response, the last block
// is checked and the controller waits in S_DONE (done=1) until the next
// start. tpg_init restarts the generator on start; tpg_en keeps it running
// through the whole session, and its output is used only in S_SHIFT.
// busy is high for n*h*(m+1) + m + h clocks, and done rises n*h*(m+1) + m +
// h + 1 clocks after the clock edge that samples start.
// The single session, the per-block comparison, the fail memory logging and
// the MISR reset after each intermediate signature follow the BISD
// architecture; the state sequence and timing are own choices.
module bisd_controller
  import bisd_pkg::*;
#(
  parameter int unsigned CHAIN_LEN      = 8,
  parameter int unsigned BLOCK_PATTERNS = 8,
  parameter int unsigned NUM_BLOCKS     = 64,
  parameter int unsigned WIDTH          = 8,
  localparam int unsigned IDX_W         = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // pattern generator
  output logic             tpg_init,
  output logic             tpg_en,
  // scan chains
  output logic             scan_en,
  output logic             capture,
  // MISR
  output logic             misr_en,
  output logic             misr_clear,
  input  logic [WIDTH-1:0] signature,
  // response memory
  output logic [IDX_W-1:0] rm_addr,
  input  logic [WIDTH-1:0] expected,
  // fail memory
  output logic             fm_clear,
  output logic             fm_wr,
  output logic [IDX_W-1:0] fm_index,
  // status
  output logic             busy,
  output logic             done,
  output bisd_state_e      state
);
  localparam int unsigned TOTAL = BLOCK_PATTERNS * NUM_BLOCKS;
  localparam int unsigned SW    = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1;
  localparam int unsigned PW    = $clog2(TOTAL + 1);
  localparam int unsigned RW    = $clog2(BLOCK_PATTERNS + 1);

  bisd_state_e    state_q;
  logic [SW-1:0]  shift_q;
  logic [PW-1:0]  captured_q;  // patterns captured so far
  logic [RW-1:0]  resp_q;      // responses compacted in the current block
  logic [IDX_W-1:0] blk_q;
  logic           unload_q;    // the chains hold a response to unload

  logic last_shift, block_full, more_patterns;

  assign last_shift    = (shift_q == SW'(CHAIN_LEN - 1));
  assign block_full    = (resp_q == RW'(BLOCK_PATTERNS));
  assign more_patterns = (captured_q < PW'(TOTAL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      shift_q    <= '0;
      captured_q <= '0;
      resp_q     <= '0;
      blk_q      <= '0;
      unload_q   <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (start) begin
            state_q    <= S_SHIFT;
            shift_q    <= '0;
            captured_q <= '0;
            resp_q     <= '0;
            blk_q      <= '0;
            unload_q   <= 1'b0;
          end
        end
        S_SHIFT: begin
          shift_q <= shift_q + 1'b1;
          if (last_shift) begin
            shift_q <= '0;
            if (unload_q) begin
              resp_q   <= resp_q + 1'b1;
              unload_q <= 1'b0;
            end
            if (unload_q && resp_q == RW'(BLOCK_PATTERNS - 1)) state_q <= S_CHECK;
            else if (more_patterns)                            state_q <= S_CAPTURE;
            else                                               state_q <= S_DONE;
          end
        end
        S_CHECK: begin
          resp_q  <= '0;
          blk_q   <= blk_q + 1'b1;
          state_q <= more_patterns ? S_CAPTURE : S_DONE;
        end
        S_CAPTURE: begin
          captured_q <= captured_q + 1'b1;
          unload_q   <= 1'b1;
          state_q    <= S_SHIFT;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    tpg_init   = (state_q == S_IDLE || state_q == S_DONE) && start;
    tpg_en     = (state_q == S_SHIFT || state_q == S_CHECK || state_q == S_CAPTURE);
    scan_en    = (state_q == S_SHIFT);
    capture    = (state_q == S_CAPTURE);
    misr_en    = (state_q == S_SHIFT) && unload_q;
    misr_clear = tpg_init || (state_q == S_CHECK);
    fm_clear   = tpg_init;
    rm_addr    = blk_q;
    fm_wr      = (state_q == S_CHECK) && (signature != expected);
    fm_index   = blk_q;
    busy       = tpg_en;
    done       = (state_q == S_DONE);
    state      = state_q;
  end

  a_check_full: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_CHECK) |-> block_full);
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    !(scan_en && capture) && !(misr_en && misr_clear));

endmodule
