// Built-in self-diagnosis (BISD) on a STUMPS self-test architecture with a
// low-power test pattern generator.
//
// Data path of one test session:
//   lp_tpg (WIDTH outputs, one pattern per clock)
//     -> scan_chains (NUM_CHAINS = WIDTH chains of CHAIN_LEN cells; cells
//        drive the circuit under test, captured responses come back)
//     -> space_compactor (NUM_CHAINS -> MISR_WIDTH, XOR)
//     -> misr (MISR_WIDTH = n bits, cleared after every block of n patterns)
//     -> compared with response_memory word of the block by bisd_controller
//     -> mismatching {block index, signature} logged in fail_memory (g deep)
// The circuit under test is outside this module: cut_stimulus shows the scan
// cell contents it is driven from and cut_response is what the cells capture
// (cell j of chain c is bit c*CHAIN_LEN+j of both). The expected signatures
// are written through rm_we/rm_waddr/rm_wdata before start; after done the
// fail memory is read through fm_raddr. done rises n*h*(CHAIN_LEN+1) +
// CHAIN_LEN + h + 1 clocks after the clock edge that samples start.
// The arrangement of the blocks follows the BISD architecture; the widths of
// the interfaces, the chain count and length and the memory sizes h=64 and
// g=16 are own choices (n=8 follows the 8-bit LP-TPG).
module bisd_top
  import bisd_pkg::*;
#(
  parameter int unsigned WIDTH          = 8,   // LP-TPG width = number of scan chains
  parameter int unsigned CHAIN_LEN      = 8,   // m
  parameter int unsigned MISR_WIDTH     = 8,   // n, also patterns per block
  parameter int unsigned NUM_BLOCKS     = 64,  // h
  parameter int unsigned FAIL_DEPTH     = 16,  // g
  parameter logic [WIDTH-1:0]      TPG_TAPS  = 8'hB8,
  parameter logic [WIDTH-1:0]      TPG_SEED  = 8'h01,
  parameter logic [MISR_WIDTH-1:0] MISR_TAPS = 8'hB8,
  localparam int unsigned CELLS = WIDTH * CHAIN_LEN,
  localparam int unsigned IDX_W = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned FAW   = (FAIL_DEPTH > 1) ? $clog2(FAIL_DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output bisd_state_e           ctrl_state,  // controller state, for observation
  output tpg_step_e             tpg_step,    // LP-TPG step, for observation
  output logic [WIDTH-1:0]      tpg_lfsr,    // LP-LFSR stages, for observation
  // circuit under test
  output logic [CELLS-1:0]      cut_stimulus,
  input  logic [CELLS-1:0]      cut_response,
  // response memory load
  input  logic                  rm_we,
  input  logic [IDX_W-1:0]      rm_waddr,
  input  logic [MISR_WIDTH-1:0] rm_wdata,
  // fail memory download
  input  logic [FAW-1:0]        fm_raddr,
  output logic [IDX_W-1:0]      fm_rindex,
  output logic [MISR_WIDTH-1:0] fm_rsig,
  output logic [FAW:0]          fm_count,
  output logic                  fm_full,
  output logic                  fm_overflow
);
  logic tpg_init, tpg_en, scan_en, capture, misr_en, misr_clear;
  logic fm_clear, fm_wr;
  logic [WIDTH-1:0]      pattern, scan_out;
  logic [MISR_WIDTH-1:0] misr_in, signature, expected;
  logic [IDX_W-1:0]      rm_raddr, fm_index;

  lp_tpg #(.WIDTH(WIDTH), .TAPS(TPG_TAPS), .SEED(TPG_SEED)) u_tpg (
    .clk, .rst_n, .init(tpg_init), .test_en(tpg_en), .o(pattern), .step(tpg_step),
    .lfsr_state(tpg_lfsr)
  );

  scan_chains #(.NUM_CHAINS(WIDTH), .CHAIN_LEN(CHAIN_LEN)) u_chains (
    .clk, .rst_n, .scan_en, .capture,
    .si(pattern), .so(scan_out),
    .cells(cut_stimulus), .capture_data(cut_response)
  );

  space_compactor #(.NUM_IN(WIDTH), .NUM_OUT(MISR_WIDTH)) u_compactor (
    .d(scan_out), .y(misr_in)
  );

  misr #(.WIDTH(MISR_WIDTH), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en), .d(misr_in), .sig(signature)
  );

  response_memory #(.WIDTH(MISR_WIDTH), .NUM_BLOCKS(NUM_BLOCKS)) u_rm (
    .clk, .we(rm_we), .waddr(rm_waddr), .wdata(rm_wdata),
    .raddr(rm_raddr), .rdata(expected)
  );

  fail_memory #(.WIDTH(MISR_WIDTH), .NUM_BLOCKS(NUM_BLOCKS), .DEPTH(FAIL_DEPTH)) u_fm (
    .clk, .rst_n, .clear(fm_clear),
    .wr(fm_wr), .wr_index(fm_index), .wr_sig(signature),
    .rd_addr(fm_raddr), .rd_index(fm_rindex), .rd_sig(fm_rsig),
    .count(fm_count), .full(fm_full), .overflow(fm_overflow)
  );

  bisd_controller #(
    .CHAIN_LEN(CHAIN_LEN), .BLOCK_PATTERNS(MISR_WIDTH),
    .NUM_BLOCKS(NUM_BLOCKS), .WIDTH(MISR_WIDTH)
  ) u_ctrl (
    .clk, .rst_n, .start,
    .tpg_init, .tpg_en, .scan_en, .capture,
    .misr_en, .misr_clear, .signature,
    .rm_addr(rm_raddr), .expected,
    .fm_clear, .fm_wr, .fm_index,
    .busy, .done, .state(ctrl_state)
  );

endmodule
