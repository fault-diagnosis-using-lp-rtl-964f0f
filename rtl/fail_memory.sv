// Fail memory: log of the intermediate signatures that did not match.
//
// Up to DEPTH (g) entries, each {block index, observed signature}, i.e.
// IDX_W + WIDTH = log2(h) + n bits. A write (wr, wr_index, wr_sig) stores
// the entry at the next free address while the memory is not full; a write
// into a full memory is dropped and sets the sticky overflow flag, so the
// memory always keeps the first g failing blocks. clear (synchronous) empties
// it at the start of a session. count is the number of valid entries; after
// the session the entries are read out at system level through rd_addr ->
// rd_index/rd_sig (asynchronous). The entry layout and depth g follow the
// architecture; the overflow flag and the readout port are own choices.
module fail_memory #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned NUM_BLOCKS = 64,
  parameter int unsigned DEPTH      = 16,
  localparam int unsigned IDX_W     = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,    // asynchronous, active low
  input  logic             clear,
  input  logic             wr,
  input  logic [IDX_W-1:0] wr_index,
  input  logic [WIDTH-1:0] wr_sig,
  input  logic [AW-1:0]    rd_addr,
  output logic [IDX_W-1:0] rd_index,
  output logic [WIDTH-1:0] rd_sig,
  output logic [AW:0]      count,
  output logic             full,
  output logic             overflow
);
  logic [IDX_W+WIDTH-1:0] mem [DEPTH];
  logic [AW:0]            cnt_q;
  logic                   ovf_q;

  assign full = (cnt_q == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else if (clear) begin
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else if (wr) begin
      if (full) ovf_q <= 1'b1;
      else      cnt_q <= cnt_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !clear && !full) mem[cnt_q[AW-1:0]] <= {wr_index, wr_sig};
  end

  assign {rd_index, rd_sig} = mem[rd_addr];
  assign count              = cnt_q;
  assign overflow           = ovf_q;

endmodule
