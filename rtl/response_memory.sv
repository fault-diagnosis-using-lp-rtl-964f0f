// Response memory: the expected (fault-free) intermediate signatures.
//
// NUM_BLOCKS (h) words of WIDTH (n) bits, one per pattern block. Word b is
// the signature the MISR must hold after block b. The words are worked out
// beforehand by fault-free simulation and written through the write port
// (we, waddr, wdata; one word per clock) before a test session; the BIST
// controller reads them through the asynchronous read port (raddr -> rdata).
// The size h x n follows the architecture; loading through a write port and
// the asynchronous read are own choices.
module response_memory #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned NUM_BLOCKS = 64,
  localparam int unsigned AW        = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [NUM_BLOCKS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
