// Parallel scan chains of the STUMPS self-test scheme.
//
// NUM_CHAINS chains of CHAIN_LEN scan cells each. Cell j of chain c is bit
// c*CHAIN_LEN+j of cells/capture; cell 0 is next to the scan input si[c], cell
// CHAIN_LEN-1 drives the scan output so[c]. With scan_en=1 every chain shifts
// by one cell per clock (new bit from si, oldest bit leaves on so). With
// scan_en=0 and capture=1 every cell loads the response of the circuit under
// test from capture_data. Otherwise the cells hold. cells shows the contents
// that drive the circuit under test. The chain layout, the cell order and the
// enable priority are own choices; the chains are only named in the STUMPS
// description.
module scan_chains #(
  parameter int unsigned NUM_CHAINS = 8,
  parameter int unsigned CHAIN_LEN  = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,  // asynchronous, clears all cells
  input  logic                            scan_en,
  input  logic                            capture,
  input  logic [NUM_CHAINS-1:0]           si,
  output logic [NUM_CHAINS-1:0]           so,
  output logic [NUM_CHAINS*CHAIN_LEN-1:0] cells,
  input  logic [NUM_CHAINS*CHAIN_LEN-1:0] capture_data
);
  logic [CHAIN_LEN-1:0] chain_q [NUM_CHAINS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CHAINS; c++) chain_q[c] <= '0;
    end else if (scan_en) begin
      for (int c = 0; c < NUM_CHAINS; c++)
        chain_q[c] <= {chain_q[c][CHAIN_LEN-2:0], si[c]};
    end else if (capture) begin
      for (int c = 0; c < NUM_CHAINS; c++)
        chain_q[c] <= capture_data[c*CHAIN_LEN +: CHAIN_LEN];
    end
  end

  always_comb begin
    for (int c = 0; c < NUM_CHAINS; c++) begin
      so[c]                             = chain_q[c][CHAIN_LEN-1];
      cells[c*CHAIN_LEN +: CHAIN_LEN]   = chain_q[c];
    end
  end

endmodule
