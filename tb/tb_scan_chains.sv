// Testbench of scan_chains (3 chains of 5 cells): random shift, capture and
// hold clocks against a model that keeps each chain as a queue of bits.
// Checks the scan outputs and the cell contents after every clock.
module tb_scan_chains;
  localparam int NC = 3, L = 5;
  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0, capture = 1'b0;
  logic [NC-1:0]   si, so;
  logic [NC*L-1:0] cells, capture_data;
  int checks = 0, failures = 0;
  bit model [NC][L];  // model[c][j]: cell j of chain c, j=0 next to scan-in
  int n_shift = 0, n_capture = 0;

  scan_chains #(.NUM_CHAINS(NC), .CHAIN_LEN(L)) dut (
    .clk, .rst_n, .scan_en, .capture, .si, .so, .cells, .capture_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) for (int j = 0; j < L; j++) model[c][j] = 0;
    si = '0;
    capture_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      scan_en      = ($urandom_range(0, 2) != 0);
      capture      = ($urandom_range(0, 1) != 0);
      si           = NC'($urandom);
      capture_data = (NC*L)'({$urandom, $urandom});
      #1;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (so[c] !== model[c][L-1]) begin
          failures++;
          $display("FAIL so[%0d] at %0d", c, t);
        end
      end
      @(posedge clk);
      if (scan_en) begin
        n_shift++;
        for (int c = 0; c < NC; c++) begin
          for (int j = L - 1; j > 0; j--) model[c][j] = model[c][j-1];
          model[c][0] = si[c];
        end
      end else if (capture) begin
        n_capture++;
        for (int c = 0; c < NC; c++)
          for (int j = 0; j < L; j++) model[c][j] = capture_data[c*L+j];
      end
      #1;
      for (int c = 0; c < NC; c++)
        for (int j = 0; j < L; j++) begin
          checks++;
          if (cells[c*L+j] !== model[c][j]) begin
            failures++;
            $display("FAIL cell %0d of chain %0d at %0d", j, c, t);
          end
        end
    end
    $display("shift clocks %0d, capture clocks %0d", n_shift, n_capture);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
