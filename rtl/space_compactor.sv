// Space compactor between the scan chain outputs and the MISR.
//
// Folds NUM_IN scan outputs onto NUM_OUT MISR inputs with XOR gates: output j
// is the XOR of every input i with i mod NUM_OUT = j. It is purely
// combinational and linear, so the MISR signature stays a linear function of
// the scan-out data, which the diagnosis relies on. The compactor is only
// called for when there are more chains than MISR stages; the XOR folding is
// an own choice. When NUM_IN equals NUM_OUT each output sees exactly one
// input and the compactor reduces to wires.
module space_compactor #(
  parameter int unsigned NUM_IN  = 16,
  parameter int unsigned NUM_OUT = 8
) (
  input  logic [NUM_IN-1:0]  d,
  output logic [NUM_OUT-1:0] y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < NUM_IN; i++) y[i % NUM_OUT] ^= d[i];
  end
endmodule
