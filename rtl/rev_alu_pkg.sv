// rev_alu_pkg: constants shared by the reversible ALU and its testbenches.
//
// The ALU is built from five kinds of reversible gate. Each gate is a
// bijection on its lines, and each has a quantum cost: the number of
// elementary (NOT, CNOT, controlled-V, controlled-V+) gates in its quantum
// realisation. The costs below are the published costs of the gates. They
// add up to 33 for the seven gates of the ALU. The logic does not use them.
// They document the circuit, and the top-level testbench checks that the sum
// is 33. The line counts (12 in, 12 out, one ancilla, ten garbage lines)
// describe the ALU's reversible interface.
package rev_alu_pkg;

  // Quantum cost of each gate type.
  localparam int unsigned QC_FEYNMAN = 1;
  localparam int unsigned QC_FREDKIN = 5;
  localparam int unsigned QC_RMUX1   = 4;
  localparam int unsigned QC_WG      = 7;
  localparam int unsigned QC_FTRA    = 8;

  // Gate inventory of the ALU: one FTRA, three RMUX1, one Feynman,
  // one Fredkin and one WG gate.
  localparam int unsigned N_RMUX1    = 3;
  localparam int unsigned QC_ALU     = QC_FTRA + N_RMUX1 * QC_RMUX1 + QC_FEYNMAN
                                     + QC_FREDKIN + QC_WG;

  // Line counts of the reversible ALU.
  localparam int unsigned N_LINES    = 12;
  localparam int unsigned N_GARBAGE  = 10;
  localparam int unsigned N_ANCILLA  = 1;

  // The ten garbage outputs, G1 at bit 1 through G10 at bit 10.
  typedef logic [N_GARBAGE:1] garbage_t;

endpackage
