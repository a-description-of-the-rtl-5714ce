// BUS Parity Generator (BPG): parity of the 64-bit bus, posted as the
// condition BP (1 = odd number of ones). It acts during every bus transport
// and has no microoperations. Purely combinational.
module mat_bus_parity
  import mat_pkg::*;
(
  input  word_t bus,
  output logic  bp
);
  assign bp = ^bus;
endmodule
