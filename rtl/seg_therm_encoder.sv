// seg_therm_encoder: binary to segmented thermometer code converter.
//
// The M most significant bits of the N-bit code select how many of the
// 2**M-1 coarse transistors (each 2**(N-M) unit widths) are on (TCH); the
// N-M least significant bits select how many of the 2**(N-M)-1 unit-width
// transistors are on (TCL). The total width switched on therefore equals the
// binary value, as in a binary-weighted array, but a code step of one LSB
// only ever switches transistors of a single thermometer segment plus at
// most one coarse transistor, which keeps impedance glitches small during an
// update. The segmentation follows the original design; thermometer bits
// fill from bit 0 upward (this implementation's choice). Purely
// combinational.
module seg_therm_encoder #(
  parameter int unsigned N = odt_pkg::CODE_BITS,
  parameter int unsigned M = odt_pkg::SEG_MSBS
) (
  input  logic [N-1:0]          bin,
  output logic [2**M-1-1:0]     tch,   // coarse segment, 2**M-1 bits
  output logic [2**(N-M)-1-1:0] tcl    // fine segment, 2**(N-M)-1 bits
);
  logic [M-1:0]   msb;
  logic [N-M-1:0] lsb;

  assign msb = bin[N-1:N-M];
  assign lsb = bin[N-M-1:0];

  always_comb begin
    for (int k = 0; k < 2**M-1; k++)     tch[k] = (int'(msb) > k);
    for (int k = 0; k < 2**(N-M)-1; k++) tcl[k] = (int'(lsb) > k);
  end
endmodule
