// odt_pkg: constants shared by the on-chip terminator control logic.
//
// The impedance code is a 5-bit binary number (CODE_BITS), as in the design
// this RTL implements. Wherever it drives transistors it is re-coded as a
// segmented thermometer code: the SEG_MSBS most significant bits become a
// coarse thermometer of 2**SEG_MSBS-1 bits (TCH) whose transistors are each
// 2**(CODE_BITS-SEG_MSBS) unit widths, the remaining bits a fine thermometer
// of 2**(CODE_BITS-SEG_MSBS)-1 unit-width bits (TCL). SEG_MSBS = 2 is this
// implementation's choice; the split is not fixed by the original design.
// The update timing constants (64-cycle update period, sampling clock divided
// by 8) follow the original design; the CODE_CK placement inside each half
// period is this implementation's choice.
package odt_pkg;
  localparam int unsigned CODE_BITS  = 5;   // binary code width, pull-up and pull-down
  localparam int unsigned SEG_MSBS   = 2;   // MSBs mapped to the coarse segment
  localparam int unsigned RESET_CODE = 1 << (CODE_BITS - 1);  // mid-scale after reset

  localparam int unsigned UPD_PERIOD = 64;  // UPDATE_CK period in sampling-clock cycles
  localparam int unsigned SAM_DIV    = 8;   // SAM_CK = sampling clock / 8
  localparam int unsigned SAM_PHASE  = 4;   // SAM_CK rising edge offset within its period
  localparam int unsigned CODE_START = 4;   // first CODE_CK rise after an UPDATE_CK edge
  localparam int unsigned CODE_HALF  = 2;   // CODE_CK high (and low) time in cycles

  // Number of set bits in a thermometer code (works on any width up to 32).
  function automatic int unsigned ones(input logic [31:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction
endpackage
