// detector_array_model: behavioural model of a detection transistor array
// loaded by the reference current, together with its comparator.
//
// The array conducts a width of 2**(N-M) units per set TCH bit plus one unit
// per set TCL bit. The reference current drives V_MID above VDDH/2 while this
// width is below 'target' (the width that matches the external resistor), so
// UD is 1 there and 0 above it. Within +/- meta of the target the comparator
// is treated as metastable and UD is random. UD is re-evaluated on every
// falling clock edge, half a cycle before the detection loop samples it.
module detector_array_model #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 2
) (
  input  logic                  clk,
  input  logic [2**M-1-1:0]     tch,
  input  logic [2**(N-M)-1-1:0] tcl,
  input  real                   target,
  input  real                   meta,
  output logic                  ud
);
  real w;
  always_comb w = real'(odt_pkg::ones(32'(tch)) * (2**(N-M)) + odt_pkg::ones(32'(tcl)));

  initial ud = 1'b1;
  always @(negedge clk) begin
    if (w < target - meta)      ud <= 1'b1;
    else if (w > target + meta) ud <= 1'b0;
    else                        ud <= 1'($urandom % 2);
  end
endmodule
