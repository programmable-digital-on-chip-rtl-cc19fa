// hold_register: keeps the settled impedance code (BCDA).
//
// While the selector's enable is high the register loads the counter value
// BC; otherwise it holds. Its output is the code sent to every terminator,
// so the terminators see a stable code even though the detection loop keeps
// dithering, and a new code only after a new dithering pattern has been
// found (after a supply or temperature change). Storing BC on 'enable'
// follows the original design, which clocks the register with enable; here
// enable is a load enable in the common clock domain. Reset value RESET_CODE
// (mid-scale) is this implementation's choice. Timing: q follows d one clock
// after load.
module hold_register #(
  parameter int unsigned N          = odt_pkg::CODE_BITS,
  parameter int unsigned RESET_CODE = odt_pkg::RESET_CODE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // selector enable
  input  logic [N-1:0] d,      // BC
  output logic [N-1:0] q       // BCDA
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= N'(RESET_CODE);
    else if (load)  q <= d;
  end
endmodule
