// updn_counter: the n-bit binary up/down counter of the impedance detector.
//
// On every CK1 step (en = 1) the count BC moves by one: up when the
// comparator output UD is 1 (V_MID above VDDH/2, the array is too narrow),
// down when it is 0. Counting by one per step follows the original design.
// The count saturates at 0 and 2**N-1 instead of wrapping, and resets to
// RESET_CODE (mid-scale): both are this implementation's choices.
// Timing: count changes on the clock edge at which en is sampled high.
module updn_counter #(
  parameter int unsigned N          = odt_pkg::CODE_BITS,
  parameter int unsigned RESET_CODE = odt_pkg::RESET_CODE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,     // CK1 step
  input  logic         up,     // UD
  output logic [N-1:0] count   // BC
);
  localparam logic [N-1:0] MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= N'(RESET_CODE);
    else if (en) begin
      if (up && count != MAX)       count <= count + 1'b1;
      else if (!up && count != '0)  count <= count - 1'b1;
    end
  end
endmodule
