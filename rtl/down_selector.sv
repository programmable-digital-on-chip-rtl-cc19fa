// down_selector: dithering detector ("selector") of the impedance detector.
//
// A five-stage shift register samples the comparator output UD on every CK1
// step; q[0] is Q1 (the newest sample) and q[4] is Q5 (the oldest). Once the
// counter has reached the reference it dithers, and two UD histories are
// recognised:
//   Q1..Q5 = 1,0,1,0,1  UD alternates: BC toggles between the two codes
//                       either side of the reference (two-code dithering);
//   Q1..Q5 = 1,0,0,1,1  a window of up,up,down,down: BC walks over three
//                       codes, as comparator metastability causes, and the
//                       counter has just stepped back to the centre code.
// In both cases 'enable' is raised for that CK1 period, during which BC is
// the code to keep; the hold register stores it. The five flip-flops and the
// two literal patterns follow the original design. 'lock' is a sticky flag
// set by the first enable (its exact meaning is not fixed by the original
// design). Timing: enable is combinational from the register, valid in the
// clock cycles after the CK1 step that completed the pattern.
module down_selector (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,      // CK1 step
  input  logic       ud,      // comparator output
  output logic [4:0] q,       // q[0] = Q1 (newest) .. q[4] = Q5
  output logic       enable,
  output logic       lock
);
  localparam logic [4:0] TWO_CODE   = 5'b10101;  // {Q5,Q4,Q3,Q2,Q1}
  localparam logic [4:0] THREE_CODE = 5'b11001;  // Q1=1,Q2=0,Q3=0,Q4=1,Q5=1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (en)  q <= {q[3:0], ud};
  end

  assign enable = (q == TWO_CODE) || (q == THREE_CODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lock <= 1'b0;
    else if (enable)  lock <= 1'b1;
  end
endmodule
