// code_receiver: per-terminator receiver of the serial impedance codes.
//
// Two N-bit shift registers sample the long line on the CODE_CK falling
// edges of their half period (ck2d for the pull-down code, ck2u for the
// pull-up code), so the first bit sent ends up as the MSB. The series-to-
// parallel registers copy them on the CK3D / CK3U pulses, which come once
// per UPDATE_CK period in the hold time of the input data, and the copies
// are converted to segmented thermometer codes for the terminator's
// pull-down and pull-up transistor arrays. Shift register, series-to-
// parallel register, CK3 latching and the thermometer conversion follow the
// original design; the mid-scale reset value is this implementation's
// choice. Timing: code_* change one clock after their ck3 pulse; the
// thermometer outputs are combinational from them.
module code_receiver #(
  parameter int unsigned N          = odt_pkg::CODE_BITS,
  parameter int unsigned M          = odt_pkg::SEG_MSBS,
  parameter int unsigned RESET_CODE = odt_pkg::RESET_CODE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  line,
  input  logic                  ck2d,
  input  logic                  ck2u,
  input  logic                  ck3d,
  input  logic                  ck3u,
  output logic [N-1:0]          code_d,
  output logic [N-1:0]          code_u,
  output logic [2**M-1-1:0]     tch_d,
  output logic [2**(N-M)-1-1:0] tcl_d,
  output logic [2**M-1-1:0]     tch_u,
  output logic [2**(N-M)-1-1:0] tcl_u
);
  logic [N-1:0] sr_d, sr_u;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_d   <= N'(RESET_CODE);
      sr_u   <= N'(RESET_CODE);
      code_d <= N'(RESET_CODE);
      code_u <= N'(RESET_CODE);
    end else begin
      if (ck2d) sr_d <= {sr_d[N-2:0], line};
      if (ck2u) sr_u <= {sr_u[N-2:0], line};
      if (ck3d) code_d <= sr_d;
      if (ck3u) code_u <= sr_u;
    end
  end

  // A code is latched only while its shift register is not shifting.
  a_no_latch_while_shifting_d: assert property (@(posedge clk) disable iff (!rst_n) !(ck2d && ck3d));
  a_no_latch_while_shifting_u: assert property (@(posedge clk) disable iff (!rst_n) !(ck2u && ck3u));

  seg_therm_encoder #(.N(N), .M(M)) u_enc_d (.bin(code_d), .tch(tch_d), .tcl(tcl_d));
  seg_therm_encoder #(.N(N), .M(M)) u_enc_u (.bin(code_u), .tch(tch_u), .tcl(tcl_u));
endmodule
