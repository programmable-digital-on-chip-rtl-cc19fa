// update_timing: clocks of the serial impedance-code update.
//
// A counter of the data sampling clock (clk) produces the signals of the
// code update timing diagram as levels and single-cycle enables:
//   update_ck  high for the first half of every UPD_PERIOD (64) cycles; the
//              high half carries the pull-down code, the low half the
//              pull-up code;
//   code_ck    N (5) pulses in each half, CODE_HALF cycles high and low,
//              the first rising CODE_START cycles after the update_ck edge;
//   ck1d/ck1u  CODE_CK rising-edge enables in the high/low half (transmit);
//   ck2d/ck2u  CODE_CK falling-edge enables in the high/low half (receive);
//   sam_ck     the sampling clock divided by SAM_DIV (8), rising SAM_PHASE
//              cycles after each multiple of SAM_DIV; sam_rise marks it;
//   load_d/u   the first cycle of the high/low half (transmitter load).
// The 64-cycle period, the division by 8, the 5 CODE_CK pulses and the
// split of pull-down/pull-up codes over the two halves follow the original
// design; the placement of CODE_CK and of the SAM_CK edge is this
// implementation's choice. Each enable is high for the first clock cycle
// after the edge it marks (the cycle in which the level has just changed);
// the registers it enables act at the end of that cycle.
module update_timing #(
  parameter int unsigned UPD_PERIOD = odt_pkg::UPD_PERIOD,
  parameter int unsigned SAM_DIV    = odt_pkg::SAM_DIV,
  parameter int unsigned SAM_PHASE  = odt_pkg::SAM_PHASE,
  parameter int unsigned N          = odt_pkg::CODE_BITS,
  parameter int unsigned CODE_START = odt_pkg::CODE_START,
  parameter int unsigned CODE_HALF  = odt_pkg::CODE_HALF
) (
  input  logic clk,
  input  logic rst_n,
  output logic update_ck,
  output logic code_ck,
  output logic sam_ck,
  output logic sam_rise,
  output logic load_d,
  output logic load_u,
  output logic ck1d,
  output logic ck1u,
  output logic ck2d,
  output logic ck2u
);
  localparam int unsigned HALF = UPD_PERIOD / 2;
  localparam int unsigned CW   = $clog2(UPD_PERIOD);

  // The N CODE_CK pulses must end inside the half period.
  initial assert (CODE_START + 2 * CODE_HALF * N <= HALF)
    else $error("CODE_CK pulses do not fit in half an UPDATE_CK period");

  logic [CW-1:0] cyc;
  int unsigned   hpos, cpos, spos;
  logic          in_burst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             cyc <= '0;
    else if (int'(cyc) == UPD_PERIOD - 1)   cyc <= '0;
    else                                    cyc <= cyc + 1'b1;
  end

  always_comb begin
    hpos      = int'(cyc) % HALF;
    cpos      = hpos - CODE_START;
    in_burst  = (hpos >= CODE_START) && (hpos < CODE_START + 2 * CODE_HALF * N);
    spos      = (int'(cyc) + SAM_DIV - SAM_PHASE) % SAM_DIV;

    update_ck = int'(cyc) < HALF;
    code_ck   = in_burst && (cpos % (2 * CODE_HALF)) < CODE_HALF;
    sam_ck    = spos < SAM_DIV / 2;
    sam_rise  = spos == 0;
    load_d    = int'(cyc) == 0;
    load_u    = int'(cyc) == HALF;
    ck1d      =  update_ck && in_burst && (cpos % (2 * CODE_HALF)) == 0;
    ck1u      = !update_ck && in_burst && (cpos % (2 * CODE_HALF)) == 0;
    ck2d      =  update_ck && in_burst && (cpos % (2 * CODE_HALF)) == CODE_HALF;
    ck2u      = !update_ck && in_burst && (cpos % (2 * CODE_HALF)) == CODE_HALF;
  end
endmodule
