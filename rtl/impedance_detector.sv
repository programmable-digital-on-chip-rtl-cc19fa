// impedance_detector: digital loop of one impedance detection circuit.
//
// The reference current (VDDH/2RT) flows through a segmented-thermometer
// transistor array; a comparator outside this module compares the array's
// node voltage V_MID with VDDH/2 and returns UD. On every CK1 step the
// up/down counter moves BC one code towards the reference (UD = 1: add
// width). BC is re-coded into the coarse/fine thermometer codes TCH/TCL that
// drive the array, closing the loop. Once the loop dithers about the
// reference, the selector recognises the two-code or three-code pattern and
// the hold register stores BC as BCDA, the code shipped to the terminators.
// The structure (counter, selector, hold register, binary-to-thermometer
// converter on one CK1) follows the original design; mid-scale reset and
// counter saturation are this implementation's choices.
// Timing: ud is sampled at clock edges with ck1_en high; BC/TCH/TCL change
// on that edge, BCDA one clock edge after enable rises.
module impedance_detector #(
  parameter int unsigned N          = odt_pkg::CODE_BITS,
  parameter int unsigned M          = odt_pkg::SEG_MSBS,
  parameter int unsigned RESET_CODE = odt_pkg::RESET_CODE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ck1_en,  // CK1 step
  input  logic                  ud,      // comparator output
  output logic [N-1:0]          bc,      // counter, binary
  output logic [2**M-1-1:0]     tch,     // detection array, coarse segment
  output logic [2**(N-M)-1-1:0] tcl,     // detection array, fine segment
  output logic [N-1:0]          bcda,    // held code
  output logic                  enable,  // dithering recognised
  output logic                  lock
);
  logic [4:0] sel_q;

  updn_counter #(.N(N), .RESET_CODE(RESET_CODE)) u_cnt (
    .clk, .rst_n, .en(ck1_en), .up(ud), .count(bc));

  down_selector u_sel (
    .clk, .rst_n, .en(ck1_en), .ud, .q(sel_q), .enable, .lock);

  hold_register #(.N(N), .RESET_CODE(RESET_CODE)) u_hold (
    .clk, .rst_n, .load(enable), .d(bc), .q(bcda));

  seg_therm_encoder #(.N(N), .M(M)) u_b2t (
    .bin(bc), .tch, .tcl);

  // BC moves by at most one code per CK1 step and not at all between steps.
  a_bc_step: assert property (@(posedge clk) disable iff (!rst_n)
    !ck1_en |=> $stable(bc));
endmodule
