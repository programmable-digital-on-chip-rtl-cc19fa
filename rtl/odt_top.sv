// odt_top: digital control of a programmable on-chip terminator.
//
// An external resistor sets a reference current; the programmable impedance
// controller (pic) tunes a pull-down and a pull-up transistor array against
// it with two up/down-counter loops and keeps the settled codes once the
// loops dither. Those two 5-bit codes are sent over one serial line to a
// receiver at every terminated input pad: in each 64-cycle UPDATE_CK period
// the pull-down code travels while UPDATE_CK is high and the pull-up code
// while it is low, five CODE_CK pulses each. Every receiver applies a new
// code only on its CK3D / CK3U pulse, which is aligned to SAM_CK (the
// sampling clock divided by 8), and drives its terminator with segmented
// thermometer codes so that an update causes only a small glitch.
//
// The analog parts stay outside: the comparators' outputs enter as ud_pd /
// ud_pu, the PIC's detection-array codes leave as tch_*/tcl_*, and each
// terminator's codes leave as term_*[i]. One clock (the data sampling clock)
// runs everything; the derived clocks of the original design are levels and
// enables here. CK1 of the detection loops is the SAM_CK rising edge (this
// implementation's choice). The block partition and the update scheme
// follow the original design; NUM_TERM = 4 is this implementation's choice.
// Latency: a newly held code reaches the terminators within two UPDATE_CK
// periods (at most 128 cycles).
module odt_top
  import odt_pkg::*;
#(
  parameter int unsigned N        = CODE_BITS,
  parameter int unsigned M        = SEG_MSBS,
  parameter int unsigned NUM_TERM = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ud_pd,
  input  logic                  ud_pu,
  // PIC detection arrays
  output logic [2**M-1-1:0]     tch_pd,
  output logic [2**(N-M)-1-1:0] tcl_pd,
  output logic [2**M-1-1:0]     tch_pu,
  output logic [2**(N-M)-1-1:0] tcl_pu,
  output logic [N-1:0]          bcda_pd,
  output logic [N-1:0]          bcda_pu,
  output logic                  lock_pd,
  output logic                  lock_pu,
  // update scheme
  output logic                  code_line,
  output logic                  update_ck,
  output logic                  sam_ck,
  output logic                  code_ck,
  output logic                  ck3u,
  output logic                  ck3d,
  // terminators
  output logic [2**M-1-1:0]     term_tch_pd [NUM_TERM],
  output logic [2**(N-M)-1-1:0] term_tcl_pd [NUM_TERM],
  output logic [2**M-1-1:0]     term_tch_pu [NUM_TERM],
  output logic [2**(N-M)-1-1:0] term_tcl_pu [NUM_TERM]
);
  logic         sam_rise, load_d, load_u, ck1d, ck1u, ck2d, ck2u;
  // observation-only signals of the sub-blocks, not brought out
  logic [N-1:0] bc_pd, bc_pu;
  logic         enable_pd, enable_pu;
  logic         spg_u, spg_d, stby_u, stby_d;

  update_timing #(.N(N)) u_timing (
    .clk, .rst_n, .update_ck, .code_ck, .sam_ck, .sam_rise,
    .load_d, .load_u, .ck1d, .ck1u, .ck2d, .ck2u);

  pic #(.N(N), .M(M)) u_pic (
    .clk, .rst_n, .ck1_en(sam_rise), .ud_pd, .ud_pu,
    .tch_pd, .tcl_pd, .tch_pu, .tcl_pu, .bc_pd, .bc_pu, .bcda_pd, .bcda_pu,
    .enable_pd, .enable_pu, .lock_pd, .lock_pu);

  code_transmitter #(.N(N)) u_tx (
    .clk, .rst_n, .code_d(bcda_pd), .code_u(bcda_pu), .load_d, .load_u,
    .ck1d, .ck1u, .update_ck, .line(code_line));

  ck3_gen #(.RISING(1'b1)) u_ck3u (
    .clk, .rst_n, .update_ck, .sam_ck, .update_ck2(spg_u), .stby(stby_u), .ck3(ck3u));

  ck3_gen #(.RISING(1'b0)) u_ck3d (
    .clk, .rst_n, .update_ck, .sam_ck, .update_ck2(spg_d), .stby(stby_d), .ck3(ck3d));

  for (genvar i = 0; i < NUM_TERM; i++) begin : g_term
    logic [N-1:0] code_d, code_u;
    code_receiver #(.N(N), .M(M)) u_rx (
      .clk, .rst_n, .line(code_line), .ck2d, .ck2u, .ck3d, .ck3u,
      .code_d, .code_u,
      .tch_d(term_tch_pd[i]), .tcl_d(term_tcl_pd[i]),
      .tch_u(term_tch_pu[i]), .tcl_u(term_tcl_pu[i]));
  end
endmodule
