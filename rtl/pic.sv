// pic: digital part of the programmable impedance controller.
//
// The analog front end copies the current VDDH/2RT, set by the external
// reference resistor, into a pull-down and a pull-up detection circuit. Each
// has its own comparator and its own digital loop (impedance_detector); both
// loops step on the same CK1 enable. The pull-down and pull-up held codes
// (BCDA) go to the code transmitter. The pull-up loop is assumed identical to
// the pull-down one with its comparator wired so that ud_pu = 1 means "add
// pull-up width"; the original design names the pull-up detector without
// detailing it. Timing: as impedance_detector.
module pic #(
  parameter int unsigned N = odt_pkg::CODE_BITS,
  parameter int unsigned M = odt_pkg::SEG_MSBS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ck1_en,
  input  logic                  ud_pd,
  input  logic                  ud_pu,
  output logic [2**M-1-1:0]     tch_pd,
  output logic [2**(N-M)-1-1:0] tcl_pd,
  output logic [2**M-1-1:0]     tch_pu,
  output logic [2**(N-M)-1-1:0] tcl_pu,
  output logic [N-1:0]          bc_pd,
  output logic [N-1:0]          bc_pu,
  output logic [N-1:0]          bcda_pd,
  output logic [N-1:0]          bcda_pu,
  output logic                  enable_pd,
  output logic                  enable_pu,
  output logic                  lock_pd,
  output logic                  lock_pu
);
  impedance_detector #(.N(N), .M(M)) u_pd (
    .clk, .rst_n, .ck1_en, .ud(ud_pd), .bc(bc_pd), .tch(tch_pd), .tcl(tcl_pd),
    .bcda(bcda_pd), .enable(enable_pd), .lock(lock_pd));

  impedance_detector #(.N(N), .M(M)) u_pu (
    .clk, .rst_n, .ck1_en, .ud(ud_pu), .bc(bc_pu), .tch(tch_pu), .tcl(tcl_pu),
    .bcda(bcda_pu), .enable(enable_pu), .lock(lock_pu));
endmodule
