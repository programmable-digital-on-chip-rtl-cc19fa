// ck3_gen: generator of the series-to-parallel latch pulse CK3U (or CK3D).
//
// The original circuit is dynamic: a short pulse generator (SPG) fires on
// the UPDATE_CK edge and charges a standby node STBY; the next SAM_CK rising
// edge then produces one CK3 pulse, which discharges STBY again, so exactly
// one pulse follows every UPDATE_CK edge, aligned to the sampling clock so
// that the terminator impedance changes only in the hold time of the input
// data. This module does the same synchronously: update_ck2 is the SPG
// pulse (active high here), stby the armed flag, ck3 a one-clock pulse.
// RISING = 1 gives CK3U (UPDATE_CK rising edge); RISING = 0 gives CK3D
// (falling edge), which the original design shows only in its timing
// diagram. Timing: ck3 is high in the clock cycle after the cycle in which
// sam_ck is first seen high while armed.
module ck3_gen #(
  parameter bit RISING = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic update_ck,
  input  logic sam_ck,
  output logic update_ck2,  // SPG pulse
  output logic stby,        // armed
  output logic ck3
);
  logic upd_q, sam_q, sam_edge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_q <= 1'b1;   // update_ck is high right after reset: no edge
      sam_q <= 1'b1;
    end else begin
      upd_q <= update_ck;
      sam_q <= sam_ck;
    end
  end

  assign update_ck2 = RISING ? (update_ck && !upd_q) : (!update_ck && upd_q);
  assign sam_edge   = sam_ck && !sam_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stby <= 1'b0;
      ck3  <= 1'b0;
    end else begin
      ck3 <= stby && sam_edge;
      if (update_ck2)            stby <= 1'b1;
      else if (stby && sam_edge) stby <= 1'b0;
    end
  end

  // One pulse per arming: CK3 never lasts more than one clock.
  a_ck3_single: assert property (@(posedge clk) disable iff (!rst_n) ck3 |=> !ck3);
endmodule
