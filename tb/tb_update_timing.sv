// tb_update_timing: over four UPDATE_CK periods checks the 64-cycle period
// with 32 cycles high, five CODE_CK pulses per half, that transmit enables
// mark CODE_CK rising edges and receive enables falling edges in the right
// half, that SAM_CK has an 8-cycle period marked by sam_rise and that the
// transmitter loads come at the UPDATE_CK edges. Every enable is high in the
// first clock cycle after the edge it stands for.
module tb_update_timing;
  logic clk = 0, rst_n = 0;
  logic update_ck, code_ck, sam_ck, sam_rise, load_d, load_u, ck1d, ck1u, ck2d, ck2u;
  int checks = 0, failures = 0;

  update_timing dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  logic upd_q, code_q, sam_q;
  logic upd_rise, upd_fall, code_rise, code_fall, sam_edge;
  int last_upd_rise = -1, last_sam_rise = -1;
  int n1d = 0, n1u = 0, n2d = 0, n2u = 0, ncode = 0, nperiods = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    // right after reset UPDATE_CK is high; treat that as a rising edge
    upd_q = 1'b0; code_q = code_ck; sam_q = sam_ck;
    for (int t = 0; t < 4 * 64 + 1; t++) begin
      if (t > 0) begin @(posedge clk); #1; end
      upd_rise  =  update_ck && !upd_q;
      upd_fall  = !update_ck &&  upd_q;
      code_rise =  code_ck && !code_q;
      code_fall = !code_ck &&  code_q;
      sam_edge  =  sam_ck && !sam_q;
      if (upd_rise) begin
        if (last_upd_rise >= 0) begin
          nperiods++;
          check(t - last_upd_rise == 64, "UPDATE_CK period is 64");
          check(n1d == 5 && n2d == 5 && n1u == 5 && n2u == 5, $sformatf(
                "five transmit/receive enables per half (%0d %0d %0d %0d)", n1d, n2d, n1u, n2u));
          check(ncode == 10, $sformatf("ten CODE_CK pulses per period (%0d)", ncode));
        end
        last_upd_rise = t; n1d = 0; n1u = 0; n2d = 0; n2u = 0; ncode = 0;
      end
      if (upd_fall) check(t - last_upd_rise == 32, "UPDATE_CK high for 32 cycles");
      if (code_rise) ncode++;
      if (sam_edge) begin
        if (last_sam_rise >= 0) check(t - last_sam_rise == 8, "SAM_CK period is 8");
        last_sam_rise = t;
      end
      check(sam_rise == sam_edge, "sam_rise marks the SAM_CK rising edge");
      check(ck1d == (code_rise && update_ck),  "ck1d marks CODE_CK rise while UPDATE_CK is high");
      check(ck1u == (code_rise && !update_ck), "ck1u marks CODE_CK rise while UPDATE_CK is low");
      check(ck2d == (code_fall && update_ck),  "ck2d marks CODE_CK fall while UPDATE_CK is high");
      check(ck2u == (code_fall && !update_ck), "ck2u marks CODE_CK fall while UPDATE_CK is low");
      check(load_d == upd_rise, "load_d marks the UPDATE_CK rising edge");
      check(load_u == upd_fall, "load_u marks the UPDATE_CK falling edge");
      n1d += int'(ck1d); n1u += int'(ck1u); n2d += int'(ck2d); n2u += int'(ck2u);
      upd_q = update_ck; code_q = code_ck; sam_q = sam_ck;
    end
    check(nperiods == 4, "four full periods observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
