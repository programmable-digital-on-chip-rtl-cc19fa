// tb_ck3_gen: drives UPDATE_CK (64-cycle period) and SAM_CK (8-cycle period)
// from its own counters, with several SAM_CK phases, and checks that CK3U
// and CK3D come exactly once per period, one clock after the first SAM_CK
// rise that follows the UPDATE_CK rising (falling) edge, and that STBY is
// cleared by the pulse.
module tb_ck3_gen;
  logic clk = 0, rst_n = 0, update_ck = 1, sam_ck = 1;
  logic spg_u, stby_u, ck3u, spg_d, stby_d, ck3d;
  int checks = 0, failures = 0;

  ck3_gen #(.RISING(1'b1)) dut_u (.clk, .rst_n, .update_ck, .sam_ck, .update_ck2(spg_u), .stby(stby_u), .ck3(ck3u));
  ck3_gen #(.RISING(1'b0)) dut_d (.clk, .rst_n, .update_ck, .sam_ck, .update_ck2(spg_d), .stby(stby_d), .ck3(ck3d));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    for (int phase = 1; phase < 8; phase += 2) begin
      int nu, nd, exp_u, exp_d;
      nu = 0; nd = 0;
      rst_n = 0; update_ck = 1; sam_ck = 1;
      repeat (2) @(posedge clk);
      rst_n = 1;
      // first SAM_CK rise at or after cycle c where (c % 8) == phase
      exp_u = 64 + phase;              // rise of UPDATE_CK at cycle 64
      exp_d = 32 + phase;              // fall of UPDATE_CK at cycle 32
      for (int c = 0; c < 64 * 3; c++) begin
        update_ck = (c % 64) < 32;
        sam_ck    = ((c + 8 - phase) % 8) < 4;
        @(posedge clk); #1;
        if (ck3u) begin
          nu++;
          check((c % 64) == (exp_u % 64), $sformatf("phase %0d: CK3U at cycle %0d", phase, c));
          check(!stby_u, "STBY cleared by CK3U");
        end
        if (ck3d) begin
          nd++;
          check((c % 64) == (exp_d % 64), $sformatf("phase %0d: CK3D at cycle %0d", phase, c));
          check(!stby_d, "STBY cleared by CK3D");
        end
        if ((c % 64) == 0 && c > 0) check(stby_u, "SPG armed STBY on UPDATE_CK rise");
      end
      // UPDATE_CK rises at cycles 64 and 128, falls at 32, 96 and 160
      check(nu == 2, $sformatf("phase %0d: %0d CK3U pulses, expected 2", phase, nu));
      check(nd == 3, $sformatf("phase %0d: %0d CK3D pulses, expected 3", phase, nd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
