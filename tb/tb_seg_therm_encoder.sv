// tb_seg_therm_encoder: exhaustive check of the binary to segmented
// thermometer conversion: both segments are contiguous runs of ones from bit
// 0, their lengths are the MSB and LSB fields, and the weighted width equals
// the binary value.
module tb_seg_therm_encoder;
  localparam int N = 5, M = 2;
  logic [N-1:0] bin;
  logic [2**M-2:0] tch;
  logic [2**(N-M)-2:0] tcl;
  int checks = 0, failures = 0;

  seg_therm_encoder dut (.bin, .tch, .tcl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**N; v++) begin
      int hi, lo;
      bin = N'(v);
      #1;
      hi = v / (2**(N-M));
      lo = v % (2**(N-M));
      checks++;
      if (int'(tch) != (1 << hi) - 1) begin failures++; $display("v=%0d tch=%b", v, tch); end
      checks++;
      if (int'(tcl) != (1 << lo) - 1) begin failures++; $display("v=%0d tcl=%b", v, tcl); end
      checks++;
      if (int'($countones(tch)) * 2**(N-M) + int'($countones(tcl)) != v) begin
        failures++; $display("v=%0d width mismatch", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
