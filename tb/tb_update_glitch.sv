// tb_update_glitch: why the arrays are driven by a segmented thermometer
// code. For every one-step code update (c -> c+1 and c+1 -> c) it computes
// how far the array width can momentarily leave the range between the old
// and the new width if the transistors switching on and those switching off
// do not change at the same instant: if all 'on' transistors switch first
// the width overshoots by the width switching off, if all 'off' transistors
// switch first it undershoots by the width switching on, so the excursion is
// the smaller of the two. A binary-weighted array (widths 1,2,4,8,16) is
// compared with the segmented thermometer array driven by seg_therm_encoder
// (coarse units of 2**(N-M), fine units of 1). The segmented array's worst
// error must be the fine segment's full width, 2**(N-M)-1, and smaller than
// the binary array's, 2**(N-1)-1.
module tb_update_glitch;
  import odt_pkg::*;
  localparam int N = CODE_BITS, M = SEG_MSBS;
  logic [N-1:0] bin;
  logic [2**M-2:0] tch;
  logic [2**(N-M)-2:0] tcl;
  int checks = 0, failures = 0;

  seg_therm_encoder u_enc (.bin, .tch, .tcl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // width switched on / off between two codes of each array
  function automatic int bin_err(input int a, input int b);
    int on = 0, off = 0;
    for (int i = 0; i < N; i++) begin
      if (!a[i] && b[i]) on  += 1 << i;
      if (a[i] && !b[i]) off += 1 << i;
    end
    return (on < off) ? on : off;
  endfunction

  initial begin
    int worst_bin = 0, worst_seg = 0, at_bin = 0, at_seg = 0;
    logic [2**M-2:0] h0, h1;
    logic [2**(N-M)-2:0] l0, l1;
    for (int c = 0; c < 2**N - 1; c++) begin
      for (int dir = 0; dir < 2; dir++) begin
        int a, b, on, off, e;
        a = dir ? c + 1 : c;
        b = dir ? c : c + 1;
        bin = N'(a); #1; h0 = tch; l0 = tcl;
        bin = N'(b); #1; h1 = tch; l1 = tcl;
        on = 0; off = 0;
        for (int k = 0; k < 2**M - 1; k++) begin
          if (!h0[k] && h1[k]) on  += 2**(N-M);
          if (h0[k] && !h1[k]) off += 2**(N-M);
        end
        for (int k = 0; k < 2**(N-M) - 1; k++) begin
          if (!l0[k] && l1[k]) on  += 1;
          if (l0[k] && !l1[k]) off += 1;
        end
        checks++;
        if (on - off != b - a) begin failures++; $display("step %0d->%0d changes width by %0d", a, b, on - off); end
        e = (on < off) ? on : off;
        if (e > worst_seg) begin worst_seg = e; at_seg = a; end
        if (bin_err(a, b) > worst_bin) begin worst_bin = bin_err(a, b); at_bin = a; end
      end
    end
    $display("worst width excursion of a one-step update: binary %0d units (from code %0d), segmented thermometer %0d units (from code %0d)",
             worst_bin, at_bin, worst_seg, at_seg);
    checks++;
    if (worst_seg != 2**(N-M) - 1) begin failures++; $display("segmented worst %0d", worst_seg); end
    checks++;
    if (worst_bin != 2**(N-1) - 1) begin failures++; $display("binary worst %0d", worst_bin); end
    checks++;
    if (worst_seg >= worst_bin) begin failures++; $display("segmentation does not reduce the glitch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
