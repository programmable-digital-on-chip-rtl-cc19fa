// tb_code_receiver: shifts random pull-down and pull-up codes in, MSB first,
// on their receive enables, checks that the applied codes change only on the
// CK3D / CK3U pulses and that the thermometer outputs match the codes.
module tb_code_receiver;
  localparam int N = 5, M = 2;
  logic clk = 0, rst_n = 0, line = 0, ck2d = 0, ck2u = 0, ck3d = 0, ck3u = 0;
  logic [N-1:0] code_d, code_u;
  logic [2**M-2:0] tch_d, tch_u;
  logic [2**(N-M)-2:0] tcl_d, tcl_u;
  int checks = 0, failures = 0;

  code_receiver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  task automatic send(input logic down, input logic [N-1:0] v);
    for (int b = N - 1; b >= 0; b--) begin
      line = v[b];
      repeat (2) @(posedge clk); #1;
      if (down) ck2d = 1; else ck2u = 1;
      @(posedge clk); #1;
      ck2d = 0; ck2u = 0;
      line = 1'($urandom);           // line carries other traffic between samples
    end
  endtask

  initial begin
    logic [N-1:0] vd, vu, held_d, held_u;
    repeat (2) @(posedge clk);
    #1;
    check(code_d == 5'd16 && code_u == 5'd16, "reset to mid-scale");
    rst_n = 1;
    held_d = 5'd16; held_u = 5'd16;
    repeat (100) begin
      vd = N'($urandom); vu = N'($urandom);
      send(1'b1, vd);
      send(1'b0, vu);
      check(code_d == held_d && code_u == held_u, "no change before CK3");
      ck3u = 1; @(posedge clk); #1; ck3u = 0;
      check(code_u == vu && code_d == held_d, "CK3U applies the pull-up code only");
      held_u = vu;
      ck3d = 1; @(posedge clk); #1; ck3d = 0;
      check(code_d == vd, "CK3D applies the pull-down code");
      held_d = vd;
      check(odt_pkg::ones(32'(tch_d)) * 8 + odt_pkg::ones(32'(tcl_d)) == int'(vd), "pull-down thermometer width");
      check(odt_pkg::ones(32'(tch_u)) * 8 + odt_pkg::ones(32'(tcl_u)) == int'(vu), "pull-up thermometer width");
      check(int'(tch_u) == (1 << (vu >> 3)) - 1, "pull-up coarse segment is a thermometer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
