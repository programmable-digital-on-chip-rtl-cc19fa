// tb_impedance_detector: closes the detection loop through a behavioural
// array/comparator model and checks convergence, the step count to the first
// enable, the held code for two-code dithering (the upper of the two codes)
// and three-code dithering (the centre code), and re-locking after the
// reference moves (a supply or temperature change).
module tb_impedance_detector;
  localparam int N = 5, M = 2;
  logic clk = 0, rst_n = 0, ck1_en = 0;
  logic ud, enable, lock;
  logic [N-1:0] bc, bcda;
  logic [2**M-2:0] tch;
  logic [2**(N-M)-2:0] tcl;
  real target = 25.4, meta = 0.0;
  int checks = 0, failures = 0, steps = 0;
  int n_two = 0, n_three = 0;
  int hist[5];

  impedance_detector dut (
    .clk, .rst_n, .ck1_en, .ud, .bc, .tch, .tcl, .bcda, .enable, .lock);
  detector_array_model #(.N(N), .M(M)) u_model (.clk, .tch, .tcl, .target, .meta, .ud);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (bc=%0d bcda=%0d)", what, bc, bcda); end
  endtask

  // One CK1 step every 4 clocks; the model's UD is updated on falling edges.
  task automatic ck1_step();
    logic u;
    repeat (3) @(posedge clk);
    #1;
    ck1_en = 1;
    @(negedge clk); #1;
    u = ud;                          // the value the loop samples
    @(posedge clk); #1;
    ck1_en = 0;
    steps++;
    for (int i = 4; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = int'(u);
    check(odt_pkg::ones(32'(tch)) * 8 + odt_pkg::ones(32'(tcl)) == int'(bc), "array code equals BC");
  endtask

  task automatic do_reset();
    rst_n = 0; steps = 0;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
  endtask

  // Run until enable, return the step count.
  task automatic run_to_enable(output int n);
    n = -1;
    for (int k = 0; k < 200; k++) begin
      ck1_step();
      if (enable) begin n = steps; return; end
    end
  endtask

  int n;
  initial begin
    // Ramp up from mid-scale 16 to a reference of 25.4 unit widths:
    // ten up steps to 26, then down/up/down/up completes 1,0,1,0,1.
    target = 25.4; meta = 0.0;
    do_reset();
    run_to_enable(n);
    check(n == 14, $sformatf("first enable after 14 CK1 steps (got %0d)", n));
    check(bc == 5'd26, "two-code dithering: BC is the upper code");
    @(posedge clk); #1;
    check(bcda == 5'd26 && lock, "hold register stores 26 and lock is set");
    n_two++;
    repeat (20) ck1_step();
    check(bcda == 5'd26, "held code stable while the loop keeps dithering");

    // Ramp down to 9.6: seven downs to 9, then 1,0,1,0,1.
    target = 9.6;
    do_reset();
    check(bcda == 5'd16 && !lock, "reset to mid-scale, unlocked");
    run_to_enable(n);
    check(n == 12, $sformatf("first enable after 12 CK1 steps (got %0d)", n));
    @(posedge clk); #1;
    check(bcda == 5'd10, "held code 10 for reference 9.6");
    n_two++;

    // Reference moves (temperature / supply change): held code follows.
    target = 22.4;
    for (int k = 0; k < 100 && bcda != 5'd23; k++) ck1_step();
    check(bcda == 5'd23, "held code updated to 23 after the reference moved");

    // Metastable comparator at code 20: two- and three-code dithering mix.
    target = 20.0; meta = 0.3;
    do_reset();
    repeat (3000) begin
      ck1_step();
      if (enable) begin
        bit three;
        three = hist[0] == 1 && hist[1] == 0 && hist[2] == 0 && hist[3] == 1 && hist[4] == 1;
        if (three) begin
          n_three++;
          check(bc == 5'd20, "three-code dithering: BC is the centre code");
        end else begin
          n_two++;
          check(bc == 5'd20 || bc == 5'd21, "two-code dithering near a metastable code");
        end
        @(posedge clk); #1;
        check(bcda == bc, "hold register follows enable");
      end
    end
    check(n_three > 0, "three-code dithering happened");
    $display("two-code enables %0d, three-code enables %0d", n_two, n_three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
