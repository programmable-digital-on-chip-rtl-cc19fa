// tb_odt_top: end-to-end run of the terminator control at its default size
// (5-bit codes, four terminators, 64-cycle updates). Behavioural
// array/comparator models close both detection loops. The test
//   - lets both loops ramp from mid-scale and lock (two-code dithering),
//   - checks that every terminator then receives both held codes over the
//     serial line, that terminator codes change only right after CK3U/CK3D,
//     that CK3U comes every 64 cycles and CK3D 32 cycles after it, and that
//     the codes arrive within two update periods of being held,
//   - moves both references (a supply/temperature change) and checks that
//     the new codes reach every terminator,
//   - makes the pull-down comparator metastable at one code so that
//     three-code dithering occurs and the centre code is held.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_odt_top;
  import odt_pkg::*;
  localparam int N = CODE_BITS, M = SEG_MSBS, NT = 4;
  logic clk = 0, rst_n = 0;
  logic ud_pd, ud_pu;
  logic [2**M-2:0] tch_pd, tch_pu;
  logic [2**(N-M)-2:0] tcl_pd, tcl_pu;
  logic [N-1:0] bcda_pd, bcda_pu;
  logic lock_pd, lock_pu, code_line, update_ck, sam_ck, code_ck, ck3u, ck3d;
  logic [2**M-2:0] term_tch_pd [NT], term_tch_pu [NT];
  logic [2**(N-M)-2:0] term_tcl_pd [NT], term_tcl_pu [NT];
  real t_pd = 13.6, t_pu = 21.2, meta_pd = 0.0, meta_pu = 0.0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  odt_top dut (.*);
  detector_array_model #(.N(N), .M(M)) m_pd (.clk, .tch(tch_pd), .tcl(tcl_pd), .target(t_pd), .meta(meta_pd), .ud(ud_pd));
  detector_array_model #(.N(N), .M(M)) m_pu (.clk, .tch(tch_pu), .tcl(tcl_pu), .target(t_pu), .meta(meta_pu), .ud(ud_pu));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at cycle %0d: %s", cyc, what); end
  endtask

  function automatic int width(input logic [31:0] h, input logic [31:0] l);
    return int'(ones(h)) * (2**(N-M)) + int'(ones(l));
  endfunction

  // ---- mechanism counters ----
  int n_ramp = 0, n_two = 0, n_three = 0, n_ck3u = 0, n_ck3d = 0;
  int n_term_update = 0, n_env_change = 0, n_serial_bits = 0;
  longint last_ck3u = -1, last_ck3d = -1;

  // Timing of CK3U / CK3D and "no change except after CK3" on the terminators.
  int prev_pd [NT], prev_pu [NT];
  logic ck3u_q = 0, ck3d_q = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (ck3u) begin
      n_ck3u++;
      if (last_ck3u >= 0) check(cyc - last_ck3u == 64, "CK3U every 64 cycles");
      last_ck3u = cyc;
    end
    if (ck3d) begin
      n_ck3d++;
      if (last_ck3u >= 0) check(cyc - last_ck3u == 32, "CK3D 32 cycles after CK3U");
      last_ck3d = cyc;
    end
    for (int i = 0; i < NT; i++) begin
      int wd, wu;
      wd = width(32'(term_tch_pd[i]), 32'(term_tcl_pd[i]));
      wu = width(32'(term_tch_pu[i]), 32'(term_tcl_pu[i]));
      if (wd != prev_pd[i]) begin
        check(ck3d_q, "terminator pull-down code changes only after CK3D");
        n_term_update++;
      end
      if (wu != prev_pu[i]) begin
        check(ck3u_q, "terminator pull-up code changes only after CK3U");
        n_term_update++;
      end
      prev_pd[i] = wd; prev_pu[i] = wu;
    end
    ck3u_q = ck3u; ck3d_q = ck3d;
    if (code_ck && update_ck) n_serial_bits++;
  end

  // Count ramp steps and dithering kinds from the loops' own signals.
  always @(posedge clk) if (rst_n && dut.u_pic.u_pd.ck1_en) begin
    #1;
    if (dut.u_pic.enable_pd) begin
      if (dut.u_pic.u_pd.u_sel.q == 5'b11001) n_three++; else n_two++;
    end
    if (!dut.u_pic.enable_pd && !dut.u_pic.u_pd.lock) n_ramp++;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #2;
  endtask

  // After the held codes settle, two update periods must carry them out.
  task automatic expect_terminators(input int cd, input int cu, input string when);
    wait_cycles(2 * 64 + 8);
    for (int i = 0; i < NT; i++) begin
      check(width(32'(term_tch_pd[i]), 32'(term_tcl_pd[i])) == cd,
            $sformatf("%s: terminator %0d pull-down code %0d", when, i, cd));
      check(width(32'(term_tch_pu[i]), 32'(term_tcl_pu[i])) == cu,
            $sformatf("%s: terminator %0d pull-up code %0d", when, i, cu));
    end
  endtask

  initial begin
    longint t_lock, t_arrive;
    for (int i = 0; i < NT; i++) begin prev_pd[i] = 16; prev_pu[i] = 16; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Lock. pull-down 16 -> 14 (target 13.6), pull-up 16 -> 22 (21.2)
    wait (lock_pd && lock_pu);
    t_lock = cyc;
    #2;
    check(bcda_pd == 5'd14, $sformatf("pull-down held code 14 (got %0d)", bcda_pd));
    check(bcda_pu == 5'd22, $sformatf("pull-up held code 22 (got %0d)", bcda_pu));
    // held codes reach all terminators within two update periods
    t_arrive = -1;
    for (int k = 0; k < 3 * 64 && t_arrive < 0; k++) begin
      @(posedge clk); #2;
      if (width(32'(term_tch_pd[NT-1]), 32'(term_tcl_pd[NT-1])) == 14 &&
          width(32'(term_tch_pu[NT-1]), 32'(term_tcl_pu[NT-1])) == 22)
        t_arrive = cyc;
    end
    check(t_arrive >= 0 && t_arrive - t_lock <= 128,
          $sformatf("codes reach the terminators within 128 cycles of lock (%0d)", t_arrive - t_lock));
    expect_terminators(14, 22, "after lock");

    // 2. Supply / temperature change: both references move.
    t_pd = 7.3; t_pu = 29.5;
    n_env_change++;
    wait_cycles(40 * 8);
    check(bcda_pd == 5'd8, $sformatf("pull-down re-held at 8 (got %0d)", bcda_pd));
    check(bcda_pu == 5'd30, $sformatf("pull-up re-held at 30 (got %0d)", bcda_pu));
    expect_terminators(8, 30, "after reference change");

    // 3. Comparator metastable at code 18: three-code dithering, centre kept.
    t_pd = 18.0; meta_pd = 0.3;
    n_env_change++;
    begin
      int k = 0;
      while (n_three == 0 && k < 400) begin wait_cycles(8); k++; end
    end
    wait_cycles(8);
    check(n_three > 0, "three-code dithering occurred");
    check(bcda_pd == 5'd18 || bcda_pd == 5'd19, $sformatf("metastable: held code 18 or 19 (got %0d)", bcda_pd));
    t_pd = 17.8; meta_pd = 0.0;   // comparator settles: UD=0 at 18 -> dither 17/18
    wait_cycles(40 * 8);
    check(bcda_pd == 5'd18, $sformatf("held code 18 after the comparator settles (got %0d)", bcda_pd));
    expect_terminators(18, 30, "after metastability");

    // mechanism coverage
    $display("ramp steps %0d, two-code enables %0d, three-code enables %0d", n_ramp, n_two, n_three);
    $display("CK3U %0d, CK3D %0d, terminator code updates %0d, serial bit slots %0d, reference changes %0d",
             n_ck3u, n_ck3d, n_term_update, n_serial_bits, n_env_change);
    check(n_ramp > 0, "counter ramp happened");
    check(n_two > 0, "two-code dithering happened");
    check(n_three > 0, "three-code dithering happened");
    check(n_ck3u > 0 && n_ck3d > 0, "CK3U and CK3D pulses happened");
    check(n_term_update > 0, "terminator code updates happened");
    check(n_serial_bits > 0, "serial transfers happened");
    check(n_env_change > 0, "reference changes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
