// tb_pic: both detection loops of the controller run against behavioural
// arrays with different references; each must hold the code just above its
// reference and lock, independently of the other.
module tb_pic;
  localparam int N = 5, M = 2;
  logic clk = 0, rst_n = 0, ck1_en = 0;
  logic ud_pd, ud_pu;
  logic [2**M-2:0] tch_pd, tch_pu;
  logic [2**(N-M)-2:0] tcl_pd, tcl_pu;
  logic [N-1:0] bc_pd, bc_pu, bcda_pd, bcda_pu;
  logic enable_pd, enable_pu, lock_pd, lock_pu;
  real t_pd = 11.3, t_pu = 27.7, meta = 0.0;
  int checks = 0, failures = 0, step_pd = -1, step_pu = -1;

  pic dut (.*);
  detector_array_model #(.N(N), .M(M)) m_pd (.clk, .tch(tch_pd), .tcl(tcl_pd), .target(t_pd), .meta, .ud(ud_pd));
  detector_array_model #(.N(N), .M(M)) m_pu (.clk, .tch(tch_pu), .tcl(tcl_pu), .target(t_pu), .meta, .ud(ud_pu));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 1; s <= 60; s++) begin
      repeat (3) @(posedge clk);
      #1;
      ck1_en = 1;
      @(posedge clk); #1;
      ck1_en = 0;
      if (enable_pd && step_pd < 0) step_pd = s;
      if (enable_pu && step_pu < 0) step_pu = s;
    end
    // pull-down: 16 -> 11 (five downs), then 1,0,1,0,1 -> step 10
    // pull-up:   16 -> 28 (twelve ups) then 0,1,0,1  -> step 16
    checks++; if (step_pd != 10) begin failures++; $display("pd enable at step %0d", step_pd); end
    checks++; if (step_pu != 16) begin failures++; $display("pu enable at step %0d", step_pu); end
    checks++; if (bcda_pd != 5'd12 || !lock_pd) begin failures++; $display("bcda_pd=%0d", bcda_pd); end
    checks++; if (bcda_pu != 5'd28 || !lock_pu) begin failures++; $display("bcda_pu=%0d", bcda_pu); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
