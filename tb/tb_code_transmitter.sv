// tb_code_transmitter: generates its own update schedule (load at each half,
// five shift enables four cycles apart), samples the line two cycles after
// every shift enable, as a receiver would on the CODE_CK falling edge, and
// rebuilds the pull-down and pull-up codes, MSB first, for random codes.
module tb_code_transmitter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] code_d, code_u;
  logic load_d = 0, load_u = 0, ck1d = 0, ck1u = 0, update_ck = 1, line;
  int checks = 0, failures = 0;

  code_transmitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one half period: update level, load, five shifts, sample after each
  task automatic half(input logic upd, output logic [N-1:0] got);
    update_ck = upd;
    if (upd) load_d = 1; else load_u = 1;
    @(posedge clk); #1;
    load_d = 0; load_u = 0;
    // the code inputs may change after the load without effect
    code_d = N'($urandom); code_u = N'($urandom);
    got = '0;
    for (int b = 0; b < N; b++) begin
      repeat (2) @(posedge clk); #1;
      if (upd) ck1d = 1; else ck1u = 1;
      @(posedge clk); #1;
      ck1d = 0; ck1u = 0;
      @(posedge clk); #1;            // CODE_CK falling edge: sample
      got = {got[N-2:0], line};
    end
    repeat (6) @(posedge clk); #1;
  endtask

  initial begin
    logic [N-1:0] exp_d, exp_u, got;
    code_d = '0; code_u = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (100) begin
      code_d = N'($urandom); code_u = N'($urandom);
      exp_d = code_d; exp_u = code_u;
      half(1'b1, got);
      checks++; if (got != exp_d) begin failures++; $display("pull-down sent %b got %b", exp_d, got); end
      code_u = exp_u;
      half(1'b0, got);
      checks++; if (got != exp_u) begin failures++; $display("pull-up sent %b got %b", exp_u, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
