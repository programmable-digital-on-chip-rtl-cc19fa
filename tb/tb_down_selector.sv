// tb_down_selector: drives UD histories (monotonic runs, alternation,
// up-up-down-down, random) and compares enable and lock with a model that
// keeps its own list of the last five UD samples.
module tb_down_selector;
  logic clk = 0, rst_n = 0, en = 0, ud = 0;
  logic [4:0] q;
  logic enable, lock;
  int checks = 0, failures = 0, n_two = 0, n_three = 0;
  int hist[5];      // hist[0] = newest
  bit model_lock = 0;

  down_selector dut (.clk, .rst_n, .en, .ud, .q, .enable, .lock);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic u);
    bit exp_two, exp_three;
    en = e; ud = u;
    @(posedge clk); #1;
    if (e) begin
      for (int i = 4; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(u);
    end
    exp_two   = hist[0] == 1 && hist[1] == 0 && hist[2] == 1 && hist[3] == 0 && hist[4] == 1;
    exp_three = hist[0] == 1 && hist[1] == 0 && hist[2] == 0 && hist[3] == 1 && hist[4] == 1;
    if (exp_two) n_two++;
    if (exp_three) n_three++;
    checks++;
    if (enable !== (exp_two || exp_three)) begin
      failures++;
      $display("enable=%b expected %b (hist %0d%0d%0d%0d%0d)", enable, exp_two || exp_three,
               hist[0], hist[1], hist[2], hist[3], hist[4]);
    end
    if (exp_two || exp_three) model_lock = 1;
    en = 0;
    @(posedge clk); #1;
    checks++;
    if (lock !== model_lock) begin failures++; $display("lock=%b expected %b", lock, model_lock); end
  endtask

  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) step(1, 1);            // ramp: no enable
    repeat (3)  step(1, 0);
    checks++; if (lock) begin failures++; $display("early lock"); end
    repeat (8) begin step(1, 1); step(1, 0); end          // two-code dithering
    repeat (4) begin step(1, 1); step(1, 1); step(1, 0); step(1, 0); end  // three-code
    repeat (3000) step(1'($urandom % 3 != 0), 1'($urandom % 2));
    checks++;
    if (n_two == 0 || n_three == 0) begin failures++; $display("a pattern was never seen"); end
    $display("two-code matches %0d, three-code matches %0d", n_two, n_three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
