// tb_updn_counter: random up/down/enable stimulus against a saturating
// integer model, with long runs that hit both ends of the range.
module tb_updn_counter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, en = 0, up = 0;
  logic [N-1:0] count;
  int checks = 0, failures = 0, model = 16, sat_hi = 0, sat_lo = 0;

  updn_counter dut (.clk, .rst_n, .en, .up, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic u);
    en = e; up = u;
    @(posedge clk); #1;
    if (e) begin
      if (u) begin if (model == 31) sat_hi++; else model++; end
      else   begin if (model == 0)  sat_lo++; else model--; end
    end
    checks++;
    if (int'(count) != model) begin
      failures++;
      $display("mismatch: count=%0d model=%0d", count, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++; if (count != 5'd16) begin failures++; $display("reset value %0d", count); end
    rst_n = 1;
    repeat (40) step(1, 1);
    repeat (5)  step(0, 0);
    repeat (45) step(1, 0);
    repeat (2000) step(1'($urandom % 4 != 0), 1'($urandom % 2));
    checks++; if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
