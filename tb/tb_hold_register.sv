// tb_hold_register: random load/data stimulus against a model register.
module tb_hold_register;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N-1:0] d, q;
  int checks = 0, failures = 0, model = 16;

  hold_register dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q != 5'd16) begin failures++; $display("reset value %0d", q); end
    rst_n = 1;
    repeat (1000) begin
      load = 1'($urandom % 4 == 0);
      d = N'($urandom);
      @(posedge clk); #1;
      if (load) model = int'(d);
      checks++;
      if (int'(q) != model) begin failures++; $display("q=%0d expected %0d", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
