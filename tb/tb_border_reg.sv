// tb_border_reg: checks that the border register loads a full row from the
// device every clock, captures the array's edge bits, gives the device load
// priority, holds otherwise and clears on reset.
module tb_border_reg;
  localparam int N = 16;
  logic clk = 0, rst = 1, dev_load = 0, arr_capture = 0;
  logic [N-1:0] dev_i = '0, arr_i = '0, q, expq;
  int checks = 0, failures = 0;

  border_reg #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    @(posedge clk); #1;
    checks++; if (q != '0) begin failures++; $display("FAIL: reset"); end
    rst = 0;
    expq = '0;
    for (int n = 0; n < 500; n++) begin
      dev_load = 1'($urandom); arr_capture = 1'($urandom);
      dev_i = N'($urandom); arr_i = N'($urandom);
      @(posedge clk); #1;
      if (dev_load) expq = dev_i; else if (arr_capture) expq = arr_i;
      checks++;
      if (q != expq) begin failures++; $display("FAIL: step %0d q=%h exp=%h", n, q, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
