// tb_response_unit: checks the SOME/NONE flag and the responder count, one
// clock after the E bits, for random, all-zero and all-one response patterns.
module tb_response_unit;
  localparam int N = 100;
  logic clk = 0, rst = 1;
  logic [N-1:0] e_i = '0;
  logic some_o;
  logic [$clog2(N+1)-1:0] count_o;
  int checks = 0, failures = 0;

  response_unit #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 300; n++) begin
      int cnt;
      case (n % 10)
        0: e_i = '0;
        1: e_i = '1;
        2: begin e_i = '0; e_i[$urandom_range(0, N-1)] = 1'b1; end
        default: for (int k = 0; k < N; k++) e_i[k] = ($urandom_range(0, 99) < n % 100);
      endcase
      cnt = 0;
      for (int k = 0; k < N; k++) cnt += int'(e_i[k]);
      @(posedge clk); #1;
      checks++;
      if (int'(count_o) != cnt || some_o != (cnt != 0)) begin
        failures++; $display("FAIL: step %0d count %0d exp %0d some %b", n, count_o, cnt, some_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
