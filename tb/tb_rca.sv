// Testbench of the ripple-carry adder: every input of the 4-bit adder
// (a, b, cin) is applied and {cout, sum} compared with a + b + cin.
module tb_rca;
  logic       clk = 1'b0;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      @(negedge clk);
      checks++;
      if ({cout, sum} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got=%0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
