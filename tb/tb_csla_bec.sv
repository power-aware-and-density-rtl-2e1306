// Testbench of the modified square-root carry-select adder. The default
// 16-bit adder gets carry patterns that cross each group boundary
// ([1:0] [3:2] [6:4] [10:7] [15:11]) plus random operands; the 10-bit
// instance used by the Posit11 adder is checked for every a and b with both
// carry-in values chosen at random. {cout, sum} must equal a + b + cin.
module tb_csla_bec;
  logic        clk = 1'b0;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [9:0]  a10, b10, sum10;
  logic        cin10, cout10;
  int checks = 0, failures = 0;

  csla_bec dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  csla_bec #(.WIDTH(10)) dut10 (.a(a10), .b(b10), .cin(cin10), .sum(sum10), .cout(cout10));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16();
    @(negedge clk);
    checks++;
    if ({cout, sum} !== 17'(32'(a) + 32'(b) + 32'(cin))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got=%h", a, b, cin, {cout, sum});
    end
  endtask

  initial begin
    // Carry chains: all ones plus one, and a run of ones ending at each bit.
    for (int c = 0; c < 2; c++) begin
      cin = 1'(c);
      for (int i = 0; i < 16; i++) begin
        a = 16'((32'd1 << (i + 1)) - 1);
        b = 16'd1;
        check16();
        a = 16'hffff;
        b = 16'(32'd1 << i);
        check16();
      end
    end
    for (int i = 0; i < 100000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      cin = 1'($urandom);
      check16();
    end
    for (int i = 0; i < 1024; i++)
      for (int j = 0; j < 1024; j++) begin
        a10 = 10'(i);
        b10 = 10'(j);
        cin10 = 1'($urandom);
        #1;
        checks++;
        if ({cout10, sum10} !== 11'(i + j + int'(cin10))) begin
          failures++;
          if (failures < 10) $display("FAIL10 a=%0d b=%0d got=%0d", i, j, {cout10, sum10});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
