// Testbench of the binary to excess-1 converter: the 4-bit converter is
// checked against its full function table (b + 1, 1111 wrapping to 0000), and
// a 7-bit instance, the widest one the 16-bit carry-select adder uses, against
// b + 1 for every input.
module tb_bec;
  logic       clk = 1'b0;
  logic [3:0] b4, x4;
  logic [6:0] b7, x7;
  int checks = 0, failures = 0;

  bec #(.WIDTH(4)) dut4 (.b(b4), .x(x4));
  bec #(.WIDTH(7)) dut7 (.b(b7), .x(x7));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Function table of the 4-bit converter, output column.
  localparam logic [3:0] TABLE [16] = '{4'b0001, 4'b0010, 4'b0011, 4'b0100,
                                        4'b0101, 4'b0110, 4'b0111, 4'b1000,
                                        4'b1001, 4'b1010, 4'b1011, 4'b1100,
                                        4'b1101, 4'b1110, 4'b1111, 4'b0000};

  initial begin
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i);
      @(negedge clk);
      checks++;
      if (x4 !== TABLE[i]) begin
        failures++;
        $display("FAIL bec4 b=%b x=%b exp=%b", b4, x4, TABLE[i]);
      end
    end
    for (int i = 0; i < 128; i++) begin
      b7 = 7'(i);
      @(negedge clk);
      checks++;
      if (x7 !== 7'(i + 1)) begin
        failures++;
        $display("FAIL bec7 b=%b x=%b", b7, x7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
