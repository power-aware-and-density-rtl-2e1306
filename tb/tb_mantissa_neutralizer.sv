// Testbench of the mantissa neutralizer. For the default 16-bit adder the
// segments are [1:0] [3:2] [6:4] [10:7] [15:11]; for the 10-bit instance of
// the Posit11 adder [1:0] [3:2] [6:4] [9:7]. Every lsb_pos value is applied
// with random operands: a segment must be enabled exactly when its top bit
// is at or above lsb_pos, and the operand bits of disabled segments must be
// zero while the others pass unchanged.
module tb_mantissa_neutralizer;
  logic        clk = 1'b0;
  logic [15:0] a, b, ao, bo;
  logic [4:0]  lsb;
  logic [4:0]  en;
  logic [9:0]  a10, b10, ao10, bo10;
  logic [4:0]  lsb10;
  logic [3:0]  en10;
  int checks = 0, failures = 0;

  mantissa_neutralizer dut (.a_in(a), .b_in(b), .lsb_pos(lsb), .a_out(ao),
                            .b_out(bo), .seg_en(en));
  mantissa_neutralizer #(.WIDTH(10)) dut10 (.a_in(a10), .b_in(b10), .lsb_pos(lsb10),
                                            .a_out(ao10), .b_out(bo10), .seg_en(en10));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int HI16 [5] = '{1, 3, 6, 10, 15};
  localparam int LO16 [5] = '{0, 2, 4, 7, 11};
  localparam int HI10 [4] = '{1, 3, 6, 9};
  localparam int LO10 [4] = '{0, 2, 4, 7};

  initial begin
    logic [15:0] m;
    logic [9:0]  m10;
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); lsb = 5'($urandom_range(0, 16));
      a10 = 10'($urandom); b10 = 10'($urandom); lsb10 = 5'($urandom_range(0, 10));
      @(negedge clk);
      m = '0;
      for (int g = 0; g < 5; g++) begin
        checks++;
        if (en[g] !== (int'(lsb) <= HI16[g])) failures++;
        if (int'(lsb) <= HI16[g]) for (int k = LO16[g]; k <= HI16[g]; k++) m[k] = 1'b1;
      end
      checks++;
      if (ao !== (a & m) || bo !== (b & m)) begin
        failures++;
        if (failures < 10) $display("FAIL16 lsb=%0d a=%h ao=%h", lsb, a, ao);
      end
      m10 = '0;
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (en10[g] !== (int'(lsb10) <= HI10[g])) failures++;
        if (int'(lsb10) <= HI10[g]) for (int k = LO10[g]; k <= HI10[g]; k++) m10[k] = 1'b1;
      end
      checks++;
      if (ao10 !== (a10 & m10) || bo10 !== (b10 & m10)) begin
        failures++;
        if (failures < 10) $display("FAIL10 lsb=%0d a=%h ao=%h", lsb10, a10, ao10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
