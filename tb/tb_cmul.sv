// tb_cmul: checks the complex multiplier with random 16-bit operands and
// with the (1 - j) / (-1 - j) constants the FFT uses, against 64-bit
// integer arithmetic.
module tb_cmul;
  localparam int AW = 16, CW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [AW-1:0]  a_re, a_im;
  logic signed [CW-1:0]  c_re, c_im;
  logic signed [AW+CW:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmul #(.AW(AW), .CW(CW)) dut (.*);

  task automatic check(input longint ar, ai, cr, ci);
    longint er, ei;
    a_re = AW'(ar); a_im = AW'(ai); c_re = CW'(cr); c_im = CW'(ci);
    @(posedge clk);
    er = ar * cr - ai * ci;
    ei = ai * cr + ar * ci;
    checks++;
    if (longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      $display("FAIL (%0d,%0d)*(%0d,%0d) = (%0d,%0d) expected (%0d,%0d)",
               ar, ai, cr, ci, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    check(-32768, -32768, -32768, -32768);
    check(-32768, 32767, 32767, -32768);
    check(1234, -567, 1, -1);
    check(1234, -567, -1, -1);
    for (int i = 0; i < 1000; i++)
      check(longint'($urandom_range(65535)) - 32768, longint'($urandom_range(65535)) - 32768,
            longint'($urandom_range(65535)) - 32768, longint'($urandom_range(65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
