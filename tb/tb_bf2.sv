// tb_bf2: checks the radix-2 butterfly against integer sums and
// differences for random and extreme inputs.
module tb_bf2;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [W:0]   s_re, s_im, d_re, d_im;
  int checks = 0, failures = 0;

  bf2 #(.W(W)) dut (.*);

  task automatic check(input int ar, ai, br, bi);
    a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
    @(posedge clk);
    checks++;
    if (int'(s_re) != ar + br || int'(s_im) != ai + bi ||
        int'(d_re) != ar - br || int'(d_im) != ai - bi) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) s=(%0d,%0d) d=(%0d,%0d)",
               ar, ai, br, bi, s_re, s_im, d_re, d_im);
    end
  endtask

  initial begin
    check(32767, 32767, 32767, 32767);
    check(-32768, -32768, 32767, -32768);
    check(-32768, 32767, -32768, 32767);
    for (int i = 0; i < 500; i++)
      check($signed($urandom_range(65535)) - 32768, $signed($urandom_range(65535)) - 32768,
            $signed($urandom_range(65535)) - 32768, $signed($urandom_range(65535)) - 32768);
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
