// tb_mul_sqrt2: checks the shift-and-add sqrt(2)/2 multiplier against a
// real-number product, allowing one LSB for the rounding of the result.
module tb_mul_sqrt2;
  localparam int W = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x, y;
  int checks = 0, failures = 0;

  mul_sqrt2 #(.W(W)) dut (.x, .y);

  task automatic check(input int v);
    real r;
    x = W'(v);
    @(posedge clk);
    r = real'(v) * 0.70710678118654752;
    checks++;
    if (real'(y) - r > 1.0 || r - real'(y) > 1.0) begin
      failures++;
      $display("FAIL x=%0d y=%0d expected %f", v, y, r);
    end
  endtask

  initial begin
    check(0); check(1); check(-1); check(131071); check(-131072); check(100000);
    for (int i = 0; i < 1000; i++) check(int'($urandom_range(262143)) - 131072);
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
