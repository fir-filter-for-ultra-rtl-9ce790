// Self-checking test of sign_flip: the output must equal +d or -d (one bit
// wider) for random and extreme inputs, including the most negative value.
module tb_sign_flip;
  localparam int unsigned W = 15;
  logic signed [W-1:0] d;
  logic                neg;
  logic signed [W:0]   q;
  int checks = 0, failures = 0;

  sign_flip dut (.d, .neg, .q);

  task automatic check(input int dv, input bit nv);
    int expv;
    d = W'(dv); neg = nv;
    #1;
    expv = nv ? -dv : dv;
    checks++;
    if (int'(q) !== expv) begin
      failures++;
      $display("FAIL d=%0d neg=%0d q=%0d exp=%0d", dv, nv, q, expv);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-(1 << (W-1)), 1'b1);
    check(-(1 << (W-1)), 1'b0);
    check((1 << (W-1)) - 1, 1'b1);
    check(0, 1'b1);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(0, (1 << W) - 1)) - (1 << (W-1)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
