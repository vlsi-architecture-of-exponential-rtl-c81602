// Self-checking test of add_sub: random and corner operands, add and
// subtract, compared with integer arithmetic modulo 2^25.
module tb_add_sub;
  localparam int W = 25;
  logic [W-1:0] a, b, y;
  logic         sub;
  int checks = 0, failures = 0;

  add_sub #(.W(W)) dut (.a, .b, .sub, .y);

  task automatic check(logic [W-1:0] ta, logic [W-1:0] tb_, logic ts);
    longint exp_v;
    a = ta; b = tb_; sub = ts;
    #1;
    exp_v = ts ? (longint'(ta) - longint'(tb_)) : (longint'(ta) + longint'(tb_));
    checks++;
    if (y !== W'(exp_v)) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0b y=%h exp=%h", ta, tb_, ts, y, W'(exp_v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 1'b0);
    check('0, '0, 1'b1);
    check('1, 25'd1, 1'b0);
    check('0, 25'd1, 1'b1);
    check(25'h0800000, 25'h0400000, 1'b1);
    for (int n = 0; n < 500; n++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
