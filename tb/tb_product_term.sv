// tb_product_term: the sign-magnitude product term must equal the signed
// product a*b (and -(a*b) for the b*d variant) for random and extreme
// 18 x 28-bit operands.
module tb_product_term;
  localparam int WA = 18, WB = 28;
  logic signed [WA-1:0] a;
  logic signed [WB-1:0] b;
  logic signed [WA+WB-1:0] p, pn;
  int checks = 0, failures = 0;

  product_term #(.WA(WA), .WB(WB), .NEG_ON_SAME(1'b0)) dut  (.a(a), .b(b), .p(p));
  product_term #(.WA(WA), .WB(WB), .NEG_ON_SAME(1'b1)) dutn (.a(a), .b(b), .p(pn));

  task automatic check(input longint x, input longint y);
    longint e;
    a = WA'(x);
    b = WB'(y);
    e = x * y;
    #1;
    checks += 2;
    if (longint'(p) != e)   begin failures++; $display("%0d*%0d: got %0d", x, y, p); end
    if (longint'(pn) != -e) begin failures++; $display("-(%0d*%0d): got %0d", x, y, pn); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-131072, -134217728);
    check(131071, -134217728);
    check(-131072, 134217727);
    check(0, 5); check(-1, -1); check(65536, 1000);
    for (int i = 0; i < 2000; i++)
      check(longint'($urandom_range(0, 262143)) - 131072, longint'($urandom_range(0, 268435455)) - 134217728);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
