// tb_sign_corrector: both variants over all four sign combinations with
// random magnitudes. NEG_ON_SAME = 0 negates when the signs differ,
// NEG_ON_SAME = 1 (the b*d term) when they are equal.
module tb_sign_corrector;
  localparam int W = 20;
  logic sa, sb;
  logic [W-1:0] mag;
  logic signed [W:0] p0, p1;
  int checks = 0, failures = 0;

  sign_corrector #(.W(W), .NEG_ON_SAME(1'b0)) dut0 (.sign_a(sa), .sign_b(sb), .magnitude(mag), .product(p0));
  sign_corrector #(.W(W), .NEG_ON_SAME(1'b1)) dut1 (.sign_a(sa), .sign_b(sb), .magnitude(mag), .product(p1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int m, e0, e1;
      m   = (i == 0) ? (1 << W) - 1 : int'($urandom_range(0, (1 << W) - 1));
      sa  = i[0];
      sb  = i[1];
      mag = W'(m);
      e0  = (sa != sb) ? -m : m;
      e1  = (sa == sb) ? -m : m;
      #1;
      checks += 2;
      if (p0 != (W+1)'(e0)) begin failures++; $display("normal: sa=%0b sb=%0b m=%0d got %0d", sa, sb, m, p0); end
      if (p1 != (W+1)'(e1)) begin failures++; $display("bd: sa=%0b sb=%0b m=%0d got %0d", sa, sb, m, p1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
