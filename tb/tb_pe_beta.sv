// tb_pe_beta: self-checking test of pe_beta, forward and inverse variants.
//
// Drives corner values and random signed operands (kept within the range
// a transform can produce) into both variants and compares with
// a + beta*(b+c), beta = 1/4, computed with explicit floor division. Also checks that the
// inverse variant undoes the forward one. Combinational: no clock.
module tb_pe_beta;
  import dwt53_pkg::*;

  coef_t a, b, c, yf, yi, yr;
  int checks = 0, failures = 0;

  pe_beta #(.INVERSE(1'b0)) dut_f (.a(a), .b(b), .c(c), .y(yf));
  pe_beta #(.INVERSE(1'b1)) dut_i (.a(a), .b(b), .c(c), .y(yi));
  pe_beta #(.INVERSE(1'b1)) dut_r (.a(yf), .b(b), .c(c), .y(yr));

  task automatic check(int av, int bv, int cv);
    int ef, ei;
    a = coef_t'(av); b = coef_t'(bv); c = coef_t'(cv);
    #1;
    ef = a + dwt53_ref_pkg::floordiv(b + c + 2, 4);
    ei = a - dwt53_ref_pkg::floordiv(b + c + 2, 4);
    checks += 3;
    if (int'(yf) != ef) begin failures++; $display("FAIL fwd a=%0d b=%0d c=%0d got %0d exp %0d", av, bv, cv, yf, ef); end
    if (int'(yi) != ei) begin failures++; $display("FAIL inv a=%0d b=%0d c=%0d got %0d exp %0d", av, bv, cv, yi, ei); end
    if (int'(yr) != av) begin failures++; $display("FAIL roundtrip a=%0d b=%0d c=%0d got %0d", av, bv, cv, yr); end
  endtask

  initial begin
    check(0, 0, 0);
    check(5, 1, 0);
    check(5, -1, 0);
    check(-7, -3, -4);
    check(100, 255, 255);
    check(0, -1, -2);
    check(3, 1, 2);
    for (int k = 0; k < 2000; k++)
      check($signed($urandom_range(0, 8000)) - 4000, $signed($urandom_range(0, 8000)) - 4000,
            $signed($urandom_range(0, 8000)) - 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
