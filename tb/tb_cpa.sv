// tb_cpa: exhaustive self-check of the ripple-carry adder at N = 6: every
// a, b and cin, comparing {cout, sum} with the integer a + b + cin.
module tb_cpa;
  localparam int unsigned N = 6;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cpa #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int ia = 0; ia < (1 << N); ia++)
      for (int ib = 0; ib < (1 << N); ib++)
        for (int ic = 0; ic < 2; ic++) begin
          a = N'(ia); b = N'(ib); cin = ic[0];
          #1;
          checks++;
          if (int'({cout, sum}) != ia + ib + ic) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d cin=%0d got %0d", a, b, cin, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
