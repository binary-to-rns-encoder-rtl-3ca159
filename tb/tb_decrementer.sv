// tb_decrementer: exhaustive self-check of the half-subtractor decrementer at
// N = 6: y must equal (a - bin) mod 2^N for every a and bin.
module tb_decrementer;
  localparam int unsigned N = 6;

  logic [N-1:0] a, y;
  logic         bin;
  int checks = 0, failures = 0;

  decrementer #(.N(N)) dut (.a(a), .bin(bin), .y(y));

  initial begin
    for (int ia = 0; ia < (1 << N); ia++)
      for (int ib = 0; ib < 2; ib++) begin
        a = N'(ia); bin = ib[0];
        #1;
        checks++;
        if (int'(y) != (ia - ib + (1 << N)) % (1 << N)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d bin=%0d y=%0d", a, bin, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
