// tb_rns_encoder: end-to-end self-check of the forward encoder at its default
// width (N = 6, moduli {63, 64, 65}, 18-bit input).
// 1. The five input/output sets of the published functional simulation:
//    (X, d) -> (x1, x2, x3) = (54425,0)->(56,25,19), (54425,1)->(56,25,20),
//    (54401,1)->(32,1,61), (5345,0)->(53,33,14), (64,1)->(1,0,64).
// 2. Every X of the dynamic range 0 <= X < 2^18 - 2^6, with d = 1 and d = 0,
//    against X % 63, X % 64, X % 65 and (X - 1) mod 65.
// It counts each mechanism of the datapath and fails if one never occurs:
// both switch positions, the decrement and end-around-carry paths of the
// 2^N - 1 channel, and the three cases A < 2^N, A = 2^N, A > 2^N of the
// 2^N + 1 selection network (the last being sel = 1).
module tb_rns_encoder;
  localparam int unsigned N = 6;
  localparam longint M  = (longint'(1) << (3 * N)) - (longint'(1) << N);
  localparam longint M1 = (longint'(1) << N) - 1;
  localparam longint M2 = (longint'(1) << N);
  localparam longint M3 = (longint'(1) << N) + 1;

  logic [3*N-1:0] x;
  logic           d;
  logic [N-1:0]   x1, x2;
  logic [N:0]     x3;
  int checks = 0, failures = 0;
  int n_d1 = 0, n_d0 = 0, n_eac = 0, n_dec = 0, n_below = 0, n_equal = 0, n_above = 0;

  rns_encoder dut (.x(x), .d(d), .x1(x1), .x2(x2), .x3(x3));

  task automatic apply_check(input longint xv, input bit dv,
                             input longint e1, input longint e2, input longint e3);
    longint a;
    x = (3*N)'(xv);
    d = dv;
    #1;
    if (dv) n_d1++; else n_d0++;
    if (dut.u_m1.cout) n_eac++; else n_dec++;
    a = longint'({dut.u_p1.cout, dut.u_p1.a});
    if (a < M2) n_below++; else if (a == M2) n_equal++; else n_above++;
    checks++;
    if (longint'(x1) != e1 || longint'(x2) != e2 || longint'(x3) != e3) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d d=%0d got (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                 xv, dv, x1, x2, x3, e1, e2, e3);
    end
  endtask

  initial begin
    apply_check(54425, 1'b0, 56, 25, 19);
    apply_check(54425, 1'b1, 56, 25, 20);
    apply_check(54401, 1'b1, 32,  1, 61);
    apply_check( 5345, 1'b0, 53, 33, 14);
    apply_check(   64, 1'b1,  1,  0, 64);

    for (longint xv = 0; xv < M; xv++) begin
      apply_check(xv, 1'b1, xv % M1, xv % M2, xv % M3);
      apply_check(xv, 1'b0, xv % M1, xv % M2, (xv + M3 - 1) % M3);
    end

    $display("mechanisms: d=1 %0d, d=0 %0d, end-around carry %0d, decrement %0d, A<2^N %0d, A=2^N %0d, A>2^N %0d",
             n_d1, n_d0, n_eac, n_dec, n_below, n_equal, n_above);
    checks++;
    if (n_d1 == 0 || n_d0 == 0 || n_eac == 0 || n_dec == 0 ||
        n_below == 0 || n_equal == 0 || n_above == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
