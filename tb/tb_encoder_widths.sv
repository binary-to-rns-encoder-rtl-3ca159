// tb_encoder_widths: runs the encoder at the other channel widths evaluated
// for the design, n = 4, 5, 7, 8 and 10 (moduli sets {15,16,17}, {31,32,33},
// {127,128,129}, {255,256,257}, {1023,1024,1025}), each as its own instance.
// n = 4, 5 and 7 are checked exhaustively over the dynamic range
// 0 <= X < 2^(3n) - 2^n with both settings of d; n = 8 and 10 with
// 200,000 random inputs each (plus the range ends). Expected values come from
// the % operator.
module tb_encoder_widths;
  int checks = 0, failures = 0;

  localparam int NW = 5;
  localparam int WIDTHS [NW] = '{4, 5, 7, 8, 10};

  logic [29:0] xin [NW];
  logic        din [NW];
  logic [9:0]  r1 [NW], r2 [NW];
  logic [10:0] r3 [NW];

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int unsigned W = WIDTHS[g];
    logic [W-1:0] x1, x2;
    logic [W:0]   x3;
    rns_encoder #(.N(W)) dut (.x(xin[g][3*W-1:0]), .d(din[g]), .x1(x1), .x2(x2), .x3(x3));
    assign r1[g] = 10'(x1);
    assign r2[g] = 10'(x2);
    assign r3[g] = 11'(x3);
  end

  task automatic apply_check(input int g, input longint xv, input bit dv);
    longint n, m1, m2, m3, e3;
    n  = WIDTHS[g];
    m2 = longint'(1) << n;
    m1 = m2 - 1;
    m3 = m2 + 1;
    xin[g] = 30'(xv);
    din[g] = dv;
    #1;
    e3 = dv ? xv % m3 : (xv + m3 - 1) % m3;
    checks++;
    if (longint'(r1[g]) != xv % m1 || longint'(r2[g]) != xv % m2 || longint'(r3[g]) != e3) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d X=%0d d=%0d got (%0d,%0d,%0d)", n, xv, dv, r1[g], r2[g], r3[g]);
    end
  endtask

  initial begin
    for (int g = 0; g < NW; g++) begin
      xin[g] = '0;
      din[g] = 1'b0;
    end
    for (int g = 0; g < NW; g++) begin
      longint n, m;
      n = WIDTHS[g];
      m = (longint'(1) << (3 * n)) - (longint'(1) << n);
      if (n <= 7) begin
        for (longint xv = 0; xv < m; xv++) begin
          apply_check(g, xv, 1'b1);
          apply_check(g, xv, 1'b0);
        end
      end else begin
        apply_check(g, 0, 1'b1);
        apply_check(g, 0, 1'b0);
        apply_check(g, m - 1, 1'b1);
        apply_check(g, m - 1, 1'b0);
        for (int k = 0; k < 200_000; k++) begin
          longint xv;
          xv = {$urandom, $urandom} % m;
          apply_check(g, xv, k[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
