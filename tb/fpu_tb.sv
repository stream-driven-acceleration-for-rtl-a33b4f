// fpu_tb: self-checking test of the PE floating-point unit. Arithmetic
// results are compared with a reference computed in double precision and
// rounded to single precision to nearest-even by bit manipulation here
// (double holds every product of two singles exactly, and sums are chosen
// so that a*b+c is exact in double). Operands stay in the normal range.
// Special values, min/max, comparisons and sign injection are checked with
// directed vectors.
module fpu_tb;
  import accel_pkg::*;
  fpu_op_e op;
  logic [31:0] a, b, c, y;
  int checks = 0, failures = 0;

  fpu dut (.op, .a, .b, .c, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 0) d = {f[31], 63'd0};
    else d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    logic [24:0] m;
    logic g, s;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] rnd(input int elo, input int ehi);
    int e = elo + int'($urandom_range(0, ehi - elo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic check(input fpu_op_e o, input logic [31:0] xa, xb, xc, exp_y);
    op = o; a = xa; b = xb; c = xc;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h c=%h y=%h exp=%h", o.name(), xa, xb, xc, y, exp_y);
    end
  endtask

  localparam logic [31:0] PINF = 32'h7f80_0000, NINF = 32'hff80_0000, QN = 32'h7fc0_0000;

  initial begin
    logic [31:0] ra, rb, rc;
    int ep;
    // Random arithmetic.
    for (int i = 0; i < 3000; i++) begin
      ra = rnd(100, 150); rb = rnd(100, 150);
      check(FMUL, ra, rb, 0, r2f(f2r(ra) * f2r(rb)));
      rb = {rb[31], 8'(int'(ra[30:23]) + int'($urandom_range(0, 60)) - 30), rb[22:0]};
      check(FADD, ra, rb, 0, r2f(f2r(ra) + f2r(rb)));
      check(FSUB, ra, rb, 0, r2f(f2r(ra) - f2r(rb)));
      ep = int'(ra[30:23]) + int'(rb[30:23]) - 127;
      rc = {1'($urandom), 8'(ep + int'($urandom_range(0, 8)) - 4), 23'($urandom)};
      check(FMADD,  ra, rb, rc, r2f(f2r(ra) * f2r(rb) + f2r(rc)));
      check(FMSUB,  ra, rb, rc, r2f(f2r(ra) * f2r(rb) - f2r(rc)));
      check(FNMADD, ra, rb, rc, r2f(-(f2r(ra) * f2r(rb)) - f2r(rc)));
      check(FNMSUB, ra, rb, rc, r2f(-(f2r(ra) * f2r(rb)) + f2r(rc)));
    end
    // Cancellation: a*b - c with c equal to a rounded product.
    for (int i = 0; i < 500; i++) begin
      ra = rnd(110, 140); rb = rnd(110, 140);
      rc = r2f(f2r(ra) * f2r(rb));
      check(FMSUB, ra, rb, rc, r2f(f2r(ra) * f2r(rb) - f2r(rc)));
    end
    // Directed special values.
    check(FMUL, PINF, 32'h0, 0, QN);
    check(FADD, PINF, NINF, 0, QN);
    check(FADD, PINF, 32'h3f80_0000, 0, PINF);
    check(FADD, 32'h3f80_0000, 32'hbf80_0000, 0, 32'h0);
    check(FMUL, 32'h8000_0000, 32'h40a0_0000, 0, 32'h8000_0000);
    check(FMADD, 32'h0, 32'h4000_0000, 32'h4040_0000, 32'h4040_0000);
    check(FMUL, 32'h7f00_0000, 32'h7f00_0000, 0, PINF);
    check(FADD, 32'h7fc0_0001, 32'h3f80_0000, 0, QN);
    check(FMADD, 32'h3fc0_0000, 32'h4000_0000, 32'h3f80_0000, 32'h4080_0000); // 1.5*2+1=4
    // Min / max / comparisons.
    check(FMIN, 32'h3f80_0000, 32'hc000_0000, 0, 32'hc000_0000);
    check(FMAX, 32'h3f80_0000, 32'hc000_0000, 0, 32'h3f80_0000);
    check(FMIN, 32'hc040_0000, 32'hc000_0000, 0, 32'hc040_0000);
    check(FMAX, 32'h4040_0000, 32'h4000_0000, 0, 32'h4040_0000);
    check(FMIN, QN, 32'h4000_0000, 0, 32'h4000_0000);
    check(FMIN, 32'h0, 32'h8000_0000, 0, 32'h8000_0000);
    check(FMAX, 32'h0, 32'h8000_0000, 0, 32'h0);
    check(FEQ, 32'h0, 32'h8000_0000, 0, 32'd1);
    check(FEQ, 32'h3f80_0000, 32'h4000_0000, 0, 32'd0);
    check(FLT, 32'hbf80_0000, 32'h3f80_0000, 0, 32'd1);
    check(FLT, 32'h4000_0000, 32'h3f80_0000, 0, 32'd0);
    check(FLT, 32'hc000_0000, 32'hbf80_0000, 0, 32'd1);
    check(FLE, 32'h3f80_0000, 32'h3f80_0000, 0, 32'd1);
    check(FLE, QN, 32'h3f80_0000, 0, 32'd0);
    check(FSGNJ, 32'h3f80_0000, 32'hc000_0000, 0, 32'hbf80_0000);
    check(FSGNJN, 32'h3f80_0000, 32'hc000_0000, 0, 32'h3f80_0000);
    check(FSGNJX, 32'hbf80_0000, 32'hc000_0000, 0, 32'h3f80_0000);
    check(FMV, 32'h1234_5678, 32'h0, 0, 32'h1234_5678);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
