// fpu: single-precision floating-point unit of a processing element.
// It executes 16 operations. Seven of them (add, subtract, multiply and the
// four fused multiply-add forms) share one fused multiply-add datapath:
// the 48-bit exact product and the addend are aligned in a 75-bit window,
// added or subtracted in sign-magnitude, normalised and rounded once to
// nearest-even. Add uses a multiplier of 1.0; multiply uses an addend of
// -0.0 so that the sign of a zero product is kept. The other operations
// are min/max, the three comparisons (result 1 or 0 as an integer word),
// the three sign injections and a move.
// The operation count and the presence of a fused multiply-add follow the
// design description; the choice of the 16 operations (the RISC-V F set),
// flushing subnormal inputs and results to zero, the single rounding mode
// and the canonical NaN 0x7fc00000 are this implementation's choices.
// Purely combinational; the PE registers the result (one cycle per op).
module fpu
  import accel_pkg::*;
(
  input  fpu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] y
);
  localparam logic [31:0] ONE  = 32'h3f80_0000;
  localparam logic [31:0] QNAN = 32'h7fc0_0000;
  localparam int unsigned RW   = 75;   // alignment window

  // ---------------- fused multiply-add operand selection ---------------
  logic [31:0] x, m, z;
  always_comb begin
    x = a; m = b; z = c;
    unique case (op)
      FADD:    begin m = ONE; z = b; end
      FSUB:    begin m = ONE; z = {~b[31], b[30:0]}; end
      FMUL:    z = 32'h8000_0000;
      FMADD:   ;
      FMSUB:   z = {~c[31], c[30:0]};
      FNMADD:  begin x = {~a[31], a[30:0]}; z = {~c[31], c[30:0]}; end
      FNMSUB:  x = {~a[31], a[30:0]};
      default: ;
    endcase
  end

  function automatic logic [RW-1:0] shr_sticky(input logic [RW-1:0] v, input logic [10:0] sh);
    logic [RW-1:0] mask;
    if (sh >= 11'(RW)) return {{(RW-1){1'b0}}, |v};
    mask = ({RW{1'b1}} << sh);
    return (v >> sh) | {{(RW-1){1'b0}}, |(v & ~mask)};
  endfunction

  logic [31:0] fma_y;
  always_comb begin
    logic sx, sm, sz, sp;
    logic [7:0] ex, em, ez;
    logic x_zero, m_zero, z_zero, x_inf, m_inf, z_inf, any_nan;
    logic [47:0] mp;
    logic signed [11:0] ep, e_z, e_big, e_res;
    logic signed [11:0] diff;
    logic [RW-1:0] ap, az, big, sml, sum;
    logic s_big, s_sml, s_res;
    int lead;
    logic [RW-1:0] norm;
    logic [24:0] mant;
    logic guard, sticky;

    sx = x[31]; sm = m[31]; sz = z[31];
    ex = x[30:23]; em = m[30:23]; ez = z[30:23];
    x_zero = (ex == 8'd0); m_zero = (em == 8'd0); z_zero = (ez == 8'd0);
    x_inf = (ex == 8'hff) && (x[22:0] == 0);
    m_inf = (em == 8'hff) && (m[22:0] == 0);
    z_inf = (ez == 8'hff) && (z[22:0] == 0);
    any_nan = ((ex == 8'hff) && (x[22:0] != 0)) || ((em == 8'hff) && (m[22:0] != 0)) ||
              ((ez == 8'hff) && (z[22:0] != 0));
    sp = sx ^ sm;
    mp = {1'b1, x[22:0]} * {1'b1, m[22:0]};
    ep = $signed({4'd0, ex}) + $signed({4'd0, em}) - 12'sd127;
    e_z = $signed({4'd0, ez});
    ap = {1'b0, mp, 26'd0};
    az = {2'b0, 1'b1, z[22:0], 49'd0};
    diff = ep - e_z;
    big = '0; sml = '0; sum = '0; s_big = 1'b0; s_sml = 1'b0; s_res = 1'b0;
    e_big = '0; e_res = '0; lead = 0; norm = '0; mant = '0; guard = 1'b0; sticky = 1'b0;
    fma_y = '0;

    if (any_nan || ((x_inf || m_inf) && (x_zero || m_zero)) ||
        ((x_inf || m_inf) && z_inf && (sp != sz))) begin
      fma_y = QNAN;
    end else if (x_inf || m_inf) begin
      fma_y = {sp, 8'hff, 23'd0};
    end else if (z_inf) begin
      fma_y = z;
    end else if (x_zero || m_zero) begin
      fma_y = z_zero ? {sp & sz, 31'd0} : z;
    end else begin
      if (z_zero || diff >= 0) begin
        e_big = ep; big = ap; s_big = sp; s_sml = sz;
        sml = z_zero ? '0 : shr_sticky(az, diff[10:0]);
      end else begin
        e_big = e_z; big = az; s_big = sz; s_sml = sp;
        sml = shr_sticky(ap, 11'(-diff));
      end
      if (s_big == s_sml) begin
        sum = big + sml; s_res = s_big;
      end else if (big >= sml) begin
        sum = big - sml; s_res = s_big;
      end else begin
        sum = sml - big; s_res = s_sml;
      end
      if (sum == '0) begin
        fma_y = 32'd0;
      end else begin
        for (int i = 0; i < RW; i++) if (sum[i]) lead = i;
        e_res = e_big + 12'(lead) - 12'sd72;
        norm = sum << (RW - 1 - lead);
        mant = {1'b0, norm[RW-1 -: 24]};
        guard = norm[RW-25];
        sticky = |norm[RW-26:0];
        if (guard && (sticky || mant[0])) mant = mant + 25'd1;
        if (mant[24]) begin
          mant = mant >> 1;
          e_res = e_res + 12'sd1;
        end
        if (e_res >= 12'sd255)     fma_y = {s_res, 8'hff, 23'd0};
        else if (e_res <= 12'sd0)  fma_y = {s_res, 31'd0};
        else                       fma_y = {s_res, e_res[7:0], mant[22:0]};
      end
    end
  end

  // ---------------- comparisons, min/max, sign injection ----------------
  logic a_nan, b_nan, a_zero, b_zero, eq, lt;
  always_comb begin
    a_nan  = (a[30:23] == 8'hff) && (a[22:0] != 0);
    b_nan  = (b[30:23] == 8'hff) && (b[22:0] != 0);
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    eq = (a_zero && b_zero) || (a == b);
    if (a_zero && b_zero)       lt = 1'b0;
    else if (a[31] != b[31])    lt = a[31];
    else if (a[31])             lt = a[30:0] > b[30:0];
    else                        lt = a[30:0] < b[30:0];
  end

  always_comb begin
    unique case (op)
      FADD, FSUB, FMUL, FMADD, FMSUB, FNMADD, FNMSUB: y = fma_y;
      FMIN, FMAX: begin
        if (a_nan && b_nan) y = QNAN;
        else if (a_nan)     y = b;
        else if (b_nan)     y = a;
        else if (a_zero && b_zero) y = (op == FMIN) ? (a | b) : (a & b);
        else                y = ((op == FMIN) == lt) ? a : b;
      end
      FEQ:     y = {31'd0, !a_nan && !b_nan && eq};
      FLT:     y = {31'd0, !a_nan && !b_nan && lt};
      FLE:     y = {31'd0, !a_nan && !b_nan && (lt || eq)};
      FSGNJ:   y = {b[31], a[30:0]};
      FSGNJN:  y = {~b[31], a[30:0]};
      FSGNJX:  y = {a[31] ^ b[31], a[30:0]};
      default: y = a;    // FMV
    endcase
  end
endmodule
