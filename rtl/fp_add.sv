// fp_add: combinational IEEE-754 single-precision adder.
//
// This is the binary operator placed in the reduction circuit's pipeline.
// It aligns the smaller operand with guard, round and sticky bits, adds or
// subtracts the significands, normalises and rounds to nearest, ties to
// even. Simplifications of this design: subnormal inputs are read as zero
// and results that would be subnormal are flushed to a signed zero; any NaN
// input gives the quiet NaN 0x7fc00000; inf - inf gives that NaN. The
// result of x + (-x) is +0. No clock: pipelining is added around it.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s
);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic [7:0]  dexp;
  logic [53:0] yshift;
  logic [26:0] xal, yal;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [10:0] e_res;
  logic [24:0] mround;
  logic        rnd_up;
  logic        found;

  always_comb begin
    found  = 1'b0;
    rnd_up = 1'b0;
    mround = '0;
    s      = '0;
    sa = a[31]; ea = a[30:23];
    sb = b[31]; eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    // Order the operands by magnitude: x is the larger one.
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    if (ey == 8'd0) ey = ex;  // a zero operand needs no alignment

    // Align y: 24 significand bits followed by guard, round, sticky.
    dexp   = ex - ey;
    xal    = {mx, 3'b000};
    yshift = {my, 30'd0} >> ((dexp > 8'd30) ? 8'd30 : dexp);
    yal    = yshift[53:27] | {26'd0, (|yshift[26:0])};
    if (dexp > 8'd30) yal = {26'd0, (|my)};

    sum = (sx == sy) ? ({1'b0, xal} + {1'b0, yal}) : ({1'b0, xal} - {1'b0, yal});

    // Normalise so that the leading one lands on bit 26.
    e_res = signed'({3'b000, ex});
    lz    = 5'd0;
    norm  = sum[26:0];
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      e_res = e_res + 11'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          lz    = 5'(26 - i);
          found = 1'b1;
        end
      end
      norm  = sum[26:0] << lz;
      e_res = e_res - signed'({6'd0, lz});
    end

    // Round to nearest, ties to even.
    rnd_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mround = {1'b0, norm[26:3]} + {24'd0, rnd_up};
    if (mround[24]) begin
      mround = mround >> 1;
      e_res  = e_res + 11'sd1;
    end

    // Pack, with the special cases.
    if (ea == 8'hff || eb == 8'hff) begin
      if ((ea == 8'hff && a[22:0] != 23'd0) || (eb == 8'hff && b[22:0] != 23'd0))
        s = QNAN;
      else if (ea == 8'hff && eb == 8'hff && sa != sb)
        s = QNAN;
      else
        s = (ea == 8'hff) ? {sa, 8'hff, 23'd0} : {sb, 8'hff, 23'd0};
    end else if (sum == 28'd0) begin
      s = {sa & sb, 31'd0};
    end else if (e_res >= 11'sd255) begin
      s = {sx, 8'hff, 23'd0};
    end else if (e_res <= 11'sd0) begin
      s = {sx, 31'd0};
    end else begin
      s = {sx, e_res[7:0], mround[22:0]};
    end
  end

endmodule
