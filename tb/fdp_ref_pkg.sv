// fdp_ref_pkg: reference model for the fused dot product testbenches.
//
// ref_fdp computes round(sum a[i]*b[i]) exactly: every product is formed as
// a wide integer, all products are lined up on the smallest product
// exponent in one very wide signed integer and added without loss, and the
// exact sum is rounded once to nearest-even. It shares no code with the
// design. Number conventions match the design's: zero exponent fields are
// zero, subnormal results flush to a signed zero, NaN is the quiet NaN
// 0/all-ones/10..0, an exact zero sum is +0 unless all products are -0.
// Works for any exponent width up to 11 and fraction width up to 52.
package fdp_ref_pkg;

  localparam int BIGW = 4480;
  typedef logic signed [BIGW-1:0] big_t;

  typedef struct {
    logic [63:0] result;
    logic        invalid, overflow, underflow, cancel;
  } ref_out_t;

  function automatic ref_out_t ref_fdp(int exp_w, int man_w, int n,
                                       logic [63:0] a [], logic [63:0] b []);
    ref_out_t    r;
    int          bias, emaxf, fw;
    logic        sgn [];
    logic        zer [];
    int          ep [];
    logic [127:0] prod [];
    logic        nan, pinf, ninf, allneg_zero, anynz;
    int          base;
    big_t        acc, mag, t;
    int          q, e;
    logic [63:0] frac;
    logic        rbit, sticky;

    bias  = (1 << (exp_w - 1)) - 1;
    emaxf = (1 << exp_w) - 1;
    fw    = 1 + exp_w + man_w;
    sgn  = new[n]; zer = new[n]; ep = new[n]; prod = new[n];
    r.result = '0; r.invalid = 0; r.overflow = 0; r.underflow = 0; r.cancel = 0;
    nan = 0; pinf = 0; ninf = 0; allneg_zero = 1; anynz = 0;
    base = 1 << 30;
    for (int i = 0; i < n; i++) begin
      int ea, eb;
      logic [63:0] ma, mb;
      logic za, zb, ia, ib, na, nb;
      ea = int'((a[i] >> man_w) & ((64'd1 << exp_w) - 1));
      eb = int'((b[i] >> man_w) & ((64'd1 << exp_w) - 1));
      ma = a[i] & ((64'd1 << man_w) - 1);
      mb = b[i] & ((64'd1 << man_w) - 1);
      za = (ea == 0); zb = (eb == 0);
      ia = (ea == emaxf) && (ma == 0); ib = (eb == emaxf) && (mb == 0);
      na = (ea == emaxf) && (ma != 0); nb = (eb == emaxf) && (mb != 0);
      sgn[i] = a[i][fw-1] ^ b[i][fw-1];
      if (na || nb || (ia && zb) || (za && ib)) nan = 1;
      else if (ia || ib) begin
        if (sgn[i]) ninf = 1; else pinf = 1;
      end
      zer[i] = za || zb;
      if (!zer[i]) begin
        prod[i] = 128'(ma | (64'd1 << man_w)) * 128'(mb | (64'd1 << man_w));
        ep[i]   = ea + eb;
        if (ep[i] < base) base = ep[i];
        anynz = 1;
      end else prod[i] = '0;
      allneg_zero &= zer[i] & sgn[i];
    end
    if (nan || (pinf && ninf)) begin
      r.result  = (64'(emaxf) << man_w) | (64'd1 << (man_w - 1));
      r.invalid = 1;
      return r;
    end
    if (pinf || ninf) begin
      r.result = (64'(ninf) << (fw - 1)) | (64'(emaxf) << man_w);
      return r;
    end
    acc = '0;
    for (int i = 0; i < n; i++)
      if (!zer[i]) begin
        t = big_t'(prod[i]) <<< (ep[i] - base);
        if (sgn[i]) acc = acc - t; else acc = acc + t;
      end
    if (acc == 0) begin
      r.result = 64'(allneg_zero) << (fw - 1);
      r.cancel = anynz;
      return r;
    end
    mag = acc < 0 ? -acc : acc;
    q = 0;
    for (int i = BIGW - 2; i >= 0; i--) if (mag[i]) begin q = i; break; end
    // value = mag * 2^(base - 2*bias - 2*man_w)
    e = q + base - bias - 2 * man_w;
    frac = '0; rbit = 0; sticky = 0;
    for (int k = 1; k <= man_w; k++)
      if (q - k >= 0) frac[man_w - k] = mag[q - k];
    if (q - man_w - 1 >= 0) rbit = mag[q - man_w - 1];
    for (int k = q - man_w - 2; k >= 0; k--) sticky |= mag[k];
    if (rbit && (sticky || frac[0])) begin
      frac = frac + 1;
      if (frac[man_w]) begin
        frac = '0;
        e    = e + 1;
      end
    end
    if (e >= emaxf) begin
      r.result   = (64'(acc < 0) << (fw - 1)) | (64'(emaxf) << man_w);
      r.overflow = 1;
    end else if (e <= 0) begin
      r.result    = 64'(acc < 0) << (fw - 1);
      r.underflow = 1;
    end else begin
      r.result = (64'(acc < 0) << (fw - 1)) | (64'(e) << man_w) | frac;
    end
    return r;
  endfunction

endpackage
