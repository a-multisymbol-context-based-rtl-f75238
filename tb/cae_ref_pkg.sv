// cae_ref_pkg: bit-exact software model of the CAE encoder, used by the
// testbenches as the independent reference.
//
// It codes a bordered BAB pixel by pixel, straight from the template
// definitions on two-dimensional arrays and the textbook multiplicative
// coder (range update, renormalisation loop, bits_to_follow expansion,
// two-bit termination), with no pipeline. Alongside the bits it counts
// what the two-symbol pipeline should see: pairs, pairs split because the
// first symbol needs renormalisation, pairs followed by renormalisation,
// and renormalisation iterations.
// A matching arithmetic decoder checks that a bitstream decodes back to the
// BAB. It also defines the probability tables and test shapes the testbenches
// load: c0 = 1 + (hash(ctx) mod 65535), pulled towards the ends of the
// range for contexts with many equal bits, with the four fixed values of
// the all-0 / all-1 contexts.
package cae_ref_pkg;

  typedef bit cur_img_t [20][20];
  typedef bit mc_img_t  [18][18];

  typedef struct {
    int pairs;
    int splits;
    int pair_rn;
    int rn;
    int nbits;          // total bits produced (may exceed 298)
    bit bits [1024];
  } enc_result_t;

  function automatic int unsigned hash32(int unsigned v);
    v = v ^ (v >> 16);
    v = v * 32'h7feb352d;
    v = v ^ (v >> 15);
    v = v * 32'h846ca68b;
    v = v ^ (v >> 16);
    return v;
  endfunction

  function automatic int unsigned table_c0(bit inter, int ctx);
    int ones, nbits;
    int unsigned h;
    nbits = inter ? 9 : 10;
    if (ctx == 0) return inter ? 65532 : 65267;
    if (ctx == (1 << nbits) - 1) return inter ? 14 : 235;
    ones = $countones(ctx);
    h = hash32(ctx + (inter ? 32'h1000 : 0));
    if (ones <= 2)              return 60000 + (h % 5500);  // mostly 0
    else if (ones >= nbits - 2) return 1 + (h % 5000);      // mostly 1
    else                        return 1 + (h % 65535);
  endfunction

  // A blob shape on the extended coordinate plane of an n x n BAB, seed-dependent.
  function automatic bit shape_px(int seed, int r, int c, int noise, int n);
    int cr, cc, rad, dr, dc;
    int unsigned h;
    cr  = n / 5 + int'(hash32(seed * 3 + 1) % (n * 5 / 8 + 1));
    cc  = n / 5 + int'(hash32(seed * 3 + 2) % (n * 5 / 8 + 1));
    rad = n / 5 + 1 + int'(hash32(seed * 3 + 3) % (n / 2 + 1));
    dr = r - cr; dc = c - cc;
    h = hash32(seed * 1000 + (r + 4) * 32 + (c + 4));
    if (noise > 0 && (h % 100) < noise) return h[20];
    return (dr * dr + 2 * dc * dc) <= rad * rad;
  endfunction

  // Bordered current and MC BAB of side n (16, 8 or 4) in the top-left
  // corner of the 20x20 / 18x18 arrays; the rest of the arrays is filled too.
  function automatic void make_bab(int seed, int noise, output cur_img_t cur, output mc_img_t mc,
                                   input int n = 16);
    for (int r = 0; r < 20; r++)
      for (int c = 0; c < 20; c++)
        cur[r][c] = shape_px(seed, r - 2, c - 2, noise, n);
    for (int r = 0; r < 18; r++)
      for (int c = 0; c < 18; c++)
        mc[r][c] = shape_px(seed, r - 1 + 1, c - 1, noise, n);   // shifted by one line
  endfunction

  // Pixel (r, c) of the coded plane, bordered coordinates; vertical scan transposes
  function automatic bit cp(const ref cur_img_t cur, input bit vert, input int r, input int c);
    return vert ? cur[c][r] : cur[r][c];
  endfunction
  function automatic bit mp(const ref mc_img_t mc, input bit vert, input int r, input int c);
    return vert ? mc[c][r] : mc[r][c];
  endfunction

  // Context of the pixel at BAB position (y, x), 0..15
  function automatic int context_of(const ref cur_img_t cur, const ref mc_img_t mc,
                                    input bit inter, input bit vert, input int y, input int x);
    int r, c, mr, mcol, ctx;
    r = y + 2; c = x + 2; mr = y + 1; mcol = x + 1;
    if (!inter) begin
      ctx = cp(cur, vert, r, c-1)        | cp(cur, vert, r, c-2) << 1
          | cp(cur, vert, r-1, c+2) << 2 | cp(cur, vert, r-1, c+1) << 3
          | cp(cur, vert, r-1, c) << 4   | cp(cur, vert, r-1, c-1) << 5
          | cp(cur, vert, r-1, c-2) << 6 | cp(cur, vert, r-2, c+1) << 7
          | cp(cur, vert, r-2, c) << 8   | cp(cur, vert, r-2, c-1) << 9;
    end else begin
      ctx = cp(cur, vert, r, c-1)
          | cp(cur, vert, r-1, c+1) << 1 | cp(cur, vert, r-1, c) << 2
          | cp(cur, vert, r-1, c-1) << 3
          | mp(mc, vert, mr+1, mcol) << 4  | mp(mc, vert, mr, mcol+1) << 5
          | mp(mc, vert, mr, mcol) << 6    | mp(mc, vert, mr, mcol-1) << 7
          | mp(mc, vert, mr-1, mcol) << 8;
    end
    return ctx;
  endfunction

  function automatic void put_bits(ref enc_result_t res, input bit b, input int follow);
    if (res.nbits < 1024) res.bits[res.nbits] = b;
    res.nbits++;
    for (int i = 0; i < follow; i++) begin
      if (res.nbits < 1024) res.bits[res.nbits] = !b;
      res.nbits++;
    end
  endfunction

  // Code one symbol; returns the number of renormalisation iterations
  function automatic int code_symbol(ref enc_result_t res, ref longint unsigned R, ref longint unsigned L,
                                     ref int btf, input bit sym, input int unsigned c0, output bit below_q);
    int unsigned c1, clps;
    longint unsigned rlps;
    bit lps;
    int n;
    c1 = 65536 - c0;
    lps = (c0 > c1);
    clps = lps ? c1 : c0;
    rlps = (R >> 16) * clps;
    if (sym == lps) begin
      L = L + R - rlps;
      R = rlps;
    end else R = R - rlps;
    L = L & 64'hFFFF_FFFF;
    below_q = (R < 64'h4000_0000);
    n = 0;
    while (R < 64'h4000_0000) begin
      if (L >= 64'h8000_0000) begin
        put_bits(res, 1, btf); btf = 0; L = L - 64'h8000_0000;
      end else if (L + R <= 64'h8000_0000) begin
        put_bits(res, 0, btf); btf = 0;
      end else begin
        btf++; L = L - 64'h4000_0000;
      end
      L = (L << 1) & 64'hFFFF_FFFF;
      R = R << 1;
      n++;
    end
    return n;
  endfunction

  // Termination: the two MSBs of L rounded up to a multiple of QUARTER
  function automatic void terminate(ref enc_result_t res, input longint unsigned L, input int btf);
    int top;
    top = int'(L >> 30) + ((L & 64'h3FFF_FFFF) != 0 ? 1 : 0);
    put_bits(res, top[1], btf);
    put_bits(res, top[0], 0);
  endfunction

  function automatic void encode(const ref cur_img_t cur, const ref mc_img_t mc,
                                 input bit inter, input bit vert, input bit ms_en, ref enc_result_t res,
                                 input int n = 16);
    longint unsigned R, L;
    int btf, x, ctx, ctx2, nb;
    bit s, s2, bq, bq2, all0, all1;
    res.pairs = 0; res.splits = 0; res.pair_rn = 0; res.rn = 0; res.nbits = 0;
    R = 64'h7FFF_FFFF; L = 0; btf = 0;
    nb = inter ? 9 : 10;
    for (int y = 0; y < n; y++) begin
      x = 0;
      while (x < n) begin
        ctx = context_of(cur, mc, inter, vert, y, x);
        s = cp(cur, vert, y + 2, x + 2);
        all0 = (ctx == 0);
        all1 = (ctx == (1 << nb) - 1);
        if (ms_en && x < n - 1 && (all0 || all1)) begin
          ctx2 = context_of(cur, mc, inter, vert, y, x + 1);
          s2 = cp(cur, vert, y + 2, x + 3);
          if (ctx2 == ctx && s2 == all1) begin
            int n1, n2;
            res.pairs++;
            n1 = code_symbol(res, R, L, btf, s, table_c0(inter, ctx), bq);
            n2 = code_symbol(res, R, L, btf, s2, table_c0(inter, ctx), bq2);
            if (bq) res.splits++;
            else if (bq2) res.pair_rn++;
            res.rn += n1 + n2;
            x += 2;
            continue;
          end
        end
        res.rn += code_symbol(res, R, L, btf, s, table_c0(inter, ctx), bq);
        x++;
      end
    end
    terminate(res, L, btf);
  endfunction

  // Arithmetic decoder: decodes the bitstream in bs (bits past bs.nbits read
  // as 0) with the same tables and templates and returns how many decoded
  // pixels differ from the BAB. A pair coded in one clock decodes as two
  // ordinary symbols, so this checks the encoder end to end, termination
  // included.
  function automatic int decode_errors(const ref cur_img_t cur, const ref mc_img_t mc,
                                       input bit inter, input bit vert, input enc_result_t bs,
                                       input int n = 16);
    longint unsigned R, L, V, rlps;
    int unsigned c0, c1, clps;
    int pos, err, ctx;
    bit lps, sym;
    R = 64'h7FFF_FFFF; L = 0; V = 0; pos = 0; err = 0;
    for (int i = 0; i < 32; i++) begin
      V = (V << 1) | ((pos < bs.nbits && pos < 1024) ? bs.bits[pos] : 1'b0);
      pos++;
    end
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        ctx = context_of(cur, mc, inter, vert, y, x);
        c0 = table_c0(inter, ctx);
        c1 = 65536 - c0;
        lps = (c0 > c1);
        clps = lps ? c1 : c0;
        rlps = (R >> 16) * clps;
        if (V - L >= R - rlps) begin
          sym = lps; L = L + R - rlps; R = rlps;
        end else begin
          sym = !lps; R = R - rlps;
        end
        if (sym != cp(cur, vert, y + 2, x + 2)) err++;
        while (R < 64'h4000_0000) begin
          if (L >= 64'h8000_0000) begin
            L = L - 64'h8000_0000; V = V - 64'h8000_0000;
          end else if (L + R > 64'h8000_0000) begin
            L = L - 64'h4000_0000; V = V - 64'h4000_0000;
          end
          L = L << 1; R = R << 1;
          V = (V << 1) | ((pos < bs.nbits && pos < 1024) ? bs.bits[pos] : 1'b0);
          pos++;
        end
      end
    return err;
  endfunction

endpackage
