// tb_ebc_ref_pkg: reference encoder used by the testbenches to build code
// streams for the decoder.
//
// mq_enc is the MQ arithmetic encoder of ISO/IEC 15444-1 Annex C (INITENC,
// CODEMPS, CODELPS, RENORME, BYTEOUT, FLUSH) with its own nineteen context
// states. ebc_encode runs the embedded block coder in the ordinary sequential
// order (bit-plane by bit-plane, three passes each, stripe by stripe) with
// vertically causal contexts and one terminated MQ segment per coding pass,
// which is the mode the word-level decoder expects. The context labels come
// from the table functions of ebc_pkg, which follow the standard.
package tb_ebc_ref_pkg;
  import ebc_pkg::*;

  localparam int MAXW = 64;
  localparam int MAXP = 10;

  class mq_enc;
    int unsigned a, c, ct;
    byte unsigned out[$];
    logic [5:0] idx[NCTX];
    bit         mps[NCTX];
    int         nsym;

    function new();
      reset();
    endfunction

    function void reset();
      a = 32'h8000; c = 0; ct = 12;
      out = {};
      out.push_back(8'h00);           // the byte before the segment (BP = start - 1)
      nsym = 0;
      for (int i = 0; i < NCTX; i++) begin
        idx[i] = mq_init_state(i);
        mps[i] = 1'b0;
      end
    endfunction

    function void byteout();
      if (out[$] == 8'hFF) begin
        out.push_back(8'(c >> 20)); c &= 32'hFFFFF; ct = 7;
      end else if (c < 32'h8000000) begin
        out.push_back(8'(c >> 19)); c &= 32'h7FFFF; ct = 8;
      end else begin
        out[$] = out[$] + 8'd1;
        if (out[$] == 8'hFF) begin
          c &= 32'h7FFFFFF;
          out.push_back(8'(c >> 20)); c &= 32'hFFFFF; ct = 7;
        end else begin
          out.push_back(8'(c >> 19)); c &= 32'h7FFFF; ct = 8;
        end
      end
    endfunction

    function void renorme();
      do begin
        a = (a << 1) & 32'hFFFF;
        c = c << 1;
        ct = ct - 1;
        if (ct == 0) byteout();
      end while ((a & 32'h8000) == 0);
    endfunction

    function void encode(input bit d, input int cx);
      int unsigned qe;
      qe = 32'(mq_qe(idx[cx]));
      nsym++;
      if (d == mps[cx]) begin           // CODEMPS
        a = a - qe;
        if ((a & 32'h8000) == 0) begin
          if (a < qe) a = qe;
          else c = c + qe;
          idx[cx] = mq_nmps(idx[cx]);
          renorme();
        end else begin
          c = c + qe;
        end
      end else begin                     // CODELPS
        a = a - qe;
        if (a < qe) c = c + qe;
        else a = qe;
        if (mq_switch(idx[cx])) mps[cx] = ~mps[cx];
        idx[cx] = mq_nlps(idx[cx]);
        renorme();
      end
    endfunction

    // FLUSH; returns the segment bytes.
    function void flush(ref byte unsigned seg[$]);
      int unsigned tempc;
      tempc = c + a;
      c = c | 32'hFFFF;
      if (c >= tempc) c = c - 32'h8000;
      c = c << ct;
      byteout();
      c = c << ct;
      byteout();
      if (out[$] == 8'hFF) void'(out.pop_back());
      seg = out[1:$];
    endfunction
  endclass

  // Code-block under test.
  typedef struct {
    int    w, h, nplanes;
    band_t band;
    int    mag [MAXW][MAXW];   // [y][x]
    bit    sgn [MAXW][MAXW];
  } cblk_t;

  // Encoded segments: seg[plane][pass], pass 0..2 = SPP, MR, cleanup.
  typedef struct {
    byte unsigned seg [MAXP][3][$];
    int           nsym [MAXP][3];
  } cstream_t;

  // Significance of a neighbour under the vertically causal mode.
  function automatic bit nsig(ref bit sig [MAXW][MAXW], input cblk_t cb,
                              input int y0, input int x, input int y);
    if (x < 0 || x >= cb.w || y < 0 || y >= cb.h) return 1'b0;
    if ((y / 4) > (y0 / 4)) return 1'b0;
    return sig[y][x];
  endfunction

  function automatic logic [4:0] ref_zc(ref bit sig [MAXW][MAXW], input cblk_t cb,
                                        input int y, input int x);
    int h, v, d;
    h = nsig(sig, cb, y, x-1, y) + nsig(sig, cb, y, x+1, y);
    v = nsig(sig, cb, y, x, y-1) + nsig(sig, cb, y, x, y+1);
    d = nsig(sig, cb, y, x-1, y-1) + nsig(sig, cb, y, x+1, y-1) +
        nsig(sig, cb, y, x-1, y+1) + nsig(sig, cb, y, x+1, y+1);
    return zc_context(2'(h), 2'(v), 3'(d), cb.band);
  endfunction

  function automatic bit ref_any(ref bit sig [MAXW][MAXW], input cblk_t cb,
                                 input int y, input int x);
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if ((dx != 0 || dy != 0) && nsig(sig, cb, y, x+dx, y+dy)) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [5:0] ref_sc(ref bit sig [MAXW][MAXW], input cblk_t cb,
                                        input int y, input int x);
    logic [1:0] hc, vc;
    bit sl, sr, su, sd, nl, nr, nu, nd;
    sl = nsig(sig, cb, y, x-1, y);  nl = (x > 0)      ? cb.sgn[y][x-1] : 1'b0;
    sr = nsig(sig, cb, y, x+1, y);  nr = (x < cb.w-1) ? cb.sgn[y][x+1] : 1'b0;
    su = nsig(sig, cb, y, x, y-1);  nu = (y > 0)      ? cb.sgn[y-1][x] : 1'b0;
    sd = nsig(sig, cb, y, x, y+1);  nd = (y < cb.h-1) ? cb.sgn[y+1][x] : 1'b0;
    hc = sc_contrib(sl, nl, sr, nr);
    vc = sc_contrib(su, nu, sd, nd);
    return sc_context(hc, vc);
  endfunction

  function automatic void code_sign(mq_enc e, ref bit sig [MAXW][MAXW], input cblk_t cb,
                                    input int y, input int x);
    logic [5:0] sc;
    sc = ref_sc(sig, cb, y, x);
    e.encode(cb.sgn[y][x] ^ sc[5], int'(sc[4:0]));
  endfunction

  // Sequential EBCOT encoder, causal mode, every pass terminated.
  function automatic void ebc_encode(input cblk_t cb, ref cstream_t cs);
    bit    sig  [MAXW][MAXW];
    bit    refd [MAXW][MAXW];
    bit    pi   [MAXW][MAXW];
    mq_enc e;
    e = new();
    for (int y = 0; y < MAXW; y++)
      for (int x = 0; x < MAXW; x++) begin
        sig[y][x] = 0; refd[y][x] = 0; pi[y][x] = 0;
      end
    for (int p = 0; p < MAXP; p++)
      for (int q = 0; q < 3; q++) begin
        cs.seg[p][q] = {};
        cs.nsym[p][q] = 0;
      end

    for (int p = cb.nplanes - 1; p >= 0; p--) begin
      if (p != cb.nplanes - 1) begin
        // Significance propagation pass.
        e.reset();
        for (int s = 0; s < cb.h; s += 4)
          for (int x = 0; x < cb.w; x++)
            for (int y = s; y < s + 4; y++)
              if (!sig[y][x] && ref_any(sig, cb, y, x)) begin
                bit b;
                b = ((cb.mag[y][x] >> p) & 1) != 0;
                e.encode(b, int'(ref_zc(sig, cb, y, x)));
                pi[y][x] = 1;
                if (b) begin
                  code_sign(e, sig, cb, y, x);
                  sig[y][x] = 1;
                end
              end
        e.flush(cs.seg[p][0]);
        cs.nsym[p][0] = e.nsym;
        // Magnitude refinement pass.
        e.reset();
        for (int s = 0; s < cb.h; s += 4)
          for (int x = 0; x < cb.w; x++)
            for (int y = s; y < s + 4; y++)
              if (sig[y][x] && !pi[y][x]) begin
                bit b;
                b = ((cb.mag[y][x] >> p) & 1) != 0;
                e.encode(b, int'(mr_context(!refd[y][x], ref_any(sig, cb, y, x))));
                refd[y][x] = 1;
              end
        e.flush(cs.seg[p][1]);
        cs.nsym[p][1] = e.nsym;
      end
      // Cleanup pass.
      e.reset();
      for (int s = 0; s < cb.h; s += 4)
        for (int x = 0; x < cb.w; x++) begin
          int  y0;
          bit  run;
          y0  = s;
          run = 1;
          for (int y = s; y < s + 4; y++)
            if (sig[y][x] || pi[y][x] || ref_any(sig, cb, y, x)) run = 0;
          if (run) begin
            int r;
            r = 4;
            for (int y = s + 3; y >= s; y--)
              if (((cb.mag[y][x] >> p) & 1) != 0) r = y - s;
            if (r == 4) begin
              e.encode(1'b0, int'(CX_RUN));
              y0 = s + 4;
            end else begin
              e.encode(1'b1, int'(CX_RUN));
              e.encode(1'((r >> 1) & 1), int'(CX_UNI));
              e.encode(1'(r & 1), int'(CX_UNI));
              code_sign(e, sig, cb, s + r, x);
              sig[s + r][x] = 1;
              y0 = s + r + 1;
            end
          end
          for (int y = y0; y < s + 4; y++)
            if (!sig[y][x] && !pi[y][x]) begin
              bit b;
              b = ((cb.mag[y][x] >> p) & 1) != 0;
              e.encode(b, int'(ref_zc(sig, cb, y, x)));
              if (b) begin
                code_sign(e, sig, cb, y, x);
                sig[y][x] = 1;
              end
            end
        end
      e.flush(cs.seg[p][2]);
      cs.nsym[p][2] = e.nsym;
      for (int y = 0; y < MAXW; y++)
        for (int x = 0; x < MAXW; x++) pi[y][x] = 0;
    end
  endfunction

  // Random code-block: magnitudes from a roughly geometric distribution so
  // that low bit-planes are dense and high ones sparse.
  function automatic void make_cblk(ref cblk_t cb, input int w, input int h,
                                    input int nplanes, input band_t band, input int sparsity);
    cb.w = w; cb.h = h; cb.nplanes = nplanes; cb.band = band;
    for (int y = 0; y < MAXW; y++)
      for (int x = 0; x < MAXW; x++) begin
        int m, e;
        m = 0;
        if (y < h && x < w && ($urandom % 100) >= sparsity) begin
          e = $urandom % nplanes;
          m = (1 << e) | ($urandom & ((1 << e) - 1));
        end
        cb.mag[y][x] = m;
        cb.sgn[y][x] = (m != 0) ? 1'($urandom & 1) : 1'b0;
      end
    // Make sure the top plane is used.
    cb.mag[0][0] = (1 << nplanes) - 1;
  endfunction

endpackage
