// hsu_ref_pkg: reference model of the HSU datapath for the testbenches, and
// a generator of random but meaningful threads for every operating mode.
// The model performs the same single-precision operations in the same order
// as the hardware (see hsu_tb_pkg for the arithmetic), keeps its own per-lane
// accumulators for multi-beat distance instructions, and sorts box hits with
// the same compare-exchange network so ties resolve identically.
package hsu_ref_pkg;
  import hsu_pkg::*;
  import hsu_tb_pkg::*;

  word_t m_acc_e [WARP_SIZE];
  word_t m_acc_d [WARP_SIZE];
  word_t m_acc_n [WARP_SIZE];

  function automatic void ref_reset();
    for (int l = 0; l < WARP_SIZE; l++) begin
      m_acc_e[l] = '0; m_acc_d[l] = '0; m_acc_n[l] = '0;
    end
  endfunction

  function automatic word_t fmax_sel(word_t a, word_t b);   // a < b ? b : a
    return flt(a, b) ? b : a;
  endfunction

  function automatic void model_box(input dp_in_t t, output word_t res [4], output int hits);
    word_t tn [4], key [4], ptr [4];
    logic  hit [4];
    hits = 0;
    for (int c = 0; c < 4; c++) begin
      word_t lo [3], hi [3], nr [3], fr [3], n01, n012, f01, f012, tf;
      for (int a = 0; a < 3; a++) begin
        lo[a] = fmul(fsub(t.node[7*c+a], t.opnd[a]), t.opnd[3+a]);
        hi[a] = fmul(fsub(t.node[7*c+3+a], t.opnd[a]), t.opnd[3+a]);
        nr[a] = flt(lo[a], hi[a]) ? lo[a] : hi[a];
        fr[a] = flt(lo[a], hi[a]) ? hi[a] : lo[a];
      end
      n01  = flt(nr[0], nr[1]) ? nr[1] : nr[0];
      n012 = flt(n01, nr[2]) ? nr[2] : n01;
      tn[c] = flt(n012, t.opnd[6]) ? t.opnd[6] : n012;
      f01  = flt(fr[1], fr[0]) ? fr[1] : fr[0];
      f012 = flt(fr[2], f01) ? fr[2] : f01;
      tf   = flt(t.opnd[7], f012) ? t.opnd[7] : f012;
      hit[c] = flt(tn[c], tf) || (f2r(tn[c]) == f2r(tf));
      key[c] = hit[c] ? tn[c] : FP_POS_INF;
      ptr[c] = hit[c] ? t.node[7*c+6] : NULL_PTR;
      hits += int'(hit[c]);
    end
    // same compare-exchange network as the hardware: (0,1)(2,3)(0,2)(1,3)(1,2)
    cx(key, ptr, 0, 1); cx(key, ptr, 2, 3); cx(key, ptr, 0, 2); cx(key, ptr, 1, 3); cx(key, ptr, 1, 2);
    for (int c = 0; c < 4; c++) res[c] = ptr[c];
  endfunction

  function automatic void cx(inout word_t k [4], inout word_t p [4], input int i, input int j);
    word_t tk, tp;
    if (flt(k[j], k[i])) begin
      tk = k[i]; k[i] = k[j]; k[j] = tk;
      tp = p[i]; p[i] = p[j]; p[j] = tp;
    end
  endfunction

  function automatic void model_tri(input dp_in_t t, output word_t res [4]);
    word_t v [3][3], px [3], py [3], pz [3], ax [3], ay [3], az [3];
    word_t u, vv, w, det, tt, ts;
    int kx, ky, kz;
    logic neg, pos, hit;
    kx = int'(t.opnd[11][1:0]); ky = int'(t.opnd[11][3:2]); kz = int'(t.opnd[11][5:4]);
    for (int i = 0; i < 3; i++)
      for (int a = 0; a < 3; a++) v[i][a] = fsub(t.node[3*i+a], t.opnd[a]);
    for (int i = 0; i < 3; i++) begin
      ax[i] = fsub(v[i][kx], fmul(t.opnd[8], v[i][kz]));
      ay[i] = fsub(v[i][ky], fmul(t.opnd[9], v[i][kz]));
      az[i] = fmul(t.opnd[10], v[i][kz]);
    end
    u  = fsub(fmul(ax[2], ay[1]), fmul(ay[2], ax[1]));
    vv = fsub(fmul(ax[0], ay[2]), fmul(ay[0], ax[2]));
    w  = fsub(fmul(ax[1], ay[0]), fmul(ay[1], ax[0]));
    det = fadd(fadd(u, vv), w);
    tt  = fadd(fadd(fmul(u, az[0]), fmul(vv, az[1])), fmul(w, az[2]));
    neg = (f2r(u) < 0.0) || (f2r(vv) < 0.0) || (f2r(w) < 0.0);
    pos = (f2r(u) > 0.0) || (f2r(vv) > 0.0) || (f2r(w) > 0.0);
    ts  = {tt[31] ^ det[31], tt[30:0]};
    hit = !(neg && pos) && (f2r(det) != 0.0) && !(f2r(ts) < 0.0);
    res[0] = {31'd0, hit};
    res[1] = t.node[9];
    res[2] = tt;
    res[3] = det;
  endfunction

  // ----------------------------------------------------------- generators
  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom % 100000) / 100000.0);
  endfunction

  function automatic dp_in_t gen_thread(dp_mode_e m, int lane, logic acc);
    dp_in_t t;
    real o [3], d [3], dmax;
    int kz, kx, ky, tmp;
    t = '0;
    t.mode = m;
    t.lane = 5'(lane);
    t.slot = 3'($urandom);
    t.acc  = acc;
    for (int a = 0; a < 3; a++) begin
      o[a] = rr(-4.0, 4.0);
      d[a] = rr(-1.0, 1.0);
      if (d[a] > -0.01 && d[a] < 0.01) d[a] = 0.5;
    end
    case (m)
      MODE_BOX: begin
        for (int a = 0; a < 3; a++) begin
          t.opnd[a]   = r2f(o[a]);
          t.opnd[3+a] = r2f(1.0 / d[a]);
        end
        t.opnd[6] = r2f(0.0);
        t.opnd[7] = r2f(rr(2.0, 40.0));
        for (int c = 0; c < 4; c++) begin
          real s, ctr;
          s = rr(0.0, 8.0);
          for (int a = 0; a < 3; a++) begin
            ctr = o[a] + s * d[a] + rr(-1.5, 1.5);
            t.node[7*c+a]   = r2f(ctr - rr(0.1, 2.0));
            t.node[7*c+3+a] = r2f(ctr + rr(0.1, 2.0));
          end
          t.node[7*c+6] = 32'h1000 + 32'($urandom % 4096) * 64;
        end
      end
      MODE_TRI: begin
        kz = 0;
        dmax = (d[0] < 0 ? -d[0] : d[0]);
        for (int a = 1; a < 3; a++)
          if ((d[a] < 0 ? -d[a] : d[a]) > dmax) begin kz = a; dmax = (d[a] < 0 ? -d[a] : d[a]); end
        kx = (kz + 1) % 3; ky = (kx + 1) % 3;
        if (d[kz] < 0) begin tmp = kx; kx = ky; ky = tmp; end
        for (int a = 0; a < 3; a++) t.opnd[a] = r2f(o[a]);
        t.opnd[8]  = r2f(d[kx] / d[kz]);
        t.opnd[9]  = r2f(d[ky] / d[kz]);
        t.opnd[10] = r2f(1.0 / d[kz]);
        t.opnd[11] = {26'd0, 2'(kz), 2'(ky), 2'(kx)};
        begin
          real s, ctr;
          s = rr(-2.0, 8.0);
          for (int i = 0; i < 3; i++)
            for (int a = 0; a < 3; a++) begin
              ctr = o[a] + s * d[a];
              t.node[3*i+a] = r2f(ctr + rr(-1.5, 1.5));
            end
        end
        t.node[9] = $urandom;
        t.node[NODE_TYPE_WORD] = NODE_TYPE_TRI;
      end
      MODE_EUCLID:
        for (int i = 0; i < 16; i++) begin
          t.opnd[i] = frand(-4, 4);
          t.node[i] = frand(-4, 4);
        end
      MODE_ANGULAR:
        for (int i = 0; i < 8; i++) begin
          t.opnd[i] = frand(-4, 4);
          t.node[i] = frand(-4, 4);
        end
      default: begin
        word_t base;
        base = fpos(0, 3);
        for (int j = 0; j < 36; j++) t.node[j] = fadd(base, r2f(real'(j)));
        t.opnd[0] = r2f(f2r(base) + rr(-2.0, 40.0));
        t.opnd[1] = 32'($urandom % 37);
      end
    endcase
    return t;
  endfunction


  // result words of one thread; hit reports a box or triangle hit
  function automatic void ref_thread(input dp_in_t t, output word_t res [4], output logic hit);
    int hits;
    hit = 1'b0;
    for (int i = 0; i < 4; i++) res[i] = '0;
    case (t.mode)
      MODE_BOX: begin
        model_box(t, res, hits);
        hit = (hits > 0);
      end
      MODE_TRI: begin
        model_tri(t, res);
        hit = res[0][0];
      end
      MODE_EUCLID: begin
        word_t sq [16], s3 [8], s5 [4], s7 [2], s8, s9;
        for (int i = 0; i < 16; i++) sq[i] = fmul(fsub(t.opnd[i], t.node[i]), fsub(t.opnd[i], t.node[i]));
        for (int i = 0; i < 8; i++) s3[i] = fadd(sq[2*i], sq[2*i+1]);
        for (int i = 0; i < 4; i++) s5[i] = fadd(s3[2*i], s3[2*i+1]);
        for (int i = 0; i < 2; i++) s7[i] = fadd(s5[2*i], s5[2*i+1]);
        s8 = fadd(s7[0], s7[1]);
        s9 = fadd(s8, m_acc_e[t.lane]);
        m_acc_e[t.lane] = t.acc ? s9 : FP_ZERO;
        res[0] = s9;
      end
      MODE_ANGULAR: begin
        word_t p [8], n [8], d3 [4], n3 [4], d5 [2], n5 [2], d7, n7;
        for (int i = 0; i < 8; i++) begin
          p[i] = fmul(t.opnd[i], t.node[i]);
          n[i] = fmul(t.node[i], t.node[i]);
        end
        for (int i = 0; i < 4; i++) begin d3[i] = fadd(p[2*i], p[2*i+1]); n3[i] = fadd(n[2*i], n[2*i+1]); end
        for (int i = 0; i < 2; i++) begin d5[i] = fadd(d3[2*i], d3[2*i+1]); n5[i] = fadd(n3[2*i], n3[2*i+1]); end
        d7 = fadd(d5[0], d5[1]);
        n7 = fadd(n5[0], n5[1]);
        res[0] = fadd(d7, m_acc_d[t.lane]);
        res[1] = fadd(n7, m_acc_n[t.lane]);
        m_acc_d[t.lane] = t.acc ? res[0] : FP_ZERO;
        m_acc_n[t.lane] = t.acc ? res[1] : FP_ZERO;
      end
      default: begin
        logic [35:0] bits;
        for (int j = 0; j < 36; j++)
          bits[j] = (j < int'(t.opnd[1])) && !flt(t.opnd[0], t.node[j]);
        res[0] = bits[31:0];
        res[1] = {28'd0, bits[35:32]};
      end
    endcase
  endfunction

endpackage
