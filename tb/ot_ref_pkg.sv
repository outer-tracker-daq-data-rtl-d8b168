// ot_ref_pkg: reference model of the OT TELL1 output format, used by the
// testbenches, plus random stimulus generators.
//
// The model builds the expected 32-bit words of every bank from the field
// tables of the format (bit positions written out one field at a time), in
// a style independent of the RTL: it appends to queues instead of selecting
// words by index, and computes lengths by counting the words it produced.
package ot_ref_pkg;
  import ot_pkg::*;

  typedef logic [31:0] wq_t[$];

  // ------------------------------------------------------------- stimulus
  // Random OTIS fragment with a hit probability of occ_pm per mille per
  // channel; header fields consistent with the given TTC data unless the
  // corresponding `bad` bit asks for an error (0: bit19, 1: BX, 2: evcnt,
  // 3: OTIS ID, 4: status flags).
  function automatic otis_frag_t rand_otis(int occ_pm, int otis_pos, ttc_t t, logic [4:0] bad);
    otis_frag_t f;
    for (int c = 0; c < 32; c++) begin
      f.data[c] = 8'($urandom);
      f.hit[c]  = ($urandom_range(999) < occ_pm);
    end
    f.hdr.reserved = 10'($urandom);
    f.hdr.otis_id  = bad[3] ? 2'(otis_pos + 1) : 2'(otis_pos);
    f.hdr.one      = ~bad[0];
    f.hdr.status   = bad[4] ? 3'($urandom_range(7, 1)) : 3'b000;
    f.hdr.evcnt    = bad[2] ? ~t.l0_evid[7:0] : t.l0_evid[7:0];
    f.hdr.bx       = bad[1] ? ~t.bx[7:0] : t.bx[7:0];
    return f;
  endfunction

  function automatic link_frag_t rand_link(int occ_pm, ttc_t t, logic [4:0] bad);
    link_frag_t l;
    for (int o = 0; o < 4; o++) l[o] = rand_otis(occ_pm, o, t, (o == 2) ? bad : 5'b0);
    return l;
  endfunction

  function automatic link_status_t rand_stat(int err_pm);
    link_status_t s;
    s = '0;
    if ($urandom_range(999) < err_pm) begin
      case ($urandom_range(8))
        0: s.buf_full = 1'b1;
        1: s.buf_empty = 1'b1;
        2: s.size_err = 1'b1;
        3: s.tlk_err = 1'b1;
        4: s.golid_ne = 1'b1;
        5: s.clk_inactive = 1'b1;
        6: s.exp_id_wrong = 4'($urandom_range(15, 1));
        7: s.offline = 4'($urandom_range(15, 1));
        default: s.offline_zero = 4'($urandom_range(15, 1));
      endcase
    end
    return s;
  endfunction

  // ---------------------------------------------------------------- model
  function automatic int nhits_link(link_frag_t l);
    int n = 0;
    for (int o = 0; o < 4; o++) for (int c = 0; c < 32; c++) n += int'(l[o].hit[c]);
    return n;
  endfunction

  function automatic logic link_on(cfg_t cfg, int l);
    return cfg.link_en[l] && cfg.pp_en[l / 6];
  endfunction

  // GOL data block (Tab. 2, 4, 5).
  function automatic wq_t gol_block(link_frag_t l, logic zs, logic [9:0] id, logic ok);
    wq_t q;
    logic [31:0] h;
    logic [15:0] hw[$];
    int n = nhits_link(l);
    h = '0;
    h[31:24] = 8'(n);
    h[23]    = ok;
    h[22]    = zs;
    h[21:19] = l[3].hdr.status;
    h[18:16] = l[2].hdr.status;
    h[15:13] = l[1].hdr.status;
    h[12:10] = l[0].hdr.status;
    h[9:0]   = id;
    q.push_back(h);
    if (n == 0) return q;
    if (zs) begin
      for (int o = 0; o < 4; o++)
        for (int c = 0; c < 32; c++)
          if (l[o].hit[c]) begin
            logic [15:0] w;
            w[15]    = 1'b1;
            w[14:13] = 2'(o);
            w[12:8]  = 5'(c);
            w[7:0]   = l[o].data[c];
            hw.push_back(w);
          end
      if (hw.size() % 2 == 1) hw.push_back(16'h0000);
      for (int i = 0; i < hw.size(); i += 2) q.push_back({hw[i+1], hw[i]});
    end else begin
      for (int o = 0; o < 4; o++) q.push_back(l[o].hit);
    end
    return q;
  endfunction

  function automatic logic [7:0] otis_byte(otis_frag_t f, int k);
    logic [31:0] h = f.hdr;
    if (k < 4) return h[8*k +: 8];
    return f.data[k-4];
  endfunction

  // Event information W1..W17 of PP p (Fig. 8, Tab. 6); also returns the
  // PP's error flag and enabled GOL count.
  function automatic wq_t evinfo(cfg_t cfg, link_frag_t lk[24], link_status_t st[24],
                                 ttc_t t, int p, logic gen_err, logic raw,
                                 output logic pp_err, output int ngol);
    wq_t q;
    logic [31:0] w1, w3, w4, w5;
    logic [15:0] os[24];
    logic err = 0;
    ngol = 0;
    w4 = '0; w5 = '0;
    w4[31:30] = 2'(p);
    for (int i = 0; i < 6; i++) begin
      int l = 6*p + i;
      logic on = link_on(cfg, l);
      if (on) begin
        ngol++;
        w4[24+i] = st[l].buf_full;
        w4[18+i] = st[l].buf_empty;
        w4[12+i] = st[l].size_err;
        w4[6+i]  = st[l].tlk_err;
        w4[i]    = st[l].golid_ne;
        w5[6+i]  = st[l].clk_inactive;
        w5[12+i] = (nhits_link(lk[l]) > 0);
        err |= st[l].buf_full | st[l].buf_empty | st[l].size_err | st[l].tlk_err
             | st[l].golid_ne | st[l].clk_inactive;
      end
      w5[i] = !on;
      for (int o = 0; o < 4; o++) begin
        logic [15:0] s = '0;
        if (!on) s[12] = 1'b1;
        else begin
          int nh = 0;
          for (int c = 0; c < 32; c++) nh += int'(lk[l][o].hit[c]);
          s[13] = (lk[l][o].hdr.one != 1'b1);
          s[11] = (lk[l][o].hdr.bx != t.bx[7:0]);
          s[10] = (lk[l][o].hdr.evcnt != t.l0_evid[7:0]);
          s[9]  = (lk[l][o].hdr.otis_id != 2'(o));
          s[8]  = st[l].exp_id_wrong[o];
          s[7]  = st[l].offline[o];
          s[6]  = st[l].offline_zero[o];
          s[5:0] = 6'(nh);
          if (s[13:6] != 0 || lk[l][o].hdr.status != 0) err = 1'b1;
        end
        os[4*i+o] = s;
      end
    end
    pp_err = cfg.pp_en[p] && err;
    w1 = '0;
    w1[31] = gen_err;
    w1[30] = cfg.datagen_en;
    w1[29] = t.ecs_trig;
    w1[23:21] = t.trig_type;
    w1[20:16] = {1'b0, raw, 3'b111};
    w1[15:12] = 4'h3;
    w1[11:0]  = t.bx;
    w3 = '0;
    w3[27:25] = t.trig_type;
    w3[24]    = pp_err;
    w3[23:16] = t.bx[7:0];
    w3[15:0]  = 16'(ngol);
    q.push_back(w1);
    q.push_back(t.l0_evid);
    q.push_back(w3);
    q.push_back(w4);
    q.push_back(w5);
    for (int j = 0; j < 12; j++) q.push_back({os[2*j+1], os[2*j]});
    return q;
  endfunction

  // RAW-bank block of one PP (Fig. 6, 7).
  function automatic wq_t raw_pp(link_frag_t lk[24], int p, wq_t info);
    wq_t q;
    for (int half = 0; half < 2; half++)
      for (int k = 0; k < 36; k++)
        for (int pr = 0; pr < 3; pr++) begin
          link_frag_t le = lk[6*p + 2*pr];
          link_frag_t lo = lk[6*p + 2*pr + 1];
          q.push_back({otis_byte(lo[half + 2], k), otis_byte(lo[half], k),
                       otis_byte(le[half + 2], k), otis_byte(le[half], k)});
        end
    foreach (info[i]) q.push_back(info[i]);
    return q;
  endfunction

  // Error-bank section of one PP (Fig. 9, Tab. 7).
  function automatic wq_t err_pp(wq_t info, logic pp_en, logic pp_err, int proc_bytes, logic raw);
    wq_t q;
    q.push_back(info[0]);
    q.push_back(info[1]);
    q.push_back({16'(proc_bytes), 16'h0000});
    q.push_back(info[2]);
    q.push_back({(pp_en && pp_err) ? 16'h0038 : 16'h0000, 16'h8E00});
    if (pp_en && pp_err) for (int i = 3; i < 17; i++) q.push_back(info[i]);
    q.push_back({16'(proc_bytes), 16'h8E01});
    q.push_back(32'h0000_8E02);
    if (raw) q.push_back({pp_en ? 16'h03A4 : 16'h0000, 16'h8E03});
    return q;
  endfunction

  // Whole event: processed, RAW and error banks.
  function automatic wq_t event_words(cfg_t cfg, link_frag_t lk[24], link_status_t st[24],
                                      ttc_t t, output logic raw, output logic errb);
    wq_t q, gols, body;
    wq_t info[4];
    logic pe[4];
    int ng[4];
    int ppb[4];
    logic gen_err = 0;
    int ngol = 0;
    raw = cfg.force_raw || (t.trig_type == 3'h5);
    // first pass for the error flags
    for (int p = 0; p < 4; p++) begin
      info[p] = evinfo(cfg, lk, st, t, p, 1'b0, raw, pe[p], ng[p]);
      gen_err |= pe[p];
      ngol += ng[p];
    end
    for (int p = 0; p < 4; p++) info[p] = evinfo(cfg, lk, st, t, p, gen_err, raw, pe[p], ng[p]);
    errb = cfg.force_info || gen_err;
    for (int p = 0; p < 4; p++) begin
      int n_prev = gols.size();
      for (int i = 0; i < 6; i++) begin
        int l = 6*p + i;
        if (link_on(cfg, l)) begin
          wq_t g = gol_block(lk[l], cfg.zs_mode[l], cfg.gol_id[l],
                             !(st[l].tlk_err || st[l].clk_inactive));
          foreach (g[j]) gols.push_back(g[j]);
        end
      end
      ppb[p] = 4 * (gols.size() - n_prev);
    end
    q.push_back({16'(4 * (3 + gols.size())), 16'hCBCB});
    q.push_back({cfg.source_id, cfg.version, cfg.type_proc});
    q.push_back({4'h0, t.trig_type, gen_err, t.bx[7:0], 16'(ngol)});
    foreach (gols[j]) q.push_back(gols[j]);
    if (raw) begin
      body = {};
      for (int p = 0; p < 4; p++)
        if (cfg.pp_en[p]) begin
          wq_t r = raw_pp(lk, p, info[p]);
          foreach (r[j]) body.push_back(r[j]);
        end
      q.push_back({16'(4 * (2 + body.size())), 16'hCBCB});
      q.push_back({cfg.source_id, cfg.version, cfg.type_raw});
      foreach (body[j]) q.push_back(body[j]);
    end
    if (errb) begin
      body = {};
      for (int p = 0; p < 4; p++) begin
        wq_t e = err_pp(info[p], cfg.pp_en[p], pe[p], ppb[p], raw);
        foreach (e[j]) body.push_back(e[j]);
      end
      q.push_back({16'(4 * (2 + body.size())), 16'hCBCB});
      q.push_back({cfg.source_id, cfg.version, cfg.type_err});
      foreach (body[j]) q.push_back(body[j]);
    end
    return q;
  endfunction

  // MEP packing: `factor` events per MEP, or fewer when the next event would
  // take the MEP beyond 16383 words.  Returns the MEPs and how many of them
  // closed early.
  function automatic void mep_pack(wq_t evs[$], logic [31:0] ids[$], int factor,
                                   logic [31:0] partition, ref wq_t meps[$], output int n_early);
    int i = 0;
    n_early = 0;
    while (i < evs.size()) begin
      wq_t m;
      int nev, words;
      logic [31:0] first;
      nev = 0; words = 3; first = ids[i];
      m = {};
      while (i < evs.size() && nev < factor &&
             (nev == 0 || words + 1 + evs[i].size() <= 16383)) begin
        m.push_back({16'(4 * evs[i].size()), ids[i][15:0]});
        foreach (evs[i][j]) m.push_back(evs[i][j]);
        words += 1 + evs[i].size();
        nev++;
        i++;
      end
      if (nev < factor && i < evs.size()) n_early++;
      m.push_front(partition);
      m.push_front({16'(4 * words), 16'(nev)});
      m.push_front(first);
      meps.push_back(m);
    end
  endfunction

  // Default configuration of the note's example board: 9 links on PP0/PP1.
  function automatic cfg_t default_cfg();
    cfg_t c;
    c = '0;
    c.pp_en        = 4'b0011;
    c.link_en      = 24'h0001FF;
    c.zs_mode      = '1;
    for (int l = 0; l < 24; l++) c.gol_id[l] = 10'(12'h100 + l);
    c.source_id    = 16'h0011;
    c.version      = 8'h01;
    c.type_proc    = 8'h0C;
    c.type_raw     = 8'h20;
    c.type_err     = 8'h21;
    c.mep_factor   = 6'd12;
    c.partition_id = 32'hEDED1D1D;
    return c;
  endfunction

endpackage
