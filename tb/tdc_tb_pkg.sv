// tdc_tb_pkg: testbench model shared by the multi-channel tests.
//
// tdc_stim generates random pulses on each channel (normal, shorter than one
// clock, and optionally too long for the pairing timeout), turns them into tap
// words (tap i of the word captured at cycle k sees the input at time
// k*T - i, in tap units) and predicts the merged output stream:
//   * a pulse gives one hit word: leading time (capture cycle mod frame
//     length, fine = t - (k-1)*T - 1), TOT = width in taps, channel number;
//   * it belongs to the frame of its trailing-edge capture cycle;
//   * it is removed if the TOT window was on two cycles after that capture
//     and cut it, or if the event gate was closed three cycles after it;
//   * too-long pulses give no hit.
// The checker takes the output words in order and compares, per frame and
// per channel, the hit words with the prediction (channel order kept, frames
// not mixed); a delimiter must close each frame with the right number. In a
// frame whose delimiter carries the overflow flag, missing hits are allowed
// and counted; elsewhere every predicted hit must be there.
package tdc_tb_pkg;
  import str_tdc_pkg::*;

  class tdc_stim;
    int T, nch, fr, ch_base, max_cycles;
    int le [][$], te [][$];
    int ptr [];
    bit tot_en_h [int], gate_h [int];
    int tot_min, tot_max;
    // checker state
    int miss_f, cur_f, nhits, nmiss, nframes, nflag_ovf, nerr, nshort, nlong;
    int exp_q [][$];
    int exp_f;

    function new(int T, int nch, int fr, int ch_base, int max_cycles);
      this.T = T; this.nch = nch; this.fr = fr; this.ch_base = ch_base;
      this.max_cycles = max_cycles;
      le = new[nch]; te = new[nch]; ptr = new[nch]; exp_q = new[nch];
      miss_f = 0; cur_f = 0; exp_f = -1; nhits = 0; nmiss = 0; nframes = 0; nflag_ovf = 0; nerr = 0;
      nshort = 0; nlong = 0;
    endfunction

    function int cyc_of(int t); return (t + T - 1) / T; endfunction
    function int fine_of(int t); return t - (cyc_of(t) - 1) * T - 1; endfunction

    // mean_gap in cycles; pulses until cycle last
    function void gen(int first, int last, int mean_gap, bit with_long);
      for (int c = 0; c < nch; c++) begin
        int t, w, r;
        t = first * T + $urandom % (mean_gap * T);
        while (cyc_of(t) < last) begin
          r = $urandom % 16;
          if (r == 0) begin w = 1 + $urandom % (T - 1); nshort++; end
          else if (r == 1 && with_long) begin w = (max_cycles + 4) * T + $urandom % T; nlong++; end
          else w = T + $urandom % (8 * T);
          if (cyc_of(t + w) >= last) break;
          le[c].push_back(t); te[c].push_back(t + w);
          t = t + w + T + 1 + $urandom % (2 * mean_gap * T);
        end
        ptr[c] = 0;
      end
    endfunction

    // tap word of channel c at capture cycle k (bit i = input at k*T - i)
    function bit [255:0] taps(int c, int k);
      bit [255:0] v, ones;
      int t0, t1, lo, hi;
      v = '0;
      ones = '1;
      t0 = k * T - T + 1;     // oldest sample time of the word
      t1 = k * T;             // newest sample time
      while (ptr[c] < te[c].size() && te[c][ptr[c]] <= t0) ptr[c]++;
      for (int p = ptr[c]; p < ptr[c] + 2 && p < te[c].size(); p++) begin
        if (le[c][p] > t1 || te[c][p] <= t0) continue;
        lo = (le[c][p] > t0) ? le[c][p] : t0;        // first high sample time
        hi = (te[c][p] - 1 < t1) ? te[c][p] - 1 : t1; // last high sample time
        // sample time s sits at bit t1 - s
        v |= (ones >> (255 - (t1 - lo))) & (ones << (t1 - hi));
      end
      return v;
    endfunction

    // record run control seen by the channels at cycle k
    function void note(int k, bit tot_en, bit gate);
      tot_en_h[k] = tot_en; gate_h[k] = gate;
    endfunction

    function word_t word_of(int c, int p);
      hit_word_t h;
      h = '0; h.kind = KIND_HIT; h.ch = CH_W'(ch_base + c); h.tot = TOT_W'(te[c][p] - le[c][p]);
      h.coarse = HB_W'(cyc_of(le[c][p]) % fr); h.fine = FINE_W'(fine_of(le[c][p]));
      return word_t'(h);
    endfunction

    // decided only once the run control of the pulse's cycles has been noted
    function bit kept(int c, int p);
      int kle, kte, w;
      kle = cyc_of(le[c][p]); kte = cyc_of(te[c][p]); w = te[c][p] - le[c][p];
      if (kte - kle > max_cycles + 1) return 0;
      if (tot_en_h.exists(kte + 2) && tot_en_h[kte + 2] && (w < tot_min || w > tot_max)) return 0;
      if (gate_h.exists(kte + 3) && !gate_h[kte + 3]) return 0;
      return 1;
    endfunction

    function void build_expected(int f);
      for (int c = 0; c < nch; c++) begin
        exp_q[c].delete();
        for (int p = 0; p < le[c].size(); p++)
          if (cyc_of(te[c][p]) / fr == f) exp_q[c].push_back(p);
      end
      exp_f = f;
    endfunction

    // returns 0 on a mismatch
    function bit take(word_t w);
      if (exp_f != cur_f) build_expected(cur_f);
      if (is_delim(w)) begin
        delim_word_t d;
        int left;
        d = delim_word_t'(w);
        left = 0;
        for (int c = 0; c < nch; c++)
          foreach (exp_q[c][i]) if (kept(c, exp_q[c][i])) left++;
        nframes++;
        if (d.flags[FLAG_OVERFLOW]) nflag_ovf++;
        left += miss_f;
        nmiss += left;
        miss_f = 0;
        cur_f++;
        if (d.frame != FRAME_W'(cur_f - 1)) begin
          $display("FAIL: delimiter frame %0d expected %0d", d.frame, cur_f - 1); nerr++; return 0;
        end
        if (left != 0 && !d.flags[FLAG_OVERFLOW]) begin
          $display("FAIL: frame %0d closed with %0d hits missing", cur_f - 1, left); nerr++; return 0;
        end
        return 1;
      end else begin
        hit_word_t h;
        int c, n;
        h = hit_word_t'(w);
        c = int'(h.ch) - ch_base;
        if (c < 0 || c >= nch) begin $display("FAIL: bad channel %0d", h.ch); nerr++; return 0; end
        n = 0;
        while (exp_q[c].size() > 0 && word_of(c, exp_q[c][0]) != w) begin
          if (kept(c, exp_q[c][0])) n++;
          void'(exp_q[c].pop_front());
        end
        if (exp_q[c].size() == 0 || !kept(c, exp_q[c][0])) begin
          $display("FAIL: unexpected hit %h in frame %0d", w, cur_f); nerr++; return 0;
        end
        void'(exp_q[c].pop_front());
        miss_f += n;
        nhits++;
        return 1;
      end
    endfunction
  endclass

endpackage
