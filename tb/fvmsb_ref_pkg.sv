// fvmsb_ref_pkg -- reference model of the FV-i-MSB-j encoder, written apart
// from the RTL for the testbenches to compare against.
//
// lru_table keeps each table as an array of slots plus a recency list of slot
// numbers, most recent first. A miss writes the slot at the tail of the list;
// any use moves a slot to the head. After reset the list runs N-1, N-2, ..., 0,
// so slots fill in the order 0, 1, 2, ...
// fvmsb_model applies the encoder's rules (FV hit first, then MSB hit, else
// unencoded; MSB table updated only when the FV table missed; with use_msb
// clear there is no MSB table, as in plain FV-i) and also
// produces the correlated bus value.
package fvmsb_ref_pkg;

  class lru_table;
    int unsigned n;
    logic [31:0] tag[];
    bit          valid[];
    int unsigned order[$];   // most recently used first
    int unsigned evictions;

    function new(int unsigned entries);
      n = entries;
      tag = new[n];
      valid = new[n];
      reset();
    endfunction

    function void reset();
      order.delete();
      for (int s = n - 1; s >= 0; s--) order.push_back(s);
      foreach (valid[s]) begin valid[s] = 0; tag[s] = '0; end
      evictions = 0;
    endfunction

    function bit lookup(logic [31:0] key, output int unsigned slot);
      foreach (tag[s]) if (valid[s] && tag[s] == key) begin slot = s; return 1; end
      slot = 0;
      return 0;
    endfunction

    function void touch(int unsigned slot);
      foreach (order[p]) if (order[p] == slot) begin order.delete(p); break; end
      order.push_front(slot);
    endfunction

    // record a use of key: hit -> touch, miss -> replace the LRU slot
    function void update(bit hit, int unsigned slot, logic [31:0] key);
      int unsigned v;
      if (hit) touch(slot);
      else begin
        v = order[$];
        if (valid[v]) evictions++;
        tag[v] = key;
        valid[v] = 1;
        touch(v);
      end
    endfunction
  endclass

  class fvmsb_model;
    int unsigned data_w, msb_w, lsb_w;
    lru_table    fv, msb;
    logic [31:0] bus;
    bit          msb_en;

    function new(int unsigned dw, int unsigned mw, int unsigned i, int unsigned j,
                 bit use_msb = 1);
      data_w = dw; msb_w = mw; lsb_w = dw - mw; msb_en = use_msb;
      fv  = new(dw << i);
      msb = new(mw << j);
      bus = '0;
    endfunction

    function void reset();
      fv.reset(); msb.reset(); bus = '0;
    endfunction

    // mode: 0 raw, 1 FV, 2 MSB (matches fvmsb_pkg::enc_mode_e)
    function void encode(logic [31:0] data, output logic [31:0] code,
                         output int unsigned mode, output int unsigned bank);
      int unsigned fs, ms;
      bit fh, mh;
      logic [31:0] hi, lo_mask;
      lo_mask = (lsb_w == 0) ? '0 : ((32'd1 << lsb_w) - 1);
      hi = data >> lsb_w;
      fh = fv.lookup(data, fs);
      mh = msb_en && msb.lookup(hi, ms);
      if (fh) begin
        code = 32'd1 << (fs % data_w); mode = 1; bank = fs / data_w;
      end else if (mh) begin
        code = ((32'd1 << (ms % msb_w)) << lsb_w) | (data & lo_mask);
        mode = 2; bank = ms / msb_w;
      end else begin
        code = data; mode = 0; bank = 0;
      end
      fv.update(fh, fs, data);
      if (!fh && msb_en) msb.update(mh, ms, hi);
      bus = bus ^ code;
    endfunction
  endclass

  // Synthetic bus trace: a skewed pool of frequent words larger than the FV
  // table, a skewed pool of frequent upper parts larger than the MSB table
  // (with random lower bits), and fully random words.
  class trace_gen;
    logic [31:0] words[160];
    logic [31:0] uppers[100];
    int unsigned msb_w;

    function new(int unsigned mw);
      msb_w = mw;
      foreach (words[k])  words[k]  = $urandom;
      foreach (uppers[k]) uppers[k] = $urandom;
    endfunction

    function logic [31:0] next();
      int unsigned r, k;
      logic [31:0] lo_mask;
      lo_mask = (msb_w >= 32) ? '0 : ((32'd1 << (32 - msb_w)) - 1);
      r = $urandom_range(0, 99);
      if (r < 55) begin
        k = $urandom_range(0, $urandom_range(0, 159));
        return words[k];
      end else if (r < 85) begin
        k = $urandom_range(0, $urandom_range(0, 99));
        return (uppers[k] & ~lo_mask) | ($urandom & lo_mask);
      end
      return $urandom;
    endfunction
  endclass

endpackage
