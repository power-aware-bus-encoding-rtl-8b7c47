// cam_lru_table -- content-addressable value table with least-recently-used
// replacement, used as both the FV (frequent value) table and the MSB table of
// the FV-i-MSB-j codec.
//
// Function. The table holds N entries of W bits. A search port compares
// search_key with every valid entry in parallel, the job of a row of CAM
// cells, and reports a hit and the slot that matched. A read port returns the
// entry at a given slot; the decoder uses it to turn a received one-hot code
// back into a value. One update per clock keeps the contents current: with
// upd_hit set the slot upd_idx is marked most recently used; with upd_hit
// clear, upd_data is written into the least recently used slot, which then
// becomes the most recently used. Because the encoder and the decoder apply
// the same update sequence to their own copies, the two copies stay equal.
//
// Timestamps. Each entry keeps an age of $clog2(N) bits. The ages are always a
// permutation of 0..N-1: 0 is the newest entry, N-1 the oldest. On a use of an
// entry of age a, every entry younger than a ages by one and the used entry
// gets age 0, so the replacement victim is simply the entry whose age is N-1.
// Reset gives slot s age N-1-s and clears every valid bit, so empty slots are
// filled in order 0, 1, 2, ... before any valid entry is evicted. The original
// scheme names timestamps as a codec component but not their form; the
// exact-LRU age permutation is this design's choice.
//
// Timing. Search and read are combinational. Updates take effect at the rising
// clock edge when upd_en is high. Reset is active-low and synchronous.
module cam_lru_table #(
  parameter int unsigned W     = 32,
  parameter int unsigned N     = 32,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // search (CAM match)
  input  logic [W-1:0]     search_key,
  output logic             search_hit,
  output logic [IDX_W-1:0] search_idx,
  // read by slot
  input  logic [IDX_W-1:0] rd_idx,
  output logic [W-1:0]     rd_data,
  output logic             rd_valid,
  // update
  input  logic             upd_en,
  input  logic             upd_hit,
  input  logic [IDX_W-1:0] upd_idx,
  input  logic [W-1:0]     upd_data
);

  logic [W-1:0]     tag   [N];
  logic [N-1:0]     valid;
  logic [IDX_W-1:0] age   [N];

  // ---- search ---------------------------------------------------------
  logic [N-1:0] match;
  always_comb begin
    for (int s = 0; s < N; s++) match[s] = valid[s] && (tag[s] == search_key);
  end

  always_comb begin
    search_hit = |match;
    search_idx = '0;
    for (int s = 0; s < N; s++)
      if (match[s]) search_idx = IDX_W'(s);
  end

  // ---- read -----------------------------------------------------------
  always_comb begin
    rd_data  = '0;
    rd_valid = 1'b0;
    for (int s = 0; s < N; s++)
      if (rd_idx == IDX_W'(s)) begin
        rd_data  = tag[s];
        rd_valid = valid[s];
      end
  end

  // ---- replacement victim: the entry whose age is N-1 -------------------
  logic [IDX_W-1:0] victim;
  always_comb begin
    victim = '0;
    for (int s = 0; s < N; s++)
      if (age[s] == IDX_W'(N - 1)) victim = IDX_W'(s);
  end

  logic [IDX_W-1:0] used;      // slot touched by this update
  assign used = upd_hit ? upd_idx : victim;

  logic [IDX_W-1:0] used_age;
  always_comb begin
    used_age = '0;
    for (int s = 0; s < N; s++)
      if (used == IDX_W'(s)) used_age = age[s];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      for (int s = 0; s < N; s++) begin
        age[s] <= IDX_W'(N - 1 - s);
        tag[s] <= '0;
      end
    end else if (upd_en) begin
      for (int s = 0; s < N; s++) begin
        if (used == IDX_W'(s)) begin
          age[s] <= '0;
          if (!upd_hit) begin
            tag[s]   <= upd_data;
            valid[s] <= 1'b1;
          end
        end else if (age[s] < used_age) begin
          age[s] <= age[s] + 1'b1;
        end
      end
    end
  end

  // At most one entry may match: a value is only inserted after a miss.
  a_unique_match: assert property (@(posedge clk) disable iff (!rst_n)
                                   $onehot0(match))
    else $error("cam_lru_table: more than one entry matches the key");
  // An update that claims a hit must name a valid slot.
  a_hit_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                upd_en && upd_hit |-> valid[upd_idx])
    else $error("cam_lru_table: hit update on an empty slot");

endmodule
