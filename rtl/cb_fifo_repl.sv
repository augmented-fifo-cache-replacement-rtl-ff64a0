// cb_fifo_repl: Counter-Based FIFO (CB-FIFO) replacement state for a
// set-associative cache.
//
// Each set keeps a log2(WAYS)-bit FIFO victim pointer and a CNT_BITS-wide
// saturating hit counter per way (two bits in the document's main
// configuration). A hit increments the counter of the hit way, holding at the
// maximum. On a replacement the ways are sorted into value groups
// (0, 1, .. 2**CNT_BITS-1) by parallel comparators; the lowest non-empty group
// is taken and, within it, the first way from the FIFO pointer on (wrapping)
// is the victim. Then every counter of the set is decremented (floor 0) or,
// with RESET_ON_MISS = 1, cleared; the filled way's counter starts at 0; and
// the pointer moves to the way after the victim. The document names
// decrementing as the better of the two on average, so it is the default.
// Taking the first way from the pointer within the smallest group, the
// fresh block's count of 0 and the new pointer value are this design's
// reading of the document's Fig. 1(c) and its "search for victim and set FIFO
// counter" summary.
//
// Lock-down: ways below lock_base are never chosen; the pointer wraps from the
// last way to lock_base, and a stored pointer below lock_base is read as
// lock_base. lock_base = 0 locks nothing.
//
// Interface and timing: as mh_fifo_repl. set_idx selects the set; victim_way
// is combinational; a hit or fill pulse updates the state on the next rising
// clock edge. Active-low synchronous reset clears pointers and counters.
module cb_fifo_repl #(
  parameter int unsigned NSETS         = 8,
  parameter int unsigned WAYS          = 32,
  parameter int unsigned CNT_BITS      = 2,
  parameter bit          RESET_ON_MISS = 1'b0,
  localparam int unsigned LW           = $clog2(WAYS),
  localparam int unsigned SW           = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned NLEVELS      = 1 << CNT_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] lock_base,
  input  logic [SW-1:0] set_idx,
  input  logic          hit,
  input  logic [LW-1:0] hit_way,
  input  logic          fill,
  output logic [LW-1:0] victim_way
);

  localparam logic [CNT_BITS-1:0] CNT_MAX = '1;

  logic [LW-1:0]       ptr [NSETS];
  logic [CNT_BITS-1:0] cnt [NSETS][WAYS];

  logic [LW-1:0]   cur;
  logic [WAYS-1:0] unlocked;
  logic [WAYS-1:0] group [NLEVELS];
  logic [WAYS-1:0] cand;
  logic            cand_found;
  logic [LW-1:0]   cand_way;
  logic [LW-1:0]   next_ptr;

  always_comb begin
    cur = (ptr[set_idx] < lock_base) ? lock_base : ptr[set_idx];
    for (int w = 0; w < WAYS; w++) unlocked[w] = (LW'(w) >= lock_base);
    // Value groups: one bit per way in the group matching its counter.
    for (int v = 0; v < NLEVELS; v++) begin
      for (int w = 0; w < WAYS; w++) begin
        group[v][w] = unlocked[w] && (cnt[set_idx][w] == CNT_BITS'(v));
      end
    end
    // Lowest non-empty group wins.
    cand = '0;
    for (int v = NLEVELS - 1; v >= 0; v--) begin
      if (|group[v]) cand = group[v];
    end
  end

  victim_search #(.WAYS(WAYS)) u_search (
    .mask  (cand),
    .start (cur),
    .found (cand_found),
    .way   (cand_way)
  );

  always_comb begin
    victim_way = cand_found ? cand_way : cur;
    next_ptr   = (victim_way == LW'(WAYS - 1)) ? lock_base : victim_way + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++) begin
        ptr[s] <= '0;
        for (int w = 0; w < WAYS; w++) cnt[s][w] <= '0;
      end
    end else if (fill) begin
      ptr[set_idx] <= next_ptr;
      for (int w = 0; w < WAYS; w++) begin
        if (RESET_ON_MISS || LW'(w) == victim_way || cnt[set_idx][w] == '0)
          cnt[set_idx][w] <= '0;
        else
          cnt[set_idx][w] <= cnt[set_idx][w] - 1'b1;
      end
    end else if (hit) begin
      if (cnt[set_idx][hit_way] != CNT_MAX)
        cnt[set_idx][hit_way] <= cnt[set_idx][hit_way] + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(hit && fill))
    else $error("cb_fifo_repl: hit and fill in the same cycle");

endmodule
