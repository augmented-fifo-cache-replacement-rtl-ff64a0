// sh_fifo_repl: Set-on-Hit FIFO (SH-FIFO) replacement state for a
// set-associative cache.
//
// Each set keeps a log2(WAYS)-bit FIFO victim pointer and one use bit per
// way. A hit sets the use bit of the hit way and touches nothing else. On a
// replacement the victim is the first way, searching from the pointer and
// wrapping around, whose use bit is clear; if every way has been used since
// the last miss, the victim is the way the pointer names. After the
// replacement all use bits of the set are cleared and the pointer moves to
// the way after the victim, so the block just filled is the youngest.
// Moving the pointer past the victim is read from the document's summary
// ("search for victim and set FIFO counter") and its Fig. 1(b); the exact
// new value is this design's reading.
//
// Lock-down: ways below lock_base are never chosen; the pointer wraps from the
// last way to lock_base, and a stored pointer below lock_base is read as
// lock_base. lock_base = 0 locks nothing.
//
// Interface and timing: as mh_fifo_repl. set_idx selects the set; victim_way
// is combinational; a hit or fill pulse updates the state on the next rising
// clock edge. Active-low synchronous reset clears pointers and use bits.
module sh_fifo_repl #(
  parameter int unsigned NSETS = 8,
  parameter int unsigned WAYS  = 32,
  localparam int unsigned LW   = $clog2(WAYS),
  localparam int unsigned SW   = (NSETS > 1) ? $clog2(NSETS) : 1
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

  logic [LW-1:0]   ptr      [NSETS];
  logic [WAYS-1:0] use_bits [NSETS];

  logic [LW-1:0]   cur;
  logic [WAYS-1:0] unlocked;
  logic [WAYS-1:0] cand;
  logic            cand_found;
  logic [LW-1:0]   cand_way;
  logic [LW-1:0]   next_ptr;

  always_comb begin
    cur = (ptr[set_idx] < lock_base) ? lock_base : ptr[set_idx];
    for (int w = 0; w < WAYS; w++) unlocked[w] = (LW'(w) >= lock_base);
    cand = unlocked & ~use_bits[set_idx];
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
        ptr[s]      <= '0;
        use_bits[s] <= '0;
      end
    end else if (fill) begin
      ptr[set_idx]      <= next_ptr;
      use_bits[set_idx] <= '0;
    end else if (hit) begin
      use_bits[set_idx][hit_way] <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(hit && fill))
    else $error("sh_fifo_repl: hit and fill in the same cycle");

endmodule
