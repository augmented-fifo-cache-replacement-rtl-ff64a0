// mh_fifo_repl: Move-on-Hit FIFO (MH-FIFO) replacement state for a
// set-associative cache.
//
// Each set keeps one log2(WAYS)-bit victim pointer, exactly as a plain FIFO
// cache does; no other state is added. The pointer names the next way to
// replace. It advances by one way on every replacement (fill) and, unlike
// plain FIFO, also when a hit lands in the very way it points at. A block
// still in use at the head of the FIFO therefore escapes eviction. The match
// of hit way against pointer is a single log2(WAYS)-bit comparator, and the
// advanced pointer value is formed from the stored state alone, before the
// hit way is known, so the hit path only adds the compare and a mux.
//
// Lock-down: ways below lock_base are locked. The pointer stays within
// [lock_base, WAYS-1]; when it would pass the last way it wraps to lock_base,
// and a stored pointer below lock_base (after lock_base was raised) is read as
// lock_base. lock_base = 0 locks nothing. The bounding of the pointer follows
// the document; the clamp of a stale pointer is this design's choice.
//
// Interface and timing: set_idx selects the set for both the victim output and
// the update. victim_way is combinational from the stored state. A one-cycle
// pulse on hit (with hit_way) or on fill (the cache replaces victim_way of
// set_idx) updates the state at the next rising clock edge, so a hit is
// handled in one cycle. hit and fill must not be high together. Active-low
// synchronous reset clears every pointer to way 0.
module mh_fifo_repl #(
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

  logic [LW-1:0] ptr [NSETS];
  logic [LW-1:0] cur;
  logic [LW-1:0] next_ptr;

  // Current pointer of the selected set, kept inside the unlocked range.
  always_comb begin
    cur        = (ptr[set_idx] < lock_base) ? lock_base : ptr[set_idx];
    victim_way = cur;
    next_ptr   = (cur == LW'(WAYS - 1)) ? lock_base : cur + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++) ptr[s] <= '0;
    end else if (fill || (hit && hit_way == cur)) begin
      ptr[set_idx] <= next_ptr;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(hit && fill))
    else $error("mh_fifo_repl: hit and fill in the same cycle");

endmodule
