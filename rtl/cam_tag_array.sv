// cam_tag_array: tag store of a highly set-associative cache, organised as a
// content-addressable memory (CAM) per set.
//
// For the set named by set_idx, the lookup tag is compared with the stored
// tag of every way in parallel; a valid way whose tag matches raises hit and
// its number is given on hit_way. This is the CAM-tag organisation that
// highly associative low-power caches use; the document names it but does not
// describe its circuit, so it is written here as plain registers and
// comparators. Each way also holds a valid bit and a dirty bit for the
// write-back cache around it.
//
// Ports (all for the set set_idx):
//   lookup_tag -> hit, hit_way            combinational match
//   vic_way    -> vic_valid, vic_dirty, vic_tag   combinational read of one way
//   fill_en, fill_way, fill_tag, fill_dirty       write a way: tag, valid=1, dirty
//   mark_dirty_en, mark_dirty_way                 set the dirty bit of a way
// Writes take effect at the rising clock edge. Active-low synchronous reset
// clears all valid and dirty bits. A fill and a dirty mark to the same way in
// one cycle: the fill wins.
module cam_tag_array #(
  parameter int unsigned NSETS    = 8,
  parameter int unsigned WAYS     = 32,
  parameter int unsigned TAG_BITS = 24,
  localparam int unsigned LW      = $clog2(WAYS),
  localparam int unsigned SW      = (NSETS > 1) ? $clog2(NSETS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SW-1:0]       set_idx,
  input  logic [TAG_BITS-1:0] lookup_tag,
  output logic                hit,
  output logic [LW-1:0]       hit_way,
  input  logic [LW-1:0]       vic_way,
  output logic                vic_valid,
  output logic                vic_dirty,
  output logic [TAG_BITS-1:0] vic_tag,
  input  logic                fill_en,
  input  logic [LW-1:0]       fill_way,
  input  logic [TAG_BITS-1:0] fill_tag,
  input  logic                fill_dirty,
  input  logic                mark_dirty_en,
  input  logic [LW-1:0]       mark_dirty_way
);

  logic [TAG_BITS-1:0] tags  [NSETS][WAYS];
  logic [WAYS-1:0]     valid [NSETS];
  logic [WAYS-1:0]     dirty [NSETS];
  logic [WAYS-1:0]     match;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      match[w] = valid[set_idx][w] && (tags[set_idx][w] == lookup_tag);
    end
    hit     = |match;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (match[w]) hit_way = hit_way | LW'(w);
    end
    vic_valid = valid[set_idx][vic_way];
    vic_dirty = dirty[set_idx][vic_way];
    vic_tag   = tags[set_idx][vic_way];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
      end
    end else begin
      if (mark_dirty_en) dirty[set_idx][mark_dirty_way] <= 1'b1;
      if (fill_en) begin
        tags[set_idx][fill_way]  <= fill_tag;
        valid[set_idx][fill_way] <= 1'b1;
        dirty[set_idx][fill_way] <= fill_dirty;
      end
    end
  end

  // Tags are data only; they need no reset (valid bits guard them).
  // A tag may live in at most one way of a set.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("cam_tag_array: tag matched in more than one way");

endmodule
