// victim_search: circular first-one finder over a way mask.
//
// Given a mask with one bit per way and a start way (the FIFO victim pointer),
// it returns the first way at or after the start, wrapping past the last way,
// whose mask bit is set. This is the search the Set-on-Hit and Counter-Based
// FIFO schemes perform on a miss ("starting from the block pointed by the FIFO
// pointer, find the first block whose use bit is not set").
//
// Implementation: the mask is rotated so that the start way lands at bit 0, a
// plain priority encoder finds the lowest set bit, and the start is added
// back modulo WAYS. WAYS must be a power of two so that the modulo is a
// truncation. When no bit is set, found is low and way equals start.
//
// Purely combinational; no clock.
module victim_search #(
  parameter int unsigned WAYS = 32,
  localparam int unsigned LW  = $clog2(WAYS)
) (
  input  logic [WAYS-1:0] mask,
  input  logic [LW-1:0]   start,
  output logic            found,
  output logic [LW-1:0]   way
);

  logic [WAYS-1:0]   rotated;
  logic [LW-1:0]     offset;

  always_comb begin
    for (int i = 0; i < WAYS; i++) rotated[i] = mask[LW'(i) + start];
    found   = |rotated;
    offset  = '0;
    for (int i = WAYS - 1; i >= 0; i--) begin
      if (rotated[i]) offset = LW'(i);
    end
    way = start + offset;
  end

endmodule
