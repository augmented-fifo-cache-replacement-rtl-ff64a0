// wb_buffer: write-back buffer between a write-back cache and its memory bus.
//
// Dirty lines the cache evicts are queued here, in order, so that the miss
// that evicted them can fetch its own line first; the memory port drains the
// buffer when it has nothing better to do. The document gives only its size
// (four entries); the FIFO organisation, the handshake and the address check
// are this design's.
//
// Ports:
//   push, push_addr, push_data   enqueue a line (push only when !full)
//   full, empty
//   head_addr, head_data         oldest entry, valid when !empty
//   pop                          drop the oldest entry (only when !empty)
//   chk_addr -> chk_hit          high if any queued entry holds line chk_addr;
//                                the cache must not fetch such a line from
//                                memory before the buffer has written it
// push and pop act at the rising clock edge and may happen together.
// Active-low synchronous reset empties the buffer.
module wb_buffer #(
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned ADDR_BITS = 27,
  parameter int unsigned LINE_BITS = 256,
  localparam int unsigned PW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  logic [ADDR_BITS-1:0] push_addr,
  input  logic [LINE_BITS-1:0] push_data,
  output logic                 full,
  output logic                 empty,
  output logic [ADDR_BITS-1:0] head_addr,
  output logic [LINE_BITS-1:0] head_data,
  input  logic                 pop,
  input  logic [ADDR_BITS-1:0] chk_addr,
  output logic                 chk_hit
);

  logic [ADDR_BITS-1:0] addr_q [DEPTH];
  logic [LINE_BITS-1:0] data_q [DEPTH];
  logic [DEPTH-1:0]     vld_q;
  logic [PW-1:0]        wr_ptr, rd_ptr;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    full      = &vld_q;
    empty     = ~|vld_q;
    head_addr = addr_q[rd_ptr];
    head_data = data_q[rd_ptr];
    chk_hit   = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (vld_q[i] && addr_q[i] == chk_addr) chk_hit = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_q  <= '0;
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (pop) begin
        vld_q[rd_ptr] <= 1'b0;
        rd_ptr        <= incr(rd_ptr);
      end
      if (push) begin
        addr_q[wr_ptr] <= push_addr;
        data_q[wr_ptr] <= push_data;
        vld_q[wr_ptr]  <= 1'b1;
        wr_ptr         <= incr(wr_ptr);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("wb_buffer: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("wb_buffer: pop while empty");

endmodule
