// afifo_cache: highly set-associative, write-back cache with an augmented-FIFO
// replacement policy.
//
// Default geometry: 8 kB, 32 ways, 32-byte lines, hence 8 sets; a 32-bit
// address splits into tag[31:8], set[7:5] and byte offset[4:0]. Tags live in
// a CAM-style tag array (cam_tag_array); data live in one line-wide array
// indexed by {set, way}. The replacement unit is chosen by POLICY:
// mh_fifo_repl (Move-on-Hit), sh_fifo_repl (Set-on-Hit) or cb_fifo_repl
// (Counter-Based, the default). All three keep the FIFO victim pointer per set
// and honour lock-down: ways below lock_base are never replaced.
//
// CPU port (one request at a time, valid/ready):
//   cpu_req_valid/ready, cpu_req_we, cpu_req_addr, cpu_req_wdata, cpu_req_be.
//   A request is taken when valid and ready are both high. ready is high
//   whenever no miss is being served. A hit answers one cycle later with a
//   one-cycle pulse on cpu_resp_valid (cpu_resp_rdata holds the addressed word
//   for a read); the replacement state is updated in that same cycle, so hits
//   run back to back at one per cycle. A miss answers after the line has been
//   fetched.
// Memory port (one transfer at a time): mem_req is held, with mem_we,
//   mem_addr (line address) and mem_wdata, until mem_done pulses; a read's
//   line is on mem_rdata with mem_done.
//
// Miss handling: in the cycle the miss is seen, the replacement unit names the
// victim and updates its state, and the victim line is read out. If the victim
// is valid and dirty it is queued in the write-back buffer (waiting while the
// buffer is full). The missing line is then fetched; if it is still queued in
// the buffer, the buffer is drained first. The fetched line, merged with the
// store data for a write miss, is written to the victim way, and the response
// is given in the next cycle. Queued write-backs use the memory port only when
// no fetch needs it: while the cache is idle or serving hits, when a full
// buffer blocks an eviction, or when the missing line is itself queued. A
// fetch therefore never waits behind a write-back it does not depend on, and
// a run of dirty misses can fill the buffer.
//
// evt_hit and evt_miss pulse once per accepted request that hits or misses.
//
// The geometry, the three policies, the 4-entry write-back buffer and lock-down
// follow the document. The CPU and memory handshakes, write-back with
// write-allocate, the line-wide data array and the blocking miss handling are
// this design's choices.
module afifo_cache
  import afifo_pkg::*;
#(
  parameter int unsigned CACHE_BYTES   = 8192,
  parameter int unsigned WAYS          = 32,
  parameter int unsigned LINE_BYTES    = 32,
  parameter policy_e     POLICY        = POL_CB,
  parameter int unsigned CNT_BITS      = 2,
  parameter bit          RESET_ON_MISS = 1'b0,
  parameter int unsigned WBB_DEPTH     = 4,
  parameter int unsigned ADDR_BITS     = 32,
  localparam int unsigned NSETS        = CACHE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned LW           = $clog2(WAYS),
  localparam int unsigned SW           = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned SETB         = $clog2(NSETS),
  localparam int unsigned OFF_BITS     = $clog2(LINE_BYTES),
  localparam int unsigned TAG_BITS     = ADDR_BITS - OFF_BITS - SETB,
  localparam int unsigned LA_BITS      = ADDR_BITS - OFF_BITS,
  localparam int unsigned LINE_BITS    = LINE_BYTES * 8,
  localparam int unsigned WORDS        = LINE_BYTES / 4,
  localparam int unsigned WB           = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LW-1:0]        lock_base,
  // CPU side
  input  logic                 cpu_req_valid,
  output logic                 cpu_req_ready,
  input  logic                 cpu_req_we,
  input  logic [ADDR_BITS-1:0] cpu_req_addr,
  input  logic [31:0]          cpu_req_wdata,
  input  logic [3:0]           cpu_req_be,
  output logic                 cpu_resp_valid,
  output logic [31:0]          cpu_resp_rdata,
  // memory side
  output logic                 mem_req,
  output mem_op_e              mem_we,
  output logic [LA_BITS-1:0]   mem_addr,
  output logic [LINE_BITS-1:0] mem_wdata,
  input  logic                 mem_done,
  input  logic [LINE_BITS-1:0] mem_rdata,
  // events
  output logic                 evt_hit,
  output logic                 evt_miss
);

  typedef enum logic [1:0] {S_IDLE, S_EVICT, S_FETCH} state_e;
  typedef enum logic [1:0] {OWN_NONE, OWN_FETCH, OWN_WB} owner_e;

  state_e state;
  owner_e owner;

  // Registered miss context.
  logic                 m_we;
  logic [ADDR_BITS-1:0] m_addr;
  logic [31:0]          m_wdata;
  logic [3:0]           m_be;
  logic [LW-1:0]        m_way;
  logic                 m_vic_dirty;
  logic [TAG_BITS-1:0]  m_vic_tag;

  // Data array and its read register.
  logic [LINE_BITS-1:0] data_mem [NSETS*WAYS];
  logic [LINE_BITS-1:0] rline;
  logic [WB-1:0]        resp_word;

  // Address fields of the request being looked up or served.
  logic [ADDR_BITS-1:0] cur_addr;
  logic [SW-1:0]        cur_set;
  logic [TAG_BITS-1:0]  cur_tag;

  logic                 take;
  logic                 tag_hit;
  logic [LW-1:0]        hit_way;
  logic [LW-1:0]        victim_way;
  logic                 vic_valid, vic_dirty;
  logic [TAG_BITS-1:0]  vic_tag;
  logic                 repl_hit, repl_fill;
  logic                 tag_fill;
  logic                 mark_dirty;

  logic                 wbb_push, wbb_pop, wbb_full, wbb_empty, wbb_chk_hit;
  logic [LA_BITS-1:0]   wbb_head_addr;
  logic [LINE_BITS-1:0] wbb_head_data;

  logic                 fetch_ok;
  logic                 drain_ok;
  logic [LINE_BITS-1:0] fill_line;

  function automatic logic [SW-1:0] set_of(input logic [ADDR_BITS-1:0] a);
    if (NSETS > 1) return SW'(a >> OFF_BITS);
    else           return '0;
  endfunction

  function automatic logic [LINE_BITS-1:0] merge_word(
      input logic [LINE_BITS-1:0] line, input logic [WB-1:0] word,
      input logic [31:0] wdata, input logic [3:0] be);
    logic [LINE_BITS-1:0] r;
    r = line;
    for (int b = 0; b < 4; b++) begin
      if (be[b]) r[32*word + 8*b +: 8] = wdata[8*b +: 8];
    end
    return r;
  endfunction

  always_comb begin
    cpu_req_ready = (state == S_IDLE);
    take          = cpu_req_valid && cpu_req_ready;
    cur_addr      = (state == S_IDLE) ? cpu_req_addr : m_addr;
    cur_set       = set_of(cur_addr);
    cur_tag       = TAG_BITS'(cur_addr >> (OFF_BITS + SETB));
    evt_hit       = take && tag_hit;
    evt_miss      = take && !tag_hit;
    repl_hit      = evt_hit;
    repl_fill     = evt_miss;
    mark_dirty    = evt_hit && cpu_req_we;
    // Fetch may use the port only once its line has left the write-back buffer.
    fetch_ok      = (state == S_FETCH) && !wbb_chk_hit;
    // A write-back may use the port when no request is missing in this cycle,
    // when the buffer is full and blocks an eviction, or when the line to be
    // fetched is itself still queued.
    drain_ok      = !wbb_empty &&
                    (((state == S_IDLE) && !evt_miss) ||
                     ((state == S_EVICT) && wbb_full) ||
                     ((state == S_FETCH) && wbb_chk_hit));
    tag_fill      = (owner == OWN_FETCH) && mem_done;
    wbb_push      = (state == S_EVICT) && m_vic_dirty && !wbb_full;
    wbb_pop       = (owner == OWN_WB) && mem_done;
    fill_line     = m_we ? merge_word(mem_rdata, WB'(m_addr >> 2), m_wdata, m_be)
                         : mem_rdata;
    mem_req       = (owner != OWN_NONE);
    mem_we        = (owner == OWN_WB) ? MEM_WRITE : MEM_READ;
    mem_addr      = (owner == OWN_WB) ? wbb_head_addr : LA_BITS'(m_addr >> OFF_BITS);
    mem_wdata     = wbb_head_data;
    cpu_resp_rdata = rline[32*resp_word +: 32];
  end

  cam_tag_array #(.NSETS(NSETS), .WAYS(WAYS), .TAG_BITS(TAG_BITS)) u_tags (
    .clk            (clk),
    .rst_n          (rst_n),
    .set_idx        (cur_set),
    .lookup_tag     (cur_tag),
    .hit            (tag_hit),
    .hit_way        (hit_way),
    .vic_way        (victim_way),
    .vic_valid      (vic_valid),
    .vic_dirty      (vic_dirty),
    .vic_tag        (vic_tag),
    .fill_en        (tag_fill),
    .fill_way       (m_way),
    .fill_tag       (cur_tag),
    .fill_dirty     (m_we),
    .mark_dirty_en  (mark_dirty),
    .mark_dirty_way (hit_way)
  );

  generate
    if (POLICY == POL_MH) begin : g_mh
      mh_fifo_repl #(.NSETS(NSETS), .WAYS(WAYS)) u_repl (
        .clk, .rst_n, .lock_base, .set_idx(cur_set),
        .hit(repl_hit), .hit_way, .fill(repl_fill), .victim_way
      );
    end else if (POLICY == POL_SH) begin : g_sh
      sh_fifo_repl #(.NSETS(NSETS), .WAYS(WAYS)) u_repl (
        .clk, .rst_n, .lock_base, .set_idx(cur_set),
        .hit(repl_hit), .hit_way, .fill(repl_fill), .victim_way
      );
    end else begin : g_cb
      cb_fifo_repl #(.NSETS(NSETS), .WAYS(WAYS), .CNT_BITS(CNT_BITS),
                     .RESET_ON_MISS(RESET_ON_MISS)) u_repl (
        .clk, .rst_n, .lock_base, .set_idx(cur_set),
        .hit(repl_hit), .hit_way, .fill(repl_fill), .victim_way
      );
    end
  endgenerate

  wb_buffer #(.DEPTH(WBB_DEPTH), .ADDR_BITS(LA_BITS), .LINE_BITS(LINE_BITS)) u_wbb (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (wbb_push),
    .push_addr ({m_vic_tag, cur_set}),
    .push_data (rline),
    .full      (wbb_full),
    .empty     (wbb_empty),
    .head_addr (wbb_head_addr),
    .head_data (wbb_head_data),
    .pop       (wbb_pop),
    .chk_addr  (LA_BITS'(m_addr >> OFF_BITS)),
    .chk_hit   (wbb_chk_hit)
  );

  // Data array: line read for hits and victims, word write for store hits,
  // line write for fills.
  always_ff @(posedge clk) begin
    if (take) begin
      rline <= data_mem[{cur_set, (tag_hit ? hit_way : victim_way)}];
      if (tag_hit && cpu_req_we) begin
        data_mem[{cur_set, hit_way}] <=
          merge_word(data_mem[{cur_set, hit_way}], WB'(cpu_req_addr >> 2),
                     cpu_req_wdata, cpu_req_be);
      end
    end else if (tag_fill) begin
      rline                       <= fill_line;
      data_mem[{cur_set, m_way}]  <= fill_line;
    end
  end

  // Controller state.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      owner          <= OWN_NONE;
      cpu_resp_valid <= 1'b0;
      resp_word      <= '0;
      m_we           <= 1'b0;
      m_addr         <= '0;
      m_wdata        <= '0;
      m_be           <= '0;
      m_way          <= '0;
      m_vic_dirty    <= 1'b0;
      m_vic_tag      <= '0;
    end else begin
      cpu_resp_valid <= 1'b0;

      // Memory port ownership: a fetch goes first, write-backs fill the gaps.
      if (owner == OWN_NONE) begin
        if (fetch_ok)        owner <= OWN_FETCH;
        else if (drain_ok)   owner <= OWN_WB;
      end else if (mem_done) begin
        owner <= OWN_NONE;
      end

      unique case (state)
        S_IDLE: begin
          if (take) begin
            resp_word <= WB'(cpu_req_addr >> 2);
            if (tag_hit) begin
              cpu_resp_valid <= 1'b1;
            end else begin
              m_we        <= cpu_req_we;
              m_addr      <= cpu_req_addr;
              m_wdata     <= cpu_req_wdata;
              m_be        <= cpu_req_be;
              m_way       <= victim_way;
              m_vic_dirty <= vic_valid && vic_dirty;
              m_vic_tag   <= vic_tag;
              state       <= S_EVICT;
            end
          end
        end
        S_EVICT: begin
          if (!m_vic_dirty || !wbb_full) state <= S_FETCH;
        end
        S_FETCH: begin
          if (tag_fill) begin
            cpu_resp_valid <= 1'b1;
            state          <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) mem_req && !mem_done |=> mem_req)
    else $error("afifo_cache: memory request dropped before mem_done");
  assert property (@(posedge clk) disable iff (!rst_n) !(wbb_push && wbb_full))
    else $error("afifo_cache: write-back buffer overflow");

endmodule
