// cache_exerciser: traffic generator, memory model and checker for one
// afifo_cache at its default geometry (32-bit addresses, 8 sets, 32 ways,
// 32-byte lines).
//
// Memory model: one block transfer at a time; a request seen at a rising edge
// completes MEM_LAT = 24 cycles later with a one-cycle mem_done, matching the
// 24 processor cycles per cache block the simulated system assumes. Lines
// never written read as a fixed function of their word address.
//
// CPU side: one access at a time, each issued as soon as the previous one has
// answered. Every read is compared with a reference copy of memory as the
// CPU has written it, so lost or stale write-backs show up as data errors. A
// hit must answer exactly one cycle after it is taken.
//
// Phases: (1) cold-fill four lines into each set, which land in ways 0-3;
// (2) lock ways 0-3 (lock_base = 4) and run random traffic with a hot set of
// lines; (3) re-read the locked lines, which must all still hit; (4) stream
// stores to more distinct lines than a set holds, then re-read them at once,
// which fills the write-back buffer and asks for lines still queued in it;
// (5) unlock and run random traffic again; (6) fill one set with new lines,
// hit every way, then miss, so that every way has been used since the last
// miss.
module cache_exerciser #(
  parameter int unsigned N_RANDOM = 6000
) (
  input  logic         clk,
  output logic         rst_n,
  output logic [4:0]   lock_base,
  output logic         cpu_req_valid,
  input  logic         cpu_req_ready,
  output logic         cpu_req_we,
  output logic [31:0]  cpu_req_addr,
  output logic [31:0]  cpu_req_wdata,
  output logic [3:0]   cpu_req_be,
  input  logic         cpu_resp_valid,
  input  logic [31:0]  cpu_resp_rdata,
  input  logic         mem_req,
  input  logic         mem_we,
  input  logic [26:0]  mem_addr,
  input  logic [255:0] mem_wdata,
  output logic         mem_done,
  output logic [255:0] mem_rdata,
  input  logic         evt_hit,
  input  logic         evt_miss,
  output logic         done,
  output int           checks,
  output int           failures,
  output int           n_hits,
  output int           n_misses,
  output int           n_mem_writes,
  output int           min_miss_lat
);

  localparam int MEM_LAT = 24;

  // ---------------- memory model ----------------
  logic [255:0] mem_lines [int];
  bit           busy;
  int           cnt;
  logic [26:0]  m_addr;
  logic         m_we;
  logic [255:0] m_wdata;

  function automatic logic [31:0] init_word(input logic [29:0] waddr);
    return {waddr[14:0], 2'b01, waddr[29:15]} ^ 32'h6b43_a9b5;
  endfunction

  function automatic logic [255:0] mem_read_line(input logic [26:0] la);
    logic [255:0] l;
    if (mem_lines.exists(int'(la))) return mem_lines[int'(la)];
    for (int w = 0; w < 8; w++) l[32*w +: 32] = init_word({la, 3'(w)});
    return l;
  endfunction

  initial begin
    busy = 0; cnt = 0; mem_done = 1'b0; mem_rdata = '0;
  end

  always @(posedge clk) begin
    mem_done <= 1'b0;
    if (!rst_n) begin
      busy <= 0;
    end else if (busy) begin
      if (cnt == MEM_LAT - 1) begin
        busy     <= 0;
        mem_done <= 1'b1;
        if (m_we) begin
          mem_lines[int'(m_addr)] = m_wdata;
          n_mem_writes++;
        end else begin
          mem_rdata <= mem_read_line(m_addr);
        end
      end else begin
        cnt <= cnt + 1;
      end
    end else if (mem_req && !mem_done) begin
      busy    <= 1;
      cnt     <= 1;
      m_addr  <= mem_addr;
      m_we    <= mem_we;
      m_wdata <= mem_wdata;
    end
  end

  // ---------------- reference memory and CPU driver ----------------
  logic [31:0] ref_words [int];
  int cycle = 0;
  always @(negedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic logic [31:0] ref_read(input logic [31:0] addr);
    logic [29:0] wa = addr[31:2];
    if (ref_words.exists(int'(wa))) return ref_words[int'(wa)];
    return init_word(wa);
  endfunction

  task automatic access(input bit we, input logic [31:0] addr,
                        input logic [31:0] wdata, input logic [3:0] be,
                        output bit was_hit);
    int lat;
    logic [31:0] exp;
    // Called on a falling edge: the request goes out at once, so accesses run
    // back to back with no idle cycle between them.
    cpu_req_valid = 1'b1;
    cpu_req_we    = we;
    cpu_req_addr  = addr;
    cpu_req_wdata = wdata;
    cpu_req_be    = be;
    #1;
    while (!cpu_req_ready) begin
      @(negedge clk);
      #1;
    end
    was_hit = evt_hit;
    check(evt_hit != evt_miss, "exactly one of hit/miss on a taken request");
    // Latency in cycles from the edge that takes the request to the edge that
    // sees the response: 1 means the answer is there in the very next cycle.
    @(negedge clk);
    cpu_req_valid = 1'b0;
    lat = 1;
    while (!cpu_resp_valid) begin
      @(negedge clk);
      lat++;
    end
    if (was_hit) begin
      n_hits++;
      check(lat == 1, "hit answers in one cycle");
    end else begin
      n_misses++;
      check(lat >= MEM_LAT, "miss takes at least one block transfer");
      if (lat < min_miss_lat) min_miss_lat = lat;
    end
    if (we) begin
      logic [31:0] old = ref_read(addr);
      for (int b = 0; b < 4; b++) if (be[b]) old[8*b +: 8] = wdata[8*b +: 8];
      ref_words[int'(addr[31:2])] = old;
    end else begin
      exp = ref_read(addr);
      check(cpu_resp_rdata == exp, $sformatf("read data at %08h: got %08h exp %08h",
                                             addr, cpu_resp_rdata, exp));
    end
  endtask

  function automatic logic [31:0] mk_addr(input int tag, input int set, input int word);
    return {24'(tag), 3'(set), 3'(word), 2'b00};
  endfunction

  task automatic random_traffic(input int n);
    bit h;
    for (int i = 0; i < n; i++) begin
      int set  = int'($urandom_range(0, 7));
      int r    = int'($urandom_range(0, 99));
      // 16 hot lines per set and 48 cold ones; the hot ones are reused often.
      int tag  = (r < 75) ? 16'h100 + int'($urandom_range(0, 15))
                          : 16'h200 + int'($urandom_range(0, 47));
      bit we   = ($urandom_range(0, 99) < 30);
      access(we, mk_addr(tag, set, int'($urandom_range(0, 7))), $urandom,
             4'($urandom_range(1, 15)), h);
    end
  endtask

  int n_lock_hits;

  initial begin
    bit h;
    checks = 0; failures = 0; n_hits = 0; n_misses = 0; n_mem_writes = 0;
    min_miss_lat = 1 << 30; done = 1'b0; n_lock_hits = 0;
    rst_n = 1'b0; lock_base = '0;
    cpu_req_valid = 1'b0; cpu_req_we = 1'b0; cpu_req_addr = '0;
    cpu_req_wdata = '0; cpu_req_be = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // (1) cold fill: four lines per set go to ways 0-3.
    for (int set = 0; set < 8; set++)
      for (int k = 0; k < 4; k++) begin
        access(1'b1, mk_addr(16'h700 + k, set, 0), 32'hc0de_0000 + 32'(set * 4 + k), 4'hf, h);
        check(!h, "cold access misses");
      end
    // (2) lock ways 0-3 and run traffic.
    lock_base = 5'd4;
    random_traffic(N_RANDOM / 2);
    // (3) the locked lines are still there.
    for (int set = 0; set < 8; set++)
      for (int k = 0; k < 4; k++) begin
        access(1'b0, mk_addr(16'h700 + k, set, 0), '0, '0, h);
        check(h, "locked line still cached");
        if (h) n_lock_hits++;
      end
    // (4) stream stores to 40 new lines of set 5, then read them back.
    for (int k = 0; k < 40; k++) access(1'b1, mk_addr(16'h900 + k, 5, 1), 32'(k) * 3, 4'hf, h);
    for (int k = 39; k >= 0; k--) access(1'b0, mk_addr(16'h900 + k, 5, 1), '0, '0, h);
    for (int k = 0; k < 40; k++) access(1'b1, mk_addr(16'h980 + k, 6, 2), 32'(k) * 5, 4'hf, h);
    for (int k = 0; k < 40; k++) access(1'b0, mk_addr(16'h980 + k, 6, 2), '0, '0, h);
    // (5) unlock and run more traffic.
    lock_base = 5'd0;
    random_traffic(N_RANDOM / 2);
    // (6) fill set 3 with 32 new lines, touch every one of them, then miss:
    // a set in which every way was used since the last miss.
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < 32; k++) access(1'b0, mk_addr(16'ha00 + 64 * rep + k, 3, 0), '0, '0, h);
      for (int k = 0; k < 32; k++) access(1'b0, mk_addr(16'ha00 + 64 * rep + k, 3, 4), '0, '0, h);
      access(1'b1, mk_addr(16'ha00 + 64 * rep + 40, 3, 0), 32'hfeed_0000 + 32'(rep), 4'hf, h);
      check(!h, "new line misses");
    end
    // Finally read back every word written, through the cache.
    foreach (ref_words[wa]) access(1'b0, {wa[29:0], 2'b00}, '0, '0, h);
    repeat (4) @(negedge clk);
    done = 1'b1;
  end

endmodule
