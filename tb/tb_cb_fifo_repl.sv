// tb_cb_fifo_repl: self-checking testbench for cb_fifo_repl.
//
// Part 1 works a small 4-way example by hand: hit counts 3,1,2,1 with the
// pointer at way 0 make way 1 the victim (smallest count, first from the
// pointer); after the miss the counts are 2,0,1,0 and the pointer is at way 2,
// so way 3 is next. Counters saturate at 3. A second small unit built with
// RESET_ON_MISS clears all counts on a miss. Part 2 drives random hits, fills
// and lock-down bases into the default 8-set, 32-way, 2-bit unit and compares
// every victim with a reference model kept here.
module tb_cb_fifo_repl;
  localparam int NS = 8, W = 32, LW = 5, CMAX = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0] s_lock = '0, s_hway = '0, s_vic, r_vic;
  logic       s_set = 1'b0, s_hit = 1'b0, s_fill = 1'b0;
  cb_fifo_repl #(.NSETS(2), .WAYS(4)) u_small (
    .clk, .rst_n, .lock_base(s_lock), .set_idx(s_set), .hit(s_hit),
    .hit_way(s_hway), .fill(s_fill), .victim_way(s_vic));
  cb_fifo_repl #(.NSETS(2), .WAYS(4), .RESET_ON_MISS(1'b1)) u_small_rst (
    .clk, .rst_n, .lock_base(s_lock), .set_idx(s_set), .hit(s_hit),
    .hit_way(s_hway), .fill(s_fill), .victim_way(r_vic));

  logic [LW-1:0] lock = '0, hway = '0, vic;
  logic [2:0]    set = '0;
  logic          hit = 1'b0, fill = 1'b0;
  cb_fifo_repl u_dut (
    .clk, .rst_n, .lock_base(lock), .set_idx(set), .hit, .hit_way(hway),
    .fill, .victim_way(vic));

  int ref_ptr [NS];
  int ref_cnt [NS][W];

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic small_op(input bit h, input bit f, input int way);
    @(negedge clk);
    s_hit = h; s_fill = f; s_hway = 2'(way);
    @(negedge clk);
    s_hit = 1'b0; s_fill = 1'b0;
  endtask

  function automatic int ref_victim(input int s, input int lb);
    int cur = (ref_ptr[s] < lb) ? lb : ref_ptr[s];
    int mn = CMAX + 1;
    for (int w = lb; w < W; w++) if (ref_cnt[s][w] < mn) mn = ref_cnt[s][w];
    for (int k = 0; k < W; k++) begin
      int w = (cur + k) % W;
      if (w >= lb && ref_cnt[s][w] == mn) return w;
    end
    return cur;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(int'(s_vic), 0, "small: all zero, pointed way");
    // Counts 3,1,2,1.
    for (int k = 0; k < 3; k++) small_op(1, 0, 0);
    small_op(1, 0, 1);
    small_op(1, 0, 2);
    small_op(1, 0, 2);
    small_op(1, 0, 3);
    check(int'(s_vic), 1, "counts 3121: smallest first from pointer");
    check(int'(r_vic), 1, "reset variant: same choice");
    small_op(0, 1, 0);
    // Decrement: counts 2,0,1,0, pointer at 2 -> way 3.
    check(int'(s_vic), 3, "after decrement: first zero from pointer");
    // Reset variant: all zero, pointer at 2 -> way 2.
    check(int'(r_vic), 2, "after reset: pointed way");
    small_op(0, 1, 0);
    // Decrement: counts 1,0,0,0 pointer at 0 -> way 1.
    check(int'(s_vic), 1, "second decrement");
    // Saturation: six hits on way 1 leave it at 3; then three misses.
    for (int k = 0; k < 6; k++) small_op(1, 0, 1);
    for (int k = 0; k < 3; k++) small_op(1, 0, 2);
    for (int k = 0; k < 3; k++) small_op(1, 0, 3);
    small_op(1, 0, 0);
    small_op(1, 0, 0);
    // counts 3,3,3,3 with the pointer at way 0: the pointed way wins.
    check(int'(s_vic), 0, "all saturated: pointed way");
    small_op(1, 0, 0);
    check(int'(s_vic), 0, "saturated counter holds");
    // Miss: counts 0,2,2,2, pointer at 1; way 0 is free again.
    small_op(0, 1, 0);
    check(int'(s_vic), 0, "after miss from saturation");
    // Two hits on way 0 give counts 2,2,2,2 with the pointer at way 1. Had a
    // counter wrapped past 3 instead of saturating, it would now be smallest.
    small_op(1, 0, 0);
    small_op(1, 0, 0);
    check(int'(s_vic), 1, "ties at count 2: first from pointer");

    for (int s = 0; s < NS; s++) begin
      ref_ptr[s] = 0;
      for (int w = 0; w < W; w++) ref_cnt[s][w] = 0;
    end
    for (int i = 0; i < 20000; i++) begin
      int r, s, lb, v;
      @(negedge clk);
      r  = int'($urandom_range(0, 99));
      s  = int'($urandom_range(0, NS - 1));
      if (i % 2000 == 1999) lock = LW'($urandom_range(0, 8));
      lb = int'(lock);
      set = 3'(s);
      hit = (r < 95);
      fill = (r >= 95);
      hway = LW'($urandom_range(0, W - 1));
      #1;
      v = ref_victim(s, lb);
      check(int'(vic), v, "random: victim");
      if (fill) begin
        for (int w = 0; w < W; w++) if (ref_cnt[s][w] > 0) ref_cnt[s][w]--;
        ref_cnt[s][v] = 0;
        ref_ptr[s] = (v == W - 1) ? lb : v + 1;
      end else if (hit) begin
        if (ref_cnt[s][hway] < CMAX) ref_cnt[s][hway]++;
      end
    end
    @(negedge clk);
    hit = 1'b0; fill = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
