// tb_sh_fifo_repl: self-checking testbench for sh_fifo_repl.
//
// Part 1 replays the Set-on-Hit example on a 4-way cache with the pointer at
// way 2: hits on ways 2 and 3 make way 0 the victim (the search wraps);
// hits on ways 1 and 3 leave way 2 as the victim; hits on every way fall back
// to the pointed way. Part 2 drives random hits, fills and lock-down bases
// into the default 8-set, 32-way unit and compares every victim with a
// reference model kept here (use bits and pointer per set).
module tb_sh_fifo_repl;
  localparam int NS = 8, W = 32, LW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0] s_lock = '0, s_hway = '0, s_vic;
  logic       s_set = 1'b0, s_hit = 1'b0, s_fill = 1'b0;
  sh_fifo_repl #(.NSETS(2), .WAYS(4)) u_small (
    .clk, .rst_n, .lock_base(s_lock), .set_idx(s_set), .hit(s_hit),
    .hit_way(s_hway), .fill(s_fill), .victim_way(s_vic));

  logic [LW-1:0] lock = '0, hway = '0, vic;
  logic [2:0]    set = '0;
  logic          hit = 1'b0, fill = 1'b0;
  sh_fifo_repl u_dut (
    .clk, .rst_n, .lock_base(lock), .set_idx(set), .hit, .hit_way(hway),
    .fill, .victim_way(vic));

  int ref_ptr [NS];
  bit ref_use [NS][W];

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
    for (int k = 0; k < W; k++) begin
      int w = (cur + k) % W;
      if (w >= lb && !ref_use[s][w]) return w;
    end
    return cur;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    small_op(0, 1, 0);
    small_op(0, 1, 0);
    check(int'(s_vic), 2, "small: pointer before");
    // Case 1: ways 2 and 3 used, search wraps to way 0.
    small_op(1, 0, 2);
    small_op(1, 0, 3);
    check(int'(s_vic), 0, "case 1: victim");
    small_op(0, 1, 0);
    check(int'(s_vic), 1, "case 1: after miss, use bits cleared, pointer past victim");
    // Case 2 in the other set: ways 1 and 3 used, pointed way 2 is free.
    s_set = 1'b1;
    small_op(0, 1, 0);
    small_op(0, 1, 0);
    small_op(1, 0, 1);
    small_op(1, 0, 3);
    check(int'(s_vic), 2, "case 2: victim");
    small_op(0, 1, 0);
    check(int'(s_vic), 3, "case 2: after miss");
    // All used: fall back to the pointed way.
    for (int w = 0; w < 4; w++) small_op(1, 0, w);
    check(int'(s_vic), 3, "all used: pointed way");
    // Lock-down: ways 0-1 never chosen even when unused.
    s_lock = 2'd2;
    small_op(0, 1, 0);
    check(int'(s_vic), 2, "lock: wrap to lock base");
    small_op(1, 0, 2);
    small_op(1, 0, 3);
    check(int'(s_vic), 2, "lock: all unlocked used, pointed way");

    for (int s = 0; s < NS; s++) begin
      ref_ptr[s] = 0;
      for (int w = 0; w < W; w++) ref_use[s][w] = 0;
    end
    for (int i = 0; i < 20000; i++) begin
      int r, s, lb, v;
      @(negedge clk);
      r  = int'($urandom_range(0, 99));
      s  = int'($urandom_range(0, NS - 1));
      if (i % 2000 == 1999) lock = LW'($urandom_range(0, 8));
      lb = int'(lock);
      set = 3'(s);
      // Many hits per miss so that sets fill up with use bits.
      hit = (r < 93);
      fill = (r >= 93);
      hway = LW'($urandom_range(0, W - 1));
      #1;
      v = ref_victim(s, lb);
      check(int'(vic), v, "random: victim");
      if (fill) begin
        for (int w = 0; w < W; w++) ref_use[s][w] = 0;
        ref_ptr[s] = (v == W - 1) ? lb : v + 1;
      end else if (hit) begin
        ref_use[s][hway] = 1;
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
