// tb_mh_fifo_repl: self-checking testbench for mh_fifo_repl.
//
// Part 1 replays the two cases of the Move-on-Hit example on a 4-way cache:
// with the pointer at way 2, a hit on way 2 moves the pointer to way 3, so
// the next miss replaces way 3; a hit on way 0 leaves it, so the miss replaces
// way 2. Part 2 drives random hits, fills and lock-down bases into the default
// 8-set, 32-way unit and compares every victim with a reference model kept
// here. Inputs change on the falling edge; outputs are checked before the
// rising edge, so a hit's update is visible the very next cycle.
module tb_mh_fifo_repl;
  localparam int NS = 8, W = 32, LW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Small instance for the worked example.
  logic [1:0] s_lock = '0, s_hway = '0, s_vic;
  logic       s_set = 1'b0, s_hit = 1'b0, s_fill = 1'b0;
  mh_fifo_repl #(.NSETS(2), .WAYS(4)) u_small (
    .clk, .rst_n, .lock_base(s_lock), .set_idx(s_set), .hit(s_hit),
    .hit_way(s_hway), .fill(s_fill), .victim_way(s_vic));

  // Default-size instance.
  logic [LW-1:0] lock = '0, hway = '0, vic;
  logic [2:0]    set = '0;
  logic          hit = 1'b0, fill = 1'b0;
  mh_fifo_repl u_dut (
    .clk, .rst_n, .lock_base(lock), .set_idx(set), .hit, .hit_way(hway),
    .fill, .victim_way(vic));

  int ref_ptr [NS];

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

  function automatic int ref_cur(input int s, input int lb);
    return (ref_ptr[s] < lb) ? lb : ref_ptr[s];
  endfunction

  function automatic int ref_next(input int p, input int lb);
    return (p == W - 1) ? lb : p + 1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Two misses bring the pointer to way 2 ("before" in the example).
    check(int'(s_vic), 0, "small: first victim");
    small_op(0, 1, 0);
    small_op(0, 1, 0);
    check(int'(s_vic), 2, "small: pointer before");
    // Case 1: hit in the pointed way moves the pointer.
    small_op(1, 0, 2);
    check(int'(s_vic), 3, "case 1: after hit on pointed way");
    small_op(0, 1, 0);
    check(int'(s_vic), 0, "case 1: pointer wraps after miss");
    // Bring the pointer back to 2 in the other set.
    s_set = 1'b1;
    small_op(0, 1, 0);
    small_op(0, 1, 0);
    // Case 2: hit elsewhere leaves the pointer.
    small_op(1, 0, 0);
    check(int'(s_vic), 2, "case 2: after hit on other way");
    small_op(0, 1, 0);
    check(int'(s_vic), 3, "case 2: after miss");
    // Lock-down: with ways 0-1 locked the pointer wraps to way 2.
    s_lock = 2'd2;
    small_op(0, 1, 0);
    check(int'(s_vic), 2, "lock: wrap to lock base");
    s_set = 1'b0;
    @(negedge clk);
    check(int'(s_vic), 2, "lock: stale pointer clamped");

    // Random comparison against the reference model.
    for (int s = 0; s < NS; s++) ref_ptr[s] = 0;
    for (int i = 0; i < 20000; i++) begin
      int r, s, lb, cur;
      @(negedge clk);
      r  = int'($urandom_range(0, 99));
      s  = int'($urandom_range(0, NS - 1));
      if (i % 2000 == 1999) lock = LW'($urandom_range(0, 8));
      lb = int'(lock);
      set = 3'(s);
      hit = (r < 60);
      fill = (r >= 60 && r < 90);
      cur = ref_cur(s, lb);
      // Bias hits towards the pointed way so that the move happens often.
      hway = (r < 30) ? LW'(cur) : LW'($urandom_range(0, W - 1));
      #1;
      check(int'(vic), cur, "random: victim");
      if (fill || (hit && int'(hway) == cur)) ref_ptr[s] = ref_next(cur, lb);
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
