// tb_cam_tag_array: self-checking testbench for cam_tag_array.
//
// Random fills (tags drawn from a small pool so lookups hit often, never
// duplicating a tag inside a set), dirty marks and lookups on the default
// 8-set, 32-way, 24-bit-tag array. Every cycle the hit, hit way and the
// victim-port read of a random way are compared with a reference copy of
// the tags, valid and dirty bits kept here.
module tb_cam_tag_array;
  localparam int NS = 8, W = 32, TB = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]    set_idx = '0;
  logic [TB-1:0] lookup_tag = '0, fill_tag = '0, vic_tag;
  logic          hit, vic_valid, vic_dirty;
  logic [4:0]    hit_way, vic_way = '0, fill_way = '0, mark_way = '0;
  logic          fill_en = 1'b0, fill_dirty = 1'b0, mark_en = 1'b0;

  cam_tag_array u_dut (
    .clk, .rst_n, .set_idx, .lookup_tag, .hit, .hit_way, .vic_way, .vic_valid,
    .vic_dirty, .vic_tag, .fill_en, .fill_way, .fill_tag, .fill_dirty,
    .mark_dirty_en(mark_en), .mark_dirty_way(mark_way));

  int  r_tag   [NS][W];
  bit  r_valid [NS][W];
  bit  r_dirty [NS][W];

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ref_find(input int s, input int t);
    for (int w = 0; w < W; w++) if (r_valid[s][w] && r_tag[s][w] == t) return w;
    return -1;
  endfunction

  int nhits = 0;

  initial begin
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < W; w++) begin r_valid[s][w] = 0; r_dirty[s][w] = 0; r_tag[s][w] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      int s, t, f, ft, fw, mw, vw, r;
      @(negedge clk);
      s  = int'($urandom_range(0, NS - 1));
      t  = int'($urandom_range(0, 47)) * 1237 + 5;
      vw = int'($urandom_range(0, W - 1));
      set_idx = 3'(s); lookup_tag = TB'(t); vic_way = 5'(vw);
      #1;
      f = ref_find(s, t);
      check(int'(hit), int'(f >= 0), "hit");
      if (f >= 0) begin check(int'(hit_way), f, "hit_way"); nhits++; end
      check(int'(vic_valid), int'(r_valid[s][vw]), "vic_valid");
      if (r_valid[s][vw]) begin
        check(int'(vic_dirty), int'(r_dirty[s][vw]), "vic_dirty");
        check(int'(vic_tag), r_tag[s][vw], "vic_tag");
      end
      // Updates for this cycle.
      r = int'($urandom_range(0, 99));
      fill_en = 1'b0; mark_en = 1'b0;
      if (r < 40) begin
        fw = int'($urandom_range(0, W - 1));
        ft = int'($urandom_range(0, 47)) * 1237 + 5;
        if (ref_find(s, ft) < 0 || ref_find(s, ft) == fw) begin
          fill_en = 1'b1; fill_way = 5'(fw); fill_tag = TB'(ft);
          fill_dirty = 1'($urandom_range(0, 1));
        end
      end
      if (r >= 30 && r < 60) begin
        mw = int'($urandom_range(0, W - 1));
        mark_en = 1'b1; mark_way = 5'(mw);
      end
      @(posedge clk);
      if (mark_en) r_dirty[s][mark_way] = 1;
      if (fill_en) begin
        r_tag[s][fill_way] = int'(fill_tag);
        r_valid[s][fill_way] = 1;
        r_dirty[s][fill_way] = fill_dirty;
      end
    end
    @(negedge clk);
    fill_en = 1'b0; mark_en = 1'b0;
    checks++;
    if (nhits < 1000) begin failures++; $display("FAIL too few hits %0d", nhits); end
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
