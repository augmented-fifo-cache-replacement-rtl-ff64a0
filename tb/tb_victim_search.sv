// tb_victim_search: self-checking testbench for victim_search.
//
// Applies random masks (sparse, dense, empty and full) and random start ways
// to a 32-way and an 8-way instance and compares found/way with a reference
// that walks the ways one by one from the start. Purely combinational; a
// clock only paces the loop.
module tb_victim_search;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] mask32;
  logic [4:0]  start32, way32;
  logic        found32;
  victim_search u_dut (.mask(mask32), .start(start32), .found(found32), .way(way32));

  logic [7:0] mask8;
  logic [2:0] start8, way8;
  logic       found8;
  victim_search #(.WAYS(8)) u_small (.mask(mask8), .start(start8), .found(found8), .way(way8));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int e32, e8;
      @(negedge clk);
      case (i % 4)
        0: mask32 = $urandom & $urandom & $urandom;   // sparse
        1: mask32 = $urandom | $urandom;              // dense
        2: mask32 = (i % 8 == 2) ? '0 : '1;
        default: mask32 = 32'(1) << $urandom_range(0, 31);
      endcase
      start32 = 5'($urandom_range(0, 31));
      mask8   = 8'($urandom) & 8'($urandom);
      start8  = 3'($urandom_range(0, 7));
      #1;
      e32 = -1;
      for (int k = 0; k < 32 && e32 < 0; k++)
        if (mask32[(int'(start32) + k) % 32]) e32 = (int'(start32) + k) % 32;
      e8 = -1;
      for (int k = 0; k < 8 && e8 < 0; k++)
        if (mask8[(int'(start8) + k) % 8]) e8 = (int'(start8) + k) % 8;
      check(int'(found32), int'(e32 >= 0), "found32");
      if (e32 >= 0) check(int'(way32), e32, "way32");
      check(int'(found8), int'(e8 >= 0), "found8");
      if (e8 >= 0) check(int'(way8), e8, "way8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
