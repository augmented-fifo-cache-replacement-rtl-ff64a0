// tb_wb_buffer: self-checking testbench for wb_buffer.
//
// Random pushes (only when not full) and pops (only when not empty) into the
// default 4-entry buffer, compared with a reference queue: head address and
// data, full and empty flags, and the address check against both queued and
// absent line addresses. Counts how often the buffer was full so the full
// case is known to be exercised.
module tb_wb_buffer;
  localparam int AB = 27, LB = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          push = 1'b0, pop = 1'b0, full, empty, chk_hit;
  logic [AB-1:0] push_addr = '0, head_addr, chk_addr = '0;
  logic [LB-1:0] push_data = '0, head_data;

  wb_buffer u_dut (
    .clk, .rst_n, .push, .push_addr, .push_data, .full, .empty, .head_addr,
    .head_data, .pop, .chk_addr, .chk_hit);

  logic [AB-1:0] qa [$];
  logic [LB-1:0] qd [$];
  int nfull = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      bit exp_hit;
      @(negedge clk);
      // Address check: half the time an address that is queued, if any.
      if (qa.size() > 0 && $urandom_range(0, 1) == 1)
        chk_addr = qa[$urandom_range(0, qa.size() - 1)];
      else
        chk_addr = AB'($urandom_range(0, 15));
      #1;
      exp_hit = 1'b0;
      foreach (qa[k]) if (qa[k] == chk_addr) exp_hit = 1'b1;
      check(full == (qa.size() == 4), "full");
      check(empty == (qa.size() == 0), "empty");
      check(chk_hit == exp_hit, "chk_hit");
      if (qa.size() > 0) begin
        check(head_addr == qa[0], "head_addr");
        check(head_data == qd[0], "head_data");
      end
      if (full) nfull++;
      // Bias towards pushes in bursts so the buffer fills up.
      push = !full && ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      pop  = !empty && ($urandom_range(0, 99) < 50);
      push_addr = AB'($urandom_range(0, 15));
      push_data = {8{$urandom}};
      @(posedge clk);
      if (pop) begin void'(qa.pop_front()); void'(qd.pop_front()); end
      if (push) begin qa.push_back(push_addr); qd.push_back(push_data); end
    end
    @(negedge clk);
    push = 1'b0; pop = 1'b0;
    check(nfull > 50, "buffer reached full");
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
