// tb_afifo_cache: end-to-end testbench for afifo_cache at its default
// parameters (8 kB, 32 ways, 32-byte lines, Counter-Based FIFO, 4-entry
// write-back buffer).
//
// cache_exerciser drives the CPU port, models the 24-cycle block-transfer
// memory and checks every read against a reference memory and every hit for a
// one-cycle answer. This bench watches the inside of the cache and counts the
// mechanisms it is meant to show: hits and misses, dirty evictions into the
// write-back buffer, stalls on a full buffer, fetches held back because the
// line was still queued, CB-FIFO choosing a victim other than the pointed way,
// and misses while ways are locked (which must never pick a locked way). A
// mechanism that never happens counts as a failure. It also checks that an
// uncontended miss takes the block transfer plus the controller's four cycles.
module tb_afifo_cache;
  import afifo_pkg::*;

  logic         clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n;
  logic [4:0]   lock_base;
  logic         cpu_req_valid, cpu_req_ready, cpu_req_we, cpu_resp_valid;
  logic [31:0]  cpu_req_addr, cpu_req_wdata, cpu_resp_rdata;
  logic [3:0]   cpu_req_be;
  logic         mem_req, mem_done, evt_hit, evt_miss;
  mem_op_e      mem_we;
  logic [26:0]  mem_addr;
  logic [255:0] mem_wdata, mem_rdata;

  afifo_cache dut (
    .clk, .rst_n, .lock_base, .cpu_req_valid, .cpu_req_ready, .cpu_req_we,
    .cpu_req_addr, .cpu_req_wdata, .cpu_req_be, .cpu_resp_valid, .cpu_resp_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_done, .mem_rdata,
    .evt_hit, .evt_miss);

  logic done;
  int   x_checks, x_failures, n_hits, n_misses, n_mem_writes, min_miss_lat;

  cache_exerciser #(.N_RANDOM(6000)) u_ex (
    .clk, .rst_n, .lock_base, .cpu_req_valid, .cpu_req_ready, .cpu_req_we,
    .cpu_req_addr, .cpu_req_wdata, .cpu_req_be, .cpu_resp_valid, .cpu_resp_rdata,
    .mem_req, .mem_we(mem_we == MEM_WRITE), .mem_addr, .mem_wdata, .mem_done,
    .mem_rdata, .evt_hit, .evt_miss, .done, .checks(x_checks),
    .failures(x_failures), .n_hits, .n_misses, .n_mem_writes, .min_miss_lat);

  int checks = 0, failures = 0;
  int n_evict = 0, n_full_stall = 0, n_hazard = 0, n_skip = 0, n_locked_miss = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.wbb_push) n_evict++;
    if (dut.state == dut.S_EVICT && dut.m_vic_dirty && dut.wbb_full) n_full_stall++;
    if (dut.state == dut.S_FETCH && dut.wbb_chk_hit) n_hazard++;
    if (dut.repl_fill && dut.victim_way != dut.g_cb.u_repl.cur) n_skip++;
    if (dut.repl_fill && lock_base != 0) begin
      n_locked_miss++;
      checks++;
      if (dut.victim_way < lock_base) begin
        failures++;
        $display("FAIL locked way %0d chosen as victim", dut.victim_way);
      end
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (10) @(posedge clk);
    wait (done);
    $display("tb_afifo_cache summary:");
    need(n_hits, "hits");
    need(n_misses, "misses");
    need(n_evict, "dirty evictions into buffer");
    need(n_mem_writes, "write-backs to memory");
    need(n_full_stall, "cycles stalled on full buffer");
    need(n_hazard, "cycles fetch waited on queued line");
    need(n_skip, "victims other than pointed way");
    need(n_locked_miss, "misses with ways locked");
    checks++;
    $display("  %-34s %0d", "shortest miss latency (cycles)", min_miss_lat);
    if (min_miss_lat != 24 + 4) begin
      failures++;
      $display("FAIL uncontended miss latency %0d, expected 28", min_miss_lat);
    end
    checks   += x_checks;
    failures += x_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + x_checks, failures + x_failures);
    $finish;
  end
endmodule
