// tb_afifo_cache_policies: end-to-end testbench for afifo_cache built with
// each of the other replacement options at the default geometry: Move-on-Hit
// FIFO, Set-on-Hit FIFO, and Counter-Based FIFO that clears its counters on a
// miss instead of decrementing them.
//
// Each cache gets its own cache_exerciser (traffic, 24-cycle memory model,
// reference memory, one-cycle hit check). This bench also counts the event
// that sets each policy apart and fails if it never happens: for MH-FIFO a
// hit on the pointed way that moves the pointer; for SH-FIFO a victim found
// past the pointer and a miss where every way was used so the pointed way is
// taken; for the clearing CB-FIFO a miss taken while some counter was above
// zero.
module tb_afifo_cache_policies;
  import afifo_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 3;

  logic         rst_n [N];
  logic [4:0]   lock_base [N];
  logic         cpu_req_valid [N], cpu_req_ready [N], cpu_req_we [N], cpu_resp_valid [N];
  logic [31:0]  cpu_req_addr [N], cpu_req_wdata [N], cpu_resp_rdata [N];
  logic [3:0]   cpu_req_be [N];
  logic         mem_req [N], mem_done [N], evt_hit [N], evt_miss [N];
  mem_op_e      mem_we [N];
  logic [26:0]  mem_addr [N];
  logic [255:0] mem_wdata [N], mem_rdata [N];
  logic         done [N];
  int           x_checks [N], x_failures [N], n_hits [N], n_misses [N];
  int           n_mem_writes [N], min_miss_lat [N];

  afifo_cache #(.POLICY(POL_MH)) dut_mh (
    .clk, .rst_n(rst_n[0]), .lock_base(lock_base[0]),
    .cpu_req_valid(cpu_req_valid[0]), .cpu_req_ready(cpu_req_ready[0]),
    .cpu_req_we(cpu_req_we[0]), .cpu_req_addr(cpu_req_addr[0]),
    .cpu_req_wdata(cpu_req_wdata[0]), .cpu_req_be(cpu_req_be[0]),
    .cpu_resp_valid(cpu_resp_valid[0]), .cpu_resp_rdata(cpu_resp_rdata[0]),
    .mem_req(mem_req[0]), .mem_we(mem_we[0]), .mem_addr(mem_addr[0]),
    .mem_wdata(mem_wdata[0]), .mem_done(mem_done[0]), .mem_rdata(mem_rdata[0]),
    .evt_hit(evt_hit[0]), .evt_miss(evt_miss[0]));

  afifo_cache #(.POLICY(POL_SH)) dut_sh (
    .clk, .rst_n(rst_n[1]), .lock_base(lock_base[1]),
    .cpu_req_valid(cpu_req_valid[1]), .cpu_req_ready(cpu_req_ready[1]),
    .cpu_req_we(cpu_req_we[1]), .cpu_req_addr(cpu_req_addr[1]),
    .cpu_req_wdata(cpu_req_wdata[1]), .cpu_req_be(cpu_req_be[1]),
    .cpu_resp_valid(cpu_resp_valid[1]), .cpu_resp_rdata(cpu_resp_rdata[1]),
    .mem_req(mem_req[1]), .mem_we(mem_we[1]), .mem_addr(mem_addr[1]),
    .mem_wdata(mem_wdata[1]), .mem_done(mem_done[1]), .mem_rdata(mem_rdata[1]),
    .evt_hit(evt_hit[1]), .evt_miss(evt_miss[1]));

  afifo_cache #(.POLICY(POL_CB), .RESET_ON_MISS(1'b1)) dut_cbr (
    .clk, .rst_n(rst_n[2]), .lock_base(lock_base[2]),
    .cpu_req_valid(cpu_req_valid[2]), .cpu_req_ready(cpu_req_ready[2]),
    .cpu_req_we(cpu_req_we[2]), .cpu_req_addr(cpu_req_addr[2]),
    .cpu_req_wdata(cpu_req_wdata[2]), .cpu_req_be(cpu_req_be[2]),
    .cpu_resp_valid(cpu_resp_valid[2]), .cpu_resp_rdata(cpu_resp_rdata[2]),
    .mem_req(mem_req[2]), .mem_we(mem_we[2]), .mem_addr(mem_addr[2]),
    .mem_wdata(mem_wdata[2]), .mem_done(mem_done[2]), .mem_rdata(mem_rdata[2]),
    .evt_hit(evt_hit[2]), .evt_miss(evt_miss[2]));

  for (genvar i = 0; i < N; i++) begin : g_ex
    cache_exerciser #(.N_RANDOM(4000)) u_ex (
      .clk, .rst_n(rst_n[i]), .lock_base(lock_base[i]),
      .cpu_req_valid(cpu_req_valid[i]), .cpu_req_ready(cpu_req_ready[i]),
      .cpu_req_we(cpu_req_we[i]), .cpu_req_addr(cpu_req_addr[i]),
      .cpu_req_wdata(cpu_req_wdata[i]), .cpu_req_be(cpu_req_be[i]),
      .cpu_resp_valid(cpu_resp_valid[i]), .cpu_resp_rdata(cpu_resp_rdata[i]),
      .mem_req(mem_req[i]), .mem_we(mem_we[i] == MEM_WRITE), .mem_addr(mem_addr[i]),
      .mem_wdata(mem_wdata[i]), .mem_done(mem_done[i]), .mem_rdata(mem_rdata[i]),
      .evt_hit(evt_hit[i]), .evt_miss(evt_miss[i]), .done(done[i]),
      .checks(x_checks[i]), .failures(x_failures[i]), .n_hits(n_hits[i]),
      .n_misses(n_misses[i]), .n_mem_writes(n_mem_writes[i]),
      .min_miss_lat(min_miss_lat[i]));
  end

  int checks = 0, failures = 0;
  int n_mh_move = 0, n_sh_skip = 0, n_sh_all_used = 0, n_cbr_clear = 0;

  always @(posedge clk) begin
    if (dut_mh.repl_hit && dut_mh.hit_way == dut_mh.g_mh.u_repl.cur) n_mh_move++;
    if (dut_sh.repl_fill && dut_sh.g_sh.u_repl.cand_found &&
        dut_sh.victim_way != dut_sh.g_sh.u_repl.cur) n_sh_skip++;
    if (dut_sh.repl_fill && !dut_sh.g_sh.u_repl.cand_found) n_sh_all_used++;
    if (dut_cbr.repl_fill && dut_cbr.g_cb.u_repl.cand != dut_cbr.g_cb.u_repl.group[0])
      n_cbr_clear++;
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (10) @(posedge clk);
    wait (done[0] && done[1] && done[2]);
    $display("tb_afifo_cache_policies summary:");
    for (int i = 0; i < N; i++) begin
      $display("  cache %0d: hits %0d misses %0d write-backs %0d", i, n_hits[i],
               n_misses[i], n_mem_writes[i]);
      need(n_hits[i] * n_misses[i], "hits and misses both seen");
      checks   += x_checks[i];
      failures += x_failures[i];
    end
    need(n_mh_move, "MH: hit on pointed way moved pointer");
    need(n_sh_skip, "SH: victim found past the pointer");
    need(n_sh_all_used, "SH: all ways used, pointed way taken");
    // With clearing, every counter is 0 right after a miss; a later miss with
    // no zero counter left in the set shows hits were still being weighed.
    need(n_cbr_clear, "CB clear: miss with no zero counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
