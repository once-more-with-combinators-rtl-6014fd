// End-to-end test of the graph-reduction processor at its default size.
//
// The testbench compiles a small recursive functional program to
// combinators (with the bracket-abstraction compiler in ceph_tb_pkg),
// loads the graph through the host port, and lets the processor evaluate it:
//
//   sum = Y (\self n. (n == 0) 0 (n * 2^30 + self (n - 1)))
//   main = I (I (I (sum N)))   -- expected 2^30 * N*(N+1)/2
//
// with, inside out, "a op b" written as  b (a op). Each level of the
// recursion allocates dozens of nodes, so for the default 1024-node memory
// the run only finishes if the concurrent collector reclaims garbage while
// the program runs. All but the first partial sum need two 32-bit limbs, so
// the arithmetic runs on variable-precision integers throughout; the result
// chain is read back through the host port. The result is compared with
// 2^30 * N*(N+1)/2 and every
// mechanism of the design (value swap, indirections, allocation stall,
// multi-limb integer results, snapshot redirection, collection, freeing, indirection compression) must
// have happened at least once; the counts are printed.
module tb_cephalopode_top;
  import ceph_pkg::*;
  import ceph_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        host_req, host_we, host_rvalid, host_init, start, gc_force;
  ptr_t        host_addr, host_next, root_in;
  node_t       host_wdata, host_rdata, result;
  logic        busy, done, error, gc_busy;
  logic [1:0]  err_code;
  logic [AW:0] free_count;
  logic [31:0] n_reductions, n_swaps, n_alloc_stalls, n_ind_follow;
  logic [31:0] n_collections, n_freed, n_compressed, n_redirects;

  cephalopode_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- run ----------------
  typedef logic signed [127:0] big_t;
  int limbs_seen = 0;   // limb count of the result

  task automatic load_and_run(int n, output int cycles, output big_t res, output bit ok);
    ptr_t main;
    node_t nd;
    Term body, c0, c1;
    reset_image();
    c0 = NUM(0);
    c1 = NUM(1);
    // (n == 0) 0 (n + self (n - 1))
    body = A(A(OP(cEQ, V("n"), c0), c0),
             OP(cADD, OP(cMUL, V("n"), NUM(32'h4000_0000)), A(V("self"), OP(cSUB, V("n"), c1))));
    main = emit(compile(A(REC("self", LAM("n", body)), NUM(n))));
    // I (I (I main)): the three I rewrites leave a chain of indirections in
    // front of the computation for the collector to compress
    for (int i = 0; i < 3; i++) main = nw(mk_app(cI, main, NULLP));
    // load through the host port
    for (int i = 1; i < top; i++) begin
      @(negedge clk);
      host_req = 1; host_we = 1; host_addr = ptr_t'(i); host_wdata = img[i];
    end
    @(negedge clk);
    host_req = 0; host_we = 0;
    host_init = 1; host_next = ptr_t'(top);
    @(negedge clk);
    host_init = 0;
    // read back one node through the host port
    host_req = 1; host_addr = main;
    @(negedge clk);
    host_req = 0;
    checks++;
    if (!host_rvalid || host_rdata !== img[main]) begin
      failures++; $display("FAIL: host read-back");
    end
    root_in = main; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done && !error && cycles < 3000000) begin
      @(negedge clk);
      cycles++;
    end
    ok  = done && result.tag == T_INT;
    // follow the limb chain through the host port
    res = '0;
    limbs_seen = 0;
    nd = result;
    while (ok && nd.tag == T_INT && limbs_seen < 4) begin
      res[32*limbs_seen +: 32] = nd.left;
      limbs_seen++;
      if (nd.right == NULLP) break;
      @(negedge clk);
      host_req = 1; host_we = 0; host_addr = nd.right;
      @(negedge clk);
      host_req = 0;
      nd = host_rdata;
    end
    if (limbs_seen > 0) res = (res <<< (128 - 32 * limbs_seen)) >>> (128 - 32 * limbs_seen);
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     cycles;
  big_t   res;
  big_t   expect_v;
  bit     ok;
  int     N;
  initial begin
    host_req = 0; host_we = 0; host_addr = '0; host_wdata = '0; host_init = 0;
    host_next = '0; start = 0; root_in = '0; gc_force = 0;
    if (!$value$plusargs("N=%d", N)) N = 200;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_and_run(N, cycles, res, ok);
    expect_v = (big_t'(N) * (N + 1) / 2) <<< 30;
    checks++;
    if (!ok || res != expect_v) begin
      failures++;
      $display("FAIL: sum %0d -> done=%0b error=%0b(%0d) value=%0d expected %0d",
               N, done, error, err_code, res, expect_v);
    end else $display("ok   sum %0d = %0d (%0d limbs) in %0d cycles (program graph %0d nodes)",
                      N, res, limbs_seen, cycles, top - 1);
    $display("reductions=%0d swaps=%0d ind_follows=%0d alloc_stalls=%0d redirects=%0d",
             n_reductions, n_swaps, n_ind_follow, n_alloc_stalls, n_redirects);
    $display("collections=%0d freed=%0d compressed=%0d", n_collections, n_freed, n_compressed);
    checks++;
    if (n_reductions == 0 || n_swaps == 0 || n_ind_follow == 0 || n_alloc_stalls == 0 ||
        n_redirects == 0 || n_collections == 0 || n_freed == 0 || n_compressed == 0 ||
        limbs_seen < 2) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
