// Self-checking test of the garbage collector.
//
// The collector runs against the real snapshot memory and allocator. A
// graph of 199 nodes is loaded (random applications, integers and
// combinators, some unreachable, plus an indirection chain). While the
// first collection is marking, the "program" (this testbench) rewrites the
// root node so that the old graph becomes unreachable, allocates and writes
// new nodes, and keeps the memory busy with reads so the collector is
// stalled. Checks:
//  - collection 1 frees exactly the allocated nodes unreachable in the
//    snapshot (computed here by a graph search over a copy of the graph taken
//    at the snapshot); rewritten and new nodes survive;
//  - indirection chains are compressed: 180 -> 181 -> 182 -> 183(int)
//    becomes 180 -> 183 and 181 -> 183;
//  - collection 2 frees what became unreachable in the live graph.
module tb_gc_unit;
  import ceph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int K = 200;

  // memory
  logic  take_snapshot;
  logic  re_req, re_we, re_gnt, re_rvalid;
  ptr_t  re_addr;
  node_t re_wdata, re_rdata;
  logic  gc_req, gc_we, gc_snap, gc_gnt, gc_rvalid;
  ptr_t  gc_addr;
  node_t gc_wdata, gc_rdata;
  logic  redirect;
  // allocator
  logic  init;
  ptr_t  init_next;
  logic  alloc_req, alloc_gnt;
  ptr_t  alloc_addr;
  logic  free_valid, q_alloc;
  ptr_t  free_addr, q_addr;
  logic [AW:0] free_count;
  // collector
  logic  start, busy, snap_req, snap_ack;
  ptr_t  roots [NROOTS];
  logic [31:0] n_coll, n_freed, n_comp;

  snapshot_mem u_mem (.*);
  free_list    u_fl  (.*);
  gc_unit dut (
    .clk, .rst_n, .start, .busy, .snap_req, .snap_ack, .take_snapshot, .roots,
    .mem_req(gc_req), .mem_we(gc_we), .mem_snap(gc_snap), .mem_addr(gc_addr),
    .mem_wdata(gc_wdata), .mem_gnt(gc_gnt), .mem_rvalid(gc_rvalid), .mem_rdata(gc_rdata),
    .alloc_evt(alloc_req && alloc_gnt), .alloc_evt_addr(alloc_addr),
    .free_valid, .free_addr, .q_addr, .q_alloc,
    .n_collections(n_coll), .n_freed(n_freed), .n_compressed(n_comp)
  );

  int checks = 0, failures = 0;
  node_t g    [NODES];   // live graph model
  node_t snap [NODES];   // graph at the snapshot
  logic  allocd [NODES];
  logic  freed  [NODES];
  logic  black  [NODES];
  int    stalls = 0;

  always @(posedge clk) if (rst_n && free_valid) begin
    if (freed[free_addr]) begin failures++; $display("FAIL: %0d freed twice", free_addr); end
    freed[free_addr] = 1'b1;
  end
  always @(posedge clk) if (rst_n && gc_req && !gc_gnt) stalls++;

  // reachability in a graph model
  function automatic void reach(input ptr_t rs [$], input logic use_snap, output logic r [NODES]);
    ptr_t work [$];
    node_t n;
    for (int i = 0; i < NODES; i++) r[i] = 1'b0;
    work = rs;
    while (work.size() > 0) begin
      ptr_t p = work.pop_back();
      if (p == NULLP || r[p]) continue;
      r[p] = 1'b1;
      n = use_snap ? snap[p] : g[p];
      if (n.tag == T_APP) begin work.push_back(n.left[AW-1:0]); work.push_back(n.right); end
      if (n.tag == T_IND) work.push_back(n.left[AW-1:0]);
    end
  endfunction

  task automatic mem_write(ptr_t a, node_t n);
    @(negedge clk);
    re_req = 1; re_we = 1; re_addr = a; re_wdata = n;
    @(negedge clk);
    re_req = 0; re_we = 0;
    g[a] = n;
  endtask

  task automatic mem_read(ptr_t a, output node_t n);
    @(negedge clk);
    re_req = 1; re_we = 0; re_addr = a;
    @(negedge clk);
    re_req = 0;
    n = re_rdata;
  endtask

  task automatic check_freed(string name, logic live [NODES]);
    int nf = 0, ne = 0;
    for (int i = 1; i < NODES; i++) begin
      logic expf = allocd[i] && !live[i] && !black[i];
      if (expf) ne++;
      if (freed[i]) nf++;
      if (freed[i] != expf) begin
        failures++;
        $display("FAIL %s: node %0d freed=%0b expected=%0b", name, i, freed[i], expf);
      end
    end
    checks++;
    $display("%s: freed %0d nodes (expected %0d)", name, nf, ne);
  endtask

  task automatic wait_idle();
    int t = 0;
    while (busy && t < 200000) begin @(negedge clk); t++; end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  live1 [NODES], live2 [NODES];
  ptr_t  rs [$];
  node_t n;
  ptr_t  na, nb;
  int    ack_delay;
  initial begin
    re_req = 0; re_we = 0; re_addr = '0; re_wdata = '0;
    init = 0; init_next = '0; alloc_req = 0; start = 0; snap_ack = 0;
    for (int i = 0; i < NROOTS; i++) roots[i] = NULLP;
    for (int i = 0; i < NODES; i++) begin
      g[i] = '0; allocd[i] = 0; freed[i] = 0; black[i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // random graph over nodes 1..179, children drawn from 1..199
    for (int i = 1; i < 180; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 5)      n = mk_app(ptr_t'($urandom_range(1, 199)), ptr_t'($urandom_range(1, 199)), NULLP);
      else if (kind < 8) n = mk_int(DW'($urandom), NULLP);
      else               n = mk_comb(C_K, 8'd0, NULLP);
      mem_write(ptr_t'(i), n);
    end
    // indirection chain reachable from the root
    mem_write(ptr_t'(180), mk_ind(ptr_t'(181), NULLP));
    mem_write(ptr_t'(181), mk_ind(ptr_t'(182), NULLP));
    mem_write(ptr_t'(182), mk_ind(ptr_t'(183), NULLP));
    mem_write(ptr_t'(183), mk_int(32'd1234, NULLP));
    mem_write(ptr_t'(184), mk_app(ptr_t'(181), ptr_t'(180), NULLP));
    for (int i = 185; i < K; i++) mem_write(ptr_t'(i), mk_int(DW'(i), NULLP));
    mem_write(ptr_t'(1), mk_app(ptr_t'(2), ptr_t'(184), NULLP));
    @(negedge clk);
    init = 1; init_next = ptr_t'(K);
    @(negedge clk);
    init = 0;
    for (int i = 1; i < K; i++) allocd[i] = 1;

    // ---- collection 1 ----
    roots[0] = ptr_t'(1);
    roots[5] = ptr_t'(150);
    start = 1;
    @(negedge clk);
    start = 0;
    ack_delay = 3;
    while (!snap_req) @(negedge clk);
    repeat (ack_delay) @(negedge clk);
    checks++;
    if (!snap_req) begin failures++; $display("FAIL: snapshot request dropped"); end
    snap_ack = 1;
    #1;
    checks++;
    if (!take_snapshot) begin failures++; $display("FAIL: no take_snapshot on ack"); end
    for (int i = 0; i < NODES; i++) snap[i] = g[i];
    @(negedge clk);
    snap_ack = 0;
    rs = {ptr_t'(1), ptr_t'(150)};
    reach(rs, 1'b1, live1);
    // program activity during the collection: allocate two nodes, rewrite the root
    alloc_req = 1;
    #1; na = alloc_addr;
    @(negedge clk);
    #1; nb = alloc_addr;
    @(negedge clk);
    alloc_req = 0;
    black[na] = 1; black[nb] = 1; allocd[na] = 1; allocd[nb] = 1;
    mem_write(na, mk_int(32'd7, NULLP));
    mem_write(nb, mk_app(na, na, NULLP));
    mem_write(ptr_t'(1), mk_app(nb, ptr_t'(183), NULLP));
    // keep the memory busy for a while
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      re_req = $urandom_range(0, 1); re_we = 0; re_addr = ptr_t'($urandom_range(1, 199));
    end
    re_req = 0;
    wait_idle();
    check_freed("collection 1", live1);
    for (int i = 0; i < NODES; i++) if (freed[i]) allocd[i] = 0;
    // compression of the chain
    mem_read(ptr_t'(180), n);
    checks++;
    if (n.tag != T_IND || n.left[AW-1:0] != ptr_t'(183)) begin
      failures++; $display("FAIL: node 180 not compressed (tag %0d -> %0d)", n.tag, n.left[AW-1:0]);
    end
    mem_read(ptr_t'(181), n);
    checks++;
    if (n.tag != T_IND || n.left[AW-1:0] != ptr_t'(183)) begin
      failures++; $display("FAIL: node 181 not compressed");
    end
    mem_read(ptr_t'(182), n);
    checks++;
    if (n.tag != T_IND || n.left[AW-1:0] != ptr_t'(183)) begin
      failures++; $display("FAIL: node 182 changed");
    end
    mem_read(ptr_t'(1), n);
    checks++;
    if (n !== mk_app(nb, ptr_t'(183), NULLP)) begin
      failures++; $display("FAIL: live root lost its update");
    end
    checks++;
    if (n_comp < 2 || n_coll != 1 || stalls == 0) begin
      failures++; $display("FAIL: compressions=%0d collections=%0d stalls=%0d", n_comp, n_coll, stalls);
    end
    g[180] = mk_ind(ptr_t'(183), NULLP);
    g[181] = mk_ind(ptr_t'(183), NULLP);

    // ---- collection 2: only the rewritten root is live ----
    for (int i = 0; i < NODES; i++) begin freed[i] = 0; black[i] = 0; end
    roots[5] = NULLP;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!snap_req) @(negedge clk);
    snap_ack = 1;
    for (int i = 0; i < NODES; i++) snap[i] = g[i];
    @(negedge clk);
    snap_ack = 0;
    rs = {ptr_t'(1)};
    reach(rs, 1'b1, live2);
    wait_idle();
    check_freed("collection 2", live2);
    checks++;
    if (free_count != (AW+1)'(NODES - 1 - 4)) begin
      // live: 1, na, nb, 183
      failures++; $display("FAIL: free_count %0d", free_count);
    end
    $display("collections=%0d freed=%0d compressed=%0d collector_stall_cycles=%0d",
             n_coll, n_freed, n_comp, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
