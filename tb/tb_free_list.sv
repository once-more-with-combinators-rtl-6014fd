// Self-checking test of the node allocator against an exact reference model
// (LIFO of reclaimed addresses, then a bump pointer). Random allocations and
// frees of allocated addresses, including frees in the same cycle as an
// allocation and running the pool dry, are checked for the granted address,
// the grant, the free count and the allocated-bit lookup.
module tb_free_list;
  import ceph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        init;
  ptr_t        init_next;
  logic        alloc_req, alloc_gnt;
  ptr_t        alloc_addr;
  logic        free_valid;
  ptr_t        free_addr;
  ptr_t        q_addr;
  logic        q_alloc;
  logic [AW:0] free_count;

  free_list dut (.*);

  int checks = 0, failures = 0;
  ptr_t stk_m [$];
  int   bump_m;
  logic alloc_m [NODES];
  ptr_t live [$];
  int   dry = 0, bypasses = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; init_next = '0; alloc_req = 0; free_valid = 0; free_addr = '0; q_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // program occupies nodes 1..99
    init = 1; init_next = ptr_t'(100);
    @(negedge clk);
    init = 0;
    bump_m = 100;
    for (int i = 0; i < NODES; i++) alloc_m[i] = (i > 0 && i < 100);
    for (int i = 1; i < 100; i++) live.push_back(ptr_t'(i));

    for (int cyc = 0; cyc < 30000; cyc++) begin
      logic exp_gnt;
      ptr_t exp_addr;
      int   fi;
      int   src;   // 0 none, 1 stack, 2 bump, 3 passed-through free
      // phases: mostly allocate, then mostly free, so the pool runs dry
      alloc_req  = ((cyc / 3000) % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 3);
      free_valid = live.size() > 0 &&
                   (((cyc / 3000) % 2 == 0) ? ($urandom_range(0, 9) < 2) : ($urandom_range(0, 9) < 7));
      fi = free_valid ? $urandom_range(0, live.size() - 1) : 0;
      free_addr = free_valid ? live[fi] : '0;
      q_addr = ptr_t'($urandom_range(0, NODES - 1));
      // reference
      exp_gnt = 0; exp_addr = '0; src = 0;
      if (alloc_req) begin
        if (stk_m.size() > 0)      begin exp_gnt = 1; exp_addr = stk_m[$]; src = 1; end
        else if (bump_m < NODES)   begin exp_gnt = 1; exp_addr = ptr_t'(bump_m); src = 2; end
        else if (free_valid)       begin exp_gnt = 1; exp_addr = free_addr; src = 3; bypasses++; end
        else dry++;
      end
      #1;
      checks++;
      if (alloc_gnt !== exp_gnt || (exp_gnt && alloc_addr !== exp_addr) ||
          int'(free_count) != stk_m.size() + (NODES - bump_m) || q_alloc !== alloc_m[q_addr]) begin
        failures++;
        $display("FAIL cyc %0d: gnt %0b/%0b addr %0d/%0d count %0d/%0d q %0b/%0b", cyc,
                 alloc_gnt, exp_gnt, alloc_addr, exp_addr, free_count,
                 stk_m.size() + (NODES - bump_m), q_alloc, alloc_m[q_addr]);
      end
      // update the model
      if (free_valid) begin
        live.delete(fi);
        alloc_m[free_addr] = 0;
      end
      if (src == 1) void'(stk_m.pop_back());
      if (src == 2) bump_m++;
      if (free_valid && src != 3) stk_m.push_back(free_addr);
      if (exp_gnt) begin
        alloc_m[exp_addr] = 1;
        live.push_back(exp_addr);
      end
      @(negedge clk);
    end
    alloc_req = 0; free_valid = 0;
    checks++;
    if (dry == 0) begin failures++; $display("FAIL: pool never ran dry"); end
    $display("dry_cycles=%0d bypasses=%0d", dry, bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
