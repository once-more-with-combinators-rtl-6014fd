// Self-checking test of the reduction engine on its own.
//
// The engine is connected to a behavioural graph memory (random grant
// stalls, one-cycle read latency) and a behavioural allocator (hands out
// ascending addresses, refuses at random to exercise allocation stalls).
// A snapshot request is raised at random; the test checks that it is only
// acknowledged when no memory access is issued. Small combinator programs
// are built directly in memory and the head node the engine stops at is
// compared with the value worked out by hand for each program. Integer
// cases include multi-limb operands and results (built as limb chains and
// read back by following the chain) and division; errors are checked too.
module tb_reduction_engine;
  import ceph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  start;
  ptr_t  root_in;
  logic  busy, done, error;
  logic [1:0] err_code;
  node_t result;
  logic  mem_req, mem_we, mem_gnt, mem_rvalid;
  ptr_t  mem_addr;
  node_t mem_wdata, mem_rdata;
  logic  alloc_req, alloc_gnt;
  ptr_t  alloc_addr;
  logic  snap_req, snap_ack;
  ptr_t  roots [NROOTS];
  logic [31:0] n_red, n_swaps, n_stalls, n_ind;

  reduction_engine dut (
    .clk, .rst_n, .start, .root_in, .busy, .done, .result, .error, .err_code,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .alloc_req, .alloc_gnt, .alloc_addr, .snap_req, .snap_ack, .roots,
    .n_reductions(n_red), .n_swaps, .n_alloc_stalls(n_stalls), .n_ind_follow(n_ind)
  );

  int checks = 0, failures = 0;
  int snap_acks = 0;

  // behavioural memory
  node_t mem [NODES];
  logic  gnt_rand;
  always_ff @(posedge clk) gnt_rand <= ($urandom_range(0, 3) != 0);
  assign mem_gnt = mem_req && gnt_rand;
  always_ff @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (mem_req && mem_gnt) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else begin
        mem_rdata  <= mem[mem_addr];
        mem_rvalid <= 1'b1;
      end
    end
  end

  // behavioural allocator
  ptr_t next_free;
  logic alloc_rand;
  always_ff @(posedge clk) alloc_rand <= ($urandom_range(0, 2) != 0);
  assign alloc_gnt  = alloc_req && alloc_rand;
  assign alloc_addr = next_free;
  always_ff @(posedge clk) if (alloc_req && alloc_gnt) next_free <= next_free + 1'b1;

  // random snapshot requests, acknowledged only at safe points
  always_ff @(posedge clk) snap_req <= ($urandom_range(0, 7) == 0);
  always @(posedge clk) if (rst_n && snap_ack) begin
    snap_acks++;
    if (mem_req || (alloc_req && alloc_gnt)) begin
      failures++;
      $display("FAIL: snapshot acknowledged while accessing memory");
    end
  end

  // graph building
  ptr_t top_q;
  function automatic ptr_t nw(node_t n);
    ptr_t p = top_q;
    mem[p] = n;
    top_q = top_q + 1'b1;
    return p;
  endfunction
  function automatic ptr_t app(ptr_t f, ptr_t a); return nw(mk_app(f, a, NULLP)); endfunction
  function automatic ptr_t num(int v);            return nw(mk_int(DW'(v), NULLP)); endfunction
  function automatic ptr_t cmb(comb_t c, int n = 0); return nw(mk_comb(c, 8'(n), NULLP)); endfunction
  function automatic ptr_t app2(ptr_t f, ptr_t a, ptr_t b); return app(app(f, a), b); endfunction
  function automatic ptr_t app3(ptr_t f, ptr_t a, ptr_t b, ptr_t c); return app(app2(f, a, b), c); endfunction

  typedef logic signed [511:0] big_t;
  function automatic int limbs_of(big_t v);
    int n = 1;
    while (n < 16 && ((v <<< (512 - 32 * n)) >>> (512 - 32 * n)) != v) n++;
    return n;
  endfunction
  // a variable-precision integer: a chain of limb nodes, least significant first
  function automatic ptr_t big(big_t v);
    ptr_t nxt = NULLP;
    for (int i = limbs_of(v) - 1; i >= 0; i--) nxt = nw(mk_int_link(v[32*i +: 32], nxt, NULLP));
    return nxt;
  endfunction

  task automatic run(ptr_t r, output int cycles);
    cycles = 0;
    next_free = top_q + 1'b1;   // keep allocator away from built nodes
    @(negedge clk);
    root_in = r; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && !error && cycles < 20000) begin
      @(negedge clk);
      cycles++;
    end
    top_q = next_free;
    if (!done && !error) begin   // hung: restart the engine for the next case
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
    end
  endtask

  task automatic expect_int(string name, ptr_t r, int v);
    int cyc;
    run(r, cyc);
    checks++;
    if (!done || result.tag != T_INT || result.left != DW'(v)) begin
      failures++;
      $display("FAIL %s: done=%0b err=%0b tag=%0d value=%0d (expected %0d)",
               name, done, error, result.tag, $signed(result.left), v);
    end else $display("ok   %s = %0d (%0d cycles)", name, v, cyc);
  endtask

  task automatic expect_big(string name, ptr_t r, big_t v);
    int cyc, n;
    big_t got;
    ptr_t p;
    node_t nd;
    run(r, cyc);
    checks++;
    got = '0;
    n   = 0;
    nd  = result;
    while (done && nd.tag == T_INT && n < 16) begin
      got[32*n +: 32] = nd.left;
      n++;
      if (nd.right == NULLP) break;
      p  = nd.right;
      nd = mem[p];
    end
    if (n > 0) got = (got <<< (512 - 32 * n)) >>> (512 - 32 * n);
    if (!done || result.tag != T_INT || got != v || n != limbs_of(v)) begin
      failures++;
      $display("FAIL %s: done=%0b err=%0b limbs=%0d value=%0h (expected %0h)",
               name, done, error, n, got, v);
    end else $display("ok   %s (%0d limbs, %0d cycles)", name, n, cyc);
  endtask

  task automatic expect_comb(string name, ptr_t r, comb_t c);
    int cyc;
    run(r, cyc);
    checks++;
    if (!done || result.tag != T_COMB || result.left[7:0] != c) begin
      failures++;
      $display("FAIL %s: done=%0b tag=%0d code=%0d (expected comb %0d)",
               name, done, result.tag, result.left[7:0], c);
    end else $display("ok   %s (%0d cycles)", name, cyc);
  endtask

  task automatic expect_err(string name, ptr_t r, logic [1:0] code);
    int cyc;
    run(r, cyc);
    checks++;
    if (!error || err_code != code) begin
      failures++;
      $display("FAIL %s: error=%0b code=%0d (expected %0d)", name, error, err_code, code);
    end else $display("ok   %s error %0d", name, code);
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ptr_t e, sq, n5, x, r, p0, red_before, tmp;
  int   cyc;
  initial begin
    start = 1'b0; root_in = NULLP; top_q = 1; next_free = 1;
    for (int i = 0; i < NODES; i++) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    expect_int("I 5", app(cmb(C_I), num(5)), 5);
    expect_int("K 7 8", app2(cmb(C_K), num(7), num(8)), 7);
    expect_int("KI 7 8", app2(cmb(C_KI), num(7), num(8)), 8);
    expect_int("S K K 3", app3(cmb(C_S), cmb(C_K), cmb(C_K), num(3)), 3);
    // 2 + 3, turned inside out: 3 (2 (+))
    expect_int("3 (2 (+))", app(num(3), app(num(2), cmb(C_ADD))), 5);
    // 10 - 3 = (-) 10 3 written as 3 (10 (-))
    expect_int("3 (10 (-))", app(num(3), app(num(10), cmb(C_SUB))), 7);
    // square (2 + 3) with square = S I (S I (K *)) : x (x (*)), shared argument
    e  = app(num(3), app(num(2), cmb(C_ADD)));
    sq = app2(cmb(C_S), cmb(C_I), app2(cmb(C_S), cmb(C_I), app(cmb(C_K), cmb(C_MUL))));
    r  = app(sq, e);
    red_before = ptr_t'(0);
    expect_int("square (2+3)", r, 25);
    // the shared argument was evaluated in place, once
    checks++;
    if (mem[e].tag != T_INT || mem[e].left != 32'd5) begin
      failures++; $display("FAIL: shared argument not updated in place");
    end
    // C_1 (-) 3 10 => (-) 10 3 = 7
    expect_int("C_1 - 3 10", app3(cmb(C_CN, 1), cmb(C_SUB), num(3), num(10)), 7);
    // C_2 KI ((-) 20) 5 x => KI x ((-) 20) 5 => (-) 20 5 = 15
    x = num(99);
    r = app(app3(cmb(C_CN, 2), cmb(C_KI), app(cmb(C_SUB), num(20)), num(5)), x);
    expect_int("C_2 KI (- 20) 5 x", r, 15);
    // C_0 f x => f x : C_0 (K 4) 9 => 4
    expect_int("C_0 (K 4) 9", app2(cmb(C_CN, 0), app(cmb(C_K), num(4)), num(9)), 4);
    // L_2 10 4 (-) => (-) 10 4 = 6
    expect_int("L_2 10 4 -", app3(cmb(C_LN, 2), num(10), num(4), cmb(C_SUB)), 6);
    // L_3 e1 e2 e3 x => x e1 e2 e3 : with x = K KI, K KI 1 2 3 -> KI 2 3 -> 3
    expect_int("L_3 1 2 3 (K KI)",
      app(app3(cmb(C_LN, 3), num(1), num(2), num(3)), app(cmb(C_K), cmb(C_KI))), 3);
    // L_0 7 => 7
    expect_int("L_0 7", app(cmb(C_LN, 0), num(7)), 7);
    // B (K 8) I 4 => K 8 (I 4) => 8
    expect_int("B (K 8) I 4", app3(cmb(C_B), app(cmb(C_K), num(8)), cmb(C_I), num(4)), 8);
    // B K I 6 7 => K (I 6) 7 => I 6 => 6
    expect_int("B K I 6 7", app(app3(cmb(C_B), cmb(C_K), cmb(C_I), num(6)), num(7)), 6);
    // Y (K 3) => K 3 (Y (K 3)) => 3
    expect_int("Y (K 3)", app(cmb(C_Y), app(cmb(C_K), num(3))), 3);
    // comparisons select between two alternatives
    expect_int("(== 3 3) 11 22", app2(app2(cmb(C_EQ), num(3), num(3)), num(11), num(22)), 11);
    expect_int("(< 5 3) 11 22", app2(app2(cmb(C_LT), num(5), num(3)), num(11), num(22)), 22);
    expect_int("(< -2 3) 11 22", app2(app2(cmb(C_LT), num(-2), num(3)), num(11), num(22)), 11);
    // operand behind an indirection
    tmp = nw(mk_ind(num(40), NULLP));
    expect_int("(+ ind40 2)", app2(cmb(C_ADD), tmp, num(2)), 42);
    // partial application is already in weak head normal form
    expect_comb("K 3", app(cmb(C_K), num(3)), C_K);
    // errors
    // variable-precision integers
    expect_big("2^30 * 4", app2(cmb(C_MUL), num(32'h4000_0000), num(4)), big_t'(1) <<< 32);
    expect_big("2^31-1 + 1", app2(cmb(C_ADD), num(32'h7fff_ffff), num(1)), big_t'(1) <<< 31);
    expect_big("-2^31 - 1", app2(cmb(C_SUB), num(32'h8000_0000), num(1)), -(big_t'(1) <<< 31) - 1);
    expect_big("(2^100+5) - 2^100",
               app2(cmb(C_SUB), big((big_t'(1) <<< 100) + 5), big(big_t'(1) <<< 100)), 5);
    expect_big("2^64 * -(2^64)",
               app2(cmb(C_MUL), big(big_t'(1) <<< 64), big(-(big_t'(1) <<< 64))),
               -(big_t'(1) <<< 128));
    expect_big("I ((3^40) * 7)", app(cmb(C_I), app2(cmb(C_MUL), big(big_t'(3) ** 40), num(7))),
               (big_t'(3) ** 40) * 7);
    expect_comb("-(2^70) < 3", app2(cmb(C_LT), big(-(big_t'(1) <<< 70)), num(3)), C_K);
    expect_comb("2^70 == 2^70", app2(cmb(C_EQ), big(big_t'(1) <<< 70), big(big_t'(1) <<< 70)), C_K);
    expect_comb("2^70 == 2^71", app2(cmb(C_EQ), big(big_t'(1) <<< 70), big(big_t'(1) <<< 71)), C_KI);
    expect_big("quot (2^100+7) 3",
               app2(cmb(C_DIV), big((big_t'(1) <<< 100) + 7), num(3)), ((big_t'(1) <<< 100) + 7) / 3);
    expect_big("quot -7 2", app2(cmb(C_DIV), num(-7), num(2)), -3);
    expect_big("quot (-(2^90)) (2^40)",
               app2(cmb(C_DIV), big(-(big_t'(1) <<< 90)), big(big_t'(1) <<< 40)), -(big_t'(1) <<< 50));
    expect_err("division by zero", app2(cmb(C_DIV), num(5), num(0)), 2'd2);
    expect_err("overflow", app2(cmb(C_MUL), big(big_t'(1) <<< 200), big(big_t'(1) <<< 200)), 2'd2);
    expect_err("type", app2(cmb(C_ADD), cmb(C_K), num(4)), 2'd1);
    expect_err("index", app(cmb(C_CN, 7), num(1)), 2'd3);

    // mechanisms exercised
    checks++;
    if (n_swaps == 0 || n_stalls == 0 || n_ind == 0 || snap_acks == 0) begin
      failures++;
      $display("FAIL: swaps=%0d stalls=%0d ind=%0d snaps=%0d", n_swaps, n_stalls, n_ind, snap_acks);
    end
    $display("reductions=%0d swaps=%0d alloc_stalls=%0d ind_follows=%0d snapshot_acks=%0d",
             n_red, n_swaps, n_stalls, n_ind, snap_acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
