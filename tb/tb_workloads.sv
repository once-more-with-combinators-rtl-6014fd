// Workload test of the graph-reduction processor at its default size: one
// small program from each class of benchmark the architecture targets
// (integer arithmetic, list processing, matrix manipulation and a small
// neural network). Each program is written as a lambda term, compiled to
// combinators by ceph_tb_pkg, loaded through the host port and evaluated;
// the integer result is compared with the value computed directly in the
// testbench. Lists use the Scott encoding:
//   nil = \n c. n        cons h t = \n c. c h t
// so a list is consumed by applying it to a "nil" result and a "cons"
// continuation. Two more programs use variable-precision integers: 25!
// (three limbs, read back limb by limb through the host port) and a shared
// 25! that must stay live while fib 11 runs with collections back to back.
// Cycle counts are printed for each program.
module tb_workloads;
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

  // ---- library ----
  function automatic Term NIL(); return L(cK); endfunction
  function automatic Term CONS(Term h, Term t);
    return LAM("%n", LAM("%c", A2(V("%c"), h, t)));
  endfunction
  function automatic Term LIST(int v [$]);
    Term t = NIL();
    for (int i = v.size() - 1; i >= 0; i--) t = CONS(NUM(v[i]), t);
    return t;
  endfunction
  function automatic Term IF_LT(Term a, Term b, Term yes, Term no);
    return A2(OP(cLT, a, b), yes, no);
  endfunction
  // range a b = (b < a) nil (cons a (range (a+1) b))
  function automatic Term RANGE();
    return REC("range", LAM("a", LAM("b",
      IF_LT(V("b"), V("a"), NIL(),
            CONS(V("a"), A2(V("range"), OP(cADD, V("a"), NUM(1)), V("b")))))));
  endfunction
  // map f xs = xs nil (\h t. cons (f h) (map f t))
  function automatic Term MAP();
    return REC("map", LAM("f", LAM("xs",
      A2(V("xs"), NIL(), LAM("h", LAM("t",
        CONS(A(V("f"), V("h")), A2(V("map"), V("f"), V("t")))))))));
  endfunction
  // sum xs = xs 0 (\h t. h + sum t)
  function automatic Term SUM();
    return REC("sum", LAM("xs",
      A2(V("xs"), NUM(0), LAM("h", LAM("t", OP(cADD, V("h"), A(V("sum"), V("t"))))))));
  endfunction
  // dot xs ys = xs 0 (\h t. ys 0 (\h2 t2. h*h2 + dot t t2))
  function automatic Term DOT();
    Term inner, outer;
    inner = LAM("h2", LAM("t2",
              OP(cADD, OP(cMUL, V("h"), V("h2")), A2(V("dot"), V("t"), V("t2")))));
    outer = LAM("h", LAM("t", A2(V("ys"), NUM(0), inner)));
    return REC("dot", LAM("xs", LAM("ys", A2(V("xs"), NUM(0), outer))));
  endfunction
  // relu z = (z < 0) 0 z
  function automatic Term RELU();
    return LAM("z", IF_LT(V("z"), NUM(0), NUM(0), V("z")));
  endfunction

  // ---- running a program ----
  typedef logic signed [255:0] big_t;

  task automatic run(string name, Term prog, big_t expected);
    ptr_t main;
    int   cycles = 0;
    int   n = 0;
    big_t got;
    node_t nd;
    main = emit(compile(prog));
    while (gc_busy) @(negedge clk);       // the collector must finish first
    for (int i = 1; i < top; i++) begin
      @(negedge clk);
      host_req = 1; host_we = 1; host_addr = ptr_t'(i); host_wdata = img[i];
    end
    @(negedge clk);
    host_req = 0; host_we = 0;
    host_init = 1; host_next = ptr_t'(top);
    @(negedge clk);
    host_init = 0;
    root_in = main; start = 1;
    @(negedge clk);
    start = 0;
    while (!done && !error && cycles < 2000000) begin
      @(negedge clk);
      cycles++;
    end
    // read the integer back through the host port, limb by limb
    got = '0;
    nd  = result;
    while (done && nd.tag == T_INT && n < 8) begin
      got[32*n +: 32] = nd.left;
      n++;
      if (nd.right == NULLP) break;
      @(negedge clk);
      host_req = 1; host_we = 0; host_addr = nd.right;
      @(negedge clk);
      host_req = 0;
      nd = host_rdata;
    end
    if (n > 0) got = (got <<< (256 - 32 * n)) >>> (256 - 32 * n);
    checks++;
    if (!done || result.tag != T_INT || got != expected) begin
      failures++;
      $display("FAIL %s: done=%0b error=%0b(%0d) value=%0d expected %0d",
               name, done, error, err_code, got, expected);
    end else
      $display("ok   %-26s = %0d  (%0d cycles, graph %0d nodes, %0d collections so far)",
               name, got, cycles, top - 1, n_collections);
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int M [3][3] = '{'{2, -1, 3}, '{0, 4, 1}, '{5, 2, -2}};
  int v [3]    = '{3, 1, 4};
  int W [3][4] = '{'{1, -2, 3, 1}, '{-3, 1, -1, -2}, '{2, 2, -1, 1}};
  int x [4]    = '{2, 1, 3, -1};
  int w2 [3]   = '{3, -1, 2};

  initial begin
    Term rows, prog;
    longint exp_v;
    int q [$];
    host_req = 0; host_we = 0; host_addr = '0; host_wdata = '0; host_init = 0;
    host_next = '0; start = 0; root_in = '0; gc_force = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. arithmetic: fib 12
    reset_image();
    prog = A(REC("fib", LAM("n", IF_LT(V("n"), NUM(2), V("n"),
             OP(cADD, A(V("fib"), OP(cSUB, V("n"), NUM(1))),
                      A(V("fib"), OP(cSUB, V("n"), NUM(2))))))), NUM(12));
    run("fib 12", prog, 144);

    // 2. list processing: sum (map (\x. x*2) (range 1 40))
    reset_image();
    prog = A(SUM(), A2(MAP(), LAM("x", OP(cMUL, V("x"), NUM(2))), A2(RANGE(), NUM(1), NUM(40))));
    run("sum (map (*2) [1..40])", prog, 40 * 41);

    // 3. matrix: sum of the matrix-vector product M v
    reset_image();
    rows = NIL();
    exp_v = 0;
    for (int i = 2; i >= 0; i--) begin
      q = {M[i][0], M[i][1], M[i][2]};
      rows = CONS(LIST(q), rows);
    end
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) exp_v += M[i][j] * v[j];
    q = {v[0], v[1], v[2]};
    prog = A(SUM(), A2(MAP(), LAM("row", A2(DOT(), V("row"), LIST(q))), rows));
    run("sum (M v), 3x3", prog, exp_v);

    // 4. neural network: 4 inputs, 3 ReLU neurons, 1 linear output
    reset_image();
    rows = NIL();
    for (int i = 2; i >= 0; i--) begin
      q = {W[i][0], W[i][1], W[i][2], W[i][3]};
      rows = CONS(LIST(q), rows);
    end
    exp_v = 0;
    for (int i = 0; i < 3; i++) begin
      longint z;
      z = 0;
      for (int j = 0; j < 4; j++) z += W[i][j] * x[j];
      if (z < 0) z = 0;
      exp_v += w2[i] * z;
    end
    begin
      int qx [$] = {x[0], x[1], x[2], x[3]};
      int qw [$] = {w2[0], w2[1], w2[2]};
      prog = A2(DOT(), LIST(qw),
                A2(MAP(), LAM("w", A(RELU(), A2(DOT(), V("w"), LIST(qx)))), rows));
    end
    run("neural net 4-3-1", prog, exp_v);

    // 5. variable-precision arithmetic: 25! needs three 32-bit limbs
    reset_image();
    prog = A(REC("fact", LAM("n", IF_LT(V("n"), NUM(1), NUM(1),
             OP(cMUL, V("n"), A(V("fact"), OP(cSUB, V("n"), NUM(1))))))), NUM(25));
    begin
      big_t f;
      f = 1;
      for (int i = 2; i <= 25; i++) f = f * i;
      // collections run back to back, so limb chains must survive marking
      gc_force = 1;
      run("25!", prog, f);
      // a shared big value that stays live while fib 11 is computed
      reset_image();
      prog = A(LAM("f", OP(cSUB, OP(cADD, V("f"),
                 A(REC("fib", LAM("n", IF_LT(V("n"), NUM(2), V("n"),
                   OP(cADD, A(V("fib"), OP(cSUB, V("n"), NUM(1))),
                            A(V("fib"), OP(cSUB, V("n"), NUM(2))))))), NUM(11))), V("f"))),
               A(REC("fact", LAM("n", IF_LT(V("n"), NUM(1), NUM(1),
                 OP(cMUL, V("n"), A(V("fact"), OP(cSUB, V("n"), NUM(1))))))), NUM(25)));
      run("(25! + fib 11) - 25!", prog, 89);
      gc_force = 0;
    end

    $display("reductions=%0d swaps=%0d collections=%0d freed=%0d compressed=%0d alloc_stalls=%0d",
             n_reductions, n_swaps, n_collections, n_freed, n_compressed, n_alloc_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
