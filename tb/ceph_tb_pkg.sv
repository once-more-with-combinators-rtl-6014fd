// Testbench helper: a small compiler from lambda terms to combinator graphs
// for the graph-reduction processor.
//
// Terms are variables, constant graph nodes, applications and lambdas.
// compile() removes lambdas by Turner-style bracket abstraction:
//   [x] x       = I
//   [x] e       = K e                 if x does not occur in e
//   [x] (f x)   = f                   if x does not occur in f
//   [x] (f g)   = B f ([x] g)         if x does not occur in f
//   [x] (f g)   = C_1 ([x] f) g       if x does not occur in g
//   [x] (f g)   = S ([x] f) ([x] g)   otherwise
// Strict operators are written inside out (OP builds "b (a op)" for
// "a op b") so that the processor evaluates both operands first.
// emit() writes the result into img[], from address 1 upward; the host then
// copies img[1 .. top-1] into graph memory.
package ceph_tb_pkg;
  import ceph_pkg::*;

  class Term;
    int    kind;      // 0 variable, 1 constant node, 2 application, 3 lambda
    string name;
    ptr_t  leaf;
    Term   l, r;
  endclass

  node_t img [NODES];
  int    top = 1;
  ptr_t  cI, cK, cKI, cS, cB, cC1, cY, cADD, cSUB, cMUL, cEQ, cLT;

  function automatic ptr_t nw(node_t n);
    ptr_t p = ptr_t'(top);
    img[top] = n;
    top++;
    return p;
  endfunction

  function automatic Term V(string n);
    Term t = new; t.kind = 0; t.name = n; return t;
  endfunction
  function automatic Term L(ptr_t p);
    Term t = new; t.kind = 1; t.leaf = p; return t;
  endfunction
  function automatic Term A(Term f, Term a);
    Term t = new; t.kind = 2; t.l = f; t.r = a; return t;
  endfunction
  function automatic Term A2(Term f, Term a, Term b); return A(A(f, a), b); endfunction
  function automatic Term A3(Term f, Term a, Term b, Term c); return A(A2(f, a, b), c); endfunction
  function automatic Term LAM(string x, Term body);
    Term t = new; t.kind = 3; t.name = x; t.l = body; return t;
  endfunction
  function automatic Term NUM(int v); return L(nw(mk_int(DW'(v), NULLP))); endfunction
  // a op b, inside out
  function automatic Term OP(ptr_t op, Term a, Term b); return A(b, A(a, L(op))); endfunction

  function automatic bit occurs(string x, Term t);
    if (t.kind == 0) return t.name == x;
    if (t.kind == 1) return 0;
    if (t.kind == 3) return t.name != x && occurs(x, t.l);
    return occurs(x, t.l) || occurs(x, t.r);
  endfunction

  // [x] t for a lambda-free t
  function automatic Term abstr(string x, Term t);
    if (t.kind == 0 && t.name == x) return L(cI);
    if (!occurs(x, t)) return A(L(cK), t);
    if (t.r.kind == 0 && t.r.name == x && !occurs(x, t.l)) return t.l;
    if (!occurs(x, t.l)) return A(A(L(cB), t.l), abstr(x, t.r));
    if (!occurs(x, t.r)) return A(A(L(cC1), abstr(x, t.l)), t.r);
    return A(A(L(cS), abstr(x, t.l)), abstr(x, t.r));
  endfunction

  function automatic Term compile(Term t);
    if (t.kind == 3) return abstr(t.name, compile(t.l));
    if (t.kind == 2) return A(compile(t.l), compile(t.r));
    return t;
  endfunction

  function automatic ptr_t emit(Term t);
    if (t.kind == 1) return t.leaf;
    return nw(mk_app(emit(t.l), emit(t.r), NULLP));
  endfunction

  // start a new program image with one shared node per combinator
  function automatic void reset_image();
    top = 1;
    cI   = nw(mk_comb(C_I, 0, NULLP));   cK   = nw(mk_comb(C_K, 0, NULLP));
    cKI  = nw(mk_comb(C_KI, 0, NULLP));  cS   = nw(mk_comb(C_S, 0, NULLP));
    cB   = nw(mk_comb(C_B, 0, NULLP));   cC1  = nw(mk_comb(C_CN, 1, NULLP));
    cY   = nw(mk_comb(C_Y, 0, NULLP));   cADD = nw(mk_comb(C_ADD, 0, NULLP));
    cSUB = nw(mk_comb(C_SUB, 0, NULLP)); cMUL = nw(mk_comb(C_MUL, 0, NULLP));
    cEQ  = nw(mk_comb(C_EQ, 0, NULLP));  cLT  = nw(mk_comb(C_LT, 0, NULLP));
  endfunction

  // recursive definition: Y (\self. body)
  function automatic Term REC(string self, Term body);
    return A(L(cY), LAM(self, body));
  endfunction
endpackage
