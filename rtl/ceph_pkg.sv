// Shared types and constants of the combinator graph-reduction processor.
//
// The program is a graph of fixed-size nodes held in main memory. A node is
// one of four kinds: an application of a function to an argument, a
// combinator (optionally carrying a numeric index n for the C_n and L_n
// families), an integer value, or an indirection that aliases another node.
// Every node also carries a back pointer: while the reduction engine walks
// down the left spine of an application it records the parent there, so the
// engine needs no evaluation stack.
//
// The combinator set (S, K, I, B, Y, C_n, L_n, arithmetic and comparison
// operators) and the "value applied to a function swaps the two" rule come
// from the architecture; node widths, the encoding and the pointer width
// are this implementation's choices. Address 0 is the null pointer and is
// never allocated. Booleans are the combinators K (true) and KI (false),
// i.e. they select one of two further arguments.
package ceph_pkg;

  // Pointer width: 2**AW usable nodes (the physical memory holds twice that
  // for the garbage-collection snapshot).
  parameter int AW = 10;
  // Width of the value field (integer payload, combinator code + index, or a
  // pointer in its low AW bits).
  parameter int DW = 32;
  parameter int NODES = 1 << AW;
  // Largest index n accepted for C_n and L_n; a C_n redex has n+2 arguments.
  parameter int MAXN = 6;
  parameter int MAXARGS = MAXN + 2;
  // Size of each operand memory local to the arithmetic unit, in 32-bit
  // limbs: the largest integer the engine handles is LIMBS*32 bits.
  parameter int LIMBS = 8;
  // Live pointers the reduction engine hands to the collector at a
  // snapshot: root, current node, parent, redex root, its parent, head,
  // two pre-built nodes, last spine node or integer limb, and the collected arguments.
  parameter int NROOTS = 9 + MAXARGS;

  typedef logic [AW-1:0] ptr_t;
  localparam ptr_t NULLP = '0;

  typedef enum logic [1:0] {
    T_APP  = 2'd0,   // left = function pointer, right = argument pointer
    T_COMB = 2'd1,   // left[7:0] = combinator code, left[15:8] = index n
    T_INT  = 2'd2,   // left = 32-bit limb, right = next more significant limb
    T_IND  = 2'd3    // left[AW-1:0] = target pointer
  } tag_t;

  typedef enum logic [7:0] {
    C_I   = 8'd0,   // I x       => x
    C_K   = 8'd1,   // K x y     => x          (also "true")
    C_KI  = 8'd2,   // KI x y    => y          ("false")
    C_S   = 8'd3,   // S f g x   => (f x) (g x)
    C_B   = 8'd4,   // B f g x   => f (g x)
    C_Y   = 8'd5,   // Y f       => f (Y f), built as a cycle
    C_CN  = 8'd6,   // C_n f e1..en x => f x e1..en
    C_LN  = 8'd7,   // L_n e1..en x   => x e1..en
    C_ADD = 8'd8,   // + a b     => a + b      (operands already values)
    C_SUB = 8'd9,   // - a b     => a - b
    C_MUL = 8'd10,  // * a b     => a * b
    C_EQ  = 8'd11,  // == a b    => K or KI
    C_LT  = 8'd12,  // <  a b    => K or KI
    C_DIV = 8'd13   // quot a b  => a / b, rounded towards zero
  } comb_t;

  typedef struct packed {
    tag_t            tag;
    logic [DW-1:0]   left;
    ptr_t            right;
    ptr_t            back;
  } node_t;

  localparam int NODE_W = $bits(node_t);

  // Arithmetic-unit operations.
  typedef enum logic [2:0] {
    OP_ADD = 3'd0, OP_SUB = 3'd1, OP_MUL = 3'd2, OP_EQ = 3'd3, OP_LT = 3'd4,
    OP_DIV = 3'd5
  } alu_op_t;

  // Helpers to build nodes.
  function automatic node_t mk_app(ptr_t f, ptr_t a, ptr_t bk);
    node_t n;
    n.tag = T_APP; n.left = DW'(f); n.right = a; n.back = bk;
    return n;
  endfunction

  function automatic node_t mk_ind(ptr_t t, ptr_t bk);
    node_t n;
    n.tag = T_IND; n.left = DW'(t); n.right = NULLP; n.back = bk;
    return n;
  endfunction

  function automatic node_t mk_int(logic [DW-1:0] v, ptr_t bk);
    node_t n;
    n.tag = T_INT; n.left = v; n.right = NULLP; n.back = bk;
    return n;
  endfunction

  // One limb of a variable-precision integer, linked to the next limb.
  function automatic node_t mk_int_link(logic [DW-1:0] v, ptr_t nxt, ptr_t bk);
    node_t n;
    n.tag = T_INT; n.left = v; n.right = nxt; n.back = bk;
    return n;
  endfunction

  function automatic node_t mk_comb(comb_t c, logic [7:0] idx, ptr_t bk);
    node_t n;
    n.tag = T_COMB; n.left = DW'({idx, c}); n.right = NULLP; n.back = bk;
    return n;
  endfunction

  // Number of arguments a combinator consumes before it can be rewritten.
  function automatic int unsigned comb_arity(comb_t c, logic [7:0] idx);
    case (c)
      C_I, C_Y:                           return 1;
      C_K, C_KI, C_ADD, C_SUB, C_MUL,
      C_EQ, C_LT, C_DIV:                  return 2;
      C_S, C_B:                           return 3;
      C_CN:                               return int'(idx) + 2;
      C_LN:                               return int'(idx) + 1;
      default:                            return 1;
    endcase
  endfunction

endpackage
