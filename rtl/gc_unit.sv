// Concurrent mark-and-sweep garbage collector working on a memory snapshot.
//
// A collection runs alongside the reduction engine:
//  1. Snapshot. The collector clears its mark bits and raises snap_req. When
//     the engine reaches a safe point it answers with snap_ack; in that
//     cycle take_snapshot freezes the snapshot memory's image and the
//     engine's live pointers (roots) are latched.
//  2. Mark. Roots, then the children of every marked node (function and
//     argument of an application, target of an indirection), are pushed on
//     a stack of node pointers. A node is marked when it is pushed, so no
//     node is pushed twice and the stack needs at most one entry per node.
//     Nodes are read from the snapshot image, never from the live graph.
//     Nodes the engine allocates during a collection are marked at once
//     ("allocated black"), so they survive even though the snapshot does
//     not contain them.
//  3. Sweep. Every address that is allocated but unmarked was garbage in the
//     snapshot and is returned to the allocator, one per cycle. For every
//     marked indirection whose target is itself an indirection, the chain is
//     followed in the snapshot and the node is rewritten (in the live graph)
//     to point at the first non-indirection node, so that no indirection
//     points to another one.
// The snapshot scheme, mark-and-sweep, the pointer stack, the mark-bit
// memory and the indirection compression follow the architecture. When a
// collection starts, how roots are gathered, marking at push time and
// allocating black are this implementation's choices. Compression writes an
// indirection node that existed in the snapshot; it relies on the engine
// never rewriting an indirection node.
//
// Memory port: same request/grant/rvalid protocol as snapshot_mem's gc_*
// port (grant may be withheld while the engine uses the memory).
module gc_unit
  import ceph_pkg::*;
#(
  parameter int N_ROOTS = ceph_pkg::NROOTS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,          // begin a collection when idle
  output logic        busy,
  // snapshot handshake with the reduction engine
  output logic        snap_req,
  input  logic        snap_ack,
  output logic        take_snapshot,
  input  ptr_t        roots [N_ROOTS], // NULLP entries are ignored
  // memory port
  output logic        mem_req,
  output logic        mem_we,
  output logic        mem_snap,
  output ptr_t        mem_addr,
  output node_t       mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  node_t       mem_rdata,
  // allocator side
  input  logic        alloc_evt,
  input  ptr_t        alloc_evt_addr,
  output logic        free_valid,
  output ptr_t        free_addr,
  output ptr_t        q_addr,
  input  logic        q_alloc,
  // statistics
  output logic [31:0] n_collections,
  output logic [31:0] n_freed,
  output logic [31:0] n_compressed
);
  typedef enum logic [3:0] {
    G_IDLE, G_SNAP, G_ROOTS, G_POP, G_RD, G_RDW, G_PUSHR,
    G_SWEEP, G_SRD, G_SRDW, G_CRD, G_CRDW, G_CWR
  } gstate_t;

  gstate_t          st_q;
  logic [NODES-1:0] mark_q, black_q;
  ptr_t             stk [NODES];
  logic [AW:0]      sp_q;
  ptr_t             root_q [N_ROOTS];
  int unsigned      ri_q;
  ptr_t             ptr_q;      // node being scanned / chain position
  ptr_t             rptr_q;     // pending right child
  logic [AW:0]      a_q;        // sweep address
  ptr_t             tgt_q;      // compression target
  logic             need_q;     // chain of two or more indirections seen

  // push candidate for this cycle
  logic push_en;
  ptr_t push_p;
  logic do_push;

  always_comb begin
    push_en = 1'b0;
    push_p  = NULLP;
    case (st_q)
      G_ROOTS: begin push_en = 1'b1; push_p = root_q[ri_q]; end
      G_RDW:   if (mem_rvalid && (mem_rdata.tag == T_APP || mem_rdata.tag == T_IND)) begin
                 push_en = 1'b1; push_p = mem_rdata.left[AW-1:0];
               end else if (mem_rvalid && mem_rdata.tag == T_INT) begin
                 push_en = 1'b1; push_p = mem_rdata.right;   // next limb
               end
      G_PUSHR: begin push_en = 1'b1; push_p = rptr_q; end
      default: ;
    endcase
    do_push = push_en && push_p != NULLP && !mark_q[push_p];
  end

  // memory requests
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_snap  = 1'b1;
    mem_addr  = ptr_q;
    mem_wdata = mk_ind(tgt_q, NULLP);
    case (st_q)
      G_RD, G_CRD: mem_req = 1'b1;
      G_SRD:       begin mem_req = 1'b1; mem_addr = a_q[AW-1:0]; end
      G_CWR:       begin mem_req = 1'b1; mem_we = 1'b1; mem_snap = 1'b0; mem_addr = a_q[AW-1:0]; end
      default: ;
    endcase
  end

  assign busy          = st_q != G_IDLE;
  assign snap_req      = st_q == G_SNAP;
  assign take_snapshot = snap_req && snap_ack;
  assign q_addr        = a_q[AW-1:0];
  assign free_valid    = st_q == G_SWEEP && q_alloc && !mark_q[a_q[AW-1:0]];
  assign free_addr     = a_q[AW-1:0];

  logic sweep_last;
  assign sweep_last = a_q == (AW+1)'(NODES - 1);

  always_ff @(posedge clk) begin
    if (do_push) stk[sp_q[AW-1:0]] <= push_p;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= G_IDLE;
      mark_q        <= '0;
      black_q       <= '0;
      sp_q          <= '0;
      ri_q          <= 0;
      ptr_q         <= NULLP;
      rptr_q        <= NULLP;
      a_q           <= '0;
      tgt_q         <= NULLP;
      need_q        <= 1'b0;
      n_collections <= '0;
      n_freed       <= '0;
      n_compressed  <= '0;
      for (int i = 0; i < N_ROOTS; i++) root_q[i] <= NULLP;
    end else begin
      if (do_push) begin
        mark_q[push_p] <= 1'b1;
        sp_q           <= sp_q + 1'b1;
      end
      if (alloc_evt && st_q != G_IDLE && st_q != G_SNAP) begin
        mark_q[alloc_evt_addr]  <= 1'b1;
        black_q[alloc_evt_addr] <= 1'b1;
      end
      if (free_valid) n_freed <= n_freed + 1;

      unique case (st_q)
        G_IDLE: if (start) begin
          mark_q  <= '0;
          black_q <= '0;
          sp_q    <= '0;
          st_q    <= G_SNAP;
        end
        G_SNAP: if (snap_ack) begin
          root_q <= roots;
          ri_q   <= 0;
          st_q   <= G_ROOTS;
        end
        G_ROOTS: begin
          if (ri_q == N_ROOTS - 1) st_q <= G_POP;
          ri_q <= ri_q + 1;
        end
        G_POP: begin
          if (sp_q == 0) begin
            a_q  <= (AW+1)'(1);
            st_q <= G_SWEEP;
          end else begin
            ptr_q <= stk[sp_q[AW-1:0] - 1'b1];
            sp_q  <= sp_q - 1'b1;
            st_q  <= G_RD;
          end
        end
        G_RD: if (mem_gnt) st_q <= G_RDW;
        G_RDW: if (mem_rvalid) begin
          if (mem_rdata.tag == T_APP) begin
            rptr_q <= mem_rdata.right;
            st_q   <= G_PUSHR;
          end else begin
            st_q   <= G_POP;
          end
        end
        G_PUSHR: st_q <= G_POP;
        G_SWEEP: begin
          // marked snapshot nodes are inspected for indirection chains
          if (q_alloc && mark_q[a_q[AW-1:0]] && !black_q[a_q[AW-1:0]]) begin
            need_q <= 1'b0;
            st_q   <= G_SRD;
          end else if (sweep_last) begin
            n_collections <= n_collections + 1;
            st_q <= G_IDLE;
          end else begin
            a_q <= a_q + 1'b1;
          end
        end
        G_SRD: if (mem_gnt) st_q <= G_SRDW;
        G_SRDW: if (mem_rvalid) begin
          if (mem_rdata.tag == T_IND) begin
            ptr_q <= mem_rdata.left[AW-1:0];
            tgt_q <= mem_rdata.left[AW-1:0];
            st_q  <= G_CRD;
          end else if (sweep_last) begin
            n_collections <= n_collections + 1;
            st_q <= G_IDLE;
          end else begin
            a_q  <= a_q + 1'b1;
            st_q <= G_SWEEP;
          end
        end
        G_CRD: if (mem_gnt) st_q <= G_CRDW;
        G_CRDW: if (mem_rvalid) begin
          if (mem_rdata.tag == T_IND) begin
            // target is an indirection too: keep following, rewrite later
            ptr_q  <= mem_rdata.left[AW-1:0];
            tgt_q  <= mem_rdata.left[AW-1:0];
            need_q <= 1'b1;
            st_q   <= G_CRD;
          end else if (need_q) begin
            st_q   <= G_CWR;
          end else if (sweep_last) begin
            n_collections <= n_collections + 1;
            st_q <= G_IDLE;
          end else begin
            a_q  <= a_q + 1'b1;
            st_q <= G_SWEEP;
          end
        end
        G_CWR: if (mem_gnt) begin
          n_compressed <= n_compressed + 1;
          if (sweep_last) begin
            n_collections <= n_collections + 1;
            st_q <= G_IDLE;
          end else begin
            a_q  <= a_q + 1'b1;
            st_q <= G_SWEEP;
          end
        end
        default: st_q <= G_IDLE;
      endcase
    end
  end
endmodule
