// Node allocator: hands out free node addresses to the reduction engine and
// takes back the addresses the garbage collector frees.
//
// Addresses come first from a stack of reclaimed nodes and, when that is
// empty, from a bump pointer that sweeps once through never-used memory.
// An allocated-bit per node records which addresses are in use; the
// collector's sweep consults it (q_addr -> q_alloc) so that it frees only
// nodes that are allocated and unmarked. The architecture leaves the
// allocator unspecified; this organisation is this implementation's choice.
//
// Interface (all single cycle, combinational grant):
//   init / init_next : reset the pool; addresses 1 .. init_next-1 are the
//                      host-loaded program graph and count as allocated
//   alloc_req        : request; alloc_gnt and alloc_addr answer in the same
//                      cycle (no grant when the memory is exhausted)
//   free_valid/addr  : return one address per cycle (from the sweep)
//   free_count       : number of addresses that can still be handed out
// A free and an allocation in the same cycle are both served; if the stack
// is empty the freed address is passed straight to the requester.
module free_list
  import ceph_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  ptr_t        init_next,
  input  logic        alloc_req,
  output logic        alloc_gnt,
  output ptr_t        alloc_addr,
  input  logic        free_valid,
  input  ptr_t        free_addr,
  input  ptr_t        q_addr,
  output logic        q_alloc,
  output logic [AW:0] free_count
);
  ptr_t         stk [NODES];
  logic [AW:0]  sp_q;         // number of entries on the reclaimed stack
  logic [AW:0]  bump_q;       // next never-used address (NODES = exhausted)
  logic [NODES-1:0] alloc_bm;

  logic from_stk, from_bump, bypass;

  always_comb begin
    from_stk   = 1'b0;
    from_bump  = 1'b0;
    bypass     = 1'b0;
    alloc_addr = NULLP;
    if (alloc_req) begin
      if (sp_q != 0) begin
        from_stk   = 1'b1;
        alloc_addr = stk[sp_q[AW-1:0] - 1'b1];
      end else if (bump_q < (AW+1)'(NODES)) begin
        from_bump  = 1'b1;
        alloc_addr = bump_q[AW-1:0];
      end else if (free_valid) begin
        bypass     = 1'b1;
        alloc_addr = free_addr;
      end
    end
    alloc_gnt  = from_stk || from_bump || bypass;
    free_count = sp_q + ((AW+1)'(NODES) - bump_q);
    q_alloc    = alloc_bm[q_addr];
  end

  always_ff @(posedge clk) begin
    // the freed address replaces the popped one in the same stack slot
    if (free_valid && !bypass) begin
      if (from_stk) stk[sp_q[AW-1:0] - 1'b1] <= free_addr;
      else          stk[sp_q[AW-1:0]]        <= free_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q     <= '0;
      bump_q   <= (AW+1)'(1);
      alloc_bm <= '0;
    end else if (init) begin
      sp_q     <= '0;
      bump_q   <= (init_next == NULLP) ? (AW+1)'(1) : {1'b0, init_next};
      for (int i = 0; i < NODES; i++) alloc_bm[i] <= (i != 0) && (i < int'(init_next));
    end else begin
      if (free_valid && !bypass && !from_stk) sp_q <= sp_q + 1'b1;
      if (from_stk && !(free_valid && !bypass)) sp_q <= sp_q - 1'b1;
      if (from_bump) bump_q <= bump_q + 1'b1;
      if (free_valid) alloc_bm[free_addr] <= 1'b0;
      if (alloc_gnt)  alloc_bm[alloc_addr] <= 1'b1;
    end
  end

  a_no_double_free: assert property (@(posedge clk) disable iff (!rst_n || init)
    free_valid |-> alloc_bm[free_addr]);
endmodule
