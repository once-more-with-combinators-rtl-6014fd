// Graph-reduction engine: evaluates a combinator graph to weak head normal
// form directly in hardware, with no software interpreter and no stack.
//
// Unwinding. Starting at the root, the engine walks down the left spine of
// application nodes. On entering an application it writes the parent's
// address into the node's back field, so the way back up the spine is kept
// in the graph itself rather than in a stack (context switching would only
// need the few pointer registers). Indirections are followed transparently.
// When the head of the spine is a combinator (or an integer), the engine
// climbs back up through the back pointers collecting as many arguments as
// the head needs; the application node reached last is the redex root.
// If the spine runs out first the graph is in weak head normal form and the
// engine stops, presenting the head node on `result`.
//
// Rewriting. The redex root is overwritten in place with the result, so all
// sharers see it, and unwinding resumes there:
//   I x => x           K x y => x         KI x y => y
//   S f g x => (f x)(g x)                 B f g x => f (g x)
//   Y f => f (Y f)     (the root is rewritten to point to itself)
//   C_n f e1..en x => f x e1..en          L_n e1..en x => x e1..en
//   v f => f v         for an integer value v (turns strict operators
//                      inside out, so operands are always evaluated first)
//   op a b => a op b   for + - * quot (integer) and == < (K / KI as booleans)
// Integers have variable precision: a chain of integer nodes, one 32-bit
// limb each, least significant first (see bigint_unit). The engine streams
// both operand chains into the arithmetic unit's local memory and writes a
// multi-limb result as freshly allocated limb nodes behind the redex root.
// Results of the form "head applied to m arguments" are built as a chain of
// m-1 freshly allocated application nodes plus the rewritten root; m = 0
// gives an indirection. The rules for S, K, I, C_n, L_n and "v f => f v"
// follow the architecture; B, Y, KI, the operator set and the node format
// are this implementation's choices.
//
// Interfaces:
//   start/root_in  - begin evaluating the graph at root_in (pulse while idle)
//   done, result   - stopped in weak head normal form; head node
//   error, err_code- 1: operator applied to a non-integer, 2: integer wider
//                    than the unit's local memory (LIMBS limbs) or division
//                    by zero, 3:
//                    combinator index above MAXN
//   mem_*          - request/grant port of the snapshot memory (1-cycle
//                    read latency)
//   alloc_*        - allocator; an ungranted request stalls the engine
//   snap_req/ack   - the collector's snapshot request is acknowledged at a
//                    safe point: before fetching a node, or while stalled
//                    for allocation; roots[] then holds every live pointer
module reduction_engine
  import ceph_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  ptr_t        root_in,
  output logic        busy,
  output logic        done,
  output node_t       result,
  output logic        error,
  output logic [1:0]  err_code,
  // memory port
  output logic        mem_req,
  output logic        mem_we,
  output ptr_t        mem_addr,
  output node_t       mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  node_t       mem_rdata,
  // allocator
  output logic        alloc_req,
  input  logic        alloc_gnt,
  input  ptr_t        alloc_addr,
  // snapshot handshake
  input  logic        snap_req,
  output logic        snap_ack,
  output ptr_t        roots [NROOTS],
  // statistics
  output logic [31:0] n_reductions,
  output logic [31:0] n_swaps,
  output logic [31:0] n_alloc_stalls,
  output logic [31:0] n_ind_follow
);
  typedef enum logic [4:0] {
    R_IDLE, R_FETCH, R_FETCHW, R_APPWR, R_ARG, R_ARGW, R_EXEC,
    R_OPRD, R_OPRDW, R_OPWR, R_PREALLOC, R_PREWR, R_SPSETUP,
    R_SPALLOC, R_SPWR, R_ROOTWR, R_DONE, R_ERR,
    R_OPGO, R_OPWAIT, R_BALLOC, R_BWR
  } rstate_t;

  rstate_t     st_q;
  ptr_t        root_q, cur_q, par_q, head_q, p_q, rroot_q, rback_q;
  node_t       node_q;
  comb_t       code_q;
  logic [7:0]  idx_q;
  logic        vapp_q;
  int unsigned arity_q, k_q;
  ptr_t        args_q [MAXARGS];
  ptr_t        pre_q  [2];
  int unsigned npre_q, pi_q;
  ptr_t        new_q;
  ptr_t        sp_t_q;
  ptr_t        sp_list_q [MAXARGS];
  int unsigned sp_m_q, sp_i_q;
  logic [7:0]  bk_q;
  int unsigned opi_q;
  ptr_t        opp_q;
  logic [1:0]  err_q;

  // arithmetic unit
  alu_op_t       alu_op;
  logic [DW-1:0] alu_y;
  logic          alu_bool, alu_truth, alu_ovf, alu_done;
  logic [7:0]    alu_len;
  logic [$clog2(2*LIMBS)-1:0] alu_idx;
  logic          ld_limb;

  always_comb begin
    unique case (code_q)
      C_SUB:   alu_op = OP_SUB;
      C_MUL:   alu_op = OP_MUL;
      C_EQ:    alu_op = OP_EQ;
      C_LT:    alu_op = OP_LT;
      C_DIV:   alu_op = OP_DIV;
      default: alu_op = OP_ADD;
    endcase
  end

  // Operands are streamed limb by limb from their node chains into the
  // unit's local memory; the result is read back limb by limb.
  assign ld_limb = st_q == R_OPRDW && mem_rvalid && mem_rdata.tag == T_INT;
  assign alu_idx = (st_q == R_BWR) ? bk_q[$clog2(2*LIMBS)-1:0] : '0;

  bigint_unit #(.N_LIMBS(LIMBS)) u_alu (
    .clk, .rst_n,
    .clear  (st_q == R_EXEC),
    .a_we   (ld_limb && opi_q == 0),
    .a_data (mem_rdata.left),
    .b_we   (ld_limb && opi_q == 1),
    .b_data (mem_rdata.left),
    .go     (st_q == R_OPGO),
    .op     (alu_op),
    .done   (alu_done),
    .ovf    (alu_ovf),
    .is_bool(alu_bool),
    .truth  (alu_truth),
    .r_len  (alu_len),
    .r_idx  (alu_idx),
    .r_data (alu_y)
  );

  logic in_alloc;
  assign in_alloc  = st_q == R_PREALLOC || st_q == R_SPALLOC || st_q == R_BALLOC;
  assign alloc_req = in_alloc;
  assign snap_ack  = snap_req && (st_q == R_FETCH || st_q == R_IDLE ||
                                  st_q == R_DONE || st_q == R_ERR ||
                                  (in_alloc && !alloc_gnt));
  assign busy      = st_q != R_IDLE && st_q != R_DONE && st_q != R_ERR;
  assign done      = st_q == R_DONE;
  assign error     = st_q == R_ERR;
  assign err_code  = err_q;
  assign result    = node_q;

  // live pointers offered to the collector (NULLP where not live)
  always_comb begin
    for (int i = 0; i < NROOTS; i++) roots[i] = NULLP;
    roots[0] = root_q;
    roots[1] = cur_q;
    roots[2] = par_q;
    if (in_alloc) begin
      roots[3] = rroot_q;
      roots[4] = rback_q;
      roots[5] = head_q;
      roots[6] = (pi_q > 0) ? pre_q[0] : NULLP;
      roots[7] = (pi_q > 1) ? pre_q[1] : NULLP;
      roots[8] = (st_q == R_SPALLOC || st_q == R_BALLOC) ? sp_t_q : NULLP;
      for (int i = 0; i < MAXARGS; i++)
        roots[9+i] = (i < int'(arity_q)) ? args_q[i] : NULLP;
    end
  end

  // memory requests
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = cur_q;
    mem_wdata = node_q;
    unique case (st_q)
      R_FETCH:  mem_req = !snap_req;
      R_APPWR:  begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_wdata = mk_app(node_q.left[AW-1:0], node_q.right, par_q);
      end
      R_ARG:    begin mem_req = p_q != NULLP; mem_addr = p_q; end
      R_OPRD:   begin mem_req = 1'b1; mem_addr = opp_q; end
      R_OPWR:   begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = rroot_q;
        mem_wdata = alu_bool ? mk_comb(alu_truth ? C_K : C_KI, 8'd0, rback_q)
                             : mk_int_link(alu_y, sp_t_q, rback_q);
      end
      R_BWR:    begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = new_q;
        mem_wdata = mk_int_link(alu_y, sp_t_q, NULLP);
      end
      R_PREWR:  begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = new_q;
        // S: (f x) then (g x); B: (g x)
        mem_wdata = (code_q == C_S && pi_q == 0) ? mk_app(args_q[0], args_q[2], NULLP)
                                                 : mk_app(args_q[1], args_q[2], NULLP);
      end
      R_SPWR:   begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = new_q;
        mem_wdata = mk_app(sp_t_q, sp_list_q[sp_i_q], NULLP);
      end
      R_ROOTWR: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = rroot_q;
        mem_wdata = (sp_m_q == 0) ? mk_ind(sp_t_q, rback_q)
                                  : mk_app(sp_t_q, sp_list_q[sp_m_q-1], rback_q);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= R_IDLE;
      root_q   <= NULLP;  cur_q   <= NULLP;  par_q  <= NULLP;
      head_q   <= NULLP;  p_q     <= NULLP;  rroot_q <= NULLP;
      rback_q  <= NULLP;  new_q   <= NULLP;  sp_t_q <= NULLP;
      opp_q    <= NULLP;
      node_q   <= '0;
      code_q   <= C_I;
      idx_q    <= '0;
      vapp_q   <= 1'b0;
      arity_q  <= 0; k_q <= 0; npre_q <= 0; pi_q <= 0;
      sp_m_q   <= 0; sp_i_q <= 0; opi_q <= 0;
      err_q    <= '0;
      for (int i = 0; i < MAXARGS; i++) begin
        args_q[i]    <= NULLP;
        sp_list_q[i] <= NULLP;
      end
      pre_q[0] <= NULLP; pre_q[1] <= NULLP;
      bk_q     <= '0;
      n_reductions   <= '0;
      n_swaps        <= '0;
      n_alloc_stalls <= '0;
      n_ind_follow   <= '0;
    end else begin
      unique case (st_q)
        R_IDLE, R_DONE, R_ERR: if (start) begin
          root_q <= root_in;
          cur_q  <= root_in;
          par_q  <= NULLP;
          err_q  <= '0;
          st_q   <= R_FETCH;
        end

        R_FETCH: if (mem_req && mem_gnt) st_q <= R_FETCHW;

        R_FETCHW: if (mem_rvalid) begin
          node_q <= mem_rdata;
          unique case (mem_rdata.tag)
            T_APP: st_q <= R_APPWR;
            T_IND: begin
              cur_q        <= mem_rdata.left[AW-1:0];
              n_ind_follow <= n_ind_follow + 1;
              st_q         <= R_FETCH;
            end
            T_COMB: begin
              head_q  <= cur_q;
              code_q  <= comb_t'(mem_rdata.left[7:0]);
              idx_q   <= mem_rdata.left[15:8];
              vapp_q  <= 1'b0;
              arity_q <= comb_arity(comb_t'(mem_rdata.left[7:0]), mem_rdata.left[15:8]);
              k_q     <= 0;
              p_q     <= par_q;
              if ((comb_t'(mem_rdata.left[7:0]) == C_CN || comb_t'(mem_rdata.left[7:0]) == C_LN)
                  && int'(mem_rdata.left[15:8]) > MAXN) begin
                err_q <= 2'd3;
                st_q  <= R_ERR;
              end else begin
                st_q  <= R_ARG;
              end
            end
            default: begin   // T_INT: a value applied to a function swaps
              head_q  <= cur_q;
              code_q  <= C_I;
              vapp_q  <= 1'b1;
              arity_q <= 1;
              k_q     <= 0;
              p_q     <= par_q;
              st_q    <= R_ARG;
            end
          endcase
        end

        R_APPWR: if (mem_gnt) begin
          par_q <= cur_q;
          cur_q <= node_q.left[AW-1:0];
          st_q  <= R_FETCH;
        end

        R_ARG: begin
          if (p_q == NULLP) st_q <= R_DONE;        // weak head normal form
          else if (mem_gnt) st_q <= R_ARGW;
        end

        R_ARGW: if (mem_rvalid) begin
          args_q[k_q] <= mem_rdata.right;
          rroot_q     <= p_q;
          rback_q     <= mem_rdata.back;
          if (k_q + 1 == arity_q) st_q <= R_EXEC;
          else begin
            p_q  <= mem_rdata.back;
            k_q  <= k_q + 1;
            st_q <= R_ARG;
          end
        end

        R_EXEC: begin
          pi_q   <= 0;
          sp_i_q <= 0;
          if (vapp_q) begin
            sp_t_q       <= args_q[0];
            sp_list_q[0] <= head_q;
            sp_m_q       <= 1;
            n_swaps      <= n_swaps + 1;
            st_q         <= R_ROOTWR;
          end else begin
            unique case (code_q)
              C_I, C_K: begin sp_t_q <= args_q[0]; sp_m_q <= 0; st_q <= R_ROOTWR; end
              C_KI:     begin sp_t_q <= args_q[1]; sp_m_q <= 0; st_q <= R_ROOTWR; end
              C_Y: begin
                sp_t_q       <= args_q[0];
                sp_list_q[0] <= rroot_q;
                sp_m_q       <= 1;
                st_q         <= R_ROOTWR;
              end
              C_S: begin npre_q <= 2; st_q <= R_PREALLOC; end
              C_B: begin npre_q <= 1; st_q <= R_PREALLOC; end
              C_CN: begin
                // f x e1..en : list = x, e1 .. en
                sp_t_q       <= args_q[0];
                sp_list_q[0] <= args_q[int'(idx_q) + 1];
                for (int i = 1; i < MAXARGS; i++)
                  if (i <= int'(idx_q)) sp_list_q[i] <= args_q[i];
                sp_m_q <= int'(idx_q) + 1;
                st_q   <= (idx_q == 0) ? R_ROOTWR : R_SPALLOC;
              end
              C_LN: begin
                // x e1..en : list = e1 .. en
                sp_t_q <= args_q[int'(idx_q)];
                for (int i = 0; i < MAXARGS; i++)
                  if (i < int'(idx_q)) sp_list_q[i] <= args_q[i];
                sp_m_q <= int'(idx_q);
                st_q   <= (idx_q <= 1) ? R_ROOTWR : R_SPALLOC;
              end
              default: begin   // strict binary operators
                opi_q <= 0;
                opp_q <= args_q[0];
                st_q  <= R_OPRD;
              end
            endcase
          end
        end

        R_OPRD: if (mem_gnt) st_q <= R_OPRDW;

        R_OPRDW: if (mem_rvalid) begin
          if (mem_rdata.tag == T_IND) begin
            opp_q <= mem_rdata.left[AW-1:0];
            st_q  <= R_OPRD;
          end else if (mem_rdata.tag == T_INT) begin
            // the limb is loaded into the unit; follow the chain
            if (mem_rdata.right != NULLP) begin
              opp_q <= mem_rdata.right;
              st_q  <= R_OPRD;
            end else if (opi_q == 1) st_q <= R_OPGO;
            else begin
              opi_q <= 1;
              opp_q <= args_q[1];
              st_q  <= R_OPRD;
            end
          end else begin
            err_q <= 2'd1;
            st_q  <= R_ERR;
          end
        end

        R_OPGO: st_q <= R_OPWAIT;

        R_OPWAIT: if (alu_done) begin
          // a multi-limb result is built top limb first, so each new node
          // can point to the one written before it
          sp_t_q <= NULLP;
          bk_q   <= alu_len - 1'b1;
          if (alu_ovf) begin
            err_q <= 2'd2;
            st_q  <= R_ERR;
          end else if (alu_bool || alu_len == 8'd1) st_q <= R_OPWR;
          else st_q <= R_BALLOC;
        end

        R_BALLOC: begin
          if (alloc_gnt) begin
            new_q <= alloc_addr;
            st_q  <= R_BWR;
          end else begin
            n_alloc_stalls <= n_alloc_stalls + 1;
          end
        end

        R_BWR: if (mem_gnt) begin
          sp_t_q <= new_q;
          bk_q   <= bk_q - 1'b1;
          st_q   <= (bk_q == 8'd1) ? R_OPWR : R_BALLOC;
        end

        R_OPWR: begin
          if (mem_gnt) begin
            n_reductions <= n_reductions + 1;
            cur_q        <= rroot_q;
            par_q        <= rback_q;
            st_q         <= R_FETCH;
          end
        end

        R_PREALLOC: begin
          if (alloc_gnt) begin
            new_q <= alloc_addr;
            st_q  <= R_PREWR;
          end else begin
            n_alloc_stalls <= n_alloc_stalls + 1;
          end
        end

        R_PREWR: if (mem_gnt) begin
          pre_q[pi_q] <= new_q;
          pi_q        <= pi_q + 1;
          st_q        <= (pi_q + 1 == npre_q) ? R_SPSETUP : R_PREALLOC;
        end

        R_SPSETUP: begin
          if (code_q == C_S) begin
            sp_t_q       <= pre_q[0];
            sp_list_q[0] <= pre_q[1];
          end else begin
            sp_t_q       <= args_q[0];
            sp_list_q[0] <= pre_q[0];
          end
          sp_m_q <= 1;
          st_q   <= R_ROOTWR;
        end

        R_SPALLOC: begin
          if (alloc_gnt) begin
            new_q <= alloc_addr;
            st_q  <= R_SPWR;
          end else begin
            n_alloc_stalls <= n_alloc_stalls + 1;
          end
        end

        R_SPWR: if (mem_gnt) begin
          sp_t_q <= new_q;
          sp_i_q <= sp_i_q + 1;
          st_q   <= (sp_i_q + 2 >= sp_m_q) ? R_ROOTWR : R_SPALLOC;
        end

        R_ROOTWR: if (mem_gnt) begin
          n_reductions <= n_reductions + 1;
          cur_q        <= rroot_q;
          par_q        <= rback_q;
          st_q         <= R_FETCH;
        end

        default: st_q <= R_IDLE;
      endcase
    end
  end
endmodule
