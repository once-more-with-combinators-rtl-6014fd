// Variable-precision integer unit of the reduction engine.
//
// Integers are stored in the graph as a chain of integer nodes, least
// significant 32-bit limb first, each node's `right` field pointing to the
// next more significant limb (null in the last). The value is two's
// complement over the whole chain: the top limb carries the sign. The engine
// streams the limbs of both operands into this unit's local memories (A and
// B, N_LIMBS words each), starts the operation, and afterwards reads the
// normalised result limbs back from the local result memory R. Sizing the
// local memory for the common case rather than the worst case follows the
// architecture; a result needing more than N_LIMBS limbs raises `ovf` (the
// architecture plans to spill such numbers into main memory; that is not
// built).
//
// Algorithms, one limb operation per cycle:
//   add / sub : n = max(la, lb) + 1 limbs, ripple carry across cycles
//   ==, <     : a subtraction; equal if the normalised difference is 0,
//               less if it is negative
//   quot      : restoring division of the magnitudes, one quotient bit per
//               cycle (32*N_LIMBS cycles), rounded towards zero; division
//               by zero raises `ovf`
//   multiply  : schoolbook over sign-extended operands, n = la + lb limbs,
//               one 32x32 multiply-accumulate per cycle (about n*n/2 cycles);
//               the product of sign-extended operands modulo 2^(32n) is the
//               exact signed product
// followed by normalisation: top limbs that only repeat the sign of the
// limb below are dropped, one per cycle.
//
// Interface: `clear` empties A and B; `a_we`/`b_we` append one limb; `go`
// with `op` starts the operation; `done` rises when it ends and stays high
// until the next clear or go; then r_len limbs are read at r_idx -> r_data. is_bool and
// truth give the outcome of a comparison. The limb algorithms and N_LIMBS are
// this implementation's choices.
module bigint_unit
  import ceph_pkg::*;
#(
  parameter int N_LIMBS = ceph_pkg::LIMBS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          a_we,
  input  logic [DW-1:0] a_data,
  input  logic          b_we,
  input  logic [DW-1:0] b_data,
  input  logic          go,
  input  alu_op_t       op,
  output logic          done,
  output logic          ovf,
  output logic          is_bool,
  output logic          truth,
  output logic [7:0]    r_len,
  input  logic [$clog2(2*N_LIMBS)-1:0] r_idx,
  output logic [DW-1:0] r_data
);
  localparam int RL  = 2 * N_LIMBS;
  localparam int AIW = $clog2(N_LIMBS);
  localparam int RIW = $clog2(RL);

  typedef enum logic [2:0] {U_IDLE, U_ADD, U_MUL, U_DIV, U_DIVW, U_NORM, U_DONE} ustate_t;
  localparam int WB = 32 * N_LIMBS;

  ustate_t        st_q;
  logic [DW-1:0]  a_m [N_LIMBS];
  logic [DW-1:0]  b_m [N_LIMBS];
  logic [DW-1:0]  r_m [RL];
  logic [7:0]     la_q, lb_q, n_q, i_q, j_q, len_q;
  logic           in_ovf_q, ovf_q;
  logic [DW-1:0]  carry_q;
  alu_op_t        op_q;
  // division: dividend shifted out as the quotient is shifted in
  logic [WB-1:0]  qr_q, dvs_q;
  logic [WB-1:0]  rem_q;   // always below the divisor
  logic           qneg_q;
  logic [8:0]     cnt_q;

  // limb i of a sign-extended operand
  function automatic logic [DW-1:0] ext_a(logic [7:0] i);
    if (la_q == 0)    return '0;
    if (i < la_q)     return a_m[i[AIW-1:0]];
    return {DW{a_m[la_q[AIW-1:0] - 1'b1][DW-1]}};
  endfunction
  function automatic logic [DW-1:0] ext_b(logic [7:0] i);
    if (lb_q == 0)    return '0;
    if (i < lb_q)     return b_m[i[AIW-1:0]];
    return {DW{b_m[lb_q[AIW-1:0] - 1'b1][DW-1]}};
  endfunction

  // whole operands, sign-extended to the local memory width
  logic [WB-1:0]   a_flat, b_flat, a_mag, b_mag;
  logic [WB:0]     rem_sh, rem_sub;
  logic [WB+DW-1:0] q_signed;
  always_comb begin
    for (int k = 0; k < N_LIMBS; k++) begin
      a_flat[DW*k +: DW] = ext_a(8'(k));
      b_flat[DW*k +: DW] = ext_b(8'(k));
    end
    a_mag    = a_flat[WB-1] ? -a_flat : a_flat;
    b_mag    = b_flat[WB-1] ? -b_flat : b_flat;
    rem_sh   = {rem_q, qr_q[WB-1]};
    rem_sub  = rem_sh - {1'b0, dvs_q};
    q_signed = qneg_q ? -{{DW{1'b0}}, qr_q} : {{DW{1'b0}}, qr_q};
  end

  logic [DW-1:0]   ai, bi;
  logic [DW:0]     add_w;
  logic [2*DW-1:0] mac_w;
  logic            sub;

  always_comb begin
    sub   = op_q != OP_ADD;   // SUB, EQ and LT subtract
    ai    = ext_a(i_q);
    bi    = (op_q == OP_MUL) ? ext_b(j_q) : ext_b(i_q);
    add_w = {1'b0, ai} + {1'b0, (sub ? ~bi : bi)} + {{DW{1'b0}}, carry_q[0]};
    mac_w = {{DW{1'b0}}, r_m[RIW'(i_q + j_q)]} + ai * bi + {{DW{1'b0}}, carry_q};
  end

  assign done    = st_q == U_DONE;
  assign ovf     = ovf_q;
  assign is_bool = op_q == OP_EQ || op_q == OP_LT;
  assign truth   = (op_q == OP_EQ) ? (len_q == 1 && r_m[0] == '0)
                                   : r_m[len_q[RIW-1:0] - 1'b1][DW-1];
  assign r_len   = len_q;
  assign r_data  = r_m[r_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= U_IDLE;
      la_q     <= '0;  lb_q <= '0;  n_q <= '0;  i_q <= '0;  j_q <= '0;
      len_q    <= 8'd1;
      in_ovf_q <= 1'b0;
      ovf_q    <= 1'b0;
      carry_q  <= '0;
      op_q     <= OP_ADD;
      qr_q     <= '0;
      dvs_q    <= '0;
      rem_q    <= '0;
      qneg_q   <= 1'b0;
      cnt_q    <= '0;
      for (int k = 0; k < RL; k++) r_m[k] <= '0;
      for (int k = 0; k < N_LIMBS; k++) begin a_m[k] <= '0; b_m[k] <= '0; end
    end else begin
      if (clear) begin
        la_q     <= '0;
        lb_q     <= '0;
        in_ovf_q <= 1'b0;
        st_q     <= U_IDLE;
      end else begin
        if (a_we) begin
          if (la_q < 8'(N_LIMBS)) begin a_m[la_q[AIW-1:0]] <= a_data; la_q <= la_q + 1'b1; end
          else in_ovf_q <= 1'b1;
        end
        if (b_we) begin
          if (lb_q < 8'(N_LIMBS)) begin b_m[lb_q[AIW-1:0]] <= b_data; lb_q <= lb_q + 1'b1; end
          else in_ovf_q <= 1'b1;
        end
      end

      unique case (st_q)
        U_IDLE, U_DONE: if (go && !clear) begin
          op_q  <= op;
          i_q   <= '0;
          j_q   <= '0;
          ovf_q <= 1'b0;
          if (op == OP_DIV) begin
            qr_q   <= a_mag;
            dvs_q  <= b_mag;
            rem_q  <= '0;
            qneg_q <= a_flat[WB-1] ^ b_flat[WB-1];
            cnt_q  <= '0;
            if (b_flat == '0) begin   // division by zero
              ovf_q <= 1'b1;
              st_q  <= U_DONE;
            end else st_q <= U_DIV;
          end else if (op == OP_MUL) begin
            n_q     <= la_q + lb_q;
            carry_q <= '0;
            for (int k = 0; k < RL; k++) r_m[k] <= '0;
            st_q    <= U_MUL;
          end else begin
            n_q     <= ((la_q > lb_q) ? la_q : lb_q) + 1'b1;
            carry_q <= DW'(op != OP_ADD);
            st_q    <= U_ADD;
          end
        end
        U_ADD: begin
          r_m[i_q[RIW-1:0]] <= add_w[DW-1:0];
          carry_q                  <= DW'(add_w[DW]);
          if (i_q + 1'b1 == n_q) begin
            len_q <= n_q;
            st_q  <= U_NORM;
          end
          i_q <= i_q + 1'b1;
        end
        U_MUL: begin
          r_m[RIW'(i_q + j_q)] <= mac_w[DW-1:0];
          if (i_q + j_q + 1'b1 >= n_q) begin
            // row i done; the carry out of the top limb is dropped (mod 2^(32n))
            carry_q <= '0;
            j_q     <= '0;
            if (i_q + 1'b1 == n_q) begin
              len_q <= n_q;
              st_q  <= U_NORM;
            end
            i_q <= i_q + 1'b1;
          end else begin
            carry_q <= mac_w[2*DW-1:DW];
            j_q     <= j_q + 1'b1;
          end
        end
        U_DIV: begin
          if (!rem_sub[WB]) begin
            rem_q <= rem_sub[WB-1:0];
            qr_q  <= {qr_q[WB-2:0], 1'b1};
          end else begin
            rem_q <= rem_sh[WB-1:0];
            qr_q  <= {qr_q[WB-2:0], 1'b0};
          end
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == 9'(WB - 1)) st_q <= U_DIVW;
        end
        U_DIVW: begin
          for (int k = 0; k <= N_LIMBS; k++) r_m[k] <= q_signed[DW*k +: DW];
          len_q <= 8'(N_LIMBS + 1);
          st_q  <= U_NORM;
        end
        U_NORM: begin
          if (len_q > 1 &&
              r_m[len_q[RIW-1:0] - 1'b1] ==
                {DW{r_m[len_q[RIW-1:0] - RIW'(2)][DW-1]}}) begin
            len_q <= len_q - 1'b1;
          end else begin
            ovf_q <= in_ovf_q || (!is_bool && len_q > 8'(N_LIMBS));
            st_q  <= U_DONE;
          end
        end
        default: st_q <= U_IDLE;
      endcase
    end
  end
endmodule
