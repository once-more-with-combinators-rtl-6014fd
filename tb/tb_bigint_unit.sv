// Self-checking testbench for bigint_unit: random multi-limb operands of
// every length and the usual corner values, checked against 1024-bit
// reference arithmetic, including normalisation and overflow.
module tb_bigint_unit;
  import ceph_pkg::*;
  localparam int LIMBS = 4;
  localparam int W     = 1024;

  logic clk = 0, rst_n = 0;
  logic clear, a_we, b_we, go;
  logic [DW-1:0] a_data, b_data, r_data;
  alu_op_t op;
  logic done, ovf, is_bool, truth;
  logic [7:0] r_len;
  logic [$clog2(2*LIMBS)-1:0] r_idx;
  int checks = 0, failures = 0;

  bigint_unit #(.N_LIMBS(LIMBS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #20_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $fatal(1, "watchdog");
  end

  // number of limbs of the normalised two's complement form
  function automatic int limbs_of(logic signed [W-1:0] v);
    int n = 1;
    while (n < W / 32) begin
      logic signed [W-1:0] lo;
      lo = (v <<< (W - 32 * n)) >>> (W - 32 * n);
      if (lo == v) break;
      n++;
    end
    return n;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(alu_op_t o, logic signed [W-1:0] a, logic signed [W-1:0] b);
    int la, lb, n, cyc;
    logic signed [W-1:0] exp, got;
    bit exp_ovf, exp_bool, exp_truth;
    la = limbs_of(a);
    lb = limbs_of(b);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < la || i < lb; i++) begin
      a_we = i < la; a_data = a[32*i +: 32];
      b_we = i < lb; b_data = b[32*i +: 32];
      @(negedge clk);
    end
    a_we = 0; b_we = 0;
    op = o; go = 1; @(negedge clk); go = 0;
    cyc = 0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    check($sformatf("done op=%0d", o), done);
    exp_bool = 0; exp_truth = 0;
    unique case (o)
      OP_ADD: exp = a + b;
      OP_SUB: exp = a - b;
      OP_MUL: exp = a * b;
      OP_DIV: exp = (b == 0) ? 0 : a / b;
      OP_EQ:  begin exp_bool = 1; exp_truth = a == b; exp = 0; end
      OP_LT:  begin exp_bool = 1; exp_truth = a < b; exp = 0; end
      default: exp = 0;
    endcase
    exp_ovf = !exp_bool && limbs_of(exp) > LIMBS;
    if (la > LIMBS || lb > LIMBS) exp_ovf = 1;
    if (o == OP_DIV && b == 0) exp_ovf = 1;
    check($sformatf("bool op=%0d", o), is_bool == exp_bool);
    check($sformatf("ovf op=%0d a=%0h b=%0h got %b", o, a, b, ovf), ovf == exp_ovf);
    if (exp_bool && !exp_ovf)
      check($sformatf("truth op=%0d a=%0h b=%0h", o, a, b), truth == exp_truth);
    if (!exp_bool && !exp_ovf) begin
      n = int'(r_len);
      check($sformatf("len op=%0d a=%0h b=%0h: %0d vs %0d", o, a, b, n, limbs_of(exp)),
            n == limbs_of(exp));
      got = 0;
      for (int i = 0; i < n && i < 2 * LIMBS; i++) begin
        r_idx = i[$clog2(2*LIMBS)-1:0];
        #1;
        got[32*i +: 32] = r_data;
      end
      if (n > 0 && n <= W / 32) got = (got <<< (W - 32 * n)) >>> (W - 32 * n);
      check($sformatf("value op=%0d a=%0h b=%0h got %0h", o, a, b, got), got == exp);
    end
  endtask

  function automatic logic signed [W-1:0] rnd(int limbs);
    logic signed [W-1:0] v = 0;
    for (int i = 0; i < limbs; i++) v[32*i +: 32] = $urandom;
    // sign-extend from the top limb, sometimes making the top limb small
    if ($urandom_range(0, 3) == 0) v[32*(limbs-1) +: 32] = $urandom_range(0, 3) - 2;
    return (v <<< (W - 32 * limbs)) >>> (W - 32 * limbs);
  endfunction

  initial begin
    logic signed [W-1:0] corner [8];
    clear = 0; a_we = 0; b_we = 0; go = 0; a_data = 0; b_data = 0;
    op = OP_ADD; r_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    corner[0] = 0; corner[1] = 1; corner[2] = -1;
    corner[3] = 2147483647; corner[4] = -(W'(1) <<< 31);
    corner[5] = (W'(1) <<< 63) - 1; corner[6] = -(W'(1) <<< 255);
    corner[7] = (W'(1) <<< 255) - 1;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int o = 0; o < 6; o++) run(alu_op_t'(o), corner[i], corner[j]);
    for (int k = 0; k < 1500; k++) begin
      int o, la, lb;
      logic signed [W-1:0] a, b;
      o  = $urandom_range(0, 5);
      la = $urandom_range(1, LIMBS);
      lb = $urandom_range(1, LIMBS);
      a = rnd(la);
      b = ($urandom_range(0, 5) == 0) ? a : rnd(lb);
      if (o == int'(OP_MUL) && $urandom_range(0, 1) == 1) b = rnd($urandom_range(1, LIMBS - la + 1));
      run(alu_op_t'(o), a, b);
    end
    // an operand longer than the local memory
    run(OP_ADD, W'(1) <<< (32 * LIMBS + 3), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
