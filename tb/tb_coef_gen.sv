// tb_coef_gen: self-checking test of the coefficient generator.
// For random Q2 it checks all 24 coefficient words against the lane map:
// 2*b in the correction lanes and H4*b in the quarter-scaled lanes. It also
// checks the identity the algorithm rests on: H4 diag(s4..s7) H4 has the
// entry 4*b_(i xor j) at (i,j).
module tb_coef_gen;
  import dq_ref_pkg::*;
  import dq_pkg::*;

  localparam int unsigned W = 16;
  localparam int NVEC = 1000;
  localparam int CPERM [4] = '{0, 3, 1, 2};

  logic clk = 1'b0;
  logic signed [W-1:0] b [8];
  logic signed [W+1:0] s [N_LANES];
  int checks = 0, failures = 0;

  coef_gen #(.W(W)) dut (.b(b), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int lane, input longint exp);
    checks++;
    if (longint'(s[lane]) != exp) begin
      failures++;
      if (failures < 10) $display("lane %0d: got %0d exp %0d", lane, s[lane], exp);
    end
  endtask

  initial begin
    longint bv [8];
    v4_t bt, bb, ht, hb;
    longint acc;
    for (int n = 0; n < NVEC; n++) begin
      for (int k = 0; k < 8; k++) begin
        bv[k] = rnd(W);
        b[k]  = W'(bv[k]);
      end
      for (int k = 0; k < 4; k++) begin
        bt[k] = bv[k];
        bb[k] = bv[k + 4];
      end
      ht = h4(bt);
      hb = h4(bb);
      @(posedge clk);
      for (int j = 0; j < 4; j++) begin
        check(j,      2 * bt[CPERM[j]]);
        check(4 + j,  ht[j]);
        check(8 + j,  ht[j]);
        check(12 + j, hb[j]);
        check(16 + j, 2 * bb[CPERM[j]]);
        check(20 + j, 2 * bt[CPERM[j]]);
      end
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          acc = 0;
          for (int k = 0; k < 4; k++)
            acc += ((($countones(i & k) + $countones(k & j)) % 2) == 1)
                   ? -longint'(s[4 + k]) : longint'(s[4 + k]);
          checks++;
          if (acc != 4 * bt[i ^ j]) begin
            failures++;
            if (failures < 10) $display("identity (%0d,%0d) fails", i, j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
