// tb_post_add: self-checking test of the output adder network. The test
// forms the 24 lane products for random Q1 and Q2 from the lane map
// (2*b times x in the correction lanes, H4*b times H4*x in the others).
// It feeds them to the block and compares the eight outputs with the
// schoolbook dual-quaternion product. Extreme operands are included, so
// the widest results are exercised.
module tb_post_add;
  import dq_ref_pkg::*;
  import dq_pkg::*;

  localparam int unsigned W = 16;
  localparam int NVEC = 2000;
  localparam int CPERM [4] = '{0, 3, 1, 2};

  logic clk = 1'b0;
  logic signed [2*W+3:0] m [N_LANES];
  logic signed [2*W+2:0] y [8];
  int checks = 0, failures = 0;

  post_add #(.W(W)) dut (.m(m), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dq8_t xv, bv, ev;
    v4_t xt, xb, bt, bb, hxt, hxb, hbt, hbb;
    for (int n = 0; n < NVEC; n++) begin
      for (int k = 0; k < 8; k++) begin
        xv[k] = rnd(W);
        bv[k] = rnd(W);
      end
      for (int k = 0; k < 4; k++) begin
        xt[k] = xv[k]; xb[k] = xv[k + 4];
        bt[k] = bv[k]; bb[k] = bv[k + 4];
      end
      hxt = h4(xt); hxb = h4(xb); hbt = h4(bt); hbb = h4(bb);
      for (int j = 0; j < 4; j++) begin
        m[j]      = (2*W+4)'(2 * bt[CPERM[j]] * xt[j]);
        m[4 + j]  = (2*W+4)'(hbt[j] * hxt[j]);
        m[8 + j]  = (2*W+4)'(hbt[j] * hxb[j]);
        m[12 + j] = (2*W+4)'(hbb[j] * hxt[j]);
        m[16 + j] = (2*W+4)'(2 * bb[CPERM[j]] * xt[j]);
        m[20 + j] = (2*W+4)'(2 * bt[CPERM[j]] * xb[j]);
      end
      ev = dq_product(xv, bv);
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (longint'(y[i]) != ev[i]) begin
          failures++;
          if (failures < 10) $display("vec %0d y%0d: got %0d exp %0d", n, i, y[i], ev[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
