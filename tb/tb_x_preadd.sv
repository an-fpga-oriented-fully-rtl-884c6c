// tb_x_preadd: self-checking test of the operand fan-out. For random Q1
// each of the 24 operand words must equal the plain component or the
// Hadamard sum that the lane map assigns to it.
module tb_x_preadd;
  import dq_ref_pkg::*;
  import dq_pkg::*;

  localparam int unsigned W = 16;
  localparam int NVEC = 1000;

  logic clk = 1'b0;
  logic signed [W-1:0] x [8];
  logic signed [W+1:0] v [N_LANES];
  int checks = 0, failures = 0;

  x_preadd #(.W(W)) dut (.x(x), .v(v));

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
    if (longint'(v[lane]) != exp) begin
      failures++;
      if (failures < 10) $display("lane %0d: got %0d exp %0d", lane, v[lane], exp);
    end
  endtask

  initial begin
    v4_t xt, xb, ht, hb;
    for (int n = 0; n < NVEC; n++) begin
      for (int k = 0; k < 4; k++) begin
        xt[k] = rnd(W);
        xb[k] = rnd(W);
        x[k]     = W'(xt[k]);
        x[k + 4] = W'(xb[k]);
      end
      ht = h4(xt);
      hb = h4(xb);
      @(posedge clk);
      for (int j = 0; j < 4; j++) begin
        check(j,      xt[j]);
        check(4 + j,  ht[j]);
        check(8 + j,  hb[j]);
        check(12 + j, ht[j]);
        check(16 + j, xt[j]);
        check(20 + j, xb[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
