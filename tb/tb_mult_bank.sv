// tb_mult_bank: self-checking test of the 24 parallel multipliers. Every
// lane gets its own random (W+2)-bit factors, extremes included, and each
// product is compared with a 64-bit product.
module tb_mult_bank;
  import dq_ref_pkg::*;
  import dq_pkg::*;

  localparam int unsigned W = 16;
  localparam int NVEC = 1000;

  logic clk = 1'b0;
  logic signed [W+1:0]   s [N_LANES], v [N_LANES];
  logic signed [2*W+3:0] m [N_LANES];
  longint sv [N_LANES], vv [N_LANES];
  int checks = 0, failures = 0;

  mult_bank #(.W(W)) dut (.s(s), .v(v), .m(m));

  always #5 clk = ~clk;

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      for (int i = 0; i < N_LANES; i++) begin
        sv[i] = rnd(W + 2);
        vv[i] = rnd(W + 2);
        s[i]  = (W+2)'(sv[i]);
        v[i]  = (W+2)'(vv[i]);
      end
      @(posedge clk);
      for (int i = 0; i < N_LANES; i++) begin
        checks++;
        if (longint'(m[i]) != sv[i] * vv[i]) begin
          failures++;
          if (failures < 10) $display("lane %0d: %0d * %0d got %0d", i, sv[i], vv[i], m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
