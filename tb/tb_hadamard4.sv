// tb_hadamard4: self-checking test of the order-4 Hadamard transform.
// Drives random and extreme 4-vectors and compares each output with the
// Hadamard matrix product of the reference package.
module tb_hadamard4;
  import dq_ref_pkg::*;

  localparam int unsigned IW = 16;
  localparam int NVEC = 2000;

  logic clk = 1'b0;
  logic signed [IW-1:0] a [4];
  logic signed [IW+1:0] y [4];
  int checks = 0, failures = 0;

  hadamard4 #(.IW(IW)) dut (.a(a), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v4_t av, ev;
    for (int n = 0; n < NVEC; n++) begin
      for (int k = 0; k < 4; k++) begin
        av[k] = rnd(IW);
        a[k]  = IW'(av[k]);
      end
      @(posedge clk);
      ev = h4(av);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (longint'(y[i]) != ev[i]) begin
          failures++;
          if (failures < 10) $display("mismatch vec %0d row %0d: got %0d exp %0d", n, i, y[i], ev[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
