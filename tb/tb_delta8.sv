// tb_delta8: self-checking test of Delta8 = H4 (+) H4. Each half of the
// random 8-vector must come out as the Hadamard transform of that half
// alone.
module tb_delta8;
  import dq_ref_pkg::*;

  localparam int unsigned IW = 16;
  localparam int NVEC = 2000;

  logic clk = 1'b0;
  logic signed [IW-1:0] a [8];
  logic signed [IW+1:0] y [8];
  int checks = 0, failures = 0;

  delta8 #(.IW(IW)) dut (.a(a), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v4_t lo, hi, elo, ehi;
    for (int n = 0; n < NVEC; n++) begin
      for (int k = 0; k < 4; k++) begin
        lo[k] = rnd(IW);
        hi[k] = rnd(IW);
        a[k]     = IW'(lo[k]);
        a[k + 4] = IW'(hi[k]);
      end
      @(posedge clk);
      elo = h4(lo);
      ehi = h4(hi);
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (longint'(y[i]) != elo[i] || longint'(y[i + 4]) != ehi[i]) begin
          failures++;
          if (failures < 10) $display("mismatch vec %0d row %0d", n, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
