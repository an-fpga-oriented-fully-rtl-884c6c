// tb_dq_mult: end-to-end test of the pipelined dual-quaternion multiplier
// at its default parameters.
//
// A stream of random operand pairs is pushed in. Runs of back-to-back
// inputs alternate with idle gaps, and some operands are extreme
// (all-minimum and all-maximum components). A scoreboard queue holds the
// schoolbook product and the issue cycle of each input. Every out_valid
// must match the oldest entry and arrive exactly 3 cycles after its input.
// Outputs without a pending entry are counted as failures. A synchronous
// reset in mid-stream must drop the products in flight.
//
// Coverage counters (each must be non-zero): back-to-back inputs (full
// rate, one product per cycle), idle gaps (pipeline bubbles), extreme
// operands, products that need the full 2W+3-bit output width, and
// in-flight products dropped by reset.
module tb_dq_mult;
  import dq_ref_pkg::*;

  localparam int unsigned W = dq_pkg::DQ_W;
  localparam int LATENCY = 3;
  localparam int NVEC = 4000;

  typedef struct {
    dq8_t   y;
    longint cycle;
  } exp_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0]   x [8], b [8];
  logic                  out_valid;
  logic signed [2*W+2:0] y [8];

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_b2b = 0, n_bubble = 0, n_extreme = 0, n_wide = 0, n_flushed = 0, n_out = 0;
  exp_t sb [$];
  logic prev_valid = 1'b0;

  dq_mult dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .b(b),
    .out_valid(out_valid), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker, sampled on the same edge the DUT updates (old values).
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = sb.pop_front();
        checks++;
        if (cycle - e.cycle != LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.cycle, LATENCY);
        end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (longint'(y[i]) != e.y[i]) begin
            failures++;
            if (failures < 10) $display("cycle %0d y%0d: got %0d exp %0d", cycle, i, y[i], e.y[i]);
          end
          if (e.y[i] >= (longint'(1) << (2*W)) || e.y[i] < -(longint'(1) << (2*W)))
            n_wide++;
        end
      end
    end
  end

  task automatic drive_one(input bit valid, input int kind);
    dq8_t xv, bv;
    exp_t e;
    for (int k = 0; k < 8; k++) begin
      case (kind)
        1: begin xv[k] = -(longint'(1) << (W-1)); bv[k] = -(longint'(1) << (W-1)); end
        2: begin xv[k] = (longint'(1) << (W-1)) - 1; bv[k] = -(longint'(1) << (W-1)); end
        default: begin xv[k] = rnd(W); bv[k] = rnd(W); end
      endcase
      x[k] = W'(xv[k]);
      b[k] = W'(bv[k]);
    end
    in_valid = valid;
    if (valid) begin
      if (kind != 0) n_extreme++;
      if (prev_valid) n_b2b++;
      e.y = dq_product(xv, bv);
      e.cycle = cycle;
      sb.push_back(e);
    end else if (prev_valid) begin
      n_bubble++;
    end
    prev_valid = valid;
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin x[k] = '0; b[k] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      int kind;
      bit valid;
      kind  = ($urandom_range(0, 31) == 0) ? int'($urandom_range(1, 2)) : 0;
      valid = ((n / 50) % 4 == 3) ? ($urandom_range(0, 2) == 0) : 1'b1;
      drive_one(valid, kind);
      @(posedge clk);
      #1;
    end
    // reset with products in flight: push two, then reset
    drive_one(1'b1, 0);
    @(posedge clk); #1;
    drive_one(1'b1, 0);
    @(posedge clk); #1;
    in_valid = 1'b0;
    prev_valid = 1'b0;
    rst_n = 1'b0;
    n_flushed = sb.size();
    // the scoreboard entries still pending are those the reset must drop
    @(posedge clk); #1;
    sb.delete();
    rst_n = 1'b1;
    repeat (LATENCY + 3) @(posedge clk);
    #1;
    // one more product after reset
    drive_one(1'b1, 1);
    @(posedge clk); #1;
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    #1;
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("%0d products never came out", sb.size());
    end
    $display("coverage: outputs=%0d back_to_back=%0d bubbles=%0d extreme=%0d wide_results=%0d flushed=%0d",
             n_out, n_b2b, n_bubble, n_extreme, n_wide, n_flushed);
    if (n_b2b == 0)     begin failures++; $display("no back-to-back input");   end
    if (n_bubble == 0)  begin failures++; $display("no pipeline bubble");      end
    if (n_extreme == 0) begin failures++; $display("no extreme operand");      end
    if (n_wide == 0)    begin failures++; $display("no full-width result");    end
    if (n_flushed == 0) begin failures++; $display("no product dropped by reset"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
