// tb_workloads: the 10 x 10 switch under uniform Bernoulli traffic, with B = 3 and
// B = 10 buffers per input, at every load from 0.1 to 1.0 in steps of 0.1, measuring
// packet loss probability and mean delay (slots from arrival to transmission).
// Every slot of every run is also compared with the reference model.
// Reference values (results published for this scheduler):
//   B = 3,  load 0.6: loss 6.4e-2 (simulated) and 4.07e-2 (analytical model)
//   B = 10, load 0.6: loss 5.22e-5 (simulated)
//   B = 10, load 0.8: mean delay 4.55 slots (simulated)
// They are checked with tolerances that cover the statistical error of these short
// runs. The whole sweep is checked for the published trends: loss rises with load
// and is lower with B = 10 than with B = 3; mean delay rises with load, stays
// between 1 and B, and is close to one slot at load 0.1.
module tb_workloads;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  localparam int NL    = 10;   // loads 0.1 .. 1.0
  localparam int SLOTS = 12000;

  logic   done  [2][NL];
  int     c     [2][NL];
  int     f     [2][NL];
  longint arr   [2][NL];
  longint dlv   [2][NL];
  longint drp   [2][NL];
  longint dsum  [2][NL];

  for (genvar b = 0; b < 2; b++) begin : g_b
    for (genvar l = 0; l < NL; l++) begin : g_l
      workload_runner #(.N(10), .B(b == 0 ? 3 : 10), .LAMBDA(100 * (l + 1)), .SLOTS(SLOTS)) u (
        .clk, .rst_n, .done(done[b][l]), .checks(c[b][l]), .failures(f[b][l]),
        .arrived(arr[b][l]), .delivered(dlv[b][l]), .dropped(drp[b][l]), .delay_sum(dsum[b][l]));
    end
  end

  int  checks = 0, failures = 0;
  real loss  [2][NL];
  real delay [2][NL];

  task automatic in_range(string what, real v, real lo, real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s = %g, expected %g .. %g", what, v, lo, hi);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 2; b++)
      for (int l = 0; l < NL; l++) wait (done[b][l]);
    $display("  B  load   arrived  dropped  loss        mean delay");
    for (int b = 0; b < 2; b++) begin
      for (int l = 0; l < NL; l++) begin
        checks += c[b][l]; failures += f[b][l];
        loss[b][l]  = real'(drp[b][l]) / real'(arr[b][l]);
        delay[b][l] = real'(dsum[b][l]) / real'(dlv[b][l]);
        $display("%3d  %0.1f  %8d %8d  %-10.3e  %.3f", (b == 0) ? 3 : 10, (l + 1) / 10.0,
                 arr[b][l], drp[b][l], loss[b][l], delay[b][l]);
      end
    end
    // Published points (index 5 is load 0.6, index 7 is load 0.8).
    in_range("loss B=3 load 0.6",   loss[0][5], 0.030, 0.085);
    in_range("loss B=10 load 0.6",  loss[1][5], 0.0, 5.0e-4);
    in_range("delay B=10 load 0.8", delay[1][7], 4.1, 5.0);
    // Trends over the sweep.
    for (int b = 0; b < 2; b++) begin
      in_range("mean delay at load 0.1", delay[b][0], 1.0, 1.2);
      for (int l = 0; l < NL; l++) begin
        in_range("mean delay within 1..B", delay[b][l], 1.0, (b == 0) ? 3.0 : 10.0);
        if (l > 0) in_range("mean delay rises with load", delay[b][l] - delay[b][l-1], 0.0, 10.0);
        if (l > 0 && loss[b][l-1] > 0.0)
          in_range("loss rises with load", loss[b][l] - loss[b][l-1], 0.0, 1.0);
        in_range("loss with B=10 below B=3", loss[0][l] - loss[1][l], 0.0, 1.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SLOTS + 20) * 11 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
