// tb_slot_timer: checks the minislot count, the slot length of N+1 clocks, the cyclic
// transmitting column and the serving-order rotation, with rotation on and off.
module tb_slot_timer;
  localparam int N = 3;
  localparam int B = 5;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] ms_r, ms_f;
  logic       last_r, last_f;
  logic [2:0] col_r, col_f;
  logic [1:0] st_r, st_f;

  slot_timer #(.N(N), .B(B), .ROTATE(1'b1)) dut_r (
    .clk, .rst_n, .ms(ms_r), .slot_last(last_r), .xmit_col(col_r), .serve_start(st_r));
  slot_timer #(.N(N), .B(B), .ROTATE(1'b0)) dut_f (
    .clk, .rst_n, .ms(ms_f), .slot_last(last_f), .xmit_col(col_f), .serve_start(st_f));

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    #1;
    // The first clock after reset is minislot 0 of slot 0.
    cyc = 1;
    for (int slot = 0; slot < 40; slot++) begin
      for (int m = 0; m <= N; m++) begin
        expect_eq("ms", ms_r, m);
        expect_eq("slot_last", last_r, m == N);
        expect_eq("xmit_col", col_r, slot % B);
        expect_eq("serve_start rotating", st_r, slot % N);
        expect_eq("ms fixed", ms_f, m);
        expect_eq("xmit_col fixed", col_f, slot % B);
        expect_eq("serve_start fixed", st_f, 0);
        @(posedge clk); #1;
        cyc++;
      end
    end
    // 40 slots of N+1 clocks each.
    expect_eq("clocks for 40 slots", cyc - 1, 40 * (N + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
