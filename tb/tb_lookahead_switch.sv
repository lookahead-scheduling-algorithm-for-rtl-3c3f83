// tb_lookahead_switch: end-to-end test of the lookahead switch.
//
// Three switches run side by side against the slot-level reference model:
//   * 4 x 4, B = 5, rotating serving order;
//   * 3 x 3, B = 5, fixed serving order (the shape of the worked example, where a
//     packet may still be searching when its successor arrives);
//   * 3 x 3, B = 9, rotating order, three packets in flight per input.
// Each switch sees light load, overload and medium load. Besides the per-slot
// comparison, the test requires every scheduling mechanism to occur at least once:
// drop after B failed checks, rejection because the buffer is occupied, rejection
// because the column already holds a packet for the same output, a packet placed in
// a slot after its arrival slot, placement into the transmitting column (the last
// column searched), one input checking for two packets in one minislot (possible
// only when B > N), and serving-order rotation.
module tb_lookahead_switch;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  int checks, failures;
  logic done [3];
  int c [3], f [3];
  int n_drop [3], n_rej_busy [3], n_rej_conflict [3], n_place_late [3];
  int n_place_xmit_col [3], n_overlap [3], n_rotated [3];

  switch_checker #(.N(4), .B(5), .ROTATE(1'b1), .SLOTS(1500)) u_a (
    .clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .n_drop(n_drop[0]),
    .n_rej_busy(n_rej_busy[0]), .n_rej_conflict(n_rej_conflict[0]), .n_place_late(n_place_late[0]),
    .n_place_xmit_col(n_place_xmit_col[0]), .n_overlap(n_overlap[0]), .n_rotated(n_rotated[0]));
  switch_checker #(.N(3), .B(5), .ROTATE(1'b0), .SLOTS(1500)) u_b (
    .clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .n_drop(n_drop[1]),
    .n_rej_busy(n_rej_busy[1]), .n_rej_conflict(n_rej_conflict[1]), .n_place_late(n_place_late[1]),
    .n_place_xmit_col(n_place_xmit_col[1]), .n_overlap(n_overlap[1]), .n_rotated(n_rotated[1]));
  switch_checker #(.N(3), .B(9), .ROTATE(1'b1), .SLOTS(1500)) u_c (
    .clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .n_drop(n_drop[2]),
    .n_rej_busy(n_rej_busy[2]), .n_rej_conflict(n_rej_conflict[2]), .n_place_late(n_place_late[2]),
    .n_place_xmit_col(n_place_xmit_col[2]), .n_overlap(n_overlap[2]), .n_rotated(n_rotated[2]));

  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1] && done[2]);
    for (int k = 0; k < 3; k++) begin checks += c[k]; failures += f[k]; end
    $display("mechanisms seen:");
    need("drop after B checks",           n_drop[0] + n_drop[1] + n_drop[2]);
    need("reject, buffer occupied",       n_rej_busy[0] + n_rej_busy[1] + n_rej_busy[2]);
    need("reject, output conflict",       n_rej_conflict[0] + n_rej_conflict[1] + n_rej_conflict[2]);
    need("placed in a later slot",        n_place_late[0] + n_place_late[1] + n_place_late[2]);
    need("placed in transmitting column", n_place_xmit_col[0] + n_place_xmit_col[1] + n_place_xmit_col[2]);
    need("two checks at one input (B>N)", n_overlap[1] + n_overlap[2]);
    need("serving order rotated",         n_rotated[0] + n_rotated[2]);
    checks++;
    if (n_rotated[1] != 0) begin
      failures++;
      $display("FAIL: fixed serving order rotated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
