// tb_sched_state: random legal placement requests (empty buffer, output not yet in
// the column, at most one request per column, never the column being cleared) and
// random column clears; S and M are compared with a shadow model every clock.
module tb_sched_state;
  localparam int N  = 4;
  localparam int B  = 5;
  localparam int K  = 2;
  localparam int CW = 3;
  localparam int DW = 2;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic                        clr;
  logic [CW-1:0]               clr_col;
  logic [N-1:0][K-1:0]         pl_valid;
  logic [N-1:0][K-1:0][CW-1:0] pl_col;
  logic [N-1:0][K-1:0][DW-1:0] pl_dest;
  logic [N-1:0][B-1:0]         s_q, m_q;

  sched_state #(.N(N), .B(B), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  bit s [N][B];
  bit m [N][B];
  int n_place = 0, n_clear_busy = 0;

  initial begin
    bit col_used [B];
    clr = 0; clr_col = '0; pl_valid = '0; pl_col = '0; pl_dest = '0;
    foreach (s[i, c]) begin s[i][c] = 0; m[i][c] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        for (int c = 0; c < B; c++) begin
          checks++;
          if (s_q[i][c] != s[i][c] || m_q[i][c] != m[i][c]) begin
            failures++;
            $display("FAIL t=%0d (%0d,%0d): S=%0d M=%0d, expected S=%0d M=%0d",
                     t, i, c, s_q[i][c], m_q[i][c], s[i][c], m[i][c]);
          end
        end
      end
      clr     = ($urandom_range(3) == 0);
      clr_col = CW'($urandom_range(B - 1));
      foreach (col_used[c]) col_used[c] = clr && (c == clr_col);
      for (int i = 0; i < N; i++) begin
        for (int r = 0; r < K; r++) begin
          automatic int c, d;
          c = $urandom_range(B - 1);
          d = $urandom_range(N - 1);
          pl_col[i][r]   = CW'(c);
          pl_dest[i][r]  = DW'(d);
          pl_valid[i][r] = !col_used[c] && !s[i][c] && !m[d][c] && ($urandom_range(2) != 0);
          if (pl_valid[i][r]) col_used[c] = 1;
        end
      end
      @(posedge clk);
      if (clr) begin
        for (int n = 0; n < N; n++) begin
          if (s[n][clr_col]) n_clear_busy++;
          s[n][clr_col] = 0;
          m[n][clr_col] = 0;
        end
      end
      for (int i = 0; i < N; i++)
        for (int r = 0; r < K; r++)
          if (pl_valid[i][r]) begin
            s[i][pl_col[i][r]] = 1;
            m[pl_dest[i][r]][pl_col[i][r]] = 1;
            n_place++;
          end
    end
    checks++;
    if (n_place == 0 || n_clear_busy == 0) begin
      failures++;
      $display("FAIL: placements %0d, clears of occupied buffers %0d", n_place, n_clear_busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
