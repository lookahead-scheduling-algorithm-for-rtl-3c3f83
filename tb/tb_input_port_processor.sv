// tb_input_port_processor: one input port processor (input 2 of a 4 x 4 switch with
// B = 5) sees random buffer states and destination maps every minislot. A shadow
// model predicts, per minislot, which packets check a buffer (a new packet starts in
// the minislot equal to its serving position, an older one in every minislot),
// which buffer each checks (j+1, j+2, ... of its arrival slot), whether it is placed,
// and when it is dropped after B unsuccessful checks.
module tb_input_port_processor;
  localparam int N    = 4;
  localparam int B    = 5;
  localparam int K    = 2;
  localparam int W    = 16;
  localparam int PORT = 2;
  localparam int CW   = 3;
  localparam int DW   = 2;
  localparam int MSW  = 3;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic [MSW-1:0]          ms;
  logic                    slot_last;
  logic [CW-1:0]           xmit_col;
  logic [DW-1:0]           serve_start;
  logic                    arr_valid;
  logic [DW-1:0]           arr_dest;
  logic [W-1:0]            arr_data;
  logic [B-1:0]            s_row;
  logic [N-1:0][B-1:0]     m_map;
  logic [K-1:0]            pl_valid;
  logic [K-1:0][CW-1:0]    pl_col;
  logic [K-1:0][DW-1:0]    pl_dest;
  logic [K-1:0][W-1:0]     pl_data;
  logic [K-1:0]            chk_active;
  logic                    drop;

  input_port_processor #(.N(N), .B(B), .DATA_W(W), .PORT(PORT), .K(K)) dut (.*);

  typedef struct { int dest; int data; int col; int cnt; int age; int pos; } pk_t;
  pk_t pend [$];

  int checks = 0, failures = 0;
  int n_place = 0, n_drop = 0, n_two = 0, n_late = 0;

  task automatic expect_eq(string what, int got, int exp, int t);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", t, what, got, exp);
    end
  endtask

  initial begin
    int slot, t, j, st;
    ms = '0; slot_last = 0; xmit_col = '0; serve_start = '0;
    arr_valid = 0; arr_dest = '0; arr_data = '0; s_row = '0; m_map = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    t = 0; j = 0; st = 0;
    for (slot = 0; slot < 1500; slot++) begin
      for (int m = 0; m <= N; m++) begin
        automatic pk_t keep [$];
        automatic int n_exp_pl, n_act;
        automatic bit exp_drop;
        @(negedge clk);
        ms          = MSW'(m);
        slot_last   = (m == N);
        xmit_col    = CW'(j);
        serve_start = DW'(st);
        for (int c = 0; c < B; c++) s_row[c] = ($urandom_range(9) < 6);
        for (int n = 0; n < N; n++)
          for (int c = 0; c < B; c++) m_map[n][c] = ($urandom_range(9) < 3);
        arr_valid = slot_last && ($urandom_range(9) < 7);
        arr_dest  = DW'($urandom_range(N - 1));
        arr_data  = W'($urandom);
        #1;
        n_exp_pl = 0; n_act = 0; exp_drop = 0;
        foreach (pend[k]) begin
          automatic pk_t p = pend[k];
          if (p.age > 0 || m >= p.pos) begin
            n_act++;
            if (!s_row[p.col] && !m_map[p.dest][p.col]) begin
              automatic bit found = 0;
              n_exp_pl++;
              n_place++;
              if (p.age > 0) n_late++;
              for (int r = 0; r < K; r++)
                if (pl_valid[r] && int'(pl_col[r]) == p.col && int'(pl_dest[r]) == p.dest &&
                    int'(pl_data[r]) == p.data) found = 1;
              checks++;
              if (!found) begin
                failures++;
                $display("FAIL cycle %0d: expected placement col %0d dest %0d data %h", t, p.col, p.dest, p.data);
              end
              continue;
            end
            p.cnt++;
            p.col = (p.col + 1) % B;
            if (p.cnt == B) begin
              exp_drop = 1;
              n_drop++;
              continue;
            end
          end
          keep.push_back(p);
        end
        if (n_act > 1) n_two++;
        expect_eq("placements", $countones(pl_valid), n_exp_pl, t);
        expect_eq("checks", $countones(chk_active), n_act, t);
        expect_eq("drop", drop, exp_drop, t);
        pend = keep;
        @(posedge clk);
        t++;
        if (m == N) begin
          foreach (pend[k]) pend[k].age++;
          j  = (j + 1) % B;
          st = (st + 1) % N;
          if (arr_valid) begin
            automatic pk_t p;
            p.dest = arr_dest; p.data = arr_data; p.col = (j + 1) % B; p.cnt = 0; p.age = 0;
            p.pos = (PORT - st + N) % N;
            pend.push_back(p);
          end
        end
      end
    end
    checks++;
    if (n_place == 0 || n_drop == 0 || n_late == 0 || n_two == 0) begin
      failures++;
      $display("FAIL: coverage place=%0d drop=%0d late=%0d two=%0d", n_place, n_drop, n_late, n_two);
    end
    $display("placements %0d, drops %0d, late placements %0d, double-check minislots %0d",
             n_place, n_drop, n_late, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
