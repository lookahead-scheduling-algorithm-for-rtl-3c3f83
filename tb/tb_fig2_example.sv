// tb_fig2_example: the worked example of a 3 x 3 switch with B = 5 buffers per input
// and the fixed serving order (input 1, input 2, input 3), in 0-based numbering
// inputs, outputs and columns 0..2 / 0..4.
//
// Slots 1..9 bring the switch from empty into the example's starting state: at the
// start of slot 10 the transmitting column is 0 and the queues hold
//   input 0: column 0 -> output 0, column 1 -> output 1, column 3 -> output 1
//   input 1: column 0 -> output 2, column 2 -> output 1
//   input 2: column 0 -> output 1, column 1 -> output 0, column 2 -> output 2
// and packets for outputs 1, 2, 0 arrive at inputs 0, 1, 2. The test then checks,
// minislot by minislot, the checks and placements of the example:
//   slot 10: input 1 placed in column 1 in minislot 1, input 0 in column 4 in
//            minislot 3, input 2 not placed (it checks columns 1 and 2);
//   slot 11 (packets for output 0 arrive at inputs 0 and 1): input 0 placed in
//            column 2 and the leftover of input 2 in column 3, both in minislot 0;
//            input 1 placed in column 4 in minislot 3 after two rejections;
// and the packets switched to the outputs in slots 10 to 14, which empty the
// final state of the example column by column.
module tb_fig2_example;
  localparam int N = 3;
  localparam int B = 5;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]          arr_valid;
  logic [N-1:0][1:0]     arr_dest;
  logic [N-1:0][15:0]    arr_data;
  logic                  slot_last, slot_start;
  logic [N-1:0]          out_valid;
  logic [N-1:0][15:0]    out_data;
  logic [N-1:0][1:0]     out_src;
  logic [N-1:0]          drop, place, check;

  lookahead_switch #(.N(N), .B(B), .DATA_W(16), .ROTATE(1'b0)) dut (.*);

  int checks = 0, failures = 0;
  int slot = 0;   // index of the current slot
  int ms = 0;     // minislot within it

  // Arrivals entering slot s (s = 1..11): destination per input, -1 for none.
  localparam int ARR [11][3] = '{
      '{-1, -1, -1}, '{-1, -1, -1}, '{-1, -1, -1}, '{-1,  0,  0}, '{ 0,  0,  0},
      '{ 0, -1,  0}, '{ 1,  1,  1}, '{ 1,  1,  2}, '{ 1,  2, -1},
      '{ 1,  2,  0}, '{ 0,  0, -1}};
  function automatic int arrival(int s, int i);
    return ARR[s-1][i];
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL slot %0d minislot %0d %s: got %0d expected %0d", slot, ms, what, got, exp);
    end
  endtask

  // Expected check / placement of input i in minislot m of slots 10 and 11:
  // -1 no check, -2 check rejected, c >= 0 placed in column c.
  localparam int E10 [4][3] = '{'{-2, -1, -1}, '{-2,  1, -1}, '{-2, -1, -2}, '{ 4, -1, -2}};
  localparam int E11 [4][3] = '{'{ 2, -1,  3}, '{-1, -2, -1}, '{-1, -2, -1}, '{-1,  4, -1}};
  function automatic int expected_event(int s, int m, int i);
    return (s == 10) ? E10[m][i] : E11[m][i];
  endfunction

  // Expected source input on each output in slots 10..14 (-1: idle).
  localparam int SRC [5][3] = '{'{0, 2, 1}, '{2, 0, 1}, '{0, 1, 2}, '{2, 0, -1}, '{1, 0, -1}};
  function automatic int expected_src(int s, int o);
    return SRC[s-10][o];
  endfunction

  initial begin
    arr_valid = '0; arr_dest = '0; arr_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    #1;
    while (slot < 15) begin
      // Minislot `ms` of slot `slot`.
      if (slot == 10 && ms == 0) begin
        // Starting state of the example (after column 0 was switched out).
        automatic bit [B-1:0] s_exp [N] = '{5'b01010, 5'b00100, 5'b00110};
        automatic bit [B-1:0] m_exp [N] = '{5'b00010, 5'b01110, 5'b00100};
        for (int i = 0; i < N; i++) expect_eq($sformatf("S row %0d", i), dut.s_q[i], s_exp[i]);
        for (int n = 0; n < N; n++) expect_eq($sformatf("M row %0d", n), dut.m_q[n], m_exp[n]);
      end
      if (slot == 10 || slot == 11) begin
        for (int i = 0; i < N; i++) begin
          automatic int e = expected_event(slot, ms, i);
          expect_eq($sformatf("input %0d checks", i), check[i], e != -1);
          expect_eq($sformatf("input %0d places", i), place[i], e >= 0);
          if (e >= 0) begin
            automatic int col = -1;
            for (int a = 0; a < 2; a++)
              if (dut.pl_valid[i][a]) col = dut.pl_col[i][a];
            expect_eq($sformatf("input %0d column", i), col, e);
          end
        end
      end
      if (slot >= 10 && ms == 0) begin
        for (int o = 0; o < N; o++) begin
          automatic int e = expected_src(slot, o);
          expect_eq($sformatf("output %0d valid", o), out_valid[o], e >= 0);
          if (e >= 0) begin
            expect_eq($sformatf("output %0d source", o), out_src[o], e);
            expect_eq($sformatf("output %0d payload", o), out_data[o], 16'h100 * e + o);
          end
        end
      end
      if (slot_last) begin
        for (int i = 0; i < N; i++) begin
          automatic int d = (slot + 1 <= 11) ? arrival(slot + 1, i) : -1;
          arr_valid[i] = (d >= 0);
          arr_dest[i]  = 2'(d);
          arr_data[i]  = 16'(16'h100 * i + d);
        end
      end
      @(posedge clk); #1;
      arr_valid = '0;
      if (ms == N) begin ms = 0; slot++; end
      else ms++;
    end
    expect_eq("drops", drop, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
