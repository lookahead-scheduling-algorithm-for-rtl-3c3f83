// tb_input_queue: random writes of up to two packets per clock into different
// buffers, random reads of any buffer; every read is compared with a shadow copy.
module tb_input_queue;
  localparam int N  = 4;
  localparam int B  = 5;
  localparam int K  = 2;
  localparam int W  = 16;
  localparam int CW = 3;
  localparam int DW = 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [K-1:0]          wr_en;
  logic [K-1:0][CW-1:0]  wr_col;
  logic [K-1:0][DW-1:0]  wr_dest;
  logic [K-1:0][W-1:0]   wr_data;
  logic [CW-1:0]         rd_col;
  logic [DW-1:0]         rd_dest;
  logic [W-1:0]          rd_data;

  input_queue #(.N(N), .B(B), .DATA_W(W), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  int sh_dest [B];
  int sh_data [B];
  bit written [B];

  initial begin
    foreach (written[c]) written[c] = 0;
    wr_en = '0; wr_col = '0; wr_dest = '0; wr_data = '0; rd_col = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // Check the buffer being read, then set up this clock's writes.
      rd_col = CW'($urandom_range(B - 1));
      #1;
      if (written[rd_col]) begin
        checks++;
        if (int'(rd_dest) != sh_dest[rd_col] || int'(rd_data) != sh_data[rd_col]) begin
          failures++;
          $display("FAIL t=%0d buffer %0d: dest %0d data %h, expected %0d %h",
                   t, rd_col, rd_dest, rd_data, sh_dest[rd_col], sh_data[rd_col]);
        end
      end
      wr_col[0] = CW'($urandom_range(B - 1));
      wr_col[1] = CW'((int'(wr_col[0]) + 1 + $urandom_range(B - 2)) % B);
      for (int r = 0; r < K; r++) begin
        wr_en[r]   = $urandom_range(1);
        wr_dest[r] = DW'($urandom);
        wr_data[r] = W'($urandom);
      end
      @(posedge clk);
      for (int r = 0; r < K; r++)
        if (wr_en[r]) begin
          written[wr_col[r]] = 1;
          sh_dest[wr_col[r]] = wr_dest[r];
          sh_data[wr_col[r]] = wr_data[r];
        end
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
