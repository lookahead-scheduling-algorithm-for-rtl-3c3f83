// tb_crossbar: drives the fabric with random conflict-free columns (a random
// partial permutation of inputs to outputs) and checks every output's valid bit,
// payload and source input.
module tb_crossbar;
  localparam int N  = 5;
  localparam int DW = 3;
  localparam int W  = 16;

  logic [N-1:0]          in_valid;
  logic [N-1:0][DW-1:0]  in_dest;
  logic [N-1:0][W-1:0]   in_data;
  logic [N-1:0]          out_valid;
  logic [N-1:0][W-1:0]   out_data;
  logic [N-1:0][DW-1:0]  out_src;

  crossbar #(.N(N), .DATA_W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int perm [N];
    int exp_src [N];
    bit exp_v [N];
    for (int t = 0; t < 2000; t++) begin
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      foreach (exp_v[o]) begin exp_v[o] = 0; exp_src[o] = 0; end
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(3) != 0);
        in_dest[i]  = DW'(perm[i]);
        in_data[i]  = W'($urandom);
        if (in_valid[i]) begin exp_v[perm[i]] = 1; exp_src[perm[i]] = i; end
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_valid[o] != exp_v[o] ||
            (exp_v[o] && (out_data[o] != in_data[exp_src[o]] || int'(out_src[o]) != exp_src[o]))) begin
          failures++;
          $display("FAIL t=%0d output %0d: v=%0d data=%h src=%0d, expected v=%0d data=%h src=%0d",
                   t, o, out_valid[o], out_data[o], out_src[o], exp_v[o], in_data[exp_src[o]], exp_src[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
