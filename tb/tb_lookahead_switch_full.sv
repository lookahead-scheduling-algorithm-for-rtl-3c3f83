// tb_lookahead_switch_full: the switch at its default size (10 x 10, B = 10 buffers
// per input, 424-bit packets, rotating serving order) under uniform Bernoulli
// traffic of load 0.8. Every slot is compared with the reference model (all outputs
// with their full payload, and the drops); at the end the mean delay is checked
// against the published simulation result for this configuration (4.55 slots) and
// the loss must be small but nonzero.
module tb_lookahead_switch_full
  import lookahead_ref_pkg::*;
;
  localparam int N      = 10;
  localparam int B      = 10;
  localparam int DATA_W = 424;
  localparam int LAMBDA = 800;
  localparam int SLOTS  = 20000;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  int     checks, failures;
  longint arrived, delivered, dropped, delay_sum;
  real    loss, delay;

  localparam int DW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]              arr_valid;
  logic [N-1:0][DW-1:0]      arr_dest;
  logic [N-1:0][DATA_W-1:0]  arr_data;
  logic                      slot_last, slot_start;
  logic [N-1:0]              out_valid;
  logic [N-1:0][DATA_W-1:0]  out_data;
  logic [N-1:0][DW-1:0]      out_src;
  logic [N-1:0]              drop, place, check;

  lookahead_switch dut (
    .clk, .rst_n, .arr_valid, .arr_dest, .arr_data, .slot_last, .slot_start,
    .out_valid, .out_data, .out_src, .drop, .place, .check
  );

  function automatic logic [DATA_W-1:0] payload(longint tag);
    logic [DATA_W-1:0] d;
    for (int b = 0; b < DATA_W; b++) d[b] = tag[b % 32];
    return d;
  endfunction

  lookahead_ref #(N, B, 1'b1) model;
  int drop_cnt;

  always @(negedge clk) drop_cnt += $countones(drop);

  initial begin
    bit     av [N];
    int     ad [N];
    longint at [N];
    int     slot, exp_drops;
    checks = 0; failures = 0;
    arrived = 0; delivered = 0; dropped = 0; delay_sum = 0; drop_cnt = 0;
    arr_valid = '0; arr_dest = '0; arr_data = '0;
    model = new();
    @(posedge rst_n);
    slot = 0;
    while (slot < SLOTS + B + 2) begin
      @(posedge clk); #1;
      if (!slot_last) continue;
      for (int i = 0; i < N; i++) begin
        av[i] = (slot < SLOTS) && ($urandom_range(999) < LAMBDA);
        ad[i] = $urandom_range(N - 1);
        at[i] = (longint'(slot) << 8) | (i << 4) | ad[i];
        arr_valid[i] = av[i];
        arr_dest[i]  = DW'(ad[i]);
        arr_data[i]  = payload(at[i]);
        if (av[i]) arrived++;
      end
      model.step(av, ad, at);
      @(posedge clk); #1;
      arr_valid = '0;
      slot++;
      exp_drops = 0;
      foreach (model.exp_drop[i]) exp_drops += model.exp_drop[i];
      checks++;
      if (drop_cnt != exp_drops) begin
        failures++;
        $display("FAIL N=%0d B=%0d slot %0d: %0d drops, expected %0d", N, B, slot, drop_cnt, exp_drops);
      end
      dropped += drop_cnt;
      drop_cnt = 0;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_valid[o] != model.exp_valid[o] ||
            (model.exp_valid[o] && (out_data[o] != payload(model.exp_tag[o]) ||
                                    int'(out_src[o]) != model.exp_src[o]))) begin
          failures++;
          $display("FAIL N=%0d B=%0d slot %0d output %0d: v=%0d src=%0d tag=%h, expected v=%0d src=%0d tag=%h",
                   N, B, slot, o, out_valid[o], out_src[o], out_data[o][31:0],
                   model.exp_valid[o], model.exp_src[o], 32'(model.exp_tag[o]));
        end
        if (out_valid[o]) begin
          delivered++;
          delay_sum += slot - 1 - int'(out_data[o][31:8]);
        end
      end
    end
    checks++;
    if (delivered + dropped != arrived) begin
      failures++;
      $display("FAIL N=%0d B=%0d: %0d arrived, %0d delivered, %0d dropped", N, B, arrived, delivered, dropped);
    end
    loss  = real'(dropped) / real'(arrived);
    delay = real'(delay_sum) / real'(delivered);
    $display("full size, load %0.2f: %0d arrived, %0d dropped, loss %g, mean delay %.3f slots",
             LAMBDA / 1000.0, arrived, dropped, loss, delay);
    // Published simulation result for this configuration: mean delay 4.55 slots.
    checks++;
    if (delay < 4.0 || delay > 5.1) begin
      failures++;
      $display("FAIL mean delay %.3f outside 4.0 .. 5.1", delay);
    end
    checks++;
    if (dropped == 0 || loss > 0.02) begin
      failures++;
      $display("FAIL loss %g: expected some drops, below 0.02", loss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SLOTS + 20) * (N + 1) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
