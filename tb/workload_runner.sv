// workload_runner: offers Bernoulli traffic of load LAMBDA (per mille) with uniformly
// distributed destinations to a lookahead_switch for SLOTS slots, then drains it.
// Every slot is compared with the reference model (outputs and drops); the runner
// also reports packets arrived, delivered and dropped and the total delay in slots,
// from which the testbench computes loss probability and mean delay.
// The payload's low 32 bits carry a tag (arrival slot in [31:8], input in [7:4],
// destination in [3:0]); the remaining bits are the tag repeated, so the whole
// payload width is checked.
module workload_runner
  import lookahead_ref_pkg::*;
#(
  parameter int N      = 10,
  parameter int B      = 10,
  parameter int DATA_W = 32,
  parameter int LAMBDA = 600,
  parameter int SLOTS  = 2000
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint arrived,
  output longint delivered,
  output longint dropped,
  output longint delay_sum
);
  localparam int DW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]              arr_valid;
  logic [N-1:0][DW-1:0]      arr_dest;
  logic [N-1:0][DATA_W-1:0]  arr_data;
  logic                      slot_last, slot_start;
  logic [N-1:0]              out_valid;
  logic [N-1:0][DATA_W-1:0]  out_data;
  logic [N-1:0][DW-1:0]      out_src;
  logic [N-1:0]              drop, place, check;

  lookahead_switch #(.N(N), .B(B), .DATA_W(DATA_W), .ROTATE(1'b1)) dut (
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
    done = 0; checks = 0; failures = 0;
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
    done = 1;
  end

endmodule
