// switch_checker: drives one lookahead_switch with random Bernoulli traffic and
// compares it slot by slot with the reference model in lookahead_ref_pkg.
//
// Every slot it compares, for each output, out_valid, the payload and the source
// input, and for each input the number of drops; it also checks the slot length
// (N+1 clocks), that every delivered packet waited between 1 and B slots, and that
// packets from one input to one output leave in arrival order.
// The load changes by phase (LOAD1 per mille, then LOAD2, then LOAD3) so that the
// switch sees light traffic, overload with drops, and medium traffic. A final drain
// with no arrivals checks that every packet was delivered or dropped.
// Payload tag: arrival slot in bits [31:8], input in [7:4], destination in [3:0].
module switch_checker
  import lookahead_ref_pkg::*;
#(
  parameter int N      = 4,
  parameter int B      = 5,
  parameter bit ROTATE = 1'b1,
  parameter int SLOTS  = 1500,
  parameter int LOAD1  = 400,
  parameter int LOAD2  = 1000,
  parameter int LOAD3  = 800
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_drop,
  output int   n_rej_busy,
  output int   n_rej_conflict,
  output int   n_place_late,
  output int   n_place_xmit_col,
  output int   n_overlap,
  output int   n_rotated
);
  localparam int DW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]           arr_valid;
  logic [N-1:0][DW-1:0]   arr_dest;
  logic [N-1:0][31:0]     arr_data;
  logic                   slot_last, slot_start;
  logic [N-1:0]           out_valid;
  logic [N-1:0][31:0]     out_data;
  logic [N-1:0][DW-1:0]   out_src;
  logic [N-1:0]           drop, place, check;

  lookahead_switch #(.N(N), .B(B), .DATA_W(32), .ROTATE(ROTATE)) dut (
    .clk, .rst_n, .arr_valid, .arr_dest, .arr_data, .slot_last, .slot_start,
    .out_valid, .out_data, .out_src, .drop, .place, .check
  );

  lookahead_ref #(N, B, ROTATE) model;
  int drop_cnt [N];
  int last_arr [N][N];  // arrival slot of the last packet delivered, per [input][output]
  int cyc_since_last;
  int delivered;

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) if (drop[i]) drop_cnt[i]++;
  end

  // Minislots in which one input port processor checks for two packets at once.
  int overlap_cycles = 0;
  for (genvar i = 0; i < N; i++) begin : g_ov
    always @(negedge clk)
      if ($countones(dut.g_port[i].chk_active) > 1) overlap_cycles++;
  end

  initial begin
    bit     av [N];
    int     ad [N];
    longint at [N];
    int     slot, load;
    done = 0; checks = 0; failures = 0; delivered = 0; n_rotated = 0;
    arr_valid = '0; arr_dest = '0; arr_data = '0;
    foreach (drop_cnt[i]) drop_cnt[i] = 0;
    foreach (last_arr[i, o]) last_arr[i][o] = -1;
    model = new();
    @(posedge rst_n);
    slot = 0;
    cyc_since_last = 0;
    while (slot < SLOTS + B + 2) begin
      @(posedge clk); #1;
      cyc_since_last++;
      if (!slot_last) continue;
      if (slot > 0) begin
        checks++;
        if (cyc_since_last != N + 1) begin
          failures++;
          $display("FAIL N=%0d B=%0d: slot length %0d clocks", N, B, cyc_since_last);
        end
      end
      cyc_since_last = 0;
      // Arrivals for the next slot.
      load = (slot < SLOTS / 3) ? LOAD1 : (slot < 2 * SLOTS / 3) ? LOAD2 : (slot < SLOTS) ? LOAD3 : 0;
      for (int i = 0; i < N; i++) begin
        av[i] = ($urandom_range(999) < load);
        ad[i] = $urandom_range(N - 1);
        at[i] = (longint'(slot) << 8) | (i << 4) | ad[i];
        arr_valid[i] = av[i];
        arr_dest[i]  = DW'(ad[i]);
        arr_data[i]  = 32'(at[i]);
      end
      model.step(av, ad, at);
      if (model.start != 0) n_rotated++;
      @(posedge clk); #1;
      cyc_since_last = 1;
      arr_valid = '0;
      slot++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (drop_cnt[i] != model.exp_drop[i]) begin
          failures++;
          $display("FAIL N=%0d B=%0d slot %0d: input %0d dropped %0d, expected %0d",
                   N, B, slot, i, drop_cnt[i], model.exp_drop[i]);
        end
        drop_cnt[i] = 0;
      end
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_valid[o] != model.exp_valid[o] ||
            (model.exp_valid[o] && (out_data[o] != 32'(model.exp_tag[o]) ||
                                    int'(out_src[o]) != model.exp_src[o]))) begin
          failures++;
          $display("FAIL N=%0d B=%0d slot %0d output %0d: got v=%0d data=%h src=%0d, expected v=%0d data=%h src=%0d",
                   N, B, slot, o, out_valid[o], out_data[o], out_src[o],
                   model.exp_valid[o], 32'(model.exp_tag[o]), model.exp_src[o]);
        end
        if (out_valid[o]) begin
          int delay;
          delay = slot - 1 - int'(out_data[o] >> 8);
          delivered++;
          checks++;
          if (delay < 1 || delay > B || int'(out_data[o][3:0]) != o) begin
            failures++;
            $display("FAIL N=%0d B=%0d: packet %h at output %0d after %0d slots", N, B, out_data[o], o, delay);
          end
          // Packets from one input to one output leave in arrival order.
          checks++;
          if (int'(out_data[o] >> 8) <= last_arr[out_src[o]][o]) begin
            failures++;
            $display("FAIL N=%0d B=%0d: packet %h from input %0d overtook an earlier one", N, B, out_data[o], out_src[o]);
          end
          last_arr[out_src[o]][o] = int'(out_data[o] >> 8);
        end
      end
    end
    // Every packet is delivered or dropped.
    checks++;
    if (delivered + model.n_drop != model.n_arrive) begin
      failures++;
      $display("FAIL N=%0d B=%0d: %0d arrived, %0d delivered, %0d dropped",
               N, B, model.n_arrive, delivered, model.n_drop);
    end
    n_drop           = model.n_drop;
    n_rej_busy       = model.n_rej_busy;
    n_rej_conflict   = model.n_rej_conflict;
    n_place_late     = model.n_place_late;
    n_place_xmit_col = model.n_place_xmit_col;
    n_overlap        = overlap_cycles;
    $display("switch N=%0d B=%0d rotate=%0d: %0d arrived, %0d delivered, %0d dropped",
             N, B, ROTATE, model.n_arrive, delivered, model.n_drop);
    done = 1;
  end

endmodule
