// lookahead_switch: N x N input-buffered packet switch with lookahead scheduling.
//
// Each input has a single queue of B one-packet buffers. A packet is scheduled the
// moment it arrives: its input port processor looks for a buffer, up to B slots ahead,
// whose column holds no other packet for the same output. Columns are transmitted
// one per slot in cyclic order, so a packet placed k columns after the transmitting
// column leaves k slots later, and every column crosses the nonblocking fabric without
// output conflict. A packet that finds no buffer is dropped at once. Packets for the
// same output leave an input in arrival order.
//
// Structure: slot_timer (minislots, transmitting column, serving order),
// input_port_processor x N (pipelined buffer checking), sched_state (buffer state
// matrix S and destination map M), input_queue x N (packet buffers) and crossbar
// (switching fabric).
//
// Interface and timing (one clock = one minislot, N+1 clocks = one time slot):
//   * arr_valid/arr_dest/arr_data are sampled on the edge at the end of a slot
//     (slot_last = 1): at most one packet per input per slot, scheduled in the next
//     slot. arr_dest is the output port, 0..N-1.
//   * At the same edge the packets of the next transmitting column are switched:
//     out_valid/out_data/out_src are registered and held for the whole slot
//     (slot_start = 1 in its first clock). out_src is the input a packet came from.
//   * drop[i] pulses for one clock when input i gives up on a packet; place[i] pulses
//     when input i places one; check[i] is high in every minislot in which input i
//     checks a buffer.
// A packet arriving at the end of slot t and placed k columns after the transmitting
// column of slot t+1 appears at the outputs in slot t+1+k: its delay is k slots.
//
// The scheduling rules, the N+1 minislots per slot, the cyclic column transmission and
// the rotating serving order follow the lookahead algorithm and its pipelined
// implementation. The sampling points, the registered outputs, the payload width and
// the active-low synchronous reset are this design's choice.
module lookahead_switch
  import lookahead_pkg::*;
#(
  parameter int unsigned N      = N_DEFAULT,
  parameter int unsigned B      = B_DEFAULT,
  parameter int unsigned DATA_W = DATA_W_DEFAULT,
  parameter bit          ROTATE = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 arr_valid,
  input  logic [N-1:0][idx_w(N)-1:0]   arr_dest,
  input  logic [N-1:0][DATA_W-1:0]     arr_data,
  output logic                         slot_last,
  output logic                         slot_start,
  output logic [N-1:0]                 out_valid,
  output logic [N-1:0][DATA_W-1:0]     out_data,
  output logic [N-1:0][idx_w(N)-1:0]   out_src,
  output logic [N-1:0]                 drop,
  output logic [N-1:0]                 place,
  output logic [N-1:0]                 check
);

  localparam int unsigned K   = ctx_depth(N, B);
  localparam int unsigned CW  = idx_w(B);
  localparam int unsigned DW  = idx_w(N);
  localparam int unsigned MSW = idx_w(N+1);

  logic [MSW-1:0] ms;
  logic [CW-1:0]  xmit_col, next_col;
  logic [DW-1:0]  serve_start;

  slot_timer #(.N(N), .B(B), .ROTATE(ROTATE)) u_timer (
    .clk, .rst_n, .ms, .slot_last, .xmit_col, .serve_start
  );

  assign slot_start = (ms == '0);
  assign next_col   = (xmit_col == CW'(B - 1)) ? '0 : xmit_col + 1'b1;

  logic [N-1:0][K-1:0]               pl_valid;
  logic [N-1:0][K-1:0][CW-1:0]       pl_col;
  logic [N-1:0][K-1:0][DW-1:0]       pl_dest;
  logic [N-1:0][K-1:0][DATA_W-1:0]   pl_data;
  logic [N-1:0][B-1:0]               s_q, m_q;

  sched_state #(.N(N), .B(B), .K(K)) u_state (
    .clk, .rst_n,
    .clr     (slot_last),
    .clr_col (next_col),
    .pl_valid, .pl_col, .pl_dest,
    .s_q, .m_q
  );

  logic [N-1:0]                 q_valid;
  logic [N-1:0][DW-1:0]         q_dest;
  logic [N-1:0][DATA_W-1:0]     q_data;

  for (genvar i = 0; i < N; i++) begin : g_port
    logic [K-1:0] chk_active;

    input_port_processor #(.N(N), .B(B), .DATA_W(DATA_W), .PORT(i), .K(K)) u_ipp (
      .clk, .rst_n, .ms, .slot_last, .xmit_col, .serve_start,
      .arr_valid  (arr_valid[i]),
      .arr_dest   (arr_dest[i]),
      .arr_data   (arr_data[i]),
      .s_row      (s_q[i]),
      .m_map      (m_q),
      .pl_valid   (pl_valid[i]),
      .pl_col     (pl_col[i]),
      .pl_dest    (pl_dest[i]),
      .pl_data    (pl_data[i]),
      .chk_active (chk_active),
      .drop       (drop[i])
    );

    input_queue #(.N(N), .B(B), .DATA_W(DATA_W), .K(K)) u_queue (
      .clk,
      .wr_en   (pl_valid[i]),
      .wr_col  (pl_col[i]),
      .wr_dest (pl_dest[i]),
      .wr_data (pl_data[i]),
      .rd_col  (next_col),
      .rd_dest (q_dest[i]),
      .rd_data (q_data[i])
    );

    assign q_valid[i] = s_q[i][next_col];
    assign place[i]   = |pl_valid[i];
    assign check[i]   = |chk_active;
  end

  logic [N-1:0]               xb_valid;
  logic [N-1:0][DATA_W-1:0]   xb_data;
  logic [N-1:0][DW-1:0]       xb_src;

  crossbar #(.N(N), .DATA_W(DATA_W)) u_fabric (
    .in_valid  (q_valid),
    .in_dest   (q_dest),
    .in_data   (q_data),
    .out_valid (xb_valid),
    .out_data  (xb_data),
    .out_src   (xb_src)
  );

  // The packets of a column go to different outputs.
  always_ff @(posedge clk) begin
    if (rst_n && slot_last)
      for (int o = 0; o < N; o++) begin
        int unsigned senders;
        senders = 0;
        for (int i = 0; i < N; i++)
          if (q_valid[i] && q_dest[i] == DW'(o)) senders++;
        assert (senders <= 1)
          else $error("lookahead_switch: output %0d requested by more than one input", o);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_data  <= '0;
      out_src   <= '0;
    end else if (slot_last) begin
      out_valid <= xb_valid;
      out_data  <= xb_data;
      out_src   <= xb_src;
    end
  end

endmodule
