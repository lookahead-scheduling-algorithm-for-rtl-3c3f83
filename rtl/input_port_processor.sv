// input_port_processor: buffer checking for one input port of the lookahead switch.
//
// A packet arriving at this input is scheduled up to B slots ahead. Its processor
// checks one buffer of its own queue per minislot, following the column sequence
// j+1, j+2, ..., B, 1, ..., j, where j is the transmitting column of the arrival slot.
// Buffer (i,k) is available when it is empty (S[i][k] = 0) and column k holds no other
// packet for the same output (M[n][k] = 0). The packet is placed into the first
// available buffer (a placement request to sched_state and input_queue); if none of
// the B buffers is available it is dropped, so that room stays for later packets.
//
// Pipelining: the input served at position p (0-based) of the current serving order
// makes its first check in minislot p, so in any minislot the inputs check buffers in
// different columns and every column is checked in serving order. A packet that has
// not finished its B checks by the end of the slot keeps checking in the next slot,
// one column further each minislot, from the first minislot on. With B <= N a new
// packet never meets its predecessor still searching, and the processor makes at most
// one check per minislot, the speed the algorithm assumes. With B > N a packet can
// still be searching when its successor starts (with a rotating serving order the
// successor is served one position earlier); the processor then keeps
// K = ctx_depth(N,B) packets in flight and checks one buffer for each active one,
// always in different columns. That extension is this design's own.
//
// Interface and timing: arrivals (arr_*) are sampled on the clock edge that ends a
// slot (slot_last = 1) and are scheduled in the slot that follows. s_row and m_map are
// the registered S row of this input and the whole M; pl_* and drop are combinational
// and take effect on the next clock edge. chk_active shows which in-flight packets
// make a check in the current minislot. The search order, the availability test and
// the drop rule follow the lookahead algorithm; the in-flight registers, the request
// ports and the reset are this design's choice.
module input_port_processor
  import lookahead_pkg::*;
#(
  parameter int unsigned N      = N_DEFAULT,
  parameter int unsigned B      = B_DEFAULT,
  parameter int unsigned DATA_W = DATA_W_DEFAULT,
  parameter int unsigned PORT   = 0,
  parameter int unsigned K      = ctx_depth(N_DEFAULT, B_DEFAULT)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [idx_w(N+1)-1:0]         ms,
  input  logic                          slot_last,
  input  logic [idx_w(B)-1:0]           xmit_col,
  input  logic [idx_w(N)-1:0]           serve_start,
  input  logic                          arr_valid,
  input  logic [idx_w(N)-1:0]           arr_dest,
  input  logic [DATA_W-1:0]             arr_data,
  input  logic [B-1:0]                  s_row,
  input  logic [N-1:0][B-1:0]           m_map,
  output logic [K-1:0]                  pl_valid,
  output logic [K-1:0][idx_w(B)-1:0]    pl_col,
  output logic [K-1:0][idx_w(N)-1:0]    pl_dest,
  output logic [K-1:0][DATA_W-1:0]      pl_data,
  output logic [K-1:0]                  chk_active,
  output logic                          drop
);

  localparam int unsigned CW   = idx_w(B);
  localparam int unsigned DW   = idx_w(N);
  localparam int unsigned CNTW = idx_w(B);

  typedef struct packed {
    logic              valid;
    logic [DW-1:0]     dest;
    logic [CW-1:0]     col;    // next column to check
    logic [CNTW-1:0]   cnt;    // checks already made
    logic [DATA_W-1:0] data;
  } ctx_t;

  ctx_t ctx_q [K];
  ctx_t ctx_d [K];

  // Serving position of this input in the current slot.
  logic [DW-1:0] pos;
  assign pos = DW'((PORT + N - int'(serve_start)) % N);

  function automatic logic [CW-1:0] col_inc(logic [CW-1:0] c);
    return (c == CW'(B - 1)) ? '0 : c + 1'b1;
  endfunction

  always_comb begin
    drop = 1'b0;
    for (int a = 0; a < K; a++) begin
      ctx_d[a]      = ctx_q[a];
      chk_active[a] = ctx_q[a].valid && (a != 0 || int'(ms) >= int'(pos));
      pl_valid[a]   = chk_active[a] && !s_row[ctx_q[a].col] && !m_map[ctx_q[a].dest][ctx_q[a].col];
      pl_col[a]     = ctx_q[a].col;
      pl_dest[a]    = ctx_q[a].dest;
      pl_data[a]    = ctx_q[a].data;
      if (chk_active[a]) begin
        if (pl_valid[a]) begin
          ctx_d[a].valid = 1'b0;
        end else if (ctx_q[a].cnt == CNTW'(B - 1)) begin
          ctx_d[a].valid = 1'b0;
          drop           = 1'b1;
        end else begin
          ctx_d[a].cnt = ctx_q[a].cnt + 1'b1;
          ctx_d[a].col = col_inc(ctx_q[a].col);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int a = 0; a < K; a++) ctx_q[a].valid <= 1'b0;
    end else if (slot_last) begin
      // Age every in-flight packet by one slot and take the new arrival. The new
      // slot transmits column xmit_col+1, so the search starts at xmit_col+2.
      ctx_q[0].valid <= arr_valid;
      ctx_q[0].dest  <= arr_dest;
      ctx_q[0].col   <= col_inc(col_inc(xmit_col));
      ctx_q[0].cnt   <= '0;
      ctx_q[0].data  <= arr_data;
      for (int a = 1; a < K; a++) ctx_q[a] <= ctx_d[a-1];
    end else begin
      for (int a = 0; a < K; a++) ctx_q[a] <= ctx_d[a];
    end
  end

  // The oldest in-flight packet must have finished when it would age out, and with
  // B <= N the processor makes at most one check per minislot.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (slot_last)
        assert (!ctx_d[K-1].valid)
          else $error("input_port_processor %0d: packet still searching after %0d slots", PORT, K);
      if (B <= N)
        assert ($countones(chk_active) <= 1)
          else $error("input_port_processor %0d: two checks in one minislot", PORT);
      if (slot_last && arr_valid)
        assert (int'(arr_dest) < N)
          else $error("input_port_processor %0d: destination %0d out of range", PORT, arr_dest);
    end
  end

endmodule
