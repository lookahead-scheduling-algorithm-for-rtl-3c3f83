// sched_state: buffer state matrix S and destination map M of the lookahead scheduler.
//
// S[i][c] is 1 when buffer c of input i holds a packet. M[n][c] is 1 when some buffer
// of column c holds a packet for output n; since the scheduler never places two
// packets for one output into one column, the packets of a column can always be
// switched together without output conflict.
//
// Each clock (minislot) the input port processors may place packets: request r of
// input i sets S[i][pl_col] and M[pl_dest][pl_col]. Up to K requests per input are
// accepted, one for each packet the input has in flight. When `clr` is high (the last
// minislot of a slot) the whole column `clr_col` (the next transmitting column) is
// cleared at the same edge, because its packets leave through the switching fabric
// at the start of the next slot. The pipelined schedule never places into the
// column being cleared and never checks one column twice in one minislot; the
// assertions below check both rules and the availability of each placed buffer.
//
// Interface: S and M are registered and read by the input port processors in the
// same minislot that they check a buffer. Synchronous active-low reset empties every
// buffer. Matrix contents and their update rules follow the scheduler's definition;
// the request ports and the reset are this design's choice.
module sched_state
  import lookahead_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned B = B_DEFAULT,
  parameter int unsigned K = ctx_depth(N_DEFAULT, B_DEFAULT)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clr,
  input  logic [idx_w(B)-1:0]                clr_col,
  input  logic [N-1:0][K-1:0]                pl_valid,
  input  logic [N-1:0][K-1:0][idx_w(B)-1:0]  pl_col,
  input  logic [N-1:0][K-1:0][idx_w(N)-1:0]  pl_dest,
  output logic [N-1:0][B-1:0]                s_q,   // [input][column]
  output logic [N-1:0][B-1:0]                m_q    // [output][column]
);

  logic [N-1:0][B-1:0] s_d, m_d;

  always_comb begin
    s_d = s_q;
    m_d = m_q;
    if (clr) begin
      for (int n = 0; n < N; n++) begin
        s_d[n][clr_col] = 1'b0;
        m_d[n][clr_col] = 1'b0;
      end
    end
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < K; r++) begin
        if (pl_valid[i][r]) begin
          s_d[i][pl_col[i][r]]          = 1'b1;
          m_d[pl_dest[i][r]][pl_col[i][r]] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q <= '0;
      m_q <= '0;
    end else begin
      s_q <= s_d;
      m_q <= m_d;
    end
  end

  // Scheduling rules the placements must respect.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        for (int r = 0; r < K; r++) begin
          if (pl_valid[i][r]) begin
            assert (!s_q[i][pl_col[i][r]])
              else $error("sched_state: buffer (%0d,%0d) placed while occupied", i, pl_col[i][r]);
            assert (!m_q[pl_dest[i][r]][pl_col[i][r]])
              else $error("sched_state: output %0d placed twice in column %0d", pl_dest[i][r], pl_col[i][r]);
            assert (!(clr && pl_col[i][r] == clr_col))
              else $error("sched_state: placement into column %0d while it is transmitted", clr_col);
            for (int i2 = 0; i2 < N; i2++)
              for (int r2 = 0; r2 < K; r2++)
                if ((i2 != i || r2 != r) && pl_valid[i2][r2])
                  assert (pl_col[i2][r2] != pl_col[i][r])
                    else $error("sched_state: two placements into column %0d in one minislot", pl_col[i][r]);
          end
        end
      end
    end
  end

endmodule
