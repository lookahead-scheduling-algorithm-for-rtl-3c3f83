// input_queue: the B one-packet buffers of one input port.
//
// Buffer k holds the packet (destination and payload) that the scheduler placed into
// column k of this input. Up to K packets can be written per clock, each into a
// different column (one per packet the input port processor has in flight). The
// transmitting column is read asynchronously through rd_col; the switch samples the
// read data on the edge that ends a slot, so a packet leaves the queue at the start
// of the slot in which its column transmits. Occupancy is kept in the buffer state
// matrix (sched_state), not here, so the buffers need no reset.
//
// The queue as a row of B single-packet buffers follows the switch's organisation; the
// array storage, the write ports and the asynchronous read are this design's choice.
module input_queue
  import lookahead_pkg::*;
#(
  parameter int unsigned N      = N_DEFAULT,
  parameter int unsigned B      = B_DEFAULT,
  parameter int unsigned DATA_W = DATA_W_DEFAULT,
  parameter int unsigned K      = ctx_depth(N_DEFAULT, B_DEFAULT)
) (
  input  logic                          clk,
  input  logic [K-1:0]                  wr_en,
  input  logic [K-1:0][idx_w(B)-1:0]    wr_col,
  input  logic [K-1:0][idx_w(N)-1:0]    wr_dest,
  input  logic [K-1:0][DATA_W-1:0]      wr_data,
  input  logic [idx_w(B)-1:0]           rd_col,
  output logic [idx_w(N)-1:0]           rd_dest,
  output logic [DATA_W-1:0]             rd_data
);

  localparam int unsigned DW = idx_w(N);

  logic [DW+DATA_W-1:0] mem [B];

  always_ff @(posedge clk) begin
    for (int r = 0; r < K; r++)
      if (wr_en[r]) mem[wr_col[r]] <= {wr_dest[r], wr_data[r]};
  end

  assign {rd_dest, rd_data} = mem[rd_col];

endmodule
