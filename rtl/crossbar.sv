// crossbar: the N x N nonblocking switching fabric.
//
// At the start of each slot the packets of the transmitting column are switched to
// their outputs together. The scheduler guarantees that no two packets of a column
// go to the same output, so every output is driven by at most one input and the
// fabric needs no arbitration: output n takes the payload of the input whose packet
// is destined for n. out_src names that input (0 when the output is idle).
//
// Purely combinational. Only the fabric's role (nonblocking, N x N) is given by the
// switch architecture; the AND-OR multiplexer structure is this design's choice. The
// conflict-free property the scheduler promises is asserted in lookahead_switch, where
// it is checked only once the buffer state has been reset.
module crossbar
  import lookahead_pkg::*;
#(
  parameter int unsigned N      = N_DEFAULT,
  parameter int unsigned DATA_W = DATA_W_DEFAULT
) (
  input  logic [N-1:0]                 in_valid,
  input  logic [N-1:0][idx_w(N)-1:0]   in_dest,
  input  logic [N-1:0][DATA_W-1:0]     in_data,
  output logic [N-1:0]                 out_valid,
  output logic [N-1:0][DATA_W-1:0]     out_data,
  output logic [N-1:0][idx_w(N)-1:0]   out_src
);

  localparam int unsigned DW = idx_w(N);

  logic [N-1:0][N-1:0] sel;  // [output][input]

  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_data[o] = '0;
      out_src[o]  = '0;
      for (int i = 0; i < N; i++) begin
        sel[o][i] = in_valid[i] && (in_dest[i] == DW'(o));
        if (sel[o][i]) begin
          out_data[o] = out_data[o] | in_data[i];
          out_src[o]  = out_src[o] | DW'(i);
        end
      end
      out_valid[o] = |sel[o];
    end
  end

endmodule
