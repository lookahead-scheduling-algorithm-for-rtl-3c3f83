// slot_timer: time-slot and minislot sequencing of the lookahead switch.
//
// A time slot is divided into N+1 minislots so that every input port processor can
// make N+1 buffer checks per slot, the minimum speed the pipelined scheduler needs.
// One minislot is one clock: `ms` counts 0..N and `slot_last` marks minislot N+1.
// On the clock edge that ends a slot the transmitting buffer column `xmit_col`
// advances cyclically (j -> j+1 mod B), and, when ROTATE is set, the input port
// served first (`serve_start`) advances (i -> i+1 mod N) for access fairness.
// ROTATE = 0 keeps the fixed serving order (input 0 first) used by the worked
// example and by the analytical model.
//
// Timing: every output is a register. After reset the switch is in minislot 0 of a
// slot whose transmitting column is 0 and whose first-served input is 0.
// The one-clock minislot and the synchronous active-low reset are this design's choice.
module slot_timer
  import lookahead_pkg::*;
#(
  parameter int unsigned N      = N_DEFAULT,
  parameter int unsigned B      = B_DEFAULT,
  parameter bit          ROTATE = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [idx_w(N+1)-1:0]  ms,
  output logic                   slot_last,
  output logic [idx_w(B)-1:0]    xmit_col,
  output logic [idx_w(N)-1:0]    serve_start
);

  localparam int unsigned MSW = idx_w(N+1);
  localparam int unsigned CW  = idx_w(B);
  localparam int unsigned PW  = idx_w(N);

  assign slot_last = (ms == MSW'(N));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ms          <= '0;
      xmit_col    <= '0;
      serve_start <= '0;
    end else if (slot_last) begin
      ms          <= '0;
      xmit_col    <= (xmit_col == CW'(B - 1)) ? '0 : xmit_col + 1'b1;
      if (ROTATE)
        serve_start <= (serve_start == PW'(N - 1)) ? '0 : serve_start + 1'b1;
    end else begin
      ms <= ms + 1'b1;
    end
  end

  initial begin
    assert (N >= 2) else $fatal(1, "slot_timer: N must be at least 2");
    assert (B >= 1) else $fatal(1, "slot_timer: B must be at least 1");
  end

endmodule
