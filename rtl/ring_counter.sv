// ring_counter: the three-bit ring counter that holds the processor's instruction phase.
//
// One bit is set at a time and it moves FETCH -> DECODE -> EXECUTE -> FETCH on every
// rising clock edge, so each instruction takes exactly three cycles. The one-hot ring
// is the design's own choice of state encoding; the synchronous, active-high reset into
// FETCH is this implementation's choice (the reset is not specified). The ring is not
// self-correcting: only reset restores a single set bit.
//
// Ports: clk, rst (synchronous, active high), phase (one-hot {execute, decode, fetch}).
module ring_counter
  import simple_cpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  output phase_t phase
);

  logic [2:0] ring;

  always_ff @(posedge clk) begin
    if (rst) ring <= 3'b001;                 // FETCH
    else     ring <= {ring[1:0], ring[2]};   // rotate towards EXECUTE, then wrap
  end

  assign phase = phase_t'(ring);

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(ring))
    else $error("ring_counter: phase is not one-hot: %b", ring);

endmodule
