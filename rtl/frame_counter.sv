// frame_counter: modulo-m bit counter that marks the m-th bit of every frame.
//
// The detector resets its FSM at every m-th clock so that vectors that
// overlap in the stream can never chain into a false state sequence. This
// counter provides that reset: it counts 0..M-1, one step per clock, and
// raises 'last' while the current bit is the m-th of its frame. The FSM uses
// 'last' as a synchronous reset, returning to its initial state on the edge
// that ends the frame. The method calls it an m-bit counter; a modulo-m count
// of ceil(log2 M) bits is all the reset period needs, which is the choice made
// here. 'clear' (this design's own) restarts the frame, for example when a new
// configuration is loaded.
//
// Interface: clk, active-low asynchronous rst_n (count 0), synchronous clear.
// Timing: count and last are register outputs / decoded from them.
// Lint may report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the 'disable iff' of the assertion below, not logic.
module frame_counter #(
  parameter int unsigned M = 8  // frame (vector) length in bits, M >= 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear,
  output logic [vp_pkg::clog2_min1(M)-1:0] count,
  output logic                            last
);

  localparam int unsigned CW = vp_pkg::clog2_min1(M);

  assign last = (count == CW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear || last) begin
      count <= '0;
    end else begin
      count <= count + CW'(1);
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) < M)
    else $error("frame counter out of range");

endmodule
