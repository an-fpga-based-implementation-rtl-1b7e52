// vector_coprocessor: vector-detection coprocessor built around a
// reconfigurable FSM.
//
// A host loads n m-bit vectors v and their k-bit output words r (or, with
// prec_mode high, lets each vector's word be its precedence: its position in
// ascending order, 0 for the smallest), then streams
// bits on bit_in, one per clock, in frames of m bits (most significant bit of
// each frame first). On the last bit of a frame that equals one of the
// vectors, the coprocessor presents that vector's output word on 'out' with
// 'detect' high; otherwise 'out' is zero.
//
// Datapath, as in the method: a crossbar switch sorts the vectors into
// ascending order with their output words; the reconfigurable FSM walks a
// binary tree over the sorted vectors; a modulo-m frame counter resets the FSM
// at every m-th clock so that overlapping vectors cannot chain. The
// configuration registers and the load protocol are this design's own: on a
// clock with cfg_load high the sorted v/r (and prec_mode) are captured, the frame counter
// restarts and the FSM returns to its initial state, so the first bit of the
// next frame is expected on the following clock; the bit on bit_in during the
// load clock is ignored. 'detect' stays low until a
// configuration has been loaded.
//
// Timing: out/detect are combinational (Mealy) while the m-th bit of a frame
// is on bit_in; frame_pos is the position (0..M-1) of the bit now on bit_in.
// Lint may report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the 'disable iff' of the assertion below, not logic.
module vector_coprocessor #(
  parameter int unsigned M = 8,  // vector length m
  parameter int unsigned N = 4,  // number of vectors n
  parameter int unsigned K = 2   // output word width k = ceil(log2 n)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cfg_load,
  input  logic                              prec_mode,
  input  logic [N-1:0][M-1:0]               v,
  input  logic [N-1:0][K-1:0]               r,
  input  logic                              bit_in,
  output logic [K-1:0]                      out,
  output logic                              detect,
  output logic [vp_pkg::clog2_min1(M)-1:0]  frame_pos,
  output logic                              seu_masked
);

  logic [N-1:0][M-1:0] da_s, da_q;
  logic [N-1:0][K-1:0] ra_s, ra_q;
  logic [N-1:0][K-1:0] ra_sel;
  logic                configured;
  logic                last;
  logic [K-1:0]        fsm_out;
  logic                fsm_detect;
  logic [vp_pkg::clog2_min1(N)+vp_pkg::clog2_min1(M-2)+1:0] fsm_state;  // observed in simulation only

  crossbar_switch #(.M(M), .N(N), .K(K)) u_xbar (
    .v  (v),
    .r  (r),
    .da (da_s),
    .ra (ra_s)
  );

  // Output words: user defined (r, sorted along with v) or by precedence,
  // the vector's position in ascending order (0 for the smallest).
  always_comb begin
    for (int unsigned p = 0; p < N; p++) begin
      ra_sel[p] = prec_mode ? K'(p) : ra_s[p];
    end
  end

  // Configuration registers hold the sorted vectors.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      da_q       <= '0;
      ra_q       <= '0;
      configured <= 1'b0;
    end else if (cfg_load) begin
      da_q       <= da_s;
      ra_q       <= ra_sel;
      configured <= 1'b1;
    end
  end

  frame_counter #(.M(M)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (cfg_load),
    .count (frame_pos),
    .last  (last)
  );

  reconfigurable_fsm #(.M(M), .N(N), .K(K)) u_fsm (
    .clk        (clk),
    .rst_n      (rst_n),
    .frame_end  (last | cfg_load),
    .bit_in     (bit_in),
    .da         (da_q),
    .ra         (ra_q),
    .out        (fsm_out),
    .detect     (fsm_detect),
    .state      (fsm_state),
    .seu_masked (seu_masked)
  );

  assign detect = fsm_detect & configured & ~cfg_load;
  assign out    = detect ? fsm_out : '0;

  // The FSM and the frame counter restart together, so a detection can only
  // fall on the m-th bit of a frame.
  a_detect_on_last_bit: assert property (@(posedge clk) disable iff (!rst_n) detect |-> last)
    else $error("detection outside the last bit of a frame");

endmodule
