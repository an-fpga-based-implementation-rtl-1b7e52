// reconfigurable_fsm: detects any of n m-bit vectors in a serial bit stream.
//
// The FSM is a binary search tree over the sorted vectors da[0..N-1]
// (ascending, so vectors that share leading bits are adjacent). Column j of
// the tree is the FSM after j-1 bits of the current frame, most significant
// bit first. A tree node is the group of vectors that share the bits seen so
// far, and it is named by the index of the group's first vector. Because the
// transitions are computed from da at run time, loading new vectors
// reconfigures the FSM without changing its logic.
//
// State encoding, p = CB + G + 2 bits, {cfg, diff, kind}:
//   kind 00  initial state (column 1), cfg = diff = 0
//   kind 01  column 2 after a 0; also the default state for input 0
//   kind 10  column 2 after a 1; also the default state for input 1
//   kind 11  conventional state of column j = 3..m: cfg = index of the first
//            vector of the group (configure bits, CB = ceil(log2 n)), diff =
//            j-3 (difference bits, G = ceil(log2(m-2)))
// The switching variable x[i][t] is 1 when sorted vectors i and i+1 differ in
// any of their first t bits; a group ends where x becomes 1.
//
// Next state for input b from a state that has consumed t bits:
//   initial        -> kind 01 / 10 for b = 0 / 1
//   t in 1..m-2    -> the first vector of the group whose bit t is b becomes
//                     the new group head (for b = 0 this is the head itself,
//                     searched top to bottom; for b = 1 the split point);
//                     no such vector -> default state for b
//   t = m-1        -> initial state; frame_end also forces the initial state
// A default state is a column-2 state, so after a mismatch the FSM lags the
// frame and cannot reach the last column before frame_end resets it.
//
// Output (Mealy, Eq. (13) of the method): in the last column, if a vector of
// the group has last bit equal to the input bit, out = its output word and
// detect = 1; otherwise out = 0. Identical vectors: the later one wins.
//
// The tree, the encoding, the column-2 default states and the output rule
// follow the method; the next-state rules above are this design's own
// formulation of the method's tree, and the detect flag and the voted
// (replicated) state register are this design's own.
//
// Timing: state is registered (state_protection, three copies); out and
// detect are combinational from the state, da, ra and bit_in, valid while the
// m-th bit of a frame is on bit_in.
module reconfigurable_fsm #(
  parameter int unsigned M = 8,  // vector length m, M >= 2
  parameter int unsigned N = 4,  // number of vectors n
  parameter int unsigned K = 2   // output word width k
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_end,  // last bit of a frame: reset after it
  input  logic                 bit_in,
  input  logic [N-1:0][M-1:0]  da,         // vectors, ascending
  input  logic [N-1:0][K-1:0]  ra,         // output word of each da
  output logic [K-1:0]         out,
  output logic                 detect,
  output logic [vp_pkg::clog2_min1(N)+vp_pkg::clog2_min1(M-2)+1:0] state,
  output logic                 seu_masked
);

  import vp_pkg::*;

  localparam int unsigned CB = clog2_min1(N);      // configure bits
  localparam int unsigned G  = clog2_min1(M - 2);  // difference bits
  localparam int unsigned P  = CB + G + 2;         // Eq. (1)
  localparam int unsigned TW = $clog2(M + 1);      // bits-consumed counter width

  typedef struct packed {
    logic [CB-1:0] cfg;
    logic [G-1:0]  diff;
    state_kind_e   kind;
  } state_t;

  state_t cur, nxt;

  // x[i][t]: sorted vectors i and i+1 differ in one of their first t bits.
  logic [N-1:0][M:0] x;

  always_comb begin
    x = '0;
    for (int unsigned i = 0; i + 1 < N; i++) begin
      for (int unsigned t = 1; t <= M; t++) begin
        x[i][t] = x[i][t-1] | (da[i][M-t] ^ da[i+1][M-t]);
      end
    end
  end

  // Decode the current state: bits consumed, group head, group non-empty.
  logic [TW-1:0] t_cur;
  logic [CB-1:0] head;
  logic          grp_ok;

  always_comb begin
    t_cur  = '0;
    head   = '0;
    grp_ok = 1'b0;
    unique case (cur.kind)
      ST_INIT: begin
        t_cur = '0;
      end
      ST_DEF0: begin
        t_cur  = TW'(1);
        head   = '0;
        grp_ok = ~da[0][M-1];
      end
      ST_DEF1: begin
        t_cur = TW'(1);
        for (int i = N - 1; i >= 0; i--) begin
          if (da[i][M-1]) begin
            head   = CB'(i);
            grp_ok = 1'b1;
          end
        end
      end
      ST_CONV: begin
        if (32'(cur.diff) + 2 <= M - 1) begin
          t_cur  = TW'(32'(cur.diff) + 2);
          head   = cur.cfg;
          grp_ok = (32'(cur.cfg) < N);
        end else begin
          t_cur = TW'(M - 1);  // not reachable without an upset
        end
      end
    endcase
  end

  // Search the group for the first vector whose bit t_cur equals bit_in
  // (next state), and for the last vector matching on the final bit (output).
  logic          nx_found, out_found;
  logic [CB-1:0] nx_head, out_idx;

  always_comb begin
    logic in_grp;
    nx_found  = 1'b0;
    nx_head   = '0;
    out_found = 1'b0;
    out_idx   = '0;
    in_grp    = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      if (CB'(i) == head) begin
        in_grp = grp_ok;
      end else if (i > 32'(head) && x[i-1][t_cur]) begin
        in_grp = 1'b0;
      end
      if (in_grp && (t_cur < TW'(M)) && (da[i][M-1-32'(t_cur)] == bit_in)) begin
        if (!nx_found) begin
          nx_found = 1'b1;
          nx_head  = CB'(i);
        end
        out_found = 1'b1;
        out_idx   = CB'(i);
      end
    end
  end

  // Next-state function.
  always_comb begin
    nxt = '0;
    if (frame_end || cur.kind == ST_INIT || t_cur >= TW'(M - 1)) begin
      if (!frame_end && cur.kind == ST_INIT) begin
        nxt.kind = bit_in ? ST_DEF1 : ST_DEF0;
      end else begin
        nxt.kind = ST_INIT;
      end
    end else if (nx_found) begin
      nxt.kind = ST_CONV;
      nxt.cfg  = nx_head;
      nxt.diff = G'(32'(t_cur) - 1);  // new column t+2, diff = column - 3
    end else begin
      nxt.kind = bit_in ? ST_DEF1 : ST_DEF0;
    end
  end

  // Output function, Eq. (13): only in the last column.
  always_comb begin
    out    = '0;
    detect = 1'b0;
    if (cur.kind != ST_INIT && t_cur == TW'(M - 1) && out_found) begin
      out    = ra[out_idx];
      detect = 1'b1;
    end
  end

  // Replicated state register.
  logic [P-1:0] cur_bits;

  state_protection #(.W(P), .COPIES(3)) u_state (
    .clk      (clk),
    .rst_n    (rst_n),
    .d        (nxt),
    .q        (cur_bits),
    .mismatch (seu_masked)
  );

  assign cur   = state_t'(cur_bits);
  assign state = cur_bits;

endmodule
