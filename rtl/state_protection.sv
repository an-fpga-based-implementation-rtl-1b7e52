// state_protection: replicated state register with majority voting.
//
// The initial and default states of the detector FSM are visited at every
// frame, so a soft error in the state register would hit them most often.
// The method protects the state by replication; here the whole state register
// is kept in COPIES identical registers (three by default) and read through a
// bitwise majority vote. Each copy is rewritten with the next state every
// clock, so an upset in one copy is masked immediately and scrubbed on the
// next edge. Each copy is stored XORed with its own constant mask so that
// synthesis sees three different registers and keeps all of them. Protecting
// every state rather than only the frequent ones, the voting structure and
// the masks are this design's own choices.
//
// Interface: d is the next state, q the voted current state; 'mismatch' is
// high while any copy differs from the vote (a masked upset).
// Timing: one register stage; q follows d one clock later. Reset (active-low,
// asynchronous) sets every copy to the initial state (all zeros once unmasked).
module state_protection #(
  parameter int unsigned W      = 7,  // state width p
  parameter int unsigned COPIES = 3   // number of replicas, odd
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         mismatch
);

  localparam int unsigned CW = $clog2(COPIES + 1);

  localparam int unsigned MW = (COPIES <= 2) ? 1 : $clog2(COPIES);

  // Copy c holds the state XORed with a fixed mask: bit b of the mask is bit
  // (b mod MW) of c. The copies are then not identical registers, so a
  // synthesis tool cannot merge them into one and remove the protection.
  function automatic logic [W-1:0] mask(input int unsigned c);
    logic [W-1:0] m;
    for (int unsigned b = 0; b < W; b++) m[b] = 1'((c >> (b % MW)) & 1);
    return m;
  endfunction

  logic [COPIES-1:0][W-1:0] copy_q;   // the replicated registers, masked
  logic [COPIES-1:0][W-1:0] copy_rd;  // their unmasked contents, as seen by the voter

  for (genvar c = 0; c < COPIES; c++) begin : g_unmask
    assign copy_rd[c] = copy_q[c] ^ mask(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < COPIES; c++) begin
        copy_q[c] <= mask(c);
      end
    end else begin
      for (int unsigned c = 0; c < COPIES; c++) begin
        copy_q[c] <= d ^ mask(c);
      end
    end
  end

  // Bitwise majority vote.
  always_comb begin
    logic [CW-1:0] ones;
    for (int unsigned b = 0; b < W; b++) begin
      ones = '0;
      for (int unsigned c = 0; c < COPIES; c++) begin
        ones = ones + CW'(copy_rd[c][b]);
      end
      q[b] = (ones > CW'(COPIES / 2));
    end
  end

  always_comb begin
    mismatch = 1'b0;
    for (int unsigned c = 0; c < COPIES; c++) begin
      if (copy_rd[c] != q) mismatch = 1'b1;
    end
  end

endmodule
