// tb_reconfigurable_fsm: self-checking test of the vector-detecting FSM.
//
// The testbench sorts random vector sets itself, drives them as da/ra, and
// streams frames of M bits (MSB first) with its own frame_end every M-th
// clock. Frames are copies of a configured vector, copies with one bit
// flipped, or random. On every clock it checks out/detect against a direct
// comparison of the frame with all vectors (detect only on the M-th bit,
// output word of the last equal vector), and that each frame starts in the
// initial state and its first bit leads to state ...01 or ...10. It counts
// how often detections, fallbacks to a default state, two vectors sharing a
// last-column state and identical vectors occur, and fails if one never does.
module tb_reconfigurable_fsm;
  localparam int unsigned M = 8, N = 4, K = 2;
  localparam int unsigned P = vp_pkg::clog2_min1(N) + vp_pkg::clog2_min1(M - 2) + 2;

  logic clk = 0, rst_n = 0;
  logic frame_end, bit_in;
  logic [N-1:0][M-1:0] da;
  logic [N-1:0][K-1:0] ra;
  logic [K-1:0] out;
  logic detect, seu_masked;
  logic [P-1:0] state;

  int checks = 0, failures = 0;
  int n_detect = 0, n_fallback = 0, n_pair = 0, n_ident = 0, n_reconf = 0;

  reconfigurable_fsm dut (
    .clk(clk), .rst_n(rst_n), .frame_end(frame_end), .bit_in(bit_in),
    .da(da), .ra(ra), .out(out), .detect(detect), .state(state), .seu_masked(seu_masked));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // New sorted configuration: vectors from a narrow or a full range.
  task automatic configure(int it);
    logic [M-1:0] vv [N];
    logic [M-1:0] t;
    logic [K-1:0] rr [N];
    logic [K-1:0] tr;
    int j;
    logic [M-1:0] base;
    base = M'($urandom);
    for (int i = 0; i < N; i++) begin
      case (it % 3)
        0: vv[i] = M'($urandom);
        1: vv[i] = base ^ M'($urandom_range(0, 7));        // shared prefixes
        default: vv[i] = base ^ M'($urandom_range(0, 1));  // pairs and duplicates
      endcase
      rr[i] = K'($urandom);
    end
    for (int i = 1; i < N; i++) begin
      t = vv[i]; tr = rr[i]; j = i - 1;
      while (j >= 0 && vv[j] > t) begin vv[j+1] = vv[j]; rr[j+1] = rr[j]; j--; end
      vv[j+1] = t; rr[j+1] = tr;
    end
    for (int i = 0; i < N; i++) begin da[i] = vv[i]; ra[i] = rr[i]; end
    for (int i = 0; i + 1 < N; i++) begin
      if (vv[i] == vv[i+1]) n_ident++;
      else if (vv[i][M-1:1] == vv[i+1][M-1:1]) n_pair++;
    end
    n_reconf++;
  endtask

  initial begin
    logic [M-1:0] frame;
    logic exp_det;
    logic [K-1:0] exp_out;
    int sel;
    da = '0; ra = '0; frame_end = 0; bit_in = 0;
    configure(0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 6000; f++) begin
      if (f % 20 == 0) configure(f / 20);
      sel = $urandom_range(0, 3);
      frame = da[$urandom_range(0, N - 1)];
      if (sel == 2) frame[$urandom_range(0, M - 1)] ^= 1'b1;
      else if (sel == 3) frame = M'($urandom);
      exp_det = 1'b0; exp_out = '0;
      for (int i = 0; i < N; i++) if (da[i] == frame) begin exp_det = 1'b1; exp_out = ra[i]; end
      for (int b = 0; b < M; b++) begin
        bit_in = frame[M-1-b];
        frame_end = (b == M - 1);
        #1;
        checks++;
        if (b == 0 && state !== '0) begin
          failures++;
          $display("frame %0d: not in the initial state at its start (%b)", f, state);
        end
        if (b == 1 && state[1:0] !== (frame[M-1] ? 2'b10 : 2'b01)) begin
          failures++;
          $display("frame %0d: wrong column-2 state %b", f, state);
        end
        if (b >= 2 && state[1:0] != 2'b11) n_fallback++;
        checks++;
        if (b == M - 1) begin
          if (detect !== exp_det || out !== exp_out) begin
            failures++;
            $display("frame %0d (%b): detect=%0b/%0b out=%0d/%0d", f, frame, detect, exp_det, out, exp_out);
          end
          if (detect) n_detect++;
        end else if (detect || out != '0) begin
          failures++;
          $display("frame %0d: detect at bit %0d", f, b);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_detect == 0 || n_fallback == 0 || n_pair == 0 || n_ident == 0 || n_reconf < 2) begin
      failures++;
      $display("mechanism not exercised: detect=%0d fallback=%0d pair=%0d ident=%0d reconf=%0d",
               n_detect, n_fallback, n_pair, n_ident, n_reconf);
    end
    $display("detections=%0d fallbacks=%0d pairs=%0d identical=%0d reconfigurations=%0d",
             n_detect, n_fallback, n_pair, n_ident, n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
