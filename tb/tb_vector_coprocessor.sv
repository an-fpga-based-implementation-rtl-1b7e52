// tb_vector_coprocessor: end-to-end test of the coprocessor at its default
// size (m = 8, n = 4, k = 2).
//
// The host side loads unsorted vector sets with their output words, then
// streams back-to-back 8-bit frames, one bit per clock, MSB first. Frames are
// configured vectors, vectors with one bit flipped, or random values. Every
// clock is checked against a reference that compares the frame with the
// loaded vectors directly: detect and out only on the last bit of a frame,
// the output word of the last equal vector in load order, and frame_pos
// counting 0..7. Every fourth load selects precedence-based output words
// (the vector's position in ascending order) instead of r. Some loads interrupt a frame half way, and single-copy
// upsets are forced into the replicated state register. The test counts
// detections, out-of-order loads that the crossbar had to sort, fallbacks to
// a default state, frame resets, mid-frame reconfigurations, equal vectors
// masked upsets and precedence-mode detections, and fails if any of them never happened.
module tb_vector_coprocessor;
  localparam int unsigned M = 8, N = 4, K = 2;
  localparam int unsigned CW = vp_pkg::clog2_min1(M);

  logic clk = 0, rst_n = 0;
  logic cfg_load = 0, bit_in = 0, prec_mode = 0;
  logic [N-1:0][M-1:0] v;
  logic [N-1:0][K-1:0] r;
  logic [K-1:0] out;
  logic detect, seu_masked;
  logic [CW-1:0] frame_pos;

  int checks = 0, failures = 0;
  int n_detect = 0, n_unsorted = 0, n_fallback = 0, n_frame_reset = 0;
  int n_midframe = 0, n_equal = 0, n_seu = 0, n_prec = 0;
  logic prec_cfg = 0;  // precedence mode of the loaded configuration

  vector_coprocessor dut (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .prec_mode(prec_mode), .v(v), .r(r), .bit_in(bit_in),
    .out(out), .detect(detect), .frame_pos(frame_pos), .seu_masked(seu_masked));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  // Load a new configuration on the next clock (called at a falling edge).
  task automatic load(int it);
    logic [M-1:0] base;
    base = M'($urandom);
    for (int i = 0; i < N; i++) begin
      case (it % 3)
        0: v[i] = M'($urandom);
        1: v[i] = base ^ M'($urandom_range(0, 7));
        default: v[i] = base ^ M'($urandom_range(0, 1));
      endcase
      r[i] = K'($urandom);
    end
    for (int i = 0; i + 1 < N; i++) if (v[i] > v[i+1]) begin n_unsorted++; break; end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) if (v[i] == v[j]) n_equal++;
    prec_mode = (it % 4 == 3);
    prec_cfg = prec_mode;
    cfg_load = 1'b1;
    bit_in = 1'b0;
    #1;
    check(!detect, "detect during a configuration load");
    @(negedge clk);
    cfg_load = 1'b0;
  endtask

  initial begin
    logic [M-1:0] frame;
    logic exp_det;
    logic [K-1:0] exp_out;
    int sel, cut, upset_at;
    logic [6:0] upset_val;
    v = '0; r = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // before any load nothing may be detected, even the all-zero frame
    for (int b = 0; b < M; b++) begin
      bit_in = 1'b0; #1;
      check(!detect, "detect before configuration");
      @(negedge clk);
    end
    load(0);
    for (int f = 0; f < 20000; f++) begin
      cut = M;
      if (f % 25 == 24) begin
        if (f % 50 == 49) begin
          cut = $urandom_range(1, M - 1);  // reconfigure in the middle of this frame
          n_midframe++;
        end
      end
      sel = $urandom_range(0, 3);
      frame = v[$urandom_range(0, N - 1)];
      if (sel == 2) frame[$urandom_range(0, M - 1)] ^= 1'b1;
      else if (sel == 3) frame = M'($urandom);
      exp_det = 1'b0; exp_out = '0;
      for (int i = 0; i < N; i++) begin
        if (v[i] == frame) begin
          exp_det = 1'b1;
          if (prec_cfg) begin
            // precedence: number of vectors below it in ascending order
            exp_out = '0;
            for (int j = 0; j < N; j++)
              if (v[j] < v[i] || (v[j] == v[i] && j < i)) exp_out++;
          end else begin
            exp_out = r[i];
          end
        end
      end
      upset_at = (f % 7 == 3) ? $urandom_range(0, M - 1) : -1;
      for (int b = 0; b < cut; b++) begin
        bit_in = frame[M-1-b];
        #1;
        check(frame_pos == CW'(b), $sformatf("frame_pos %0d, expected %0d", frame_pos, b));
        if (b >= 2 && dut.fsm_state[1:0] != 2'b11) n_fallback++;
        if (b == upset_at) begin
          // flip every bit of one replica of the state register as the voter sees it
          upset_val = ~dut.fsm_state;
          case (f % 3)
            0: force dut.u_fsm.u_state.copy_rd[0] = upset_val;
            1: force dut.u_fsm.u_state.copy_rd[1] = upset_val;
            default: force dut.u_fsm.u_state.copy_rd[2] = upset_val;
          endcase
          #1;
          check(seu_masked, "upset not flagged");
          if (seu_masked) n_seu++;
        end
        if (b == M - 1) begin
          check(detect === exp_det && out === exp_out,
                $sformatf("frame %0d (%b): detect=%0b/%0b out=%0d/%0d", f, frame, detect, exp_det, out, exp_out));
          if (detect) n_detect++;
          if (detect && prec_cfg) n_prec++;
        end else begin
          check(!detect && out == '0, $sformatf("frame %0d: detect at bit %0d", f, b));
        end
        @(negedge clk);
        if (b == upset_at) begin
          release dut.u_fsm.u_state.copy_rd[0];
          release dut.u_fsm.u_state.copy_rd[1];
          release dut.u_fsm.u_state.copy_rd[2];
        end
        if (b == M - 1) begin
          check(dut.fsm_state == '0, "FSM not reset after the m-th bit");
          n_frame_reset++;
        end
      end
      if (f % 25 == 24) load(f / 25 + 1);
    end
    check(n_detect > 0 && n_unsorted > 0 && n_fallback > 0 && n_frame_reset > 0 &&
          n_midframe > 0 && n_equal > 0 && n_seu > 0 && n_prec > 0, "a mechanism was never exercised");
    $display("detections=%0d unsorted_loads=%0d fallbacks=%0d frame_resets=%0d midframe_loads=%0d equal_vectors=%0d masked_upsets=%0d precedence_detections=%0d",
             n_detect, n_unsorted, n_fallback, n_frame_reset, n_midframe, n_equal, n_seu, n_prec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
