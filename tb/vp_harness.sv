// vp_harness: reusable stimulus and checker for one vector_coprocessor
// instance of any size (used by the workload testbenches).
//
// Loads a random vector set (vectors drawn close together so that they share
// leading bits, with output words equal to their index, i.e. output by
// precedence in load order), streams FRAMES back-to-back frames, and checks
// detect/out on every clock against a direct comparison of each frame with
// the loaded vectors. The vector set is reloaded every 64 frames. Reports its
// totals when 'done' rises.
module vp_harness #(
  parameter int unsigned M      = 8,
  parameter int unsigned N      = 4,
  parameter int unsigned K      = 2,
  parameter int unsigned FRAMES = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   detections
);

  logic cfg_load, bit_in;
  logic [N-1:0][M-1:0] v;
  logic [N-1:0][K-1:0] r;
  logic [K-1:0] out;
  logic detect, seu_masked;
  logic [vp_pkg::clog2_min1(M)-1:0] frame_pos;

  vector_coprocessor #(.M(M), .N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .prec_mode(1'b0), .v(v), .r(r), .bit_in(bit_in),
    .out(out), .detect(detect), .frame_pos(frame_pos), .seu_masked(seu_masked));

  initial begin
    logic [M-1:0] frame, base;
    logic exp_det;
    logic [K-1:0] exp_out;
    done = 0; checks = 0; failures = 0; detections = 0;
    cfg_load = 0; bit_in = 0; v = '0; r = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      if (f % 64 == 0) begin
        base = M'($urandom);
        for (int i = 0; i < N; i++) begin
          v[i] = base ^ M'($urandom_range(0, 2 * N - 1));
          r[i] = K'(i);
        end
        cfg_load = 1;
        @(negedge clk);
        cfg_load = 0;
      end
      frame = ($urandom_range(0, 1) == 1) ? v[$urandom_range(0, N - 1)] : M'($urandom);
      exp_det = 0; exp_out = '0;
      for (int i = 0; i < N; i++) if (v[i] == frame) begin exp_det = 1; exp_out = r[i]; end
      for (int b = 0; b < M; b++) begin
        bit_in = frame[M-1-b];
        #1;
        checks++;
        if (b == M - 1) begin
          if (detect !== exp_det || out !== exp_out) begin
            failures++;
            if (failures < 5)
              $display("(m=%0d,n=%0d) frame %0d %b: detect=%0b/%0b out=%0d/%0d",
                       M, N, f, frame, detect, exp_det, out, exp_out);
          end
          if (detect) detections++;
        end else if (detect) begin
          failures++;
        end
        @(negedge clk);
      end
    end
    done = 1;
  end

endmodule
