// tb_fsm_encoding_example: checks the exact state encoding of the detector
// FSM on a small hand-worked example, m = 4 and n = 4 with the vectors 0000,
// 1100, 1011 and 1010 (sorted: 0000, 1010, 1011, 1100; output word = sorted
// index). Here p = 2 configure bits + 1 difference bit + 2 kind bits = 5.
// Every 4-bit frame is sent and the state after each bit is compared with a
// table worked out by hand from the encoding rules:
//   after 1 bit : 00001 (prefix 0), 00010 (prefix 1)
//   after 2 bits: 00011 (00), 01011 (10), 11011 (11), else default
//   after 3 bits: 00111 (000), 01111 (101), 11111 (110), else default or a
//                 state one column behind (see 'expected')
// where "default" is 00001 after a 0 and 00010 after a 1. It also checks
// detect and the output word on the fourth bit of every frame.
module tb_fsm_encoding_example;
  localparam int unsigned M = 4, N = 4, K = 2, P = 5;

  logic clk = 0, rst_n = 0;
  logic frame_end = 0, bit_in = 0;
  logic [N-1:0][M-1:0] da;
  logic [N-1:0][K-1:0] ra;
  logic [K-1:0] out;
  logic detect, seu_masked;
  logic [P-1:0] state;
  int checks = 0, failures = 0;

  reconfigurable_fsm #(.M(M), .N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .frame_end(frame_end), .bit_in(bit_in),
    .da(da), .ra(ra), .out(out), .detect(detect), .state(state), .seu_masked(seu_masked));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected state after the first 'len' bits of 'frame' (hand-derived).
  // Prefixes 01 and 111/001 leave the tree, go to a default state and then
  // continue from it one column behind, which is why 010 and 011 end in
  // column-3 states: they can no longer reach the last column in this frame.
  function automatic logic [P-1:0] expected(logic [3:0] frame, int len);
    logic [P-1:0] e;
    e = '0;
    case (len)
      1: e = frame[3] ? 5'b00010 : 5'b00001;
      2: case (frame[3:2])
           2'b00: e = 5'b00011;
           2'b01: e = 5'b00010;
           2'b10: e = 5'b01011;
           default: e = 5'b11011;
         endcase
      3: case (frame[3:1])
           3'b000: e = 5'b00111;
           3'b001: e = 5'b00010;
           3'b010: e = 5'b01011;
           3'b011: e = 5'b11011;
           3'b100: e = 5'b00001;
           3'b101: e = 5'b01111;
           3'b110: e = 5'b11111;
           default: e = 5'b00010;
         endcase
      default: e = '0;
    endcase
    return e;
  endfunction

  initial begin
    logic [3:0] frame;
    logic [P-1:0] st [4];
    logic [K-1:0] exp_out;
    da = '{4'b1100, 4'b1011, 4'b1010, 4'b0000};  // da[0] = 0000 ... da[3] = 1100
    ra = '{2'd3, 2'd2, 2'd1, 2'd0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 16; f++) begin
      frame = 4'(f);
      for (int b = 0; b < M; b++) begin
        bit_in = frame[M-1-b];
        frame_end = (b == M - 1);
        #1;
        st[b] = state;
        checks++;
        if (state !== expected(frame, b)) begin
          failures++;
          $display("frame %b after %0d bits: state %b, expected %b", frame, b, state, expected(frame, b));
        end
        if (b == M - 1) begin
          checks++;
          case (frame)
            4'b0000: exp_out = 2'd0;
            4'b1010: exp_out = 2'd1;
            4'b1011: exp_out = 2'd2;
            4'b1100: exp_out = 2'd3;
            default: exp_out = 2'd0;
          endcase
          if (detect !== (frame == 4'b0000 || frame == 4'b1010 || frame == 4'b1011 || frame == 4'b1100)
              || out !== exp_out) begin
            failures++;
            $display("frame %b: detect=%0b out=%0d", frame, detect, out);
          end
        end
        @(negedge clk);
      end
      $display("frame %b: states %b %b %b %b", frame, st[0], st[1], st[2], st[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
