// tb_frame_counter: checks the modulo-M count, the 'last' marker on every
// M-th clock, and the synchronous clear.
module tb_frame_counter;
  localparam int unsigned M = 8;
  localparam int unsigned CW = vp_pkg::clog2_min1(M);

  logic clk = 0, rst_n = 0, clear = 0;
  logic [CW-1:0] count;
  logic last;
  int checks = 0, failures = 0;
  int exp_cnt = 0;
  int lasts = 0;

  frame_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .count(count), .last(last));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // at a falling edge: drive clear, check the registered count
      clear = (cyc == 150 || cyc == 155 || cyc == 333);
      checks++;
      if (count !== CW'(exp_cnt) || last !== (exp_cnt == M - 1)) begin
        failures++;
        $display("cyc %0d: count=%0d exp=%0d last=%0b", cyc, count, exp_cnt, last);
      end
      if (last) lasts++;
      @(posedge clk);
      exp_cnt = (clear || exp_cnt == M - 1) ? 0 : exp_cnt + 1;
      @(negedge clk);
    end
    checks++;
    if (lasts < 40) begin failures++; $display("too few frame ends: %0d", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
