// tb_state_protection: the voted output must follow d with one clock of
// delay, and an upset forced into any single copy must be masked (q correct,
// mismatch high) and scrubbed by the next clock edge.
module tb_state_protection;
  localparam int unsigned W = 7;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q, exp_q;
  logic mismatch;
  int checks = 0, failures = 0;
  int upsets = 0;

  state_protection dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .mismatch(mismatch));

  always #5 clk = ~clk;

  task automatic check_masked(int cyc, int c);
    checks++;
    if (q !== exp_q || !mismatch) begin
      failures++;
      $display("cyc %0d: upset in copy %0d not masked: q=%h exp=%h mismatch=%0b", cyc, c, q, exp_q, mismatch);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    logic [W-1:0] flip;
    d = W'(5);
    @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset value %h", q); end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      d = W'($urandom);
      exp_q = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp_q || mismatch) begin
        failures++;
        $display("cyc %0d: q=%h exp=%h mismatch=%0b", cyc, q, exp_q, mismatch);
      end
      if (cyc % 3 == 0) begin
        // upset one copy: flip one or more bits
        c = cyc % 9 / 3;
        flip = W'($urandom) | W'(1);
        // corrupt one copy as the voter sees it
        case (c)
          0: begin force dut.copy_rd[0] = exp_q ^ flip; #1; check_masked(cyc, 0); release dut.copy_rd[0]; end
          1: begin force dut.copy_rd[1] = exp_q ^ flip; #1; check_masked(cyc, 1); release dut.copy_rd[1]; end
          default: begin force dut.copy_rd[2] = exp_q ^ flip; #1; check_masked(cyc, 2); release dut.copy_rd[2]; end
        endcase
        upsets++;
        #1;
        checks++;
        if (q !== exp_q || mismatch) begin
          failures++;
          $display("cyc %0d: copy %0d not restored after the upset", cyc, c);
        end
      end
    end
    checks++;
    if (upsets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
