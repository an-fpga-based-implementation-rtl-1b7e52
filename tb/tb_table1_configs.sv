// tb_table1_configs: runs the coprocessor at every (m, n) size of the
// evaluation table, m = 4..8 and n = 3..5 with k = ceil(log2 n), plus the
// (m, n) = (2, 2) size used for a binary watermark image. Each size has its
// own instance and random stimulus (vp_harness); the test fails if any
// instance mismatches the reference or never detects a vector.
module tb_table1_configs;
  localparam int NCFG = 16;
  localparam int CFG_M [NCFG] = '{4, 4, 4, 5, 5, 5, 6, 6, 6, 7, 7, 7, 8, 8, 8, 2};
  localparam int CFG_N [NCFG] = '{3, 4, 5, 3, 4, 5, 3, 4, 5, 3, 4, 5, 3, 4, 5, 2};

  logic clk = 0, rst_n = 0;
  logic [NCFG-1:0] done;
  int c_checks [NCFG];
  int c_fail [NCFG];
  int c_det [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned M = CFG_M[g];
    localparam int unsigned N = CFG_N[g];
    localparam int unsigned K = vp_pkg::clog2_min1(N);
    vp_harness #(.M(M), .N(N), .K(K), .FRAMES(1500)) h (
      .clk(clk), .rst_n(rst_n), .done(done[g]),
      .checks(c_checks[g]), .failures(c_fail[g]), .detections(c_det[g]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (&done);
    for (int g = 0; g < NCFG; g++) begin
      $display("(m=%0d, n=%0d): checks=%0d failures=%0d detections=%0d",
               CFG_M[g], CFG_N[g], c_checks[g], c_fail[g], c_det[g]);
      checks += c_checks[g] + 1;
      failures += c_fail[g];
      if (c_det[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
