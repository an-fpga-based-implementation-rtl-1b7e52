// tb_watermark_images: streams the two image sizes of the watermarking
// application through the coprocessor.
//
// Cover image: 256 x 256 pixels of 8 bits, generated here as a diagonal
// gradient with a little noise, sent pixel by pixel (MSB first) through the
// default-size coprocessor (m = 8, n = 4), which is loaded with four gray
// levels. Watermark: a 64 x 64 binary image (a checkerboard of 8 x 8 tiles
// with a few flipped pixels) cut into 2-bit frames and sent through an
// m = 2, n = 2 instance loaded with the patterns 01 and 10. Both streams run
// at one bit per clock; the test checks every detection against a count made
// here from the image data and checks that each image takes exactly
// pixels x bits / 1 clocks (plus one load clock).
module tb_watermark_images;
  localparam int unsigned CM = 8, CN = 4, CK = 2;   // cover instance (defaults)
  localparam int unsigned WM = 2, WN = 2, WK = 1;   // watermark instance

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // cover-image coprocessor, default parameters
  logic c_load = 0, c_bit = 0, c_det, c_seu;
  logic [CN-1:0][CM-1:0] c_v;
  logic [CN-1:0][CK-1:0] c_r;
  logic [CK-1:0] c_out;
  logic [2:0] c_pos;
  vector_coprocessor u_cover (
    .clk(clk), .rst_n(rst_n), .cfg_load(c_load), .prec_mode(1'b0), .v(c_v), .r(c_r), .bit_in(c_bit),
    .out(c_out), .detect(c_det), .frame_pos(c_pos), .seu_masked(c_seu));

  // watermark coprocessor, m = 2, n = 2
  logic w_load = 0, w_bit = 0, w_det, w_seu;
  logic [WN-1:0][WM-1:0] w_v;
  logic [WN-1:0][WK-1:0] w_r;
  logic [WK-1:0] w_out;
  logic [0:0] w_pos;
  vector_coprocessor #(.M(WM), .N(WN), .K(WK)) u_wmark (
    .clk(clk), .rst_n(rst_n), .cfg_load(w_load), .prec_mode(1'b0), .v(w_v), .r(w_r), .bit_in(w_bit),
    .out(w_out), .detect(w_det), .frame_pos(w_pos), .seu_masked(w_seu));

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] cover_pixel(int x, int y, int noise);
    return 8'((x + y) / 2 + noise);
  endfunction

  function automatic logic wmark_pixel(int x, int y);
    logic p;
    p = ((x / 8) + (y / 8)) % 2 == 1;
    if ((x * 7 + y * 13) % 29 == 0) p = ~p;
    return p;
  endfunction

  int c_hits [CN];
  int c_exp [CN];
  int w_hits [WN];
  int w_exp [WN];
  longint c_start, c_end, w_start, w_end;
  bit c_done = 0, w_done = 0;

  // cover stream
  initial begin
    logic [7:0] px;
    c_v = '{8'd200, 8'd64, 8'd128, 8'd65};   // loaded out of order on purpose
    c_r = '{2'd3, 2'd0, 2'd2, 2'd1};
    for (int i = 0; i < CN; i++) begin c_hits[i] = 0; c_exp[i] = 0; end
    wait (rst_n);
    @(negedge clk);
    c_start = $time;
    c_load = 1;
    @(negedge clk);
    c_load = 0;
    for (int y = 0; y < 256; y++) begin
      for (int x = 0; x < 256; x++) begin
        px = cover_pixel(x, y, int'($urandom_range(0, 3)));
        for (int i = 0; i < CN; i++) if (c_v[i] == px) c_exp[c_r[i]]++;
        for (int b = 0; b < CM; b++) begin
          c_bit = px[CM-1-b];
          #1;
          if (c_det) c_hits[c_out]++;
          if (b != CM - 1 && c_det) failures++;
          @(negedge clk);
        end
      end
    end
    c_end = $time;
    c_done = 1;
  end

  // watermark stream: row-major, two horizontally adjacent pixels per frame
  initial begin
    logic [1:0] fr;
    w_v = '{2'b10, 2'b01};
    w_r = '{1'b1, 1'b0};
    for (int i = 0; i < WN; i++) begin w_hits[i] = 0; w_exp[i] = 0; end
    wait (rst_n);
    @(negedge clk);
    w_start = $time;
    w_load = 1;
    @(negedge clk);
    w_load = 0;
    for (int y = 0; y < 64; y++) begin
      for (int x = 0; x < 64; x += 2) begin
        fr = {wmark_pixel(x, y), wmark_pixel(x + 1, y)};
        for (int i = 0; i < WN; i++) if (w_v[i] == fr) w_exp[w_r[i]]++;
        for (int b = 0; b < WM; b++) begin
          w_bit = fr[WM-1-b];
          #1;
          if (w_det) w_hits[w_out]++;
          @(negedge clk);
        end
      end
    end
    w_end = $time;
    w_done = 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (c_done && w_done);
    for (int i = 0; i < CN; i++) begin
      checks++;
      if (c_hits[i] != c_exp[i] || c_exp[i] == 0) failures++;
      $display("cover: output word %0d detected %0d times, expected %0d", i, c_hits[i], c_exp[i]);
    end
    for (int i = 0; i < WN; i++) begin
      checks++;
      if (w_hits[i] != w_exp[i] || w_exp[i] == 0) failures++;
      $display("watermark: output word %0d detected %0d times, expected %0d", i, w_hits[i], w_exp[i]);
    end
    checks++;
    if (c_end - c_start != 10 * (1 + 256 * 256 * 8)) failures++;
    checks++;
    if (w_end - w_start != 10 * (1 + 64 * 64)) failures++;
    $display("cover image: %0d clocks, watermark: %0d clocks",
             (c_end - c_start) / 10, (w_end - w_start) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
