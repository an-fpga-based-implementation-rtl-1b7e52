// tb_crossbar_switch: self-checking test of the sorting crossbar.
//
// Random configurations (drawn from a small value range so that equal
// vectors occur) are applied; the expected order is computed here with a
// stable insertion sort and compared with da/ra. Also checks that the outputs
// are a permutation of the inputs with the output words still attached.
module tb_crossbar_switch;
  localparam int unsigned M = 8, N = 4, K = 2;

  logic [N-1:0][M-1:0] v, da;
  logic [N-1:0][K-1:0] r, ra;
  int checks = 0, failures = 0;
  int ties = 0;

  crossbar_switch dut (.v(v), .r(r), .da(da), .ra(ra));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] ev [N];
    logic [K-1:0] er [N];
    logic [M-1:0] tv;
    logic [K-1:0] tr;
    int j;
    for (int it = 0; it < 2000; it++) begin
      for (int i = 0; i < N; i++) begin
        v[i] = (it % 3 == 0) ? M'($urandom_range(0, 5)) : M'($urandom);
        r[i] = K'(i);
      end
      #1;
      // stable insertion sort
      for (int i = 0; i < N; i++) begin ev[i] = v[i]; er[i] = r[i]; end
      for (int i = 1; i < N; i++) begin
        tv = ev[i]; tr = er[i]; j = i - 1;
        while (j >= 0 && ev[j] > tv) begin ev[j+1] = ev[j]; er[j+1] = er[j]; j--; end
        ev[j+1] = tv; er[j+1] = tr;
      end
      for (int i = 0; i + 1 < N; i++) if (ev[i] == ev[i+1]) ties++;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (da[p] !== ev[p] || ra[p] !== er[p]) begin
          failures++;
          if (failures < 10)
            $display("mismatch it=%0d p=%0d da=%h/%h ra=%0d/%0d", it, p, da[p], ev[p], ra[p], er[p]);
        end
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("no equal vectors were exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
