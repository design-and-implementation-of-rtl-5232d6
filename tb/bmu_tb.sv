// Testbench for bmu: all four received pairs against all four ideal pairs;
// the expected distance is the count of differing bits, worked out bit by
// bit here.
module bmu_tb;
  logic [1:0] rx;
  logic [3:0][1:0] bm;
  int checks = 0, failures = 0;

  bmu dut (.rx(rx), .bm(bm));

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r);
      #1;
      for (int i = 0; i < 4; i++) begin
        int e;
        e = (r[1] != i[1] ? 1 : 0) + (r[0] != i[0] ? 1 : 0);
        checks++;
        if (int'(bm[i]) != e) begin
          failures++;
          $display("FAIL rx=%0d pair=%0d got %0d exp %0d", r, i, bm[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
