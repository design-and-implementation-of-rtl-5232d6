// Testbench for pmu: after reset and after every init the unit must show
// the trellis start (state 0 only, metric 0); a load must store exactly
// what was offered and nothing may change without load or init.  A shadow
// copy kept here predicts the contents every cycle.
module pmu_tb;
  localparam int MW = 5;
  logic clk = 0, rst_n = 0, init, load;
  logic [3:0][MW-1:0] npm, pm;
  logic [3:0] nvalid, pvalid;
  logic [MW-1:0] nmin, bmin;
  logic [1:0] nbest, best;
  int checks = 0, failures = 0, n_init = 0, n_load = 0;
  logic [3:0][MW-1:0] e_pm;
  logic [3:0] e_v;
  logic [MW-1:0] e_min;
  logic [1:0] e_best;

  pmu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    init = 0; load = 0; npm = '0; nvalid = 4'b1; nmin = '0; nbest = '0;
    e_pm = '0; e_v = 4'b0001; e_min = '0; e_best = '0;
    repeat (2) @(posedge clk);
    #1 chk(pm == '0 && pvalid == 4'b0001 && bmin == '0 && best == '0, "reset state");
    rst_n = 1;
    repeat (500) begin
      @(negedge clk);
      init = ($urandom_range(0, 7) == 0);
      load = ($urandom_range(0, 1) == 1);
      for (int i = 0; i < 4; i++) npm[i] = MW'($urandom);
      nvalid = 4'($urandom_range(1, 15));
      nmin = MW'($urandom); nbest = 2'($urandom);
      if (init) begin e_pm = '0; e_v = 4'b0001; e_min = '0; e_best = '0; n_init++; end
      else if (load) begin e_pm = npm; e_v = nvalid; e_min = nmin; e_best = nbest; n_load++; end
      @(posedge clk); #1;
      chk(pm == e_pm, "pm");
      chk(pvalid == e_v, "pvalid");
      chk(bmin == e_min && best == e_best, "bmin/best");
    end
    chk(n_init > 10 && n_load > 100, "init and load exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
