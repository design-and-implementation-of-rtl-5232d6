// Testbench for smu: random decision memories of a frame, trace back from
// a random start state.  The expected bits are obtained by walking the
// decisions back here (state -> {state[0], decision}, output = state[1]).
// Also checks that done comes FRAME_LEN clock edges after start and that
// busy covers exactly that interval.
module smu_tb;
  localparam int FL = 8;
  logic clk = 0, rst_n = 0, we, start, busy, done;
  logic [2:0] waddr;
  logic [3:0] wdec;
  logic [1:0] start_state;
  logic [FL-1:0] bits;
  int checks = 0, failures = 0;
  logic [3:0] d [FL];

  smu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    we = 0; start = 0; waddr = 0; wdec = 0; start_state = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (200) begin
      bit [FL-1:0] eb;
      int st, cyc;
      for (int t = 0; t < FL; t++) begin
        @(negedge clk); we = 1; waddr = 3'(t); wdec = 4'($urandom); d[t] = wdec;
      end
      @(negedge clk); we = 0; start = 1; start_state = 2'($urandom); st = start_state;
      for (int t = FL - 1; t >= 0; t--) begin
        eb[t] = st[1];
        st = {st[0], d[t][st]};
      end
      @(posedge clk); #1 start = 0;
      cyc = 0;
      while (!done) begin
        chk(busy, "busy while tracing");
        @(posedge clk); #1 cyc++;
      end
      chk(cyc == FL, "latency FRAME_LEN edges");
      chk(bits == eb, "decoded bits");
      chk(!busy, "idle at done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
