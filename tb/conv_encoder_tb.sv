// Testbench for conv_encoder: random data with random stalls on both
// sides.  A reference encoder written from the equations Y0 = X(n) ^
// X(n-1) ^ X(n-2), Y1 = X(n) ^ X(n-2) and a zero tail of two bits per
// frame predicts every symbol, its source bit and the frame-end flag.  It
// also checks that the encoder takes no input during the tail and that, with
// the output always ready, a symbol follows its input bit by one cycle.
module conv_encoder_tb;
  localparam int FL = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, out_last;
  logic [1:0] out_sym;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  // Reference model state.
  bit r1, r2;           // X(n-1), X(n-2)
  int ridx;             // symbol index in frame
  bit exp_q[$];         // expected {y0,y1,x,last}
  bit [3:0] expq[$];
  int nsym = 0, stall_seen = 0, full_rate = 1;
  logic acc_prev;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // Reference: predict the next symbol whenever the encoder loads one.
  always @(posedge clk) if (rst_n) begin
    bit tail, x;
    tail = (ridx >= FL - 2);
    if (tail) chk(!in_ready, "in_ready low in tail");
    if ((!out_valid || out_ready) && (tail || in_valid)) begin
      x = tail ? 1'b0 : in_bit;
      expq.push_back({x ^ r1 ^ r2, x ^ r2, x, ridx == FL - 1});
      r2 = r1; r1 = x;
      ridx = (ridx == FL - 1) ? 0 : ridx + 1;
    end
    if (out_valid && out_ready) begin
      bit [3:0] e;
      if (expq.size() == 0) chk(0, "unexpected symbol");
      else begin
        e = expq.pop_front();
        chk({out_sym, out_bit, out_last} == e, "symbol/bit/last");
        nsym++;
      end
    end
    if (in_valid && !in_ready) stall_seen++;
  end

  // Latency: at full rate, an accepted bit shows up on the next cycle.
  always @(posedge clk) begin
    if (rst_n && full_rate && acc_prev) chk(out_valid, "one-cycle latency");
    acc_prev <= rst_n && full_rate && (in_valid && in_ready || (ridx >= FL - 2 && out_ready));
  end

  initial begin
    ridx = 0; r1 = 0; r2 = 0; acc_prev = 0;
    in_valid = 0; in_bit = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase 1: full rate.
    repeat (40) begin
      @(negedge clk); in_valid = 1; in_bit = $urandom_range(0, 1);
    end
    // Phase 2: random stalls.
    @(negedge clk); full_rate = 0;
    repeat (400) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin in_valid = $urandom_range(0, 3) != 0; in_bit = $urandom_range(0, 1); end
      out_ready = $urandom_range(0, 2) != 0;
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    chk(nsym > 200, "enough symbols");
    chk(stall_seen > 10, "stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
