// Testbench for error_checker: frames of random bits are streamed in with
// gaps; each is later returned as a "decoded" frame with a random set of
// bits flipped, sometimes while the next frame is already being collected.
// The checker must flag exactly the flipped bits, count them, and hold
// decode_out low only for unchanged frames.
module error_checker_tb;
  localparam int FL = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_bit, in_last, dec_valid, chk_valid, decode_out;
  logic [FL-1:0] dec_bits, err_bits;
  logic [3:0] nerr;
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0;

  error_checker dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  bit [FL-1:0] sent [$];
  bit [FL-1:0] flips [$];

  initial begin
    in_valid = 0; in_bit = 0; in_last = 0; dec_valid = 0; dec_bits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      bit [FL-1:0] w, m;
      w = FL'($urandom);
      m = ($urandom_range(0, 2) == 0) ? '0 : FL'($urandom);
      for (int i = 0; i < FL; i++) begin
        @(negedge clk);
        in_valid = 1; in_bit = w[i]; in_last = (i == FL - 1);
        // Return the previous frame while this one is half collected.
        dec_valid = (i == FL / 2) && sent.size() > 0;
        if (dec_valid) begin
          bit [FL-1:0] s, x;
          s = sent.pop_front(); x = flips.pop_front();
          dec_bits = s ^ x;
          @(posedge clk); #1;
          dec_valid = 0; in_valid = 0;
          chk(chk_valid, "chk_valid");
          chk(err_bits == x, "error positions");
          chk(int'(nerr) == $countones(x), "error count");
          chk(decode_out == (x != 0), "decode_out");
          if (x == 0) n_ok++; else n_bad++;
        end
      end
      sent.push_back(w); flips.push_back(m);
      @(negedge clk); in_valid = 0; in_last = 0;
    end
    chk(n_ok > 10 && n_bad > 10, "both outcomes seen");
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
