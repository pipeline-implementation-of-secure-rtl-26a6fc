// tb_msg_conv: self-checking test of the message scheduler. Loads sixteen
// random words, then runs the 64 expansion steps, with a few stall cycles
// (shift low) mixed in, and compares W(t), seen one cycle after each step,
// with the schedule computed by the reference model. Repeats for several
// blocks to show that nothing of one block leaks into the next.
module tb_msg_conv;
  import sha1_pkg::*;

  logic  clk = 0, rst_n = 0, load = 0, shift = 0;
  word_t msg_in = '0, w;
  int    checks = 0, failures = 0;
  word_t ref_w [80];

  msg_conv dut (.clk(clk), .rst_n(rst_n), .load(load), .shift(shift),
                .msg_in(msg_in), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int blk = 0; blk < 6; blk++) begin
      for (int i = 0; i < 16; i++) ref_w[i] = (blk == 0) ? 32'(i) * 32'h01010101 : $urandom;
      for (int i = 16; i < 80; i++)
        ref_w[i] = sha1_ref_pkg::rl(ref_w[i-3] ^ ref_w[i-8] ^ ref_w[i-14] ^ ref_w[i-16], 1);
      for (int t = 0; t < 80; t++) begin
        // occasional stall cycle: the window must hold
        if (t % 23 == 5) begin
          @(negedge clk);
          shift = 0; load = 0; msg_in = $urandom;
          @(posedge clk); #1;
          if (t > 0) begin
            checks++;
            if (w !== ref_w[t-1]) begin
              failures++;
              $display("FAIL hold blk %0d t %0d: %h vs %h", blk, t, w, ref_w[t-1]);
            end
          end
        end
        @(negedge clk);
        shift = 1; load = (t < 16); msg_in = (t < 16) ? ref_w[t] : $urandom;
        @(posedge clk); #1;
        checks++;
        if (w !== ref_w[t]) begin
          failures++;
          $display("FAIL blk %0d W(%0d) = %h, expected %h", blk, t, w, ref_w[t]);
        end
      end
      @(negedge clk); shift = 0; load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
