// tb_mm_read_fsm: self-checking testbench of the rd_n one-shot machine.
//
// Drives the C2 control bit with random high and low periods (one cycle up
// to several), including changes right after a pulse and a reset in the
// middle of a high period. A reference model (remembers whether the current
// high period has already produced its pulse) predicts rd_n every cycle.
// Checks: rd_n is low for exactly one cycle, the cycle after C2 is first
// seen high; no pulse while C2 stays high; a new pulse only after C2 has
// been seen low; reset returns to the idle state with rd_n high.
module tb_mm_read_fsm;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic c2 = 1'b0;
  logic rd_n;

  mm_read_fsm dut (.clk, .rst_n, .c2, .rd_n);

  int checks = 0, failures = 0, pulses = 0, rises = 0;
  logic armed = 1'b1;      // model: next high C2 will fire
  logic exp_low = 1'b0;    // model: rd_n low this cycle

  // model update on the clock, compare just before the next edge
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b1;
      exp_low <= 1'b0;
    end else begin
      exp_low <= armed && c2;
      if (armed && c2) armed <= 1'b0;
      else if (!armed && !exp_low && !c2) armed <= 1'b1;
    end
  end

  always @(negedge clk) begin
    checks++;
    if (rd_n !== !exp_low) begin
      failures++;
      $display("FAIL: rd_n=%b expected %b at %0t", rd_n, !exp_low, $time);
    end
    if (!rd_n) pulses++;
  end

  initial begin
    int hi, lo;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      hi = 1 + ($urandom % 6);
      lo = 2 + ($urandom % 5);     // the host never returns faster
      c2 = 1'b1; rises++;
      repeat (hi) @(negedge clk);
      c2 = 1'b0;
      repeat (lo) @(negedge clk);
      if (i == 150) begin                // reset while C2 is high
        c2 = 1'b1; rises++;
        @(negedge clk);
        #2 rst_n = 1'b0;
        @(negedge clk);
        checks++;
        if (rd_n !== 1'b1) begin failures++; $display("FAIL: rd_n low in reset"); end
        rst_n = 1'b1;
        c2 = 1'b0;
        repeat (2) @(negedge clk);
      end
    end
    repeat (3) @(negedge clk);
    // every high period that follows a low period of two cycles or more fires once
    checks++;
    if (pulses != rises) begin
      failures++;
      $display("FAIL: %0d pulses for %0d C2 high periods", pulses, rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
