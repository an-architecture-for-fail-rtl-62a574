// tb_lfsr_system_function: self-checking test of the replicated system function.
// The expected output comes from the bit-stream recurrence of the polynomial
// x^8 + x^6 + x^5 + x^4 + 1 (x(t) = x(t-8) ^ x(t-6) ^ x(t-5) ^ x(t-4)),
// independent of the register form. Checks: output = x(t-7) every cycle,
// hold while en is low, period exactly 255 with every non-zero state visited,
// restart by clr, and an all-zero tap mask freezing the feedback.
module tb_lfsr_system_function;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] taps = 8'hB8;
  logic [W-1:0] state;
  logic [0:0]   out;
  int checks = 0, failures = 0;

  lfsr_system_function #(.WIDTH(W), .NUM_OUT(1), .SEED(8'h01)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .taps(taps),
    .state(state), .out(out)
  );

  always #5 clk = ~clk;

  // stream history: hist[k] = x(t-k) for the current step count t
  bit hist[0:15];
  bit seen[256];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: state=%h out=%b", what, $time, state, out);
    end
  endtask

  task automatic reset_hist();
    // seed 8'h01: bit k of the register holds x(t-k) -> x(t)=1, older 0
    foreach (hist[k]) hist[k] = 0;
    hist[0] = 1;
  endtask

  function automatic bit next_bit();
    // new x(t+1) = x(t+1-8) ^ x(t+1-6) ^ x(t+1-5) ^ x(t+1-4)
    return hist[7] ^ hist[5] ^ hist[4] ^ hist[3];
  endfunction

  task automatic shift_hist();
    bit nb = next_bit();
    for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = nb;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps;
    reset_hist();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 8'h01, "seed after reset");
    check(out == hist[7], "output after reset");
    // run a full period with random holds
    steps = 0;
    while (steps < 255) begin
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        shift_hist();
        steps++;
        check(!seen[state], "state repeated inside the period");
        seen[state] = 1;
      end
      check(out == hist[7], "output matches recurrence");
    end
    check(state == 8'h01, "period is 255");
    for (int s = 1; s < 256; s++) check(seen[s], "every non-zero state visited");
    check(!seen[0], "zero state never reached");
    // hold
    en = 0;
    repeat (5) begin
      @(negedge clk);
      check(state == 8'h01, "hold while en low");
    end
    // advance a bit, then restart with clr
    en = 1;
    repeat (17) begin @(negedge clk); shift_hist(); end
    check(out == hist[7], "output before restart");
    clr = 1;
    @(negedge clk);
    clr = 0;
    reset_hist();
    check(state == 8'h01, "clr restarts at seed");
    repeat (20) begin
      @(negedge clk);
      shift_hist();
      check(out == hist[7], "output after restart");
    end
    // erased polynomial: feedback 0, register fills with zeros
    taps = '0;
    repeat (8) @(negedge clk);
    check(state == 8'h00, "no feedback with erased taps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
