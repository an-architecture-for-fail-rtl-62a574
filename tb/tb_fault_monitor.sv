// tb_fault_monitor: self-checking test of the compare-and-latch monitor,
// in its active-high form and its active-low dual. Random pairs of region
// outputs are applied; a reference latch says when the first mismatch was
// sampled. Checks that the enable changes right after the edge that sampled
// the mismatch (one-cycle latency), stays latched whatever follows, and is
// re-armed by clr.
module tb_fault_monitor;
  logic clk = 0, rst_n = 0, clr = 0, a = 0, b = 0;
  logic q_h, q_l;
  int checks = 0, failures = 0;
  bit tripped_ref;

  fault_monitor #(.ACTIVE_HIGH(1'b1)) dut_h (.clk(clk), .rst_n(rst_n), .clr(clr), .a(a), .b(b), .q(q_h));
  fault_monitor #(.ACTIVE_HIGH(1'b0)) dut_l (.clk(clk), .rst_n(rst_n), .clr(clr), .a(a), .b(b), .q(q_l));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: a=%b b=%b q_h=%b q_l=%b ref=%b", what, $time, a, b, q_h, q_l, tripped_ref);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int trips = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(q_h == 1'b1 && q_l == 1'b0, "reset values");
    for (int run = 0; run < 40; run++) begin
      tripped_ref = 0;
      // mostly agreeing outputs, then an occasional mismatch
      for (int c = 0; c < 30; c++) begin
        a = 1'($urandom);
        b = ($urandom_range(0, 19) == 0) ? ~a : a;
        @(posedge clk);
        if (a != b) tripped_ref = 1;
        @(negedge clk);
        check(q_h == ~tripped_ref, "active-high latch");
        check(q_l == tripped_ref, "active-low latch");
      end
      if (tripped_ref) trips++;
      clr = 1;
      a = 0; b = 1;  // a mismatch during clr must not stick
      @(negedge clk);
      clr = 0;
      a = 0; b = 0;
      check(q_h == 1'b1 && q_l == 1'b0, "clr re-arms");
    end
    // exact latency: mismatch sampled at one edge, enable low right after it
    a = 1; b = 0;
    @(posedge clk);
    #1;
    check(q_h == 1'b0 && q_l == 1'b1, "one-edge latency");
    a = 1; b = 1;
    repeat (5) @(negedge clk);
    check(q_h == 1'b0 && q_l == 1'b1, "stays latched when outputs agree again");
    check(trips > 5, "mismatches occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
